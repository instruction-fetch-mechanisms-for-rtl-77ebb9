// hit_expander: the small hit-path expander of the flexible silo cache, one pipeline stage.
//
// A flexible silo holds the Ops of several FUTypes (the set SHARE) in compressed order, each
// with its FUType. On a hit this stage routes every Op read from the flexible silo to a
// functional-unit slot: the k-th Op of FUType t found in the flexible silo (in column order)
// goes to the k-th FU slot of type t. Ops from private silos go straight to the FU slot of
// their silo. The result is registered, so the stage adds one cycle to the fetch pipeline and
// one cycle to the branch misprediction penalty; flush kills the Op bundle entering the stage.
//
// Interface: in_valid/in_pc/in_len with the per-silo hit flags, Ops and FUTypes; one cycle
// later out_valid/out_pc/out_len with per-FU-slot valid flags and Ops. A separate hit-path
// expander stage behind the flexible silo follows the document; the in-order routing rule is
// this design's.
module hit_expander
  import tinker_pkg::*;
#(
  parameter logic [3:0]  SHARE    = 4'b0011,
  parameter int unsigned LEN_BITS = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush,
  input  logic                in_valid,
  input  addr_t               in_pc,
  input  logic [LEN_BITS-1:0] in_len,
  input  logic [N_FU-1:0]     in_hit,
  input  silo_op_t            in_op  [N_FU],
  input  fut_e                in_fut [N_FU],
  output logic                out_valid,
  output addr_t               out_pc,
  output logic [LEN_BITS-1:0] out_len,
  output logic [N_FU-1:0]     fu_valid,
  output silo_op_t            fu_op  [N_FU]
);

  logic [N_FU-1:0] fv_c;
  silo_op_t        fop_c [N_FU];

  always_comb begin
    for (int f = 0; f < N_FU; f++) begin
      fv_c[f]  = 1'b0;
      fop_c[f] = '0;
      if (!SHARE[FU_TYPE[f]]) begin
        fv_c[f]  = in_hit[f];
        fop_c[f] = in_op[f];
      end else begin
        for (int c = 0; c < N_FU; c++) begin
          automatic int unsigned r = 0;
          for (int k = 0; k < N_FU; k++)
            if (k < c && SHARE[FU_TYPE[k]] && in_hit[k] && in_fut[k] == FU_TYPE[f]) r++;
          if (SHARE[FU_TYPE[c]] && in_hit[c] && in_fut[c] == FU_TYPE[f] &&
              r == rank_in_type(f)) begin
            fv_c[f]  = 1'b1;
            fop_c[f] = in_op[c];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && !flush;
  end
  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_pc   <= in_pc;
      out_len  <= in_len;
      fu_valid <= fv_c;
      fu_op    <= fop_c;
    end
  end

endmodule
