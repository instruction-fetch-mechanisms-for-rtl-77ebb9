// miss_expander: the two-stage miss-path expander of the silo cache.
//
// It takes a complete MultiOp from the miss-repair logic (Ops in memory order) and routes each
// Op to the silo that will hold it, computing the length field in parallel.
//   Stage 1 ranks every Op: for an Op whose FUType has private silos, its position among the
//           Ops of the same FUType in the MultiOp; for an Op whose FUType goes to the shared
//           (flexible) silo, its position among all Ops of the shared FUTypes.
//   Stage 2 gives silo c the Op whose rank matches it: in a private silo of FUType t, the Op of
//           type t whose rank equals the silo's position among the type-t silos; in the
//           flexible silo, the shared Op whose rank equals the column's position inside the
//           flexible silo (Ops sit there in compressed order, by their offset).
// SHARE is the set of FUTypes that share one flexible silo, one bit per FUType code; 0 (or a
// single bit) gives the rigid silo cache, 4'b0011 the (I F)(M)(B) flexible silo cache.
// An Op for which no silo is left sets err and is not placed.
//
// Interface: in_valid with in_ops/in_count/in_pc for one cycle; two cycles later out_valid
// pulses with one Op (or none) per silo, the FUType of each, and the length field (count - 1).
// The two-cycle latency and routing by FUType follow the document; the ranking rule is this
// design's.
module miss_expander
  import tinker_pkg::*;
#(
  parameter logic [3:0]  SHARE    = 4'b0000,
  parameter int unsigned LEN_BITS = 3,
  localparam int unsigned CNTW    = $clog2(N_FU + 1),
  localparam int unsigned RANKW   = $clog2(N_FU)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  op_t             in_ops [N_FU],
  input  logic [CNTW-1:0] in_count,
  input  addr_t           in_pc,
  output logic            out_valid,
  output addr_t           out_pc,
  output logic [LEN_BITS-1:0] out_len,
  output logic [N_FU-1:0] col_valid,
  output silo_op_t        col_op  [N_FU],
  output fut_e            col_fut [N_FU],
  output logic            err
);

  // ---- stage 1: ranking ----
  logic [RANKW-1:0] rank_c [N_FU];
  logic [N_FU-1:0]  shared_c, live_c;
  always_comb begin
    for (int i = 0; i < N_FU; i++) begin
      live_c[i]   = i < int'(in_count);
      shared_c[i] = SHARE[in_ops[i].fut];
      rank_c[i]   = '0;
      for (int j = 0; j < N_FU; j++)
        if (j < i && j < int'(in_count)) begin
          if (shared_c[i] && SHARE[in_ops[j].fut]) rank_c[i] = rank_c[i] + 1'b1;
          else if (!shared_c[i] && in_ops[j].fut == in_ops[i].fut) rank_c[i] = rank_c[i] + 1'b1;
        end
    end
  end

  logic             s1_valid;
  op_t              s1_ops   [N_FU];
  logic [RANKW-1:0] s1_rank  [N_FU];
  logic [N_FU-1:0]  s1_shared, s1_live;
  logic [CNTW-1:0]  s1_count;
  addr_t            s1_pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    if (in_valid) begin
      s1_ops    <= in_ops;
      s1_rank   <= rank_c;
      s1_shared <= shared_c;
      s1_live   <= live_c;
      s1_count  <= in_count;
      s1_pc     <= in_pc;
    end
  end

  // ---- stage 2: silo assignment ----
  logic [N_FU-1:0] cv_c, placed_c;
  silo_op_t        cop_c  [N_FU];
  fut_e            cfut_c [N_FU];
  always_comb begin
    placed_c = '0;
    for (int c = 0; c < N_FU; c++) begin
      automatic logic          c_shared = SHARE[FU_TYPE[c]];
      automatic int unsigned   c_pos    = 0;
      if (c_shared) begin
        for (int k = 0; k < N_FU; k++)
          if (k < c && SHARE[FU_TYPE[k]]) c_pos++;
      end else begin
        c_pos = rank_in_type(c);
      end
      cv_c[c]   = 1'b0;
      cop_c[c]  = '0;
      cfut_c[c] = FU_TYPE[c];
      for (int i = 0; i < N_FU; i++)
        if (s1_live[i] && s1_shared[i] == c_shared && int'(s1_rank[i]) == c_pos &&
            (c_shared || s1_ops[i].fut == FU_TYPE[c])) begin
          cv_c[c]     = 1'b1;
          cop_c[c]    = strip_op(s1_ops[i]);
          cfut_c[c]   = s1_ops[i].fut;
          placed_c[i] = 1'b1;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end
  always_ff @(posedge clk) begin
    if (s1_valid) begin
      col_valid <= cv_c;
      col_op    <= cop_c;
      col_fut   <= cfut_c;
      out_len   <= LEN_BITS'(s1_count - 1'b1);
      out_pc    <= s1_pc;
      err       <= (s1_live & ~placed_c) != '0;
    end
  end

endmodule
