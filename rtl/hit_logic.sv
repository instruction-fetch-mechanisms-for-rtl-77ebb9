// hit_logic: tag compare, valid select and NextPC computation for the silo cache.
//
// All silos are read at the same index; this block compares, in parallel, the tag of every way
// of every silo with the tag of the fetch address. A silo entry belongs to the requested
// MultiOp when its Op-valid bit and its length-valid bit are set and its tag matches. The fetch
// hits when at least one entry belongs to it (all Ops of one MultiOp carry the same tag and
// length). The Ops of the matching ways are passed on per silo, with a per-silo valid flag.
// NextPC is the fetch address plus the MultiOp length in bytes: the length field holds the Op
// count minus one and an Op is eight bytes.
//
// Purely combinational. The hit rule (tag match and a valid length) and NextPC = PC + length
// follow the silo cache as published; the length encoding is this design's.
module hit_logic
  import tinker_pkg::*;
#(
  parameter int unsigned N_COL    = N_FU,
  parameter int unsigned WAYS     = 1,
  parameter int unsigned TAG_BITS = 21,
  parameter int unsigned LEN_BITS = 3,
  localparam int unsigned WAYW    = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  addr_t               pc,
  input  logic [TAG_BITS-1:0] pc_tag,
  input  logic [WAYS-1:0]     rd_valid     [N_COL],
  input  logic [WAYS-1:0]     rd_len_valid [N_COL],
  input  logic [LEN_BITS-1:0] rd_len       [N_COL][WAYS],
  input  logic [TAG_BITS-1:0] rd_tag       [N_COL][WAYS],
  input  silo_op_t            rd_op        [N_COL][WAYS],
  input  fut_e                rd_fut       [N_COL][WAYS],
  output logic                hit,
  output logic [N_COL-1:0]    col_hit,
  output logic [WAYW-1:0]     col_way      [N_COL],
  output silo_op_t            col_op       [N_COL],
  output fut_e                col_fut      [N_COL],
  output logic [LEN_BITS-1:0] len,
  output addr_t               next_pc
);

  always_comb begin
    hit = 1'b0;
    len = '0;
    for (int c = 0; c < N_COL; c++) begin
      col_hit[c] = 1'b0;
      col_way[c] = '0;
      col_op[c]  = '0;
      col_fut[c] = FUT_INT;
      for (int w = 0; w < WAYS; w++)
        if (rd_valid[c][w] && rd_len_valid[c][w] && rd_tag[c][w] == pc_tag) begin
          col_hit[c] = 1'b1;
          col_way[c] = WAYW'(w);
          col_op[c]  = rd_op[c][w];
          col_fut[c] = rd_fut[c][w];
          len        = rd_len[c][w];
        end
      hit = hit | col_hit[c];
    end
    next_pc = pc + (addr_t'(len) + addr_t'(1)) * addr_t'(OP_BYTES);
  end

endmodule
