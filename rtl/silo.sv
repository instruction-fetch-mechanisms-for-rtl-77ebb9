// silo: one partition of the silo cache. Every entry holds one Op together with its own tag,
// a length field (length-valid bit plus the MultiOp length) and an Op-valid bit, so several
// MultiOps that share a cache index can live side by side in different silos.
//
// Organisation: SETS sets of WAYS ways. The read port is combinational (the "block fetch"
// access of the fetch pipeline): it returns every way of set rd_set. A hit on way touch_way
// makes it the most recently used; replacement is LRU, kept as one age counter per way
// (0 = most recent, WAYS-1 = least recent).
//
// Fill: when wr_en is high the Op on wr_* is written into set wr_set. The way chosen is, in
// order of preference, a way already holding wr_tag, an empty way, the LRU way. If the chosen
// way held a different valid Op its tag is put out on victim_valid/victim_tag in the same cycle.
// The enclosing cache gathers these tags from all silos and hands them back on inv_valid/inv_tag
// with inv_en: at the clock edge every entry of set wr_set whose tag equals one of them loses
// its length-valid bit, so the next fetch of a partly displaced MultiOp misses. Clearing
// length-valid bits of a displaced MultiOp and LRU replacement follow the silo cache as
// published; the preference order for the victim and the age-counter LRU are this design's.
//
// STORE_FUT keeps the FUType of each Op, which only a flexible silo needs. With WAYS = 1 there
// is no LRU state and touch_en/touch_way are left unused.
// Timing: reads are combinational, writes, LRU updates and invalidations take effect at the
// rising clock edge. Reset clears all valid bits.
module silo
  import tinker_pkg::*;
#(
  parameter int unsigned SETS      = 256,
  parameter int unsigned WAYS      = 1,
  parameter int unsigned TAG_BITS  = 21,
  parameter int unsigned LEN_BITS  = 3,
  parameter int unsigned N_INV     = N_FU,
  parameter bit          STORE_FUT = 1'b0,
  localparam int unsigned IDXW     = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAYW     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // read port
  input  logic [IDXW-1:0]     rd_set,
  output logic [WAYS-1:0]     rd_valid,
  output logic [WAYS-1:0]     rd_len_valid,
  output logic [LEN_BITS-1:0] rd_len   [WAYS],
  output logic [TAG_BITS-1:0] rd_tag   [WAYS],
  output silo_op_t            rd_op    [WAYS],
  output fut_e                rd_fut   [WAYS],
  // LRU update on a hit
  input  logic                touch_en,
  input  logic [WAYW-1:0]     touch_way,
  // fill port
  input  logic                wr_en,
  input  logic [IDXW-1:0]     wr_set,
  input  logic [TAG_BITS-1:0] wr_tag,
  input  logic [LEN_BITS-1:0] wr_len,
  input  silo_op_t            wr_op,
  input  fut_e                wr_fut,
  output logic                victim_valid,
  output logic [TAG_BITS-1:0] victim_tag,
  // invalidation of displaced MultiOps, applied to set wr_set
  input  logic                inv_en,
  input  logic [N_INV-1:0]    inv_valid,
  input  logic [TAG_BITS-1:0] inv_tag  [N_INV]
);

  logic                v_q   [SETS][WAYS];
  logic                lv_q  [SETS][WAYS];
  logic [TAG_BITS-1:0] tag_q [SETS][WAYS];
  logic [LEN_BITS-1:0] len_q [SETS][WAYS];
  silo_op_t            op_q  [SETS][WAYS];
  fut_e                fut_q [SETS][WAYS];

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      rd_valid[w]     = v_q[rd_set][w];
      rd_len_valid[w] = lv_q[rd_set][w];
      rd_len[w]       = len_q[rd_set][w];
      rd_tag[w]       = tag_q[rd_set][w];
      rd_op[w]        = op_q[rd_set][w];
      rd_fut[w]       = STORE_FUT ? fut_q[rd_set][w] : FUT_INT;
    end
  end

  // Way selection for a fill.
  logic [WAYW-1:0] wr_way, lru_way;
  logic            found_match, found_free;
  always_comb begin
    wr_way      = '0;
    found_match = 1'b0;
    found_free  = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (!found_match && v_q[wr_set][w] && tag_q[wr_set][w] == wr_tag) begin
        found_match = 1'b1;
        wr_way      = WAYW'(w);
      end
    if (!found_match)
      for (int w = 0; w < WAYS; w++)
        if (!found_free && !v_q[wr_set][w]) begin
          found_free = 1'b1;
          wr_way     = WAYW'(w);
        end
    if (!found_match && !found_free) wr_way = lru_way;
    victim_valid = wr_en && !found_match && !found_free;
    victim_tag   = tag_q[wr_set][wr_way];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          v_q[s][w]   <= 1'b0;
          lv_q[s][w]  <= 1'b0;
        end
    end else begin
      if (inv_en)
        for (int w = 0; w < WAYS; w++)
          for (int i = 0; i < N_INV; i++)
            if (inv_valid[i] && v_q[wr_set][w] && tag_q[wr_set][w] == inv_tag[i])
              lv_q[wr_set][w] <= 1'b0;
      if (wr_en) begin
        v_q[wr_set][wr_way]  <= 1'b1;
        lv_q[wr_set][wr_way] <= 1'b1;
      end
    end
  end

  // LRU state: one age counter per way, only when there is more than one way.
  if (WAYS > 1) begin : g_lru
    logic [WAYW-1:0] age_q [SETS][WAYS];
    // Which way, if any, has its age refreshed this cycle.
    logic            upd_en;
    logic [IDXW-1:0] upd_set;
    logic [WAYW-1:0] upd_way;
    always_comb begin
      upd_en  = wr_en || touch_en;
      upd_set = wr_en ? wr_set : rd_set;
      upd_way = wr_en ? wr_way : touch_way;
    end
    always_comb begin
      lru_way = '0;
      for (int w = 0; w < WAYS; w++)
        if (age_q[wr_set][w] == WAYW'(WAYS - 1)) lru_way = WAYW'(w);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < WAYS; w++) age_q[s][w] <= WAYW'(w);
      end else if (upd_en) begin
        for (int w = 0; w < WAYS; w++)
          if (WAYW'(w) == upd_way) age_q[upd_set][w] <= '0;
          else if (age_q[upd_set][w] < age_q[upd_set][upd_way])
            age_q[upd_set][w] <= age_q[upd_set][w] + 1'b1;
      end
    end
  end else begin : g_dm
    assign lru_way = '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_q[wr_set][wr_way] <= wr_tag;
      len_q[wr_set][wr_way] <= wr_len;
      op_q[wr_set][wr_way]  <= wr_op;
      fut_q[wr_set][wr_way] <= wr_fut;
    end
  end

endmodule
