// silo_ifetch: instruction fetch unit for a TINKER-8 VLIW machine built around a silo cache.
//
// Programs use a compressed encoding: a MultiOp is 1 to 8 consecutive 64-bit Ops, delimited by
// header and tail bits, with no NOPs. The cache is split into eight silos, one per functional
// unit slot; every silo entry holds one Op with its own tag and length field. A MultiOp is
// placed by offset-reduced addressing: its start address, in Ops, gives the index (the same in
// every silo) and the bits above the index form the tag, so consecutive short MultiOps never
// share a cache index and several MultiOps with the same index can coexist in different silos.
//
// Fetch pipeline (one MultiOp per cycle on hits):
//   F1  block fetch: all silos are read at the index of the fetch address, the tags of all
//       ways of all silos are compared, the Ops of the MultiOp are selected and
//       NextPC = PC + 8 * length is fed back as the next fetch address.
//   F2  the latched MultiOp is issued, one Op per FU slot (rigid silo cache); with a flexible
//       silo (SHARE naming two or more FUTypes) a hit-path expander stage F3 follows.
// Miss: the fetch stops, miss_repair fetches the MultiOp Op by Op from memory, the two-stage
// miss_expander routes its Ops to their silos and computes the length, and in one cycle every
// silo that receives an Op is written (LRU victim within the set). The tags displaced by that
// write are broadcast to all silos, which clear the length-valid bit of every entry carrying
// one of them, so a partly displaced MultiOp misses next time. Then the fetch retries.
// Branches: redirect_valid/redirect_pc, driven by the execution pipeline, restart the fetch at
// redirect_pc in the same cycle and kill the MultiOps already fetched; this costs one cycle in
// the rigid configuration and two with the hit-path expander. A redirect that arrives during
// miss repair is held and taken once the fill is done.
//
// Parameters: CACHE_BYTES of Op storage (16 KB), ASSOC ways per silo, SHARE the FUTypes that
// share one flexible silo (4'b0000 rigid, 4'b0011 gives the (I F)(M)(B) flexible silo cache).
// The silo organisation, hit rule, NextPC, LRU, displaced-MultiOp invalidation, the two-cycle
// miss-path expander and the 1/2-cycle misprediction penalties follow the document; the
// pipeline boundaries, the interfaces and the reset behaviour are this design's choices.
// The outputs ev_* pulse once per event and exist for monitoring.
module silo_ifetch
  import tinker_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned ASSOC       = 1,
  parameter logic [3:0]  SHARE       = 4'b0000,
  localparam int unsigned ENTRIES    = CACHE_BYTES / OP_BYTES / N_FU,
  localparam int unsigned SETS       = ENTRIES / ASSOC,
  localparam int unsigned IDXW       = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TAG_BITS   = ADDR_BITS - 3 - IDXW,
  localparam int unsigned LEN_BITS   = $clog2(N_FU),
  localparam int unsigned WAYW       = (ASSOC > 1) ? $clog2(ASSOC) : 1,
  localparam int unsigned CNTW       = $clog2(N_FU + 1),
  localparam bit          FLEX       = $countones(SHARE) > 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  addr_t               reset_pc,
  // control transfer from the execution pipeline
  input  logic                redirect_valid,
  input  addr_t               redirect_pc,
  // next memory level
  output logic                mem_req_valid,
  output addr_t               mem_req_addr,
  input  logic                mem_resp_valid,
  input  op_t                 mem_resp_op,
  // issue to the functional units
  output logic                issue_valid,
  output addr_t               issue_pc,
  output logic [LEN_BITS-1:0] issue_len,
  output logic [N_FU-1:0]     fu_valid,
  output silo_op_t            fu_op [N_FU],
  // monitoring
  output logic                ev_hit,
  output logic                ev_miss,
  output logic                ev_fill,
  output logic                ev_displace,
  output logic                ev_squash,
  output logic                ev_err
);

  typedef enum logic [1:0] {S_FETCH, S_MISS, S_EXPAND} state_e;

  // The index must have at least one bit: at least two sets per silo.
  if (SETS < 2) begin : g_bad_size
    $error("silo_ifetch: CACHE_BYTES / (64 * ASSOC) must be at least 2");
  end

  function automatic logic [IDXW-1:0] idx_of(addr_t a);
    return a[3 +: IDXW];
  endfunction
  function automatic logic [TAG_BITS-1:0] tag_of(addr_t a);
    return a[ADDR_BITS-1 -: TAG_BITS];
  endfunction

  state_e state_q;
  addr_t  pc_q, miss_pc_q, pend_pc_q;
  logic   pend_q;

  // ---------------- silos ----------------
  logic [ASSOC-1:0]    rd_valid     [N_FU];
  logic [ASSOC-1:0]    rd_len_valid [N_FU];
  logic [LEN_BITS-1:0] rd_len       [N_FU][ASSOC];
  logic [TAG_BITS-1:0] rd_tag       [N_FU][ASSOC];
  silo_op_t            rd_op        [N_FU][ASSOC];
  fut_e                rd_fut       [N_FU][ASSOC];
  logic [N_FU-1:0]     touch_en, wr_en, victim_valid;
  logic [TAG_BITS-1:0] victim_tag   [N_FU];

  addr_t               fetch_pc;
  logic                hit;
  logic [N_FU-1:0]     col_hit;
  logic [WAYW-1:0]     col_way [N_FU];
  silo_op_t            col_op  [N_FU];
  fut_e                col_fut [N_FU];
  logic [LEN_BITS-1:0] hit_len;
  addr_t               next_pc;

  // miss path
  logic            mr_start, mr_busy, mr_done, mr_err;
  op_t             mr_ops [N_FU];
  logic [CNTW-1:0] mr_count;
  logic            ex_valid, ex_err;
  addr_t           ex_pc;
  logic [LEN_BITS-1:0] ex_len;
  logic [N_FU-1:0] ex_col_valid;
  silo_op_t        ex_col_op  [N_FU];
  fut_e            ex_col_fut [N_FU];

  for (genvar c = 0; c < N_FU; c++) begin : g_silo
    silo #(
      .SETS(SETS), .WAYS(ASSOC), .TAG_BITS(TAG_BITS), .LEN_BITS(LEN_BITS),
      .N_INV(N_FU), .STORE_FUT(SHARE[FU_TYPE[c]] && FLEX)
    ) u_silo (
      .clk, .rst_n,
      .rd_set       (idx_of(fetch_pc)),
      .rd_valid     (rd_valid[c]),
      .rd_len_valid (rd_len_valid[c]),
      .rd_len       (rd_len[c]),
      .rd_tag       (rd_tag[c]),
      .rd_op        (rd_op[c]),
      .rd_fut       (rd_fut[c]),
      .touch_en     (touch_en[c]),
      .touch_way    (col_way[c]),
      .wr_en        (wr_en[c]),
      .wr_set       (idx_of(ex_pc)),
      .wr_tag       (tag_of(ex_pc)),
      .wr_len       (ex_len),
      .wr_op        (ex_col_op[c]),
      .wr_fut       (ex_col_fut[c]),
      .victim_valid (victim_valid[c]),
      .victim_tag   (victim_tag[c]),
      .inv_en       (ex_valid),
      .inv_valid    (victim_valid),
      .inv_tag      (victim_tag)
    );
  end

  // ---------------- F1: block fetch, tag compare, NextPC ----------------
  assign fetch_pc = redirect_valid ? redirect_pc : pc_q;

  hit_logic #(.N_COL(N_FU), .WAYS(ASSOC), .TAG_BITS(TAG_BITS), .LEN_BITS(LEN_BITS)) u_hit (
    .pc (fetch_pc), .pc_tag (tag_of(fetch_pc)),
    .rd_valid, .rd_len_valid, .rd_len, .rd_tag, .rd_op, .rd_fut,
    .hit, .col_hit, .col_way, .col_op, .col_fut, .len (hit_len), .next_pc
  );

  logic f1_hit, f1_miss;
  assign f1_hit   = state_q == S_FETCH && hit;
  assign f1_miss  = state_q == S_FETCH && !hit;
  assign touch_en = f1_hit ? col_hit : '0;
  assign mr_start = f1_miss;

  // F1/F2 latch
  logic                l1_valid;
  addr_t               l1_pc;
  logic [LEN_BITS-1:0] l1_len;
  logic [N_FU-1:0]     l1_hit;
  silo_op_t            l1_op  [N_FU];
  fut_e                l1_fut [N_FU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) l1_valid <= 1'b0;
    else        l1_valid <= f1_hit;
  end
  always_ff @(posedge clk) begin
    if (f1_hit) begin
      l1_pc  <= fetch_pc;
      l1_len <= hit_len;
      l1_hit <= col_hit;
      l1_op  <= col_op;
      l1_fut <= col_fut;
    end
  end

  // ---------------- fetch control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_FETCH;
      pc_q      <= reset_pc;
      miss_pc_q <= reset_pc;
      pend_q    <= 1'b0;
      pend_pc_q <= reset_pc;
    end else begin
      unique case (state_q)
        S_FETCH: begin
          if (hit) pc_q <= next_pc;
          else begin
            miss_pc_q <= fetch_pc;
            state_q   <= S_MISS;
          end
        end
        S_MISS, S_EXPAND: begin
          if (state_q == S_MISS && mr_done) state_q <= S_EXPAND;
          if (ex_valid) begin
            state_q <= S_FETCH;
            pc_q    <= redirect_valid ? redirect_pc : (pend_q ? pend_pc_q : miss_pc_q);
            pend_q  <= 1'b0;
          end else if (redirect_valid) begin
            pend_q    <= 1'b1;
            pend_pc_q <= redirect_pc;
          end
        end
        default: state_q <= S_FETCH;
      endcase
    end
  end

  // ---------------- miss path ----------------
  miss_repair #(.MAX_OPS(N_FU)) u_repair (
    .clk, .rst_n,
    .start (mr_start), .start_pc (fetch_pc),
    .busy (mr_busy), .done (mr_done), .err (mr_err), .ops (mr_ops), .count (mr_count),
    .mem_req_valid, .mem_req_addr, .mem_resp_valid, .mem_resp_op
  );

  miss_expander #(.SHARE(SHARE), .LEN_BITS(LEN_BITS)) u_mexp (
    .clk, .rst_n,
    .in_valid (mr_done), .in_ops (mr_ops), .in_count (mr_count), .in_pc (miss_pc_q),
    .out_valid (ex_valid), .out_pc (ex_pc), .out_len (ex_len),
    .col_valid (ex_col_valid), .col_op (ex_col_op), .col_fut (ex_col_fut), .err (ex_err)
  );

  assign wr_en = ex_valid ? ex_col_valid : '0;

  // ---------------- issue ----------------
  logic out_valid_raw;
  if (FLEX) begin : g_flex
    logic o_valid;
    hit_expander #(.SHARE(SHARE), .LEN_BITS(LEN_BITS)) u_hexp (
      .clk, .rst_n, .flush (redirect_valid),
      .in_valid (l1_valid), .in_pc (l1_pc), .in_len (l1_len),
      .in_hit (l1_hit), .in_op (l1_op), .in_fut (l1_fut),
      .out_valid (o_valid), .out_pc (issue_pc), .out_len (issue_len),
      .fu_valid, .fu_op
    );
    assign out_valid_raw = o_valid;
  end else begin : g_rigid
    assign out_valid_raw = l1_valid;
    assign issue_pc      = l1_pc;
    assign issue_len     = l1_len;
    assign fu_valid      = l1_hit;
    assign fu_op         = l1_op;
  end

  assign issue_valid = out_valid_raw && !redirect_valid;

  // ---------------- monitoring ----------------
  logic mr_err_seen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mr_err_seen <= 1'b0;
    else        mr_err_seen <= mr_done && mr_err;
  end
  assign ev_hit      = f1_hit;
  assign ev_miss     = f1_miss;
  assign ev_fill     = ex_valid;
  assign ev_displace = ex_valid && (victim_valid != '0);
  assign ev_squash   = redirect_valid && (out_valid_raw || (FLEX && l1_valid));
  assign ev_err      = mr_err_seen || (ex_valid && ex_err);

  // A miss repair only starts when the previous one has finished.
  assert property (@(posedge clk) disable iff (!rst_n) mr_start |-> !mr_busy);

  // All Ops of a hitting MultiOp are present: one silo hit per Op of its length.
  assert property (@(posedge clk) disable iff (!rst_n)
                   f1_hit |-> $countones(col_hit) == int'(hit_len) + 1);

endmodule
