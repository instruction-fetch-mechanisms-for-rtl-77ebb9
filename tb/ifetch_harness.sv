// ifetch_harness: end-to-end test environment for silo_ifetch.
//
// It builds a random TINKER-8 program in a memory model (3-cycle latency, one Op per cycle),
// runs the fetch unit on it and plays the part of the execution pipeline: every issued
// MultiOp is compared, Op by Op and FU slot by FU slot, with the program, and a MultiOp whose
// branch Op says "taken" is followed, one cycle after its issue, by a redirect to its target.
// Program rules: MultiOp k has 1..8 Ops, at most 3 integer, 2 FP, 2 memory and 1 branch, in
// random order, header bit on the first Op and tail bit on the last. A branch Op carries in
// enc[15:1] the index of its target MultiOp and in enc[0] whether a forward branch is taken.
// A backward branch (a loop) is taken on three visits out of four, so every loop ends. The
// last MultiOp always branches back to MultiOp 0.
// The k-th Op of FUType t must appear on the k-th FU slot of type t. Checked timing: after a
// redirect whose target hits, the target issues PEN cycles later (1 rigid, 2 flexible); a
// MultiOp of L Ops that misses issues min(8, L + 3) + 7 + PEN cycles after the miss.
// Counted mechanisms (each must happen at least once): hit, miss, fill, displacement
// invalidation, miss caused by a cleared length-valid bit, two MultiOps coexisting at one
// index, redirect squash, redirect held during a miss, LRU replacement (ASSOC > 1) and
// flexible-silo routing (SHARE naming two FUTypes).
// FULL selects an instance of the fetch unit with its default parameters.
module ifetch_harness
  import tinker_pkg::*;
#(
  parameter bit          FULL        = 1'b0,
  parameter int unsigned CACHE_BYTES = 512,
  parameter int unsigned ASSOC       = 1,
  parameter logic [3:0]  SHARE       = 4'b0000,
  parameter int unsigned N_MOPS      = 40,
  parameter int unsigned N_ISSUE     = 400,
  parameter int unsigned SEED        = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam addr_t       BASE = 32'h8000_0000;
  localparam int unsigned PEN  = ($countones(SHARE) > 1) ? 2 : 1;
  localparam int unsigned MAXW = N_MOPS * N_FU;

  logic                redirect_valid;
  addr_t               redirect_pc;
  logic                mem_req_valid, mem_resp_valid;
  addr_t               mem_req_addr;
  op_t                 mem_resp_op;
  logic                issue_valid;
  addr_t               issue_pc;
  logic [2:0]          issue_len;
  logic [N_FU-1:0]     fu_valid;
  silo_op_t            fu_op [N_FU];
  logic ev_hit, ev_miss, ev_fill, ev_displace, ev_squash, ev_err;

  if (FULL) begin : g_full
    silo_ifetch dut (
      .clk, .rst_n, .reset_pc (BASE), .redirect_valid, .redirect_pc,
      .mem_req_valid, .mem_req_addr, .mem_resp_valid, .mem_resp_op,
      .issue_valid, .issue_pc, .issue_len, .fu_valid, .fu_op,
      .ev_hit, .ev_miss, .ev_fill, .ev_displace, .ev_squash, .ev_err);
  end else begin : g_dut
    silo_ifetch #(.CACHE_BYTES(CACHE_BYTES), .ASSOC(ASSOC), .SHARE(SHARE)) dut (
      .clk, .rst_n, .reset_pc (BASE), .redirect_valid, .redirect_pc,
      .mem_req_valid, .mem_req_addr, .mem_resp_valid, .mem_resp_op,
      .issue_valid, .issue_pc, .issue_len, .fu_valid, .fu_op,
      .ev_hit, .ev_miss, .ev_fill, .ev_displace, .ev_squash, .ev_err);
  end

  mem_model #(.WORDS(MAXW), .BASE(BASE), .LAT(3)) u_mem (
    .clk, .rst_n, .req_valid (mem_req_valid), .req_addr (mem_req_addr),
    .resp_valid (mem_resp_valid), .resp_op (mem_resp_op));

  // ---------------- program ----------------
  int unsigned mop_word [N_MOPS];   // word offset of each MultiOp
  int unsigned mop_len  [N_MOPS];
  int unsigned seed_s;

  function automatic int unsigned rnd(int unsigned n);
    seed_s = seed_s * 32'd1103515245 + 32'd12345;
    return (seed_s >> 8) % n;
  endfunction

  initial begin
    automatic int unsigned w = 0;
    seed_s = SEED;
    for (int k = 0; k < N_MOPS; k++) begin
      automatic int unsigned lim [4] = '{3, 2, 2, 1};
      automatic int unsigned n = 1 + rnd(N_FU);
      automatic fut_e ts [N_FU];
      automatic int unsigned cnt = 0;
      // pick FUTypes, honouring the per-type limits
      while (cnt < n) begin
        automatic int unsigned t = rnd(4);
        if (k == N_MOPS - 1 && cnt == 0) t = 3;   // last MultiOp holds a branch
        if (lim[t] > 0) begin
          lim[t]--;
          ts[cnt] = fut_e'(t);
          cnt++;
        end else if (lim[0] + lim[1] + lim[2] + lim[3] == 0) break;
      end
      mop_word[k] = w;
      mop_len[k]  = cnt;
      for (int i = 0; i < int'(cnt); i++) begin
        automatic op_t op;
        op.h     = (i == 0);
        op.t     = (i == int'(cnt) - 1);
        op.sp    = rnd(2) == 1;
        op.pause = 5'(rnd(32));
        op.fut   = ts[i];
        op.enc   = {15'(rnd(32768)), 16'(rnd(65536)), 16'(k * 16 + i)};
        op.pred  = 7'(rnd(128));
        if (ts[i] == FUT_BR) begin
          automatic int unsigned sel = rnd(4);
          automatic int unsigned tgt = rnd(N_MOPS);               // far jump
          if (sel < 2) tgt = (k >= 3) ? k - rnd(3) : k;          // short loop
          else if (sel == 2) tgt = (k + 1 + rnd(3)) % N_MOPS;    // forward skip
          op.enc[15:1] = 15'(tgt);
          op.enc[0]    = (k == N_MOPS - 1) || (rnd(3) != 0);
          if (k == N_MOPS - 1) op.enc[15:1] = '0;
        end
        u_mem.mem[w] = op;
        w++;
      end
    end
    // wrong-path fetches beyond the program find one-Op integer MultiOps
    while (w < MAXW) begin
      automatic op_t pad = '0;
      pad.h = 1'b1;
      pad.t = 1'b1;
      u_mem.mem[w] = pad;
      w++;
    end
  end

  // ---------------- execution-side checker ----------------
  int unsigned exp_k, issued, cyc, last_redirect_cyc;
  int unsigned n_hit, n_miss, n_fill, n_disp, n_lvmiss, n_coexist, n_squash, n_pend, n_lru;
  int unsigned n_flexroute, n_penalty, n_b2b;
  logic        redir_pending;
  addr_t       redir_target;
  logic        redir_target_hit;
  int unsigned last_issue_cyc;
  int unsigned visits [N_MOPS];
  // miss-to-issue latency: F1 miss at cycle miss_cyc for miss_pc, no redirect until its issue
  logic        lat_armed;
  addr_t       lat_pc, o_fpc;
  int unsigned lat_cyc, n_lat;

  function automatic addr_t pc_of(int unsigned k);
    return BASE + addr_t'(mop_word[k] * OP_BYTES);
  endfunction

  // expected Op for FU slot f of MultiOp k, or valid=0
  function automatic logic exp_fu(int unsigned k, int unsigned f, output silo_op_t o);
    automatic int unsigned r = 0;
    o = '0;
    for (int i = 0; i < int'(mop_len[k]); i++) begin
      automatic op_t op = u_mem.mem[mop_word[k] + i];
      if (op.fut == FU_TYPE[f]) begin
        if (r == rank_in_type(f)) begin
          o = strip_op(op);
          return 1'b1;
        end
        r++;
      end
    end
    return 1'b0;
  endfunction

  assign redirect_valid = redir_pending;
  assign redirect_pc    = redir_target;

  // internal observation for the mechanism counters
  logic              o_hit, o_fetch, o_miss;
  logic [N_FU-1:0]   o_col_hit, o_other, o_stale;
  int unsigned       o_state;
  if (FULL) begin : g_obs_full
    always_comb begin
      o_hit = g_full.dut.hit; o_col_hit = g_full.dut.col_hit; o_state = g_full.dut.state_q;
      for (int c = 0; c < N_FU; c++) begin
        o_other[c] = g_full.dut.rd_valid[c][0] && g_full.dut.rd_len_valid[c][0] && !o_col_hit[c];
        o_stale[c] = g_full.dut.rd_valid[c][0] && !g_full.dut.rd_len_valid[c][0] &&
                     g_full.dut.rd_tag[c][0] == g_full.dut.fetch_pc[31 -: $bits(g_full.dut.rd_tag[c][0])];
      end
    end
  end else begin : g_obs
    always_comb begin
      o_hit = g_dut.dut.hit; o_col_hit = g_dut.dut.col_hit; o_state = g_dut.dut.state_q;
      for (int c = 0; c < N_FU; c++) begin
        o_other[c] = 1'b0;
        o_stale[c] = 1'b0;
        for (int w = 0; w < int'(ASSOC); w++) begin
          if (g_dut.dut.rd_valid[c][w] && g_dut.dut.rd_len_valid[c][w] &&
              g_dut.dut.rd_tag[c][w] != g_dut.dut.fetch_pc[31 -: $bits(g_dut.dut.rd_tag[c][w])])
            o_other[c] = 1'b1;
          if (g_dut.dut.rd_valid[c][w] && !g_dut.dut.rd_len_valid[c][w] &&
              g_dut.dut.rd_tag[c][w] == g_dut.dut.fetch_pc[31 -: $bits(g_dut.dut.rd_tag[c][w])])
            o_stale[c] = 1'b1;
        end
      end
    end
  end
  if (FULL) begin : g_fpc_full
    assign o_fpc = g_full.dut.fetch_pc;
  end else begin : g_fpc
    assign o_fpc = g_dut.dut.fetch_pc;
  end
  assign o_fetch = o_state == 0;
  assign o_miss  = o_fetch && !o_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp_k <= 0; issued <= 0; cyc <= 0; done <= 1'b0;
      for (int k = 0; k < N_MOPS; k++) visits[k] <= 0;
      checks <= 0; failures <= 0;
      redir_pending <= 1'b0; redir_target <= '0; redir_target_hit <= 1'b0;
      last_redirect_cyc <= 0; last_issue_cyc <= 0;
      n_hit <= 0; n_miss <= 0; n_fill <= 0; n_disp <= 0; n_lvmiss <= 0; n_coexist <= 0;
      n_squash <= 0; n_pend <= 0; n_lru <= 0; n_flexroute <= 0; n_penalty <= 0; n_b2b <= 0;
    end else if (!done) begin
      automatic int ch = 0, fl = 0;
      cyc <= cyc + 1;
      if (ev_hit) n_hit <= n_hit + 1;
      if (ev_miss) n_miss <= n_miss + 1;
      if (ev_fill) n_fill <= n_fill + 1;
      if (ev_displace) n_disp <= n_disp + 1;
      if (ev_squash) n_squash <= n_squash + 1;
      if (o_miss && o_stale != '0) n_lvmiss <= n_lvmiss + 1;
      if (ev_hit && o_other != '0) n_coexist <= n_coexist + 1;
      if (redirect_valid && !o_fetch) n_pend <= n_pend + 1;
      if (ASSOC > 1 && ev_displace) n_lru <= n_lru + 1;
      if (o_miss && !redirect_valid && !lat_armed) begin
        lat_armed <= 1'b1; lat_pc <= o_fpc; lat_cyc <= cyc;
      end
      if (redirect_valid) lat_armed <= 1'b0;
      if (ev_err) begin ch++; fl++; $display("FAIL: fetch unit reported a malformed MultiOp"); end
      // a redirect lasts one cycle
      if (redir_pending) begin
        redir_pending    <= 1'b0;
        redir_target_hit <= o_fetch && o_hit;
        last_redirect_cyc <= cyc;
      end
      if (issue_valid) begin
        automatic logic br_taken = 1'b0;
        automatic int unsigned tgt = 0;
        ch++;
        if (issue_pc != pc_of(exp_k) || int'(issue_len) + 1 != int'(mop_len[exp_k])) begin
          fl++;
          $display("FAIL: issue %0d pc %h len %0d, expected MultiOp %0d pc %h len %0d",
                   issued, issue_pc, issue_len + 1, exp_k, pc_of(exp_k), mop_len[exp_k]);
        end
        for (int f = 0; f < N_FU; f++) begin
          automatic silo_op_t eo;
          automatic logic ev = exp_fu(exp_k, f, eo);
          ch++;
          if (fu_valid[f] != ev || (ev && fu_op[f] != eo)) begin
            fl++;
            $display("FAIL: MultiOp %0d FU %0d valid %b op %h, expected %b %h",
                     exp_k, f, fu_valid[f], fu_op[f], ev, eo);
          end
          if (ev && SHARE[FU_TYPE[f]] && $countones(SHARE) > 1 && FU_TYPE[f] != FUT_INT &&
              fu_valid[f]) n_flexroute <= n_flexroute + 1;
        end
        // misprediction penalty: target issue after a redirect that hit in F1
        if (redir_target_hit && last_issue_cyc < last_redirect_cyc) begin
          ch++;
          n_penalty <= n_penalty + 1;
          if (cyc - last_redirect_cyc != PEN) begin
            fl++;
            $display("FAIL: redirect to issue took %0d cycles, expected %0d",
                     cyc - last_redirect_cyc, PEN);
          end
        end
        if (last_issue_cyc + 1 == cyc && issued > 0) n_b2b <= n_b2b + 1;
        // a MultiOp of L Ops that missed issues min(8, L+3) + 8 + (PEN-1) cycles after the miss
        if (lat_armed && !redirect_valid && issue_pc == lat_pc) begin
          automatic int unsigned L = mop_len[exp_k];
          automatic int unsigned want = ((L + 3 < 8) ? L + 3 : 8) + 8 + PEN - 1;
          lat_armed <= 1'b0;
          n_lat <= n_lat + 1;
          ch++;
          if (cyc - lat_cyc != want) begin
            fl++;
            $display("FAIL: miss to issue took %0d cycles for %0d Ops, expected %0d",
                     cyc - lat_cyc, L, want);
          end
        end
        last_issue_cyc <= cyc;
        for (int i = 0; i < int'(mop_len[exp_k]); i++) begin
          automatic op_t op = u_mem.mem[mop_word[exp_k] + i];
          if (op.fut == FUT_BR) begin
            tgt = int'(op.enc[15:1]);
            if (exp_k == N_MOPS - 1) br_taken = 1'b1;
            else if (tgt <= exp_k)   br_taken = (visits[exp_k] % 4) != 3;
            else                     br_taken = op.enc[0];
          end
        end
        if (br_taken) begin
          exp_k         <= tgt;
          redir_pending <= 1'b1;
          redir_target  <= pc_of(tgt);
        end else begin
          exp_k <= (exp_k + 1) % N_MOPS;
        end
        visits[exp_k] <= visits[exp_k] + 1;
        issued <= issued + 1;
        if (issued + 1 == N_ISSUE) done <= 1'b1;
      end
      checks   <= checks + ch;
      failures <= failures + fl;
    end
  end

  // report which mechanisms were exercised; each that never happened counts a failure
  task automatic report(output int extra_checks, output int extra_fail);
    extra_checks = 0;
    extra_fail   = 0;
    $display("mechanisms: hit=%0d miss=%0d fill=%0d displace=%0d lenvalid_miss=%0d coexist=%0d",
             n_hit, n_miss, n_fill, n_disp, n_lvmiss, n_coexist);
    $display("            squash=%0d redirect_in_miss=%0d lru=%0d flex_route=%0d penalty_checks=%0d back_to_back=%0d miss_latency_checks=%0d cycles=%0d",
             n_squash, n_pend, n_lru, n_flexroute, n_penalty, n_b2b, n_lat, cyc);
    extra_checks = 11;
    if (n_hit == 0)     begin extra_fail++; $display("FAIL: no hit");  end
    if (n_miss == 0)    begin extra_fail++; $display("FAIL: no miss"); end
    if (n_fill == 0)    begin extra_fail++; $display("FAIL: no fill"); end
    if (n_disp == 0)    begin extra_fail++; $display("FAIL: no displacement"); end
    if (n_lvmiss == 0 && !FULL) begin extra_fail++; $display("FAIL: no length-valid miss"); end
    if (n_coexist == 0) begin extra_fail++; $display("FAIL: no coexisting MultiOps"); end
    if (n_squash == 0)  begin extra_fail++; $display("FAIL: no squash"); end
    if (n_pend == 0)    begin extra_fail++; $display("FAIL: no redirect during a miss"); end
    if (n_penalty == 0) begin extra_fail++; $display("FAIL: no penalty measurement"); end
    if (n_b2b == 0)     begin extra_fail++; $display("FAIL: no back-to-back issue"); end
    if (n_lat == 0)     begin extra_fail++; $display("FAIL: no miss latency measured"); end
    if (ASSOC > 1) begin
      extra_checks++;
      if (n_lru == 0) begin extra_fail++; $display("FAIL: no LRU replacement"); end
    end
    if ($countones(SHARE) > 1) begin
      extra_checks++;
      if (n_flexroute == 0) begin extra_fail++; $display("FAIL: no flexible-silo routing"); end
    end
  endtask
endmodule
