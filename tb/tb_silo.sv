// tb_silo: random test of one silo (4 sets, 2 ways, 8-bit tags) against a behavioural
// reference that keeps a last-use time per way. Each cycle it either records a hit (touch),
// fills an Op (sometimes with a tag already in the set), or only invalidates tags, and then
// compares every way of a random set, plus the reported victim, with the reference.
module tb_silo;
  import tinker_pkg::*;
  localparam int SETS = 4, WAYS = 2, TB = 8, LB = 3, NI = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] rd_set, wr_set;
  logic [WAYS-1:0] rd_valid, rd_len_valid;
  logic [LB-1:0] rd_len [WAYS];
  logic [TB-1:0] rd_tag [WAYS];
  silo_op_t rd_op [WAYS];
  fut_e rd_fut [WAYS];
  logic touch_en, wr_en, victim_valid, inv_en;
  logic [0:0] touch_way;
  logic [TB-1:0] wr_tag, victim_tag;
  logic [LB-1:0] wr_len;
  silo_op_t wr_op;
  fut_e wr_fut;
  logic [NI-1:0] inv_valid;
  logic [TB-1:0] inv_tag [NI];

  silo #(.SETS(SETS), .WAYS(WAYS), .TAG_BITS(TB), .LEN_BITS(LB), .N_INV(NI), .STORE_FUT(1'b1)) dut (.*);

  // reference
  logic          m_v [SETS][WAYS], m_lv [SETS][WAYS];
  logic [TB-1:0] m_tag [SETS][WAYS];
  logic [LB-1:0] m_len [SETS][WAYS];
  silo_op_t      m_op [SETS][WAYS];
  fut_e          m_fut [SETS][WAYS];
  int            m_ts [SETS][WAYS];
  int checks = 0, failures = 0, now = 0, n_lru = 0, n_match = 0, n_inv = 0;

  function automatic int ref_way(int s, logic [TB-1:0] t, output logic victim);
    victim = 1'b0;
    for (int w = 0; w < WAYS; w++) if (m_v[s][w] && m_tag[s][w] == t) return w;
    for (int w = 0; w < WAYS; w++) if (!m_v[s][w]) return w;
    begin
      automatic int best = 0;
      for (int w = 1; w < WAYS; w++) if (m_ts[s][w] < m_ts[s][best]) best = w;
      victim = 1'b1;
      return best;
    end
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at step %0d", what, now); end
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      m_v[s][w] = 0; m_lv[s][w] = 0; m_ts[s][w] = WAYS - 1 - w;
    end
    touch_en = 0; wr_en = 0; inv_en = 0; rd_set = 0; wr_set = 0; touch_way = 0;
    wr_tag = 0; wr_len = 0; wr_op = '0; wr_fut = FUT_INT; inv_valid = 0;
    inv_tag[0] = 0; inv_tag[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < 3000; step++) begin
      automatic int kind = $urandom_range(0, 9);
      automatic int ws, rw;
      automatic logic vic;
      now = step + 10;
      @(negedge clk);
      touch_en = 0; wr_en = 0; inv_en = 0; inv_valid = 0;
      rd_set = 2'($urandom_range(0, SETS - 1));
      wr_set = 2'($urandom_range(0, SETS - 1));
      wr_tag = TB'($urandom_range(0, 5));
      wr_len = LB'($urandom);
      wr_op  = silo_op_t'({$urandom, $urandom});
      wr_fut = fut_e'($urandom_range(0, 3));
      for (int i = 0; i < NI; i++) begin
        inv_valid[i] = $urandom_range(0, 1);
        inv_tag[i]   = TB'($urandom_range(0, 5));
      end
      ws = int'(wr_set);
      if (kind < 3) begin
        // touch a valid way of rd_set, if there is one
        for (int w = 0; w < WAYS; w++)
          if (m_v[rd_set][w] && $urandom_range(0, 1) == 1) begin
            touch_en = 1; touch_way = 1'(w);
          end
      end else if (kind < 8) begin
        wr_en = 1; inv_en = 1;
      end else begin
        inv_en = 1;
      end
      #1;
      // compare the read port
      for (int w = 0; w < WAYS; w++) begin
        check("rd_valid", rd_valid[w] == m_v[rd_set][w]);
        if (m_v[rd_set][w]) begin
          check("rd_len_valid", rd_len_valid[w] == m_lv[rd_set][w]);
          check("rd_tag", rd_tag[w] == m_tag[rd_set][w]);
          check("rd_len", rd_len[w] == m_len[rd_set][w]);
          check("rd_op",  rd_op[w] == m_op[rd_set][w]);
          check("rd_fut", rd_fut[w] == m_fut[rd_set][w]);
        end
      end
      rw = -1;
      vic = 0;
      if (wr_en) begin
        rw = ref_way(ws, wr_tag, vic);
        check("victim_valid", victim_valid == vic);
        if (vic) begin
          n_lru++;
          check("victim_tag", victim_tag == m_tag[ws][rw]);
        end
        if (m_v[ws][rw] && m_tag[ws][rw] == wr_tag) n_match++;
      end
      // update the reference as the clock edge will
      if (inv_en)
        for (int w = 0; w < WAYS; w++)
          for (int i = 0; i < NI; i++)
            if (inv_valid[i] && m_v[ws][w] && m_tag[ws][w] == inv_tag[i] && w != rw) begin
              if (m_lv[ws][w]) n_inv++;
              m_lv[ws][w] = 0;
            end
      if (wr_en) begin
        m_v[ws][rw] = 1; m_lv[ws][rw] = 1; m_tag[ws][rw] = wr_tag; m_len[ws][rw] = wr_len;
        m_op[ws][rw] = wr_op; m_fut[ws][rw] = wr_fut; m_ts[ws][rw] = now;
      end else if (touch_en) begin
        m_ts[rd_set][touch_way] = now;
      end
    end
    $display("victims=%0d same-tag refills=%0d invalidations=%0d", n_lru, n_match, n_inv);
    check("LRU replacement exercised", n_lru > 0);
    check("invalidation exercised", n_inv > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
