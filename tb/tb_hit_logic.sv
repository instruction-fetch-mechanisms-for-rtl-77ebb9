// tb_hit_logic: random test of the tag compare / valid select / NextPC logic (8 silos, 2 ways,
// 8-bit tags). Each trial plants a MultiOp of random length L in L random silos (random way,
// matching tag, valid length) or plants none, fills all other entries with non-matching,
// empty or length-invalid entries, and checks hit, the silo hit vector, the selected Ops,
// the length and NextPC = PC + 8 * L.
module tb_hit_logic;
  import tinker_pkg::*;
  localparam int NC = 8, W = 2, TB = 8, LB = 3;
  addr_t pc;
  logic [TB-1:0] pc_tag;
  logic [W-1:0] rd_valid [NC], rd_len_valid [NC];
  logic [LB-1:0] rd_len [NC][W];
  logic [TB-1:0] rd_tag [NC][W];
  silo_op_t rd_op [NC][W];
  fut_e rd_fut [NC][W];
  logic hit;
  logic [NC-1:0] col_hit;
  logic [0:0] col_way [NC];
  silo_op_t col_op [NC];
  fut_e col_fut [NC];
  logic [LB-1:0] len;
  addr_t next_pc;

  hit_logic #(.N_COL(NC), .WAYS(W), .TAG_BITS(TB), .LEN_BITS(LB)) dut (.*);

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (pc %h)", what, pc); end
  endtask

  initial begin
    for (int trial = 0; trial < 2000; trial++) begin
      automatic int L = $urandom_range(1, 8);
      automatic logic plant = $urandom_range(0, 3) != 0;
      automatic logic [NC-1:0] want = '0;
      automatic int wway [NC];
      automatic int placed = 0;
      pc     = {$urandom} & ~32'h7;
      pc_tag = TB'($urandom);
      for (int c = 0; c < NC; c++)
        for (int w = 0; w < W; w++) begin
          automatic int k = $urandom_range(0, 2);
          rd_op[c][w]  = silo_op_t'({$urandom, $urandom});
          rd_fut[c][w] = fut_e'($urandom_range(0, 3));
          rd_len[c][w] = LB'($urandom);
          rd_tag[c][w] = (k == 0) ? pc_tag + TB'($urandom_range(1, 255)) : pc_tag;
          rd_valid[c][w]     = (k == 0) ? 1'($urandom) : (k == 1) ? 1'b0 : 1'b1;
          rd_len_valid[c][w] = (k == 0) ? 1'($urandom) : (k == 1) ? 1'($urandom) : 1'b0;
        end
      if (plant)
        while (placed < L) begin
          automatic int c = $urandom_range(0, NC - 1);
          if (!want[c]) begin
            want[c] = 1'b1;
            wway[c] = $urandom_range(0, W - 1);
            rd_valid[c][wway[c]] = 1'b1;
            rd_len_valid[c][wway[c]] = 1'b1;
            rd_tag[c][wway[c]] = pc_tag;
            rd_len[c][wway[c]] = LB'(L - 1);
            placed++;
          end
        end
      #1;
      check("hit", hit == plant);
      check("col_hit", col_hit == want);
      if (plant) begin
        n_hit++;
        check("len", int'(len) == L - 1);
        check("next_pc", next_pc == pc + addr_t'(8 * L));
        for (int c = 0; c < NC; c++)
          if (want[c]) begin
            check("col_way", int'(col_way[c]) == wway[c]);
            check("col_op", col_op[c] == rd_op[c][wway[c]]);
            check("col_fut", col_fut[c] == rd_fut[c][wway[c]]);
          end
      end else n_miss++;
    end
    check("both hits and misses seen", n_hit > 0 && n_miss > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
