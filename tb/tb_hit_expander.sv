// tb_hit_expander: the hit-path expander of the (I F)(M)(B) flexible silo cache. Random
// MultiOps are laid out as the miss-path expander stores them: integer and FP Ops packed in
// MultiOp order into silos 0-4 with their FUTypes, memory and branch Ops in their own silos.
// One cycle later the k-th integer Op must be on FU slot k, the k-th FP Op on slot 3 + k, and
// memory and branch Ops on their silo's slot. A flush must kill the bundle.
module tb_hit_expander;
  import tinker_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic flush, in_valid, out_valid;
  addr_t in_pc, out_pc;
  logic [2:0] in_len, out_len;
  logic [N_FU-1:0] in_hit, fu_valid;
  silo_op_t in_op [N_FU], fu_op [N_FU];
  fut_e in_fut [N_FU];

  hit_expander #(.SHARE(4'b0011)) dut (.*);

  int checks = 0, failures = 0, n_flush = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    flush = 0; in_valid = 0; in_pc = 0; in_len = 0; in_hit = 0;
    for (int c = 0; c < N_FU; c++) begin in_op[c] = '0; in_fut[c] = FUT_INT; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 500; trial++) begin
      automatic int lim [4] = '{3, 2, 2, 1};
      automatic int n = $urandom_range(1, 8);
      automatic int k = 0, sh = 0;
      automatic int cnt [4] = '{0, 0, 0, 0};
      automatic logic [N_FU-1:0] ev = '0;
      automatic silo_op_t eo [N_FU];
      automatic logic fl = $urandom_range(0, 7) == 0;
      @(negedge clk);
      in_hit = '0;
      for (int c = 0; c < N_FU; c++) begin
        in_op[c]  = silo_op_t'({$urandom, $urandom});
        in_fut[c] = fut_e'($urandom_range(0, 3));
      end
      while (k < n) begin
        automatic int t = $urandom_range(0, 3);
        if (lim[t] > 0) begin
          automatic silo_op_t o = silo_op_t'({$urandom, $urandom});
          automatic int col = (t <= 1) ? sh : ((t == 2) ? 5 + cnt[2] : 7);
          automatic int fu  = (t == 0) ? cnt[0] : (t == 1) ? 3 + cnt[1] : col;
          lim[t]--;
          in_hit[col] = 1'b1; in_op[col] = o; in_fut[col] = fut_e'(t);
          ev[fu] = 1'b1; eo[fu] = o;
          if (t <= 1) sh++;
          cnt[t]++;
          k++;
        end
      end
      in_valid = 1'b1; in_pc = {$urandom} & ~32'h7; in_len = 3'(n - 1); flush = fl;
      @(negedge clk);
      in_valid = 1'b0; flush = 1'b0;
      check("out_valid", out_valid == !fl);
      if (fl) n_flush++;
      else begin
        check("pc/len", out_pc == in_pc && out_len == 3'(n - 1));
        check("fu_valid", fu_valid == ev);
        for (int f = 0; f < N_FU; f++) if (ev[f]) check("fu_op", fu_op[f] == eo[f]);
      end
    end
    check("flush exercised", n_flush > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
