// tb_miss_expander: the miss-path expander in the rigid configuration and in the (I F)(M)(B)
// flexible configuration, driven with the same random MultiOps (per-type limits 3 I, 2 F,
// 2 M, 1 B, random order). Rigid: silo c must hold the k-th Op of its FUType, k being the
// silo's position among the silos of that type. Flexible: silos 0-4 hold the integer and FP
// Ops in MultiOp order, the others as in the rigid case. The length field and the two-cycle
// latency are checked. Overflow: four integer Ops overflow the rigid silos but fit the
// flexible silo; six integer/FP Ops overflow both.
module tb_miss_expander;
  import tinker_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid;
  op_t in_ops [N_FU];
  logic [3:0] in_count;
  addr_t in_pc;
  logic ov_r, ov_f, err_r, err_f;
  addr_t pc_r, pc_f;
  logic [2:0] len_r, len_f;
  logic [N_FU-1:0] cv_r, cv_f;
  silo_op_t cop_r [N_FU], cop_f [N_FU];
  fut_e cfut_r [N_FU], cfut_f [N_FU];

  miss_expander #(.SHARE(4'b0000)) u_r (.clk, .rst_n, .in_valid, .in_ops, .in_count, .in_pc,
    .out_valid (ov_r), .out_pc (pc_r), .out_len (len_r), .col_valid (cv_r), .col_op (cop_r),
    .col_fut (cfut_r), .err (err_r));
  miss_expander #(.SHARE(4'b0011)) u_f (.clk, .rst_n, .in_valid, .in_ops, .in_count, .in_pc,
    .out_valid (ov_f), .out_pc (pc_f), .out_len (len_f), .col_valid (cv_f), .col_op (cop_f),
    .col_fut (cfut_f), .err (err_f));

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(int n, fut_e ts [N_FU], logic xerr_r, logic xerr_f);
    automatic logic [N_FU-1:0] er = '0, ef = '0;
    automatic silo_op_t eo_r [N_FU], eo_f [N_FU];
    automatic int cnt [4] = '{0, 0, 0, 0};
    automatic int shared = 0;
    @(negedge clk);
    in_valid = 1'b1; in_count = 4'(n); in_pc = {$urandom} & ~32'h7;
    for (int i = 0; i < N_FU; i++) begin
      in_ops[i] = op_t'({$urandom, $urandom});
      in_ops[i].fut = ts[i];
      in_ops[i].h = (i == 0);
      in_ops[i].t = (i == n - 1);
    end
    // reference placement
    for (int i = 0; i < n; i++) begin
      automatic int t = int'(ts[i]);
      for (int c = 0; c < N_FU; c++)
        if (FU_TYPE[c] == ts[i] && rank_in_type(c) == cnt[t]) begin
          er[c] = 1'b1; eo_r[c] = strip_op(in_ops[i]);
        end
      cnt[t]++;
      if (t <= 1) begin
        if (shared < 5) begin ef[shared] = 1'b1; eo_f[shared] = strip_op(in_ops[i]); end
        shared++;
      end else
        for (int c = 5; c < N_FU; c++)
          if (FU_TYPE[c] == ts[i] && rank_in_type(c) == cnt[t] - 1) begin
            ef[c] = 1'b1; eo_f[c] = strip_op(in_ops[i]);
          end
    end
    @(negedge clk);
    in_valid = 1'b0;
    check("not ready after one cycle", !ov_r && !ov_f);
    @(negedge clk);
    check("out_valid after two cycles", ov_r && ov_f);
    check("pc", pc_r == in_pc && pc_f == in_pc);
    check("len", int'(len_r) == n - 1 && int'(len_f) == n - 1);
    check("rigid placement", cv_r == er);
    check("flexible placement", cv_f == ef);
    check("err rigid", err_r == xerr_r);
    check("err flexible", err_f == xerr_f);
    for (int c = 0; c < N_FU; c++) begin
      if (er[c]) check("rigid op", cop_r[c] == eo_r[c]);
      if (ef[c]) begin
        check("flexible op", cop_f[c] == eo_f[c]);
      end
    end
    for (int c = 0; c < 5; c++)
      if (ef[c]) begin
        automatic int k = 0;
        for (int i = 0; i < n; i++)
          if (int'(ts[i]) <= 1) begin
            if (k == c) check("flexible FUT", cfut_f[c] == ts[i]);
            k++;
          end
      end
    @(negedge clk);
    check("single pulse", !ov_r && !ov_f);
  endtask

  initial begin
    in_valid = 0; in_count = 0; in_pc = 0;
    for (int i = 0; i < N_FU; i++) in_ops[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 300; trial++) begin
      automatic int lim [4] = '{3, 2, 2, 1};
      automatic fut_e ts [N_FU];
      automatic int n = $urandom_range(1, 8);
      automatic int k = 0;
      for (int i = 0; i < N_FU; i++) ts[i] = FUT_INT;
      while (k < n) begin
        automatic int t = $urandom_range(0, 3);
        if (lim[t] > 0) begin lim[t]--; ts[k] = fut_e'(t); k++; end
      end
      send(n, ts, 1'b0, 1'b0);
    end
    begin
      automatic fut_e ts [N_FU] = '{FUT_INT, FUT_MEM, FUT_INT, FUT_INT, FUT_INT, FUT_FP, FUT_BR, FUT_INT};
      send(6, ts, 1'b1, 1'b0);      // 4 I + 1 F: too many for rigid, fits the flexible silo
      ts = '{FUT_INT, FUT_FP, FUT_INT, FUT_FP, FUT_INT, FUT_INT, FUT_BR, FUT_INT};
      send(6, ts, 1'b1, 1'b1);      // 4 I + 2 F: overflows both
    end
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
