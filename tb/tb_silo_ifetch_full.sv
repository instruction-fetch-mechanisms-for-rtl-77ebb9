// tb_silo_ifetch_full: the fetch unit at its default size (16 KB rigid, direct-mapped silo
// cache for TINKER-8) running a random program of 600 MultiOps, larger than the cache, until
// 30000 MultiOps have issued. Every issued MultiOp is checked against the program; see
// ifetch_harness for the program rules, the checks and the mechanism counters.
module tb_silo_ifetch_full;
  import tinker_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d;
  int   c, f, checks, failures;

  ifetch_harness #(.FULL(1'b1), .N_MOPS(600), .N_ISSUE(30000), .SEED(3))
    h (.clk, .rst_n, .done(d), .checks(c), .failures(f));

  task automatic finish_all();
    int ec, ef;
    h.report(ec, ef);
    checks   = c + ec;
    failures = f + ef;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d);
    @(posedge clk);
    finish_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    finish_all();
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
