// tb_silo_ifetch: end-to-end test of the fetch unit at reduced cache sizes. Three
// configurations run side by side on their own random programs: a direct-mapped rigid silo
// cache, a 2-way rigid one and a 2-way (I F)(M)(B) flexible silo cache, each 512 bytes so that
// misses, displacements and LRU replacements are frequent. See ifetch_harness for the checks.
module tb_silo_ifetch;
  import tinker_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int   c0, c1, c2, f0, f1, f2;
  int   checks, failures;

  ifetch_harness #(.CACHE_BYTES(512), .ASSOC(1), .SHARE(4'b0000), .N_MOPS(40), .N_ISSUE(600), .SEED(7))
    h0 (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  ifetch_harness #(.CACHE_BYTES(512), .ASSOC(2), .SHARE(4'b0000), .N_MOPS(40), .N_ISSUE(600), .SEED(11))
    h1 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  ifetch_harness #(.CACHE_BYTES(512), .ASSOC(2), .SHARE(4'b0011), .N_MOPS(40), .N_ISSUE(600), .SEED(13))
    h2 (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));

  task automatic finish_all();
    int ec, ef;
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("-- direct-mapped rigid");  h0.report(ec, ef); checks += ec; failures += ef;
    $display("-- 2-way rigid");          h1.report(ec, ef); checks += ec; failures += ef;
    $display("-- 2-way flexible (I F)"); h2.report(ec, ef); checks += ec; failures += ef;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    @(posedge clk);
    finish_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    finish_all();
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
