// tb_silo_configs: the cache configurations compared in the evaluation, each run end to end
// on its own random program at a reduced cache size (1 KB or 2 KB instead of 16 KB, so that
// misses and replacements stay frequent in a short run): the six flexible-silo pairings
// int&fp, int&mem, int&br, fp&mem, fp&br and mem&br (2-way), and the rigid silo cache with
// 4 and 16 ways. Every issued MultiOp is checked; see ifetch_harness.
module tb_silo_configs;
  import tinker_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 8;
  logic [N-1:0] d;
  int c [N], f [N];
  int checks, failures;

  ifetch_harness #(.CACHE_BYTES(1024), .ASSOC(2),  .SHARE(4'b0011), .N_ISSUE(500), .SEED(21)) h0 (.clk, .rst_n, .done(d[0]), .checks(c[0]), .failures(f[0]));
  ifetch_harness #(.CACHE_BYTES(1024), .ASSOC(2),  .SHARE(4'b0101), .N_ISSUE(500), .SEED(22)) h1 (.clk, .rst_n, .done(d[1]), .checks(c[1]), .failures(f[1]));
  ifetch_harness #(.CACHE_BYTES(1024), .ASSOC(2),  .SHARE(4'b1001), .N_ISSUE(500), .SEED(23)) h2 (.clk, .rst_n, .done(d[2]), .checks(c[2]), .failures(f[2]));
  ifetch_harness #(.CACHE_BYTES(1024), .ASSOC(2),  .SHARE(4'b0110), .N_ISSUE(500), .SEED(24)) h3 (.clk, .rst_n, .done(d[3]), .checks(c[3]), .failures(f[3]));
  ifetch_harness #(.CACHE_BYTES(1024), .ASSOC(2),  .SHARE(4'b1010), .N_ISSUE(500), .SEED(25)) h4 (.clk, .rst_n, .done(d[4]), .checks(c[4]), .failures(f[4]));
  ifetch_harness #(.CACHE_BYTES(1024), .ASSOC(2),  .SHARE(4'b1100), .N_ISSUE(500), .SEED(26)) h5 (.clk, .rst_n, .done(d[5]), .checks(c[5]), .failures(f[5]));
  ifetch_harness #(.CACHE_BYTES(2048), .ASSOC(4),  .SHARE(4'b0000), .N_ISSUE(500), .SEED(27)) h6 (.clk, .rst_n, .done(d[6]), .checks(c[6]), .failures(f[6]));
  ifetch_harness #(.CACHE_BYTES(2048), .ASSOC(16), .SHARE(4'b0000), .N_MOPS(120), .N_ISSUE(1500), .SEED(28)) h7 (.clk, .rst_n, .done(d[7]), .checks(c[7]), .failures(f[7]));

  task automatic finish_all();
    int ec, ef;
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("-- int&fp");        h0.report(ec, ef); checks += ec; failures += ef;
    $display("-- int&mem");       h1.report(ec, ef); checks += ec; failures += ef;
    $display("-- int&br");        h2.report(ec, ef); checks += ec; failures += ef;
    $display("-- fp&mem");        h3.report(ec, ef); checks += ec; failures += ef;
    $display("-- fp&br");         h4.report(ec, ef); checks += ec; failures += ef;
    $display("-- mem&br");        h5.report(ec, ef); checks += ec; failures += ef;
    $display("-- rigid 4-way");   h6.report(ec, ef); checks += ec; failures += ef;
    $display("-- rigid 16-way");  h7.report(ec, ef); checks += ec; failures += ef;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&d);
    @(posedge clk);
    finish_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    finish_all();
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
