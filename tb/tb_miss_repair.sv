// tb_miss_repair: the miss-repair logic against the memory model (3-cycle latency, one Op per
// cycle). Random MultiOps of 1..8 Ops at random addresses are fetched; the collected Ops, the
// count and the time from start to done, min(8, L + 3) + 4 cycles for a MultiOp of L Ops, are
// checked. Two malformed MultiOps (first Op without header, no tail within 8 Ops) must raise
// err.
module tb_miss_repair;
  import tinker_pkg::*;
  localparam addr_t BASE = 32'h0001_0000;
  localparam int WORDS = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, err, mem_req_valid, mem_resp_valid;
  addr_t start_pc, mem_req_addr;
  op_t ops [N_FU];
  logic [3:0] count;
  op_t mem_resp_op;

  miss_repair #(.MAX_OPS(N_FU)) dut (.*);
  mem_model #(.WORDS(WORDS), .BASE(BASE), .LAT(3)) u_mem (
    .clk, .rst_n, .req_valid (mem_req_valid), .req_addr (mem_req_addr),
    .resp_valid (mem_resp_valid), .resp_op (mem_resp_op));

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // fetch the MultiOp at word w; expect L Ops and the given err
  task automatic run(int w, int L, logic exp_err);
    automatic int cyc = 0;
    @(negedge clk);
    start = 1'b1; start_pc = BASE + addr_t'(w * 8);
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check("done arrives", done);
    check("err", err == exp_err);
    check("count", int'(count) == L);
    if (!exp_err) begin
      check("latency", cyc == ((L + 3 < 8) ? L + 3 : 8) + 3);
      if (cyc != ((L + 3 < 8) ? L + 3 : 8) + 3) $display("  L=%0d took %0d", L, cyc + 1);
    end
    for (int i = 0; i < L; i++) check("op", ops[i] == u_mem.mem[w + i]);
    @(negedge clk);
    check("idle after done", !busy);
  endtask

  initial begin
    start = 0; start_pc = '0;
    for (int i = 0; i < WORDS; i++) u_mem.mem[i] = op_t'({$urandom, $urandom});
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 200; trial++) begin
      automatic int L = $urandom_range(1, 8);
      automatic int w = $urandom_range(0, WORDS - 17);
      for (int i = 0; i < L; i++) begin
        u_mem.mem[w + i].h = (i == 0);
        u_mem.mem[w + i].t = (i == L - 1);
      end
      run(w, L, 1'b0);
    end
    // no header on the first Op
    u_mem.mem[20].h = 1'b0; u_mem.mem[20].t = 1'b1;
    run(20, 1, 1'b1);
    // no tail within eight Ops
    for (int i = 0; i < 9; i++) begin u_mem.mem[40 + i].h = (i == 0); u_mem.mem[40 + i].t = 1'b0; end
    run(40, 8, 1'b1);
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
