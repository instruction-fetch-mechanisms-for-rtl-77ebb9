// mem_model: behavioural model of the next memory level seen by the instruction fetch unit.
// A pipelined interface with a fixed latency (LAT cycles, 3 by default) and a bandwidth of one
// Op per cycle: a request accepted in cycle c is answered in cycle c + LAT, in order. The
// contents are an array of Ops starting at byte address BASE, filled by the testbench through
// hierarchical writes to mem; addresses outside the array read as a one-Op
// integer MultiOp (header and tail set, all else zero).
module mem_model
  import tinker_pkg::*;
#(
  parameter int unsigned WORDS = 1024,
  parameter addr_t       BASE  = 32'h8000_0000,
  parameter int unsigned LAT   = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid,
  input  addr_t req_addr,
  output logic  resp_valid,
  output op_t   resp_op
);
  op_t   mem [WORDS];
  logic  v_q [LAT];
  addr_t a_q [LAT];
  int unsigned reqs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) v_q[i] <= 1'b0;
      reqs <= 0;
    end else begin
      v_q[0] <= req_valid;
      a_q[0] <= req_addr;
      for (int i = 1; i < LAT; i++) begin
        v_q[i] <= v_q[i-1];
        a_q[i] <= a_q[i-1];
      end
      if (req_valid) reqs <= reqs + 1;
    end
  end

  always_comb begin
    automatic addr_t off = a_q[LAT-1] - BASE;
    resp_valid = v_q[LAT-1];
    resp_op    = '0;
    resp_op.h  = 1'b1;
    resp_op.t  = 1'b1;
    if ((off >> 3) < WORDS) resp_op = mem[off >> 3];
  end
endmodule
