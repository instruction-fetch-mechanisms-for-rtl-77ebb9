// miss_repair: the miss-repair logic between the silo cache and the next level of memory.
//
// On start it fetches the MultiOp that begins at start_pc, one Op per request, from a pipelined
// memory interface that accepts one request per cycle and returns responses in order after a
// fixed latency. The length of a missing MultiOp is not known, so requests go out back to back
// for consecutive Op addresses until the Op carrying the tail bit comes back (or N_FU Ops, the
// largest MultiOp, have been requested). Responses that arrive after the tail are the
// over-fetch of the pipelined interface and are dropped. When the tail has been seen and no
// request is left outstanding, done pulses for one cycle; ops[0..count-1] then hold the
// MultiOp until the next start. err reports a MultiOp whose first Op lacks the header bit or
// that has no tail bit within N_FU Ops.
//
// A pipelined interface with one Op per cycle follows the document; the request/response
// handshake (no back-pressure, in-order responses) and the drain before done are this design's.
module miss_repair
  import tinker_pkg::*;
#(
  parameter int unsigned MAX_OPS = N_FU,
  localparam int unsigned CNTW   = $clog2(MAX_OPS + 1),
  localparam int unsigned OUTW   = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  addr_t          start_pc,
  output logic           busy,
  output logic           done,
  output logic           err,
  output op_t            ops [MAX_OPS],
  output logic [CNTW-1:0] count,
  // memory side
  output logic           mem_req_valid,
  output addr_t          mem_req_addr,
  input  logic           mem_resp_valid,
  input  op_t            mem_resp_op
);

  addr_t           base_q;
  logic [CNTW-1:0] issued_q, recv_q;
  logic [OUTW-1:0] outst_q;
  logic            tail_q, busy_q, err_q;

  assign busy  = busy_q;
  assign count = recv_q;
  assign err   = err_q;

  always_comb begin
    mem_req_valid = busy_q && !tail_q && issued_q < CNTW'(MAX_OPS);
    mem_req_addr  = base_q + addr_t'(issued_q) * addr_t'(OP_BYTES);
  end

  logic            take;
  logic [OUTW-1:0] outst_n;
  always_comb begin
    take    = busy_q && mem_resp_valid && !tail_q;
    outst_n = outst_q + OUTW'(mem_req_valid) - OUTW'(busy_q && mem_resp_valid);
    done    = busy_q && tail_q && outst_q == '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      tail_q   <= 1'b0;
      err_q    <= 1'b0;
      issued_q <= '0;
      recv_q   <= '0;
      outst_q  <= '0;
      base_q   <= '0;
    end else if (start && !busy_q) begin
      busy_q   <= 1'b1;
      tail_q   <= 1'b0;
      err_q    <= 1'b0;
      issued_q <= '0;
      recv_q   <= '0;
      outst_q  <= '0;
      base_q   <= start_pc;
    end else if (busy_q) begin
      if (done) busy_q <= 1'b0;
      if (mem_req_valid) issued_q <= issued_q + 1'b1;
      outst_q <= outst_n;
      if (take) begin
        recv_q <= recv_q + 1'b1;
        if (mem_resp_op.t || recv_q == CNTW'(MAX_OPS - 1)) tail_q <= 1'b1;
        if ((recv_q == '0 && !mem_resp_op.h) ||
            (!mem_resp_op.t && recv_q == CNTW'(MAX_OPS - 1))) err_q <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take) ops[recv_q[$clog2(MAX_OPS)-1:0]] <= mem_resp_op;
  end

  // A memory response only ever answers a request of this block.
  assert property (@(posedge clk) disable iff (!rst_n) mem_resp_valid |-> busy_q);

endmodule
