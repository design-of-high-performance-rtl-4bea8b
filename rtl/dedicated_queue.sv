// dedicated_queue: the input queue owned by one router input port.
//
// Every arriving packet is first written here (the Queue Write stage). The
// packet at the front then competes for its output port and, if it loses,
// for a shared queue; it leaves when either grants it (pop). The router has
// no flow control towards the upstream router, so a packet that arrives while
// all DEPTH entries are taken is lost; drop pulses for that cycle. A full
// queue that is popped in the same cycle still accepts the new packet.
//
// Timing: in_valid/in_data are sampled at the rising edge; the packet is at
// the head (head_valid) from the next cycle if the queue was empty. pop
// removes the head at the same edge. Reset (synchronous, active high)
// empties the queue. Depth 4 is the published size; storage is a circular
// buffer with read and write pointers.
module dedicated_queue
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  pkt_t                     in_data,
  input  logic                     pop,
  output logic                     head_valid,
  output pkt_t                     head_data,
  output logic                     drop
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pkt_t          mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic          do_pop, do_push;

  assign head_valid = (count != 0);
  assign head_data  = mem[rd_ptr];
  assign do_pop     = pop && head_valid;
  assign do_push    = in_valid && (32'(count) < DEPTH || do_pop);
  assign drop       = in_valid && !do_push;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= in_data;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (do_pop) rd_ptr <= next_ptr(rd_ptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  // A pop is only issued for a present head.
  a_pop_valid: assert property (@(posedge clk) disable iff (rst) pop |-> head_valid);

endmodule
