// output_port_allocator: Output Port Allocator with the (P+N):P output
// crossbar and the output registers.
//
// R requesters (queue heads) compete for P output ports; a head asks for the
// port in its head flit. For every port the requester with the lowest index
// wins (fixed priority). The router orders its requesters shared queues first,
// then dedicated queues by input port, so packets that were already delayed
// leave first and input 0 has priority over input 3. Fixed priority per port
// follows the published allocator; the order is this design's choice.
//
// Timing (published light-load pipeline QW, OPA, OST, LT): gnt is
// combinational in the allocation cycle and pops the winning queues. At the
// end of that cycle the winner is latched in ost_q; at the end of the next
// cycle (output switch traversal) it is loaded into the output register that
// drives the link (out_valid/out_data). Outputs never stall: the downstream
// side always accepts. Reset is synchronous, active high.
module output_port_allocator
  import noc_pkg::*;
#(
  parameter int unsigned P = 4,
  parameter int unsigned R = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [R-1:0] req_valid,
  input  pkt_t         req_data [R],
  output logic [R-1:0] gnt,
  output logic [P-1:0] out_valid,
  output pkt_t         out_data [P]
);

  typedef struct packed {
    logic valid;
    pkt_t data;
  } stage_t;

  stage_t win   [P];  // combinational winner per port
  stage_t ost_q [P];  // allocation result, OST stage
  stage_t out_q [P];  // output port register, drives the link

  always_comb begin
    logic found;
    gnt = '0;
    for (int o = 0; o < P; o++) begin
      win[o] = '0;
      found  = 1'b0;
      for (int r = 0; r < R; r++)
        if (!found && req_valid[r] && int'(req_data[r].dest) == o) begin
          found        = 1'b1;
          gnt[r]       = 1'b1;
          win[o].valid = 1'b1;
          win[o].data  = req_data[r];
        end
    end
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < P; o++) begin
      if (rst) begin
        ost_q[o] <= '0;
        out_q[o] <= '0;
      end else begin
        ost_q[o] <= win[o];
        out_q[o] <= ost_q[o];
      end
    end
  end

  always_comb
    for (int o = 0; o < P; o++) begin
      out_valid[o] = out_q[o].valid;
      out_data[o]  = out_q[o].data;
    end

endmodule
