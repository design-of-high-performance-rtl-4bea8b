// sq_allocator: Shared Queue Allocator with the P:N shared-queue crossbar.
//
// Each requesting input (a dedicated-queue head that did not win its output
// port) is matched to one shared queue it may write: a queue with a free slot
// that is either empty or already holds packets for the same output port (the
// published deadlock-free write rule). Each queue takes at most one packet per
// cycle. Inputs are served in fixed priority, input 0 first. An input prefers
// the lowest-numbered queue that already holds its output port and otherwise
// takes the lowest-numbered empty one, so empty queues stay available for
// other ports; priority order and preference are this design's choices.
//
// The crossbar part drives sq_wr/sq_wr_data, the write request and packet for
// each queue. Everything is combinational: grants are used in the same cycle
// to pop the dedicated queues and to start the queue write.
module sq_allocator
  import noc_pkg::*;
#(
  parameter int unsigned P = 4,
  parameter int unsigned N = 4
) (
  input  logic [P-1:0] req,
  input  pkt_t         req_data [P],
  input  logic [N-1:0] sq_free,
  input  logic [N-1:0] sq_busy,
  input  port_t        sq_dest  [N],
  output logic [P-1:0] gnt,
  output logic [N-1:0] sq_wr,
  output pkt_t         sq_wr_data [N]
);

  always_comb begin
    logic [N-1:0] taken;
    int           pick;
    taken = '0;
    gnt   = '0;
    sq_wr = '0;
    for (int n = 0; n < N; n++) sq_wr_data[n] = '0;
    for (int i = 0; i < P; i++) begin
      pick = -1;
      if (req[i]) begin
        // first choice: a queue already bound to this output port
        for (int n = N - 1; n >= 0; n--)
          if (!taken[n] && sq_free[n] && sq_busy[n] && sq_dest[n] == req_data[i].dest)
            pick = n;
        // otherwise an empty queue
        if (pick < 0)
          for (int n = N - 1; n >= 0; n--)
            if (!taken[n] && !sq_busy[n])
              pick = n;
      end
      if (pick >= 0) begin
        gnt[i]           = 1'b1;
        taken[pick]      = 1'b1;
        sq_wr[pick]      = 1'b1;
        sq_wr_data[pick] = req_data[i];
      end
    end
  end

endmodule
