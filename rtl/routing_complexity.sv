// routing_complexity: traffic-load detector of the shared-queue router.
//
// Compares the head flits (requested output ports) of the packets waiting at
// the front of the dedicated input queues. If any two present packets ask for
// the same output port the load is "high" (contention: some packet will need a
// shared queue); if all present packets ask for different ports the load is
// "low" and every packet can bypass the shared queues. The high/low rule is
// the published one; leaving empty queues out of the comparison is this
// design's choice (the published tests always drive every port).
//
// Interface: head[i] is the 2-bit output port of queue i, valid[i] says the
// queue holds a packet. high/low are purely combinational, low = !high.
module routing_complexity
  import noc_pkg::*;
#(
  parameter int unsigned P = 4
) (
  input  port_t        head  [P],
  input  logic [P-1:0] valid,
  output logic         high,
  output logic         low
);

  always_comb begin
    high = 1'b0;
    for (int i = 0; i < P; i++)
      for (int j = i + 1; j < P; j++)
        if (valid[i] && valid[j] && head[i] == head[j])
          high = 1'b1;
    low = !high;
  end

endmodule
