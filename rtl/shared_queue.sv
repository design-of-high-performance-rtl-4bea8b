// shared_queue: one queue of the pool that all input ports share.
//
// A packet granted by a Shared Queue Allocator (wr_en, in the allocation
// cycle) is latched in st_q, crosses the shared-queue crossbar in the next
// cycle (SQST) into wq_q, and is written into the queue storage during the
// cycle after (SQW). From the following cycle it appears at head_valid and
// requests an output port, three cycles after the grant;
// rd_en (an output-port grant) removes it. This follows the published heavy-
// load pipeline QW, OPA/SQA, SQST, SQW, OPA, OST, LT.
//
// Receive state: a slot is reserved at grant time (occ counts reserved plus
// stored packets) so packets in flight can never overflow the DEPTH entries.
// All packets in a queue go to the same output port, recorded in dest, which
// implements the deadlock-avoidance rule: a queue accepts a packet only if it
// is empty (busy = 0) or already holds packets for that packet's output port.
// The rule is the published one; reserving at grant time is this design's way
// of applying it across the two write stages.
//
// Interface: free = an unreserved slot exists, busy = occ > 0. One write and
// one read per cycle. Reset (synchronous, active high) empties everything.
module shared_queue
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  wr_en,
  input  pkt_t  wr_data,
  input  logic  rd_en,
  output logic  head_valid,
  output pkt_t  head_data,
  output logic  free,
  output logic  busy,
  output port_t dest
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic valid;
    pkt_t data;
  } stage_t;

  stage_t        st_q;            // SQST stage register (grant latched)
  stage_t        wq_q;            // SQW stage register (queue write)
  pkt_t          mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] occ;             // reserved + stored
  logic [CW-1:0] stored;          // written into mem (SQW done)
  logic          do_rd, do_wr;

  assign head_valid = (stored != 0);
  assign head_data  = mem[rd_ptr];
  assign free       = (occ < CW'(DEPTH));
  assign busy       = (occ != 0);
  assign do_rd      = rd_en && head_valid;
  assign do_wr      = wq_q.valid;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q   <= '0;
      wq_q   <= '0;
      rd_ptr <= '0;
      wr_ptr <= '0;
      occ    <= '0;
      stored <= '0;
      dest   <= '0;
    end else begin
      st_q.valid <= wr_en;
      st_q.data  <= wr_data;
      wq_q       <= st_q;
      if (wr_en) dest <= wr_data.dest;
      if (do_wr) begin
        mem[wr_ptr] <= wq_q.data;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      occ    <= occ    + CW'(wr_en) - CW'(do_rd);
      stored <= stored + CW'(do_wr) - CW'(do_rd);
    end
  end

  // The allocator must respect the free slot and the same-output rule.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) wr_en |-> free);
  a_same_dest:   assert property (@(posedge clk) disable iff (rst)
                                  (wr_en && busy) |-> wr_data.dest == dest);
  a_rd_valid:    assert property (@(posedge clk) disable iff (rst) rd_en |-> head_valid);

endmodule
