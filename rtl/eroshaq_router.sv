// eroshaq_router: P-port network-on-chip router whose buffers are mostly
// shared between the input ports (router architecture with shared queues,
// extended with a second set of shared queues).
//
// Every input port owns a small dedicated queue. The packet at its front
// competes, in the same cycle, for its output port (Output Port Allocator)
// and for a shared queue (Shared Queue Allocator). Winning the output port
// takes precedence: the packet bypasses the shared queues and leaves two
// cycles after it was written (pipeline QW, OPA, OST, LT). A packet that loses
// the output port is moved into a shared queue instead (QW, SQA, SQST, SQW,
// OPA, OST, LT) so it stops blocking its input; a shared queue only accepts
// packets for one output port at a time, which keeps the network deadlock
// free. Shared-queue heads compete for the output ports alongside the
// dedicated-queue heads and win ties. With SQ_SETS = 2 (default, the extended
// router) a packet refused by the first set's allocator asks the second set's
// allocator; SQ_SETS = 1 gives the conventional router with one set. A packet
// stays in its dedicated queue only when no allocator can place it, and an
// arriving packet is lost if its dedicated queue is full (drop).
//
// The routing-complexity block watches the dedicated-queue heads: shared
// queues are only requested while two or more heads ask for the same output
// port (load_high); at low load all packets bypass them.
//
// Interface: in_valid/in_data per input port, sampled at the rising edge;
// out_valid/out_data per output port, registered. The ev_* outputs report per
// cycle what happened to each dedicated-queue head (sent to its output,
// written to a shared queue of set s, or kept waiting). Reset is synchronous
// and active high. Sizes (4 ports, 8-bit packets, 4-entry dedicated queues,
// 2 sets of 4 shared queues of 2 entries) are the published ones; the
// allocation priorities and the drop-on-full behaviour are this design's
// choices where the source gives no detail.
module eroshaq_router
  import noc_pkg::*;
#(
  parameter int unsigned P        = 4,  // router ports
  parameter int unsigned N        = 4,  // shared queues per set
  parameter int unsigned DQ_DEPTH = 4,  // entries per dedicated queue
  parameter int unsigned SQ_DEPTH = 2,  // entries per shared queue
  parameter int unsigned SQ_SETS  = 2   // 1 = conventional, 2 = extended
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [P-1:0]                in_valid,
  input  pkt_t                        in_data    [P],
  output logic [P-1:0]                out_valid,
  output pkt_t                        out_data   [P],
  output logic [P-1:0]                drop,
  output logic                        load_high,
  output logic [P-1:0]                ev_bypass,
  output logic [SQ_SETS-1:0][P-1:0]   ev_sq_write,
  output logic [P-1:0]                ev_stall
);

  localparam int unsigned NS = N * SQ_SETS;  // shared queues in all sets
  localparam int unsigned R  = NS + P;       // output-port requesters

  // ---------------- dedicated queues ----------------
  logic [P-1:0] dq_valid, dq_pop;
  pkt_t         dq_head [P];
  port_t        dq_dest [P];

  for (genvar i = 0; i < P; i++) begin : g_dq
    dedicated_queue #(.DEPTH(DQ_DEPTH)) u_dq (
      .clk        (clk),
      .rst        (rst),
      .in_valid   (in_valid[i]),
      .in_data    (in_data[i]),
      .pop        (dq_pop[i]),
      .head_valid (dq_valid[i]),
      .head_data  (dq_head[i]),
      .drop       (drop[i])
    );
    assign dq_dest[i] = dq_head[i].dest;
  end

  // ---------------- routing complexity ----------------
  logic load_low;
  routing_complexity #(.P(P)) u_rc (
    .head  (dq_dest),
    .valid (dq_valid),
    .high  (load_high),
    .low   (load_low)
  );

  // ---------------- output port allocator ----------------
  // Requester order: shared queues of set 0, set 1, ..., then dedicated
  // queues by input port. Lower index wins.
  logic [R-1:0] opa_req, opa_gnt;
  pkt_t         opa_data [R];

  logic [SQ_SETS-1:0][N-1:0] sq_hvalid, sq_free, sq_busy, sq_wr;
  pkt_t                      sq_hdata   [SQ_SETS][N];
  port_t                     sq_dest    [SQ_SETS][N];
  pkt_t                      sq_wr_data [SQ_SETS][N];

  always_comb begin
    for (int s = 0; s < SQ_SETS; s++)
      for (int n = 0; n < N; n++) begin
        opa_req[s*N + n]  = sq_hvalid[s][n];
        opa_data[s*N + n] = sq_hdata[s][n];
      end
    for (int i = 0; i < P; i++) begin
      opa_req[NS + i]  = dq_valid[i];
      opa_data[NS + i] = dq_head[i];
    end
  end

  output_port_allocator #(.P(P), .R(R)) u_opa (
    .clk       (clk),
    .rst       (rst),
    .req_valid (opa_req),
    .req_data  (opa_data),
    .gnt       (opa_gnt),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

  // ---------------- shared queue allocators and shared queues ----------------
  // Set s sees the heads that lost the output port and were not placed by
  // an earlier set; nothing is requested while the load is low.
  logic [SQ_SETS-1:0][P-1:0] sqa_req;
  logic [SQ_SETS-1:0][P-1:0] sqa_gnt;

  assign sqa_req[0] = dq_valid & ~opa_gnt[NS +: P] & {P{load_high}};

  for (genvar s = 0; s < SQ_SETS; s++) begin : g_set
    if (s > 0) begin : g_next
      assign sqa_req[s] = sqa_req[s-1] & ~sqa_gnt[s-1];
    end

    sq_allocator #(.P(P), .N(N)) u_sqa (
      .req        (sqa_req[s]),
      .req_data   (dq_head),
      .sq_free    (sq_free[s]),
      .sq_busy    (sq_busy[s]),
      .sq_dest    (sq_dest[s]),
      .gnt        (sqa_gnt[s]),
      .sq_wr      (sq_wr[s]),
      .sq_wr_data (sq_wr_data[s])
    );

    for (genvar n = 0; n < N; n++) begin : g_sq
      shared_queue #(.DEPTH(SQ_DEPTH)) u_sq (
        .clk        (clk),
        .rst        (rst),
        .wr_en      (sq_wr[s][n]),
        .wr_data    (sq_wr_data[s][n]),
        .rd_en      (opa_gnt[s*N + n]),
        .head_valid (sq_hvalid[s][n]),
        .head_data  (sq_hdata[s][n]),
        .free       (sq_free[s][n]),
        .busy       (sq_busy[s][n]),
        .dest       (sq_dest[s][n])
      );
    end
  end

  // ---------------- dedicated queue pops and events ----------------
  always_comb begin
    dq_pop = opa_gnt[NS +: P];
    for (int s = 0; s < SQ_SETS; s++) dq_pop |= sqa_gnt[s];
  end

  assign ev_bypass   = opa_gnt[NS +: P];
  assign ev_sq_write = sqa_gnt;
  assign ev_stall    = dq_valid & ~dq_pop;

  // The two load flags are complements; a head never takes two resources.
  a_load_flags: assert property (@(posedge clk) disable iff (rst) load_low == !load_high);
  a_single_grant: assert property (@(posedge clk) disable iff (rst)
                                   (ev_bypass & sqa_gnt[0]) == '0);

endmodule
