// tb_eroshaq_router: end-to-end test of the router at its default size
// (4 ports, two sets of four 2-entry shared queues, 4-entry input queues).
//
// A scoreboard follows every packet: a packet that enters (not dropped)
// must leave exactly once, on the output port named in its head flit, and
// nothing else may leave. Latency is measured in clock edges after the edge
// that sampled the packet. Directed phases reproduce the published test
// conditions, then random traffic runs at several loads:
//   1. four packets to four different ports: all bypass, latency 2
//   2. two ports to one output: input 0 wins (latency 2), input 1 goes
//      through a shared queue (latency 5)
//   3. three ports to one output: one direct, two through shared queues
//   4. all four ports to one output for 12 cycles in a row (worst case):
//      both shared-queue sets fill up
//   5. random traffic, light and heavy
// Every mechanism (bypass, shared-queue write in each set, stall, drop, high
// and low load) must occur at least once.
module tb_eroshaq_router;
  import noc_pkg::*;

  localparam int P = 4;
  logic clk = 0, rst = 1;
  logic [P-1:0] in_valid = '0;
  pkt_t         in_data [P];
  logic [P-1:0] out_valid, drop, ev_bypass, ev_stall;
  logic [1:0][P-1:0] ev_sq_write;
  pkt_t         out_data [P];
  logic         load_high;

  eroshaq_router dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data), .drop(drop), .load_high(load_high),
    .ev_bypass(ev_bypass), .ev_sq_write(ev_sq_write), .ev_stall(ev_stall));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int inflight [pkt_t][$];   // injection edge of each outstanding packet
  int last_lat [pkt_t];      // latency of the last delivery of a value
  int n_in = 0, n_out = 0, n_drop = 0;
  int n_bypass = 0, n_sqw0 = 0, n_sqw1 = 0, n_stall = 0, n_high = 0, n_low_busy = 0;
  int n_lat5 = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // Scoreboard and event counters; sees the values present before each edge.
  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < P; i++)
        if (in_valid[i]) begin
          if (drop[i]) n_drop++;
          else begin
            inflight[in_data[i]].push_back(cyc);
            n_in++;
          end
        end
      for (int o = 0; o < P; o++)
        if (out_valid[o]) begin
          n_out++;
          checks++;
          if (int'(out_data[o].dest) != o || !inflight.exists(out_data[o])
              || inflight[out_data[o]].size() == 0) begin
            failures++;
            $display("FAIL unexpected packet %b on port %0d (cycle %0d)", out_data[o], o, cyc);
          end else begin
            last_lat[out_data[o]] = cyc - inflight[out_data[o]].pop_front() - 1;
            if (last_lat[out_data[o]] == 5) n_lat5++;
          end
        end
      n_bypass += $countones(ev_bypass);
      n_sqw0   += $countones(ev_sq_write[0]);
      n_sqw1   += $countones(ev_sq_write[1]);
      n_stall  += $countones(ev_stall);
      if (load_high) n_high++;
      if (!load_high && ev_bypass != '0) n_low_busy++;
    end
    cyc <= cyc + 1;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pkt_t mk(input int dest, input int body, input int src);
    return pkt_make_tb(port_t'(dest), body_t'(body), port_t'(src));
  endfunction
  function automatic pkt_t pkt_make_tb(input port_t d, input body_t b, input port_t s);
    pkt_t p;
    p.dest = d; p.body = b; p.src = s;
    return p;
  endfunction

  task automatic send(input logic [P-1:0] v, input int d0, input int d1, input int d2,
                      input int d3, input int body);
    int d [P];
    d = '{d0, d1, d2, d3};
    @(negedge clk);
    in_valid = v;
    for (int i = 0; i < P; i++) in_data[i] = mk(d[i], body, i);
  endtask

  task automatic idle(input int n);
    @(negedge clk);
    in_valid = '0;
    repeat (n) @(negedge clk);
  endtask

  function automatic int outstanding();
    int s = 0;
    foreach (inflight[k]) s += inflight[k].size();
    return s;
  endfunction

  initial begin
    int drops_before, sqw_before;
    for (int i = 0; i < P; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // 1. no congestion: heads 01, 11, 00, 10
    sqw_before = n_sqw0 + n_sqw1;
    send('1, 1, 3, 0, 2, 4'd1);
    idle(8);
    for (int i = 0; i < P; i++) chk(last_lat[mk(i == 0 ? 1 : i == 1 ? 3 : i == 2 ? 0 : 2, 1, i)] == 2,
                                   "no congestion: latency 2");
    chk(n_sqw0 + n_sqw1 == sqw_before, "no congestion: shared queues unused");

    // 2. two ports to one output
    send('1, 0, 0, 3, 2, 4'd2);
    idle(10);
    chk(last_lat[mk(0, 2, 0)] == 2, "two to one: input 0 direct");
    chk(last_lat[mk(0, 2, 1)] == 5, "two to one: input 1 via shared queue, latency 5");
    chk(last_lat[mk(3, 2, 2)] == 2 && last_lat[mk(2, 2, 3)] == 2, "two to one: others direct");

    // 3. three ports to one output
    send('1, 0, 0, 2, 0, 4'd3);
    idle(10);
    chk(last_lat[mk(0, 3, 0)] == 2, "three to one: input 0 direct");
    chk(last_lat[mk(2, 3, 2)] == 2, "three to one: input 2 direct");
    chk(last_lat[mk(0, 3, 1)] == 5, "three to one: input 1 via shared queue");
    chk(last_lat[mk(0, 3, 3)] == 6, "three to one: input 3 via shared queue, one cycle later");

    // 4. worst case: all four inputs to output 0, body = cycle number
    drops_before = n_drop;
    for (int c = 1; c <= 12; c++) send('1, 0, 0, 0, 0, c);
    idle(60);
    $display("worst case: drops=%0d set0 writes=%0d set1 writes=%0d", n_drop - drops_before, n_sqw0, n_sqw1);
    chk(n_sqw1 > 0, "worst case: second shared-queue set used");

    // 5. random traffic, light then heavy
    for (int phase = 0; phase < 3; phase++) begin
      int load = (phase == 0) ? 15 : (phase == 1) ? 45 : 90;
      int hot  = (phase == 2);
      for (int c = 0; c < 3000; c++) begin
        @(negedge clk);
        for (int i = 0; i < P; i++) begin
          in_valid[i] = ($urandom_range(0, 99) < load);
          in_data[i]  = mk(hot && $urandom_range(0, 1) ? 0 : $urandom_range(0, 3), $urandom_range(0, 15), i);
        end
      end
      idle(60);
    end

    chk(outstanding() == 0, "every accepted packet delivered");
    chk(n_out == n_in, "packets out equal packets accepted");
    chk(n_bypass > 0,   "bypass happened");
    chk(n_sqw0 > 0,     "shared-queue set 1 written");
    chk(n_sqw1 > 0,     "shared-queue set 2 written");
    chk(n_stall > 0,    "dedicated-queue stall happened");
    chk(n_drop > 0,     "drop on full dedicated queue happened");
    chk(n_high > 0,     "high load seen");
    chk(n_low_busy > 0, "low load with traffic seen");
    chk(n_lat5 > 0,     "shared-queue path latency 5 seen");
    $display("in=%0d out=%0d drop=%0d bypass=%0d sqw_set1=%0d sqw_set2=%0d stall=%0d high=%0d low_busy=%0d",
             n_in, n_out, n_drop, n_bypass, n_sqw0, n_sqw1, n_stall, n_high, n_low_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
