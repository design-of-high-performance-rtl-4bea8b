// tb_throughput: accepted throughput of the conventional (one shared-queue
// set) and extended (two sets) router under the same random traffic.
//
// Every input offers a packet in a cycle with probability RATE percent; the
// rate is swept from 10 % to 100 %. Destinations are uniform over the four
// outputs (HOT > 0 sends that share of packets to output 0 instead, which
// makes output 0 the bottleneck for both routers). Packets that find their dedicated queue full are
// lost (the router has no flow control), so the accepted throughput is
// delivered packets per port per cycle. The test prints both curves and
// checks that every accepted packet is delivered on its own port, that the
// extended router never accepts fewer packets than the conventional one over
// the whole sweep, and that it loses fewer packets at the heaviest loads.
// With this design, uniform traffic saturates near 0.79 packets per port per
// cycle for the conventional router and 0.86 for the extended one.
module tb_throughput;
  import noc_pkg::*;

  localparam int P = 4;
  localparam int CYCLES = 4000;
  localparam int HOT = 0;   // percent of extra traffic aimed at output 0
  logic clk = 0, rst = 1;
  logic [P-1:0] in_valid = '0;
  pkt_t         in_data [P];

  logic [P-1:0] c_ov, c_drop, c_byp, c_stall, e_ov, e_drop, e_byp, e_stall;
  logic [0:0][P-1:0] c_sqw;
  logic [1:0][P-1:0] e_sqw;
  pkt_t         c_od [P], e_od [P];
  logic         c_hi, e_hi;

  eroshaq_router #(.SQ_SETS(1)) conv (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .out_valid(c_ov), .out_data(c_od), .drop(c_drop), .load_high(c_hi),
    .ev_bypass(c_byp), .ev_sq_write(c_sqw), .ev_stall(c_stall));
  eroshaq_router #(.SQ_SETS(2)) ext (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .out_valid(e_ov), .out_data(e_od), .drop(e_drop), .load_high(e_hi),
    .ev_bypass(e_byp), .ev_sq_write(e_sqw), .ev_stall(e_stall));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c_acc = 0, e_acc = 0, c_del = 0, e_del = 0, c_lost = 0, e_lost = 0;
  int c_tot_acc = 0, e_tot_acc = 0, c_heavy_lost = 0, e_heavy_lost = 0;
  int offered = 0;
  int c_last_tp = 0, e_last_tp = 0;  // deliveries at the 100 % rate

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < P; i++) if (in_valid[i]) begin
      offered++;
      if (c_drop[i]) c_lost++; else c_acc++;
      if (e_drop[i]) e_lost++; else e_acc++;
    end
    for (int o = 0; o < P; o++) begin
      if (c_ov[o]) begin c_del++; if (int'(c_od[o].dest) != o) begin failures++; $display("FAIL misrouted"); end end
      if (e_ov[o]) begin e_del++; if (int'(e_od[o].dest) != o) begin failures++; $display("FAIL misrouted"); end end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < P; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    $display("rate%%  offered  conv.accepted/port/cycle  ext.accepted/port/cycle  conv.lost  ext.lost");
    for (int rate = 10; rate <= 100; rate += 10) begin
      c_acc = 0; e_acc = 0; c_del = 0; e_del = 0; c_lost = 0; e_lost = 0; offered = 0;
      for (int c = 0; c < CYCLES; c++) begin
        @(negedge clk);
        for (int i = 0; i < P; i++) begin
          in_valid[i] = ($urandom_range(1, 100) <= rate);
          in_data[i].dest = ($urandom_range(1, 100) <= HOT) ? 2'd0 : port_t'($urandom_range(0, 3));
          in_data[i].body = body_t'(c);
          in_data[i].src  = port_t'(i);
        end
      end
      @(negedge clk) in_valid = '0;
      repeat (60) @(negedge clk);
      $display("%4d  %7d  %24.3f  %23.3f  %9d  %8d", rate, offered,
               real'(c_del) / (P * CYCLES), real'(e_del) / (P * CYCLES), c_lost, e_lost);
      chk(c_del == c_acc && e_del == e_acc, "accepted packets all delivered");
      c_tot_acc += c_acc; e_tot_acc += e_acc;
      c_last_tp = c_del; e_last_tp = e_del;
      if (rate >= 80) begin c_heavy_lost += c_lost; e_heavy_lost += e_lost; end
    end
    chk(e_tot_acc >= c_tot_acc, "extended accepts at least as many packets over the sweep");
    chk(c_heavy_lost > 0 && e_heavy_lost < c_heavy_lost, "extended loses fewer at heavy load");
    chk(real'(e_last_tp) > real'(c_last_tp) * 1.05, "extended saturates at least 5 % higher");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
