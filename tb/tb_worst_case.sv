// tb_worst_case: the published worst-case workload, run on the conventional
// router (one set of shared queues) and the extended router (two sets) side
// by side. All four inputs send a packet to output 0 in every cycle for
// STREAM cycles (payload = cycle number, tail = input port). Output 0 can
// pass one packet per cycle, so three packets a cycle pile up in the shared
// and dedicated queues until the buffers run out and packets are lost.
//
// Buffer space: conventional 4x4 dedicated + 4x2 shared = 24 packets,
// extended 4x4 + 8x2 = 32 packets. With this design's allocation the
// conventional router first loses a packet in stream cycle 7 and the extended
// one in stream cycle 9. The test runs an 8-cycle stream and checks that the
// conventional router loses packets while the extended one loses none, that
// every accepted packet is delivered, and that output 0 passes one packet in
// every cycle until the queues have drained.
module tb_worst_case;
  import noc_pkg::*;

  localparam int P = 4;
  localparam int STREAM = 8;
  logic clk = 0, rst = 1;
  logic [P-1:0] in_valid = '0;
  pkt_t         in_data [P];

  logic [P-1:0] c_out_valid, c_drop, c_byp, c_stall, c_high;
  logic [0:0][P-1:0] c_sqw;
  pkt_t         c_out_data [P];
  logic [P-1:0] e_out_valid, e_drop, e_byp, e_stall;
  logic [1:0][P-1:0] e_sqw;
  pkt_t         e_out_data [P];
  logic         c_load_high, e_load_high;

  eroshaq_router #(.SQ_SETS(1)) conv (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .out_valid(c_out_valid), .out_data(c_out_data), .drop(c_drop), .load_high(c_load_high),
    .ev_bypass(c_byp), .ev_sq_write(c_sqw), .ev_stall(c_stall));
  eroshaq_router #(.SQ_SETS(2)) ext (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .out_valid(e_out_valid), .out_data(e_out_data), .drop(e_drop), .load_high(e_load_high),
    .ev_bypass(e_byp), .ev_sq_write(e_sqw), .ev_stall(e_stall));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int c_first_drop = -1, e_first_drop = -1, c_drops = 0, e_drops = 0;
  int c_acc = 0, e_acc = 0, c_del = 0, e_del = 0;
  int c_last_out = 0, e_last_out = 0, e_idle_gap = 0, e_first_out = -1;
  int stream_cycle = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      for (int i = 0; i < P; i++) if (in_valid[i]) begin
        if (c_drop[i]) begin c_drops++; if (c_first_drop < 0) c_first_drop = stream_cycle; end
        else c_acc++;
        if (e_drop[i]) begin e_drops++; if (e_first_drop < 0) e_first_drop = stream_cycle; end
        else e_acc++;
      end
      for (int o = 0; o < P; o++) begin
        if (c_out_valid[o]) begin c_del++; c_last_out = cyc; chk(o == 0, "conventional: only output 0"); end
        if (e_out_valid[o]) begin
          e_del++; chk(o == 0, "extended: only output 0");
          if (e_first_out >= 0 && cyc != e_last_out + 1) e_idle_gap++;
          if (e_first_out < 0) e_first_out = cyc;
          e_last_out = cyc;
        end
      end
    end
    cyc <= cyc + 1;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < P; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 1; c <= STREAM; c++) begin
      @(negedge clk);
      stream_cycle = c;
      in_valid = '1;
      for (int i = 0; i < P; i++) begin
        in_data[i].dest = 2'd0;
        in_data[i].body = body_t'(c);
        in_data[i].src  = port_t'(i);
      end
    end
    @(negedge clk) in_valid = '0;
    repeat (80) @(negedge clk);
    $display("conventional: first drop in stream cycle %0d, %0d dropped, %0d delivered",
             c_first_drop, c_drops, c_del);
    $display("extended:     first drop in stream cycle %0d, %0d dropped, %0d delivered",
             e_first_drop, e_drops, e_del);
    chk(c_drops > 0, "conventional router loses packets in the worst case");
    chk(e_drops == 0, "extended router loses none in an 8-cycle stream");
    chk(c_acc == c_del && e_acc == e_del, "every accepted packet delivered");
    chk(c_acc + c_drops == 4 * STREAM && e_acc + e_drops == 4 * STREAM, "all packets accounted for");
    chk(e_idle_gap == 0, "output 0 busy every cycle until drained");
    chk(e_first_out >= 0 && e_last_out - e_first_out + 1 == e_del, "one packet per cycle on output 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
