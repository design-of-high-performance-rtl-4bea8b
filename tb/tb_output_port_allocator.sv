// tb_output_port_allocator: random requests against a reference fixed-
// priority allocation. Each output port must grant the lowest-numbered
// requester that asks for it and nobody else, and the winner must appear on
// that output exactly two clock edges later (OST stage, then the output
// register); an output with no winner must show no packet.
module tb_output_port_allocator;
  import noc_pkg::*;

  localparam int P = 4, R = 12;
  logic clk = 0, rst = 1;
  logic [R-1:0] req_valid = '0, gnt;
  pkt_t         req_data [R];
  logic [P-1:0] out_valid;
  pkt_t         out_data [P];
  int checks = 0, failures = 0, contended = 0;

  // expected output per port, two edges deep
  logic [P-1:0] exp_v [3];
  pkt_t         exp_d [3][P];

  output_port_allocator dut (
    .clk(clk), .rst(rst), .req_valid(req_valid), .req_data(req_data), .gnt(gnt),
    .out_valid(out_valid), .out_data(out_data));

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < R; r++) req_data[r] = '0;
    for (int k = 0; k < 3; k++) exp_v[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 5000; c++) begin
      logic [R-1:0] exp_g;
      @(negedge clk);
      req_valid = R'($urandom) & R'($urandom);
      for (int r = 0; r < R; r++) req_data[r] = pkt_t'($urandom);
      #1;
      exp_g = '0;
      exp_v[0] = '0;
      for (int o = 0; o < P; o++) begin
        int n;
        n = 0;
        for (int r = R - 1; r >= 0; r--)
          if (req_valid[r] && int'(req_data[r].dest) == o) begin
            exp_g = (exp_g & ~(R'(1) << r)) | (R'(1) << r);
            n++;
          end
        if (n > 1) contended++;
      end
      // keep only the lowest index per port
      for (int o = 0; o < P; o++) begin
        logic found;
        found = 0;
        for (int r = 0; r < R; r++)
          if (exp_g[r] && int'(req_data[r].dest) == o) begin
            if (found) exp_g[r] = 1'b0;
            else begin
              found = 1;
              exp_v[0][o] = 1'b1;
              exp_d[0][o] = req_data[r];
            end
          end
      end
      chk(gnt == exp_g, "grant");
      // output register holds what was granted two edges ago
      for (int o = 0; o < P; o++) begin
        chk(out_valid[o] == exp_v[2][o], "out_valid timing");
        if (exp_v[2][o]) chk(out_data[o] == exp_d[2][o], "out_data");
      end
      exp_v[2] = exp_v[1]; exp_d[2] = exp_d[1];
      exp_v[1] = exp_v[0]; exp_d[1] = exp_d[0];
    end
    chk(contended > 0, "contention exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
