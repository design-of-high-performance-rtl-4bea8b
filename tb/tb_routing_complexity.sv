// tb_routing_complexity: exhaustive check of the traffic-load detector.
// Every combination of four 2-bit heads and four valid bits is applied; the
// expected flag is found by counting how many present heads name each port.
// The two published example vectors (all ports different -> low, a repeated
// port -> high) are applied first.
module tb_routing_complexity;
  import noc_pkg::*;

  localparam int P = 4;
  port_t        head [P];
  logic [P-1:0] valid;
  logic         high, low;
  int checks = 0, failures = 0;

  routing_complexity dut (.head(head), .valid(valid), .high(high), .low(low));

  task automatic check(input logic exp_high, input string what);
    checks++;
    if (high !== exp_high || low !== !exp_high) begin
      failures++;
      $display("FAIL %s: heads %0d %0d %0d %0d valid %b high=%b low=%b exp_high=%b",
               what, head[0], head[1], head[2], head[3], valid, high, low, exp_high);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = '1;
    head[0] = 2'b01; head[1] = 2'b11; head[2] = 2'b00; head[3] = 2'b10; #1 check(1'b0, "example low");
    head[0] = 2'b00; head[1] = 2'b00; head[2] = 2'b01; head[3] = 2'b11; #1 check(1'b1, "example high");
    head[0] = 2'b11; head[1] = 2'b11; head[2] = 2'b11; head[3] = 2'b10; #1 check(1'b1, "example high 2");
    for (int v = 0; v < 16; v++)
      for (int h = 0; h < 256; h++) begin
        int cnt [4];
        logic exp;
        valid = 4'(v);
        for (int i = 0; i < P; i++) head[i] = port_t'(h >> (2 * i));
        cnt = '{0, 0, 0, 0};
        for (int i = 0; i < P; i++) if (valid[i]) cnt[head[i]]++;
        exp = (cnt[0] > 1) || (cnt[1] > 1) || (cnt[2] > 1) || (cnt[3] > 1);
        #1 check(exp, "exhaustive");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
