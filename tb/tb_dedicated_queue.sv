// tb_dedicated_queue: random pushes and pops against a queue model.
// Checks the head, its presence, the drop pulse on a full queue, first-in
// first-out order, the push-while-full-and-popping case and reset.
module tb_dedicated_queue;
  import noc_pkg::*;

  localparam int DEPTH = 4;
  logic clk = 0, rst = 1;
  logic in_valid = 0, pop = 0;
  pkt_t in_data = '0;
  logic head_valid, drop;
  pkt_t head_data;
  int checks = 0, failures = 0;
  int drops_seen = 0, full_pop_push = 0;
  pkt_t model [$];

  dedicated_queue dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data), .pop(pop),
    .head_valid(head_valid), .head_data(head_data), .drop(drop));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // compare with model before this cycle's operations
      chk(head_valid == (model.size() != 0), "head_valid");
      if (model.size() != 0) chk(head_data == model[0], "head_data");
      in_valid = ($urandom_range(0, 99) < 60);
      in_data  = pkt_t'($urandom);
      pop      = head_valid && ($urandom_range(0, 99) < 45);
      #1;
      begin
        logic exp_drop;
        exp_drop = in_valid && model.size() == DEPTH && !pop;
        chk(drop == exp_drop, "drop");
        if (drop) drops_seen++;
        if (in_valid && model.size() == DEPTH && pop) full_pop_push++;
        if (pop) void'(model.pop_front());
        if (in_valid && !exp_drop) model.push_back(in_data);
      end
    end
    // reset empties the queue
    @(negedge clk) begin in_valid = 0; pop = 0; rst = 1; end
    @(negedge clk) rst = 0;
    chk(!head_valid, "empty after reset");
    chk(drops_seen > 0, "drop exercised");
    chk(full_pop_push > 0, "push into full queue while popping exercised");
    $display("drops=%0d full+pop pushes=%0d", drops_seen, full_pop_push);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
