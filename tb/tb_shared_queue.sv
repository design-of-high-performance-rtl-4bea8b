// tb_shared_queue: random writes and reads against a model of one shared
// queue. A written packet must become readable exactly three clock edges
// after its grant (SQST and SQW stages), slots are reserved at grant time,
// and the queue reports the output port of the packets it holds.
module tb_shared_queue;
  import noc_pkg::*;

  localparam int DEPTH = 2;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  pkt_t wr_data = '0;
  logic head_valid, free, busy;
  pkt_t head_data;
  port_t dest;
  int checks = 0, failures = 0;
  int cyc = 0;
  int writes = 0, full_seen = 0;

  typedef struct { pkt_t data; int ready; } ent_t;
  ent_t model [$];
  port_t model_dest;

  shared_queue dut (
    .clk(clk), .rst(rst), .wr_en(wr_en), .wr_data(wr_data), .rd_en(rd_en),
    .head_valid(head_valid), .head_data(head_data), .free(free), .busy(busy), .dest(dest));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 4000; c++) begin
      logic exp_hv;
      @(negedge clk);
      exp_hv = model.size() != 0 && model[0].ready <= cyc;
      chk(head_valid == exp_hv, "head_valid / write latency");
      if (exp_hv) chk(head_data == model[0].data, "head_data");
      chk(free == (model.size() < DEPTH), "free");
      chk(busy == (model.size() != 0), "busy");
      if (model.size() != 0) chk(dest == model_dest, "dest");
      if (model.size() == DEPTH) full_seen++;
      rd_en = head_valid && ($urandom_range(0, 99) < 40);
      wr_en = free && ($urandom_range(0, 99) < 50);
      wr_data = pkt_t'($urandom);
      if (busy) wr_data.dest = dest;  // allocator obeys the same-port rule
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) begin
        ent_t e;
        e.data = wr_data;
        e.ready = cyc + 3;
        model.push_back(e);
        model_dest = wr_data.dest;
        writes++;
      end
    end
    chk(writes > 100 && full_seen > 0, "queue filled");
    $display("writes=%0d full cycles=%0d", writes, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
