// tb_sq_allocator: random requests and queue states against a reference
// allocation, plus rule checks that hold for any correct allocator: a queue
// receives at most one packet and only the packet of an input it granted, a
// granted queue has a free slot and is empty or bound to the packet's output
// port, and no requesting input is refused while a legal queue is left over.
module tb_sq_allocator;
  import noc_pkg::*;

  localparam int P = 4, N = 4;
  logic [P-1:0] req, gnt;
  pkt_t         req_data [P];
  logic [N-1:0] sq_free, sq_busy, sq_wr;
  port_t        sq_dest [N];
  pkt_t         sq_wr_data [N];
  int checks = 0, failures = 0;
  int multi_grants = 0, refused = 0, tag_reuse = 0;

  sq_allocator dut (
    .req(req), .req_data(req_data), .sq_free(sq_free), .sq_busy(sq_busy), .sq_dest(sq_dest),
    .gnt(gnt), .sq_wr(sq_wr), .sq_wr_data(sq_wr_data));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: req=%b free=%b busy=%b gnt=%b wr=%b", what, req, sq_free, sq_busy, gnt, sq_wr);
    end
  endtask

  function automatic logic legal(input int i, input int n);
    return sq_free[n] && (!sq_busy[n] || sq_dest[n] == req_data[i].dest);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int exp_q [P];
      logic [N-1:0] used;
      req = 4'($urandom);
      for (int i = 0; i < P; i++) req_data[i] = pkt_t'($urandom);
      for (int n = 0; n < N; n++) begin
        sq_busy[n] = $urandom_range(0, 1);
        sq_free[n] = !sq_busy[n] || $urandom_range(0, 1);
        sq_dest[n] = port_t'($urandom);
      end
      #1;
      // reference: inputs in order; a queue bound to the port first, then an empty one
      used = '0;
      for (int i = 0; i < P; i++) begin
        exp_q[i] = -1;
        if (req[i]) begin
          for (int n = 0; n < N && exp_q[i] < 0; n++)
            if (!used[n] && sq_busy[n] && sq_free[n] && sq_dest[n] == req_data[i].dest) exp_q[i] = n;
          if (exp_q[i] >= 0) tag_reuse++;
          for (int n = 0; n < N && exp_q[i] < 0; n++)
            if (!used[n] && !sq_busy[n]) exp_q[i] = n;
          if (exp_q[i] >= 0) used[exp_q[i]] = 1'b1;
          else refused++;
        end
      end
      for (int i = 0; i < P; i++) begin
        chk(gnt[i] == (exp_q[i] >= 0), "grant matches reference");
        if (exp_q[i] >= 0)
          chk(sq_wr[exp_q[i]] && sq_wr_data[exp_q[i]] == req_data[i], "packet routed to reference queue");
      end
      chk(sq_wr == used, "queue write set");
      // rule checks
      for (int n = 0; n < N; n++)
        if (sq_wr[n]) begin
          int src;
          src = -1;
          for (int i = 0; i < P; i++) if (gnt[i] && req_data[i] == sq_wr_data[n]) src = i;
          chk(src >= 0 && req[src] && legal(src, n), "write is legal");
        end
      for (int i = 0; i < P; i++)
        if (req[i] && !gnt[i])
          for (int n = 0; n < N; n++) chk(!(legal(i, n) && !sq_wr[n]), "no legal queue left unused");
      chk((gnt & ~req) == '0, "grant only to requesters");
      if ($countones(gnt) > 1) multi_grants++;
    end
    chk(multi_grants > 0 && refused > 0 && tag_reuse > 0, "cases exercised");
    $display("multi=%0d refused=%0d same-port reuse=%0d", multi_grants, refused, tag_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
