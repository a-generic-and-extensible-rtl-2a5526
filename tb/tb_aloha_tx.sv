// tb_aloha_tx: a receiver model acknowledges, ignores (flit lost) or
// acknowledges late. Checks: a flit is offered on the link until acknowledged;
// after TIMEOUT cycles without acknowledge the request drops and the flit is
// sent again; after NMAX_RETX retransmissions it is dropped; an acknowledge
// arriving in the cycle after the time-out still counts; the link data holds
// still during a request; every flit leaves exactly once in order unless dropped;
// after a drop, the flits up to the next header are discarded at once, and a
// dropped tail ends the discarding.
module tb_aloha_tx;
  localparam int TO = 6, NR = 3;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data = 0, link_data;
  logic in_valid = 0, in_ready, link_req, link_ack = 0, retx, drop, sent;
  int checks = 0, failures = 0;
  int n_retx = 0, n_drop = 0, n_sent = 0, n_late = 0;
  logic [31:0] exp_q[$];
  int mode;    // 0 ack, 1 never ack, 2 ack after k refused attempts, 3 late ack
  bit purge = 0;
  int n_disc = 0;

  aloha_tx #(.TIMEOUT(TO), .NMAX_RETX(NR)) dut (
    .clk, .rst_n, .in_data, .in_valid, .in_ready, .link_req_o(link_req),
    .link_data_o(link_data), .link_ack_i(link_ack), .retx, .drop, .sent);
  always #5 clk = ~clk;

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", s, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (retx) n_retx++;
    if (drop) n_drop++;
    if (sent) n_sent++;
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // receiver model
  initial begin
    int att, hi, want;
    forever begin
      @(negedge clk);
      if (link_req) begin
        att++;
        hi = 0;
        while (link_req) begin
          hi++;
          chk(hi <= TO, "request withdrawn after the time-out");
          if (mode == 0 && hi == 2) link_ack = 1;
          if (mode == 2 && att > want && hi == 1) link_ack = 1;
          if (mode == 3 && hi == TO) begin link_ack = 1; n_late++; end
          @(negedge clk);
        end
        if (link_ack) begin
          chk(exp_q.size() > 0 && link_data == exp_q[0], "delivered flit in order");
          void'(exp_q.pop_front());
          att = 0; want = $urandom_range(NR);
          @(negedge clk); link_ack = 0;
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int s_retx, s_drop, s_sent, cyc;
      mode = $urandom_range(3);
      s_retx = n_retx; s_drop = n_drop; s_sent = n_sent;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_data = $urandom;
      // mostly data flits, so that discarding after a drop is exercised
      if ($urandom_range(3) != 0) in_data[31:30] = ($urandom_range(3) == 0) ? 2'b10 : 2'b01;
      in_valid = 1;
      if (purge && in_data[31:30] != 2'b11) begin
        @(negedge clk); in_valid = 0;
        chk(n_drop == s_drop + 1 && n_retx == s_retx && in_ready, "flit after a drop discarded at once");
        chk(!link_req, "discarded flit not sent");
        n_disc++;
        continue;
      end
      purge = 0;
      if (mode != 1) exp_q.push_back(in_data);
      @(negedge clk); in_valid = 0;
      cyc = 0;
      while (!in_ready) begin @(negedge clk); cyc++; end
      if (mode == 1) begin
        purge = (in_data[31:30] != 2'b10);
        chk(n_drop == s_drop + 1 && n_retx == s_retx + NR, "dropped after NMAX_RETX retransmissions");
        chk(cyc >= (NR + 1) * TO, "every attempt waited the time-out");
      end else begin
        chk(n_sent == s_sent + 1 && n_drop == s_drop, "acknowledged flit not dropped");
      end
    end
    repeat (4) @(negedge clk);
    chk(exp_q.size() == 0, "all acknowledged flits seen");
    chk(n_late > 0 && n_retx > 0 && n_drop > 0 && n_disc > 0, "late ack, retransmission, drop and discard exercised");
    $display("INFO sent=%0d retx=%0d drop=%0d late=%0d discarded=%0d", n_sent, n_retx, n_drop, n_late, n_disc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
