// tb_flow_ctrl: a sender model drives random packets over the 4-phase link.
// Per attempt it may corrupt one bit of the flit (CRC must reject it), the
// FIFO may report full (flit must be rejected), or the sender may ignore a
// received acknowledge, as if it were lost, and send the flit again (the
// receiver must acknowledge the duplicate without storing it). The sender
// retries until it sees an acknowledge. The flits written to the FIFO must be
// exactly the packet flits, in order, once each. Also checks that an
// out-of-order data flit is refused and that the acknowledge comes one cycle
// after the request.
module tb_flow_ctrl;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req = 0, ack, fifo_full = 0, wr_en, crc_err, reject, dup;
  logic [31:0] data = 0, wr_data;
  logic [31:0] exp_q[$];
  int checks = 0, failures = 0;
  int n_crc = 0, n_dup = 0, n_full_rej = 0, n_acc = 0;

  flow_ctrl dut (.clk, .rst_n, .link_req_i(req), .link_data_i(data), .link_ack_o(ack),
                 .fifo_full, .wr_en, .wr_data, .crc_err, .reject, .dup, .busy());
  always #5 clk = ~clk;

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (crc_err) n_crc++;
    if (dup) n_dup++;
    if (wr_en) begin
      n_acc++;
      chk(exp_q.size() > 0 && wr_data == exp_q[0], "stored flit is the next expected one");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  // one attempt; returns 1 if acknowledged
  task automatic attempt(input logic [31:0] f, input bit lose_ack, output bit acked);
    int w = 0;
    @(negedge clk); data = f; req = 1;
    while (!ack && w < 4) begin @(negedge clk); w++; end
    acked = ack;
    if (acked) chk(w == 1, "ack one cycle after request");
    req = 0;
    while (ack) @(negedge clk);
    @(negedge clk);
    if (lose_ack) acked = 0;
  endtask

  task automatic send(input logic [31:0] f);
    bit acked = 0, stored = 0;
    exp_q.push_back(f);
    while (!acked) begin
      logic [31:0] g = f;
      bit corrupt = ($urandom_range(9) == 0);
      bit full    = ($urandom_range(9) == 0);
      bit lose    = ($urandom_range(9) == 0);
      if (corrupt) g[$urandom_range(31)] ^= 1'b1;
      fifo_full = full;
      attempt(g, lose, acked);
      if (full && !corrupt) n_full_rej++;
      if (corrupt) chk(!acked || lose, "corrupted flit not acknowledged");
      else if (full && !stored) chk(!acked || lose, "flit refused while the FIFO is full");
      if (!corrupt && !full) stored = 1;   // a lost acknowledge leaves it stored
      fifo_full = 0;
    end
  endtask

  function automatic logic [31:0] head(int n);
    head_flit_t h;
    h = '{nat: NAT_HEAD, qos_id: 4'h1, dest: 6'($urandom), src: 6'($urandom),
          prio: prio_e'($urandom), nbre: 4'(n), crc: 8'h00};
    return seal_flit(h);
  endfunction
  function automatic logic [31:0] body(int k, bit last);
    data_flit_t d;
    d = '{nat: last ? NAT_TAIL : NAT_BODY, data: 18'($urandom), nbre: 4'(k), crc: 8'h00};
    return seal_flit(d);
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // out-of-order flit refused
    send(head(3));
    attempt(body(2, 0), 0, a);
    chk(!a, "flit 2 before flit 1 refused");
    send(body(1, 0)); send(body(2, 0)); send(body(3, 1));
    attempt(body(4, 0), 0, a);
    chk(!a, "data flit after the end of a packet refused");
    for (int p = 0; p < 150; p++) begin
      int n;
      n = $urandom_range(15);
      send(head(n));
      for (int k = 1; k <= n; k++) send(body(k, k == n));
    end
    repeat (3) @(negedge clk);
    chk(exp_q.size() == 0, "all flits stored");
    chk(n_crc > 0 && n_dup > 0 && n_full_rej > 0, "corruption, duplicate and full cases all exercised");
    $display("INFO crc_rejects=%0d duplicates=%0d full_rejects=%0d stored=%0d", n_crc, n_dup, n_full_rej, n_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
