// tb_pmu: one input port of peripheral router 3 (valence 8). A neighbour
// model sends packets over the 4-phase link, retrying refused flits and
// sometimes corrupting one; the switch side is stalled for long stretches so
// the FIFO fills and flits are refused. An arbiter model grants after two
// cycles. Checks: every packet leaves complete and in order towards the
// preferred port of its destination, refused flits are delivered later,
// the port's clock is stopped while idle and restarts for the next packet.
module tb_pmu;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req = 0, ack;
  logic [31:0] data = 0, sw_data;
  logic arb_req, arb_gnt, sw_valid, sw_ready = 0;
  logic [1:0] arb_port, arb_prio, sw_adr;
  logic crc_err, reject, dup, refused, rerouted, clk_on;
  logic [31:0] outq[$];
  int portq[$];
  int checks = 0, failures = 0, n_crc = 0, n_rej = 0, n_off = 0, stall = 0, n_pk = 0;

  pmu #(.M(8), .NODE_ID(3), .IS_CENTER(1'b0)) dut (
    .clk, .rst_n, .link_req_i(req), .link_data_i(data), .link_ack_o(ack),
    .arb_req, .arb_port, .arb_prio, .arb_gnt, .sw_data, .sw_adr, .sw_valid, .sw_ready,
    .crc_err, .reject, .dup, .refused, .rerouted, .abandoned(), .clk_on);
  always #5 clk = ~clk;

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", s, $time); end
  endtask

  // arbiter model: grant two cycles after the request, hold while requested
  logic [1:0] rq;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) rq <= 0; else rq <= arb_req ? {rq[0], 1'b1} : 2'b00;
  assign arb_gnt = arb_req && rq[1];

  always @(posedge clk) if (rst_n) begin
    if (crc_err) n_crc++;
    if (reject && !crc_err) n_rej++;
    if (sw_valid && sw_ready) begin
      chk(outq.size() > 0 && sw_data == outq[0], "flit leaves in order");
      if (sw_data[31:30] == NAT_HEAD) begin
        chk(int'(sw_adr) == portq[0], "header sent to its preferred port");
        void'(portq.pop_front());
      end
      void'(outq.pop_front());
    end
    if (stall > 0) stall <= stall - 1;
    else if ($urandom_range(40) == 0) stall <= $urandom_range(30, 80);
    sw_ready <= (stall == 0) && ($urandom_range(3) != 0);
  end

  task automatic send(input logic [31:0] f);
    bit ok = 0;
    while (!ok) begin
      logic [31:0] g = f;
      automatic int w = 0;
      if ($urandom_range(15) == 0) g[$urandom_range(31)] ^= 1'b1;
      @(negedge clk); data = g; req = 1;
      while (!ack && w < 6) begin @(negedge clk); w++; end
      ok = ack && (g == f);
      req = 0;
      while (ack) @(negedge clk);
    end
  endtask

  function automatic int pref(int d);   // node 3 of valence 8
    int cw;
    if (d == 3) return 0;
    if (d == 0) return 3;
    cw = (d - 3 + 8) % 8;
    return (cw <= 4) ? 1 : 2;
  endfunction

  initial begin
    #5000000; failures++;
    $display("INFO stuck outq=%0d req=%b ack=%b fc=%0d ru=%0d empty=%b clk_on=%b sw_valid=%b arb_req=%b", outq.size(), req, ack, dut.u_fc.state, dut.u_ru.state, dut.empty, clk_on, sw_valid, arb_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(!clk_on, "clock stopped after reset while idle");
    for (int p = 0; p < 120; p++) begin
      head_flit_t h;
      int n;
      n = $urandom_range(15);
      h = '{nat: NAT_HEAD, qos_id: 4'h1, dest: 6'($urandom_range(8)), src: 6'd5,
            prio: prio_e'($urandom), nbre: 4'(n), crc: 8'h00};
      outq.push_back(seal_flit(h)); portq.push_back(pref(int'(h.dest)));
      send(seal_flit(h));
      for (int k = 1; k <= n; k++) begin
        data_flit_t d;
        d = '{nat: (k == n) ? NAT_TAIL : NAT_BODY, data: 18'($urandom), nbre: 4'(k), crc: 8'h00};
        outq.push_back(seal_flit(d));
        send(seal_flit(d));
      end
      if (p % 10 == 9) begin
        automatic int w = 0;
        while (outq.size() != 0 && w < 2000) begin @(negedge clk); w++; end
        repeat (4) @(negedge clk);
        chk(!clk_on, "clock stopped once the FIFO is empty");
        if (!clk_on) n_off++;
      end
      n_pk++;
    end
    begin
      automatic int w = 0;
      while (outq.size() != 0 && w < 5000) begin @(negedge clk); w++; end
    end
    chk(outq.size() == 0, "all flits delivered");
    chk(n_crc > 0 && n_rej > 0 && n_off > 0, "CRC reject, full-FIFO reject and clock stop exercised");
    $display("INFO packets=%0d crc_rejects=%0d other_rejects=%0d clock_stops=%0d", n_pk, n_crc, n_rej, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
