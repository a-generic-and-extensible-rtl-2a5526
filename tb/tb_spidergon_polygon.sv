// tb_spidergon_polygon: end-to-end test of the valence-8 elementary polygon
// (central router and 8 peripheral routers) at its default parameters.
// A core model on each of the 9 local ports sends random packets to random
// other nodes and acknowledges what it receives after a random delay.
// Phase 1: all cores send PKTS packets each. Some flits leave a core with a
// flipped bit (the router must refuse them, the core sends again), and some
// acknowledges are ignored by the sending core (the router must take the
// resent flit as a duplicate). Every packet must reach the local port of its
// destination whole, in order, not interleaved with another, with valid CRCs.
// Phase 2: the core of node 5 stops acknowledging; a packet sent to it must be
// dropped flit by flit by the Aloha sender of router 5 after its
// retransmissions, and a packet sent afterwards to another node must still
// arrive. Counts every mechanism (arbitration refusal, rerouting, Aloha
// retransmission, drop, CRC rejection, duplicate, clock stop) and fails if
// one never happened.
module tb_spidergon_polygon;
  import noc_pkg::*;
  localparam int M = 8, NN = M + 1, PKTS = 40, MAXLEN = 8, DEAD = 5, GAP = 300;
  logic clk = 0, rst_n = 0;
  logic [M:0] loc_in_req = 0, loc_in_ack, loc_out_req, loc_out_ack = 0;
  logic [M:0][31:0] loc_in_data = 0, loc_out_data;
  logic [M:0] ev_crc_err, ev_dup, ev_refused, ev_rerouted, ev_abandon, ev_retx, ev_drop, ev_clk_off;
  int checks = 0, failures = 0;
  int n_ref = 0, n_rer = 0, n_retx = 0, n_drop = 0, n_crc = 0, n_dup = 0, n_off = 0;
  int n_deliv = 0, n_sent = 0, flits_deliv = 0;
  bit dead = 0;
  longint lat_sum = 0;

  spidergon_polygon dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", s, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i <= M; i++) begin
      n_ref  += int'(ev_refused[i]);
      n_rer  += int'(ev_rerouted[i]);
      n_retx += int'(ev_retx[i]);
      n_drop += int'(ev_drop[i]);
      n_crc  += int'(ev_crc_err[i]);
      n_dup  += int'(ev_dup[i]);
    end
    if (ev_clk_off != 0) n_off++;
  end

  // expected packets keyed by the header's src field: {source node (4), seq (2)}
  typedef struct { logic [31:0] flits[$]; int dest; longint t0; } pkt_t;
  pkt_t exp_pk [int];

  task automatic send_flit(int g, logic [31:0] f);
    automatic bit ok = 0;
    while (!ok) begin
      automatic logic [31:0] v = f;
      automatic bit corrupt = ($urandom_range(40) == 0);
      automatic bit lose    = ($urandom_range(40) == 0);
      automatic int w = 0;
      if (corrupt) v[$urandom_range(31)] ^= 1'b1;
      @(negedge clk); loc_in_data[g] = v; loc_in_req[g] = 1;
      while (!loc_in_ack[g] && w < 8) begin @(negedge clk); w++; end
      ok = loc_in_ack[g] && !corrupt && !lose;
      loc_in_req[g] = 0;
      while (loc_in_ack[g]) @(negedge clk);
    end
  endtask

  task automatic send_pkt(int g, int s, int dst, int n);
    automatic head_flit_t h;
    automatic pkt_t pk;
    automatic int key = g * 4 + (s % 4);
    while (exp_pk.exists(key)) @(negedge clk);
    h = '{nat: NAT_HEAD, qos_id: 4'h1, dest: 6'(dst), src: 6'(key),
          prio: prio_e'($urandom), nbre: 4'(n), crc: 8'h00};
    pk.flits.push_back(seal_flit(h));
    for (int k = 1; k <= n; k++) begin
      automatic data_flit_t d;
      d = '{nat: (k == n) ? NAT_TAIL : NAT_BODY, data: {4'(g), 6'(s), 8'(k)}, nbre: 4'(k), crc: 8'h00};
      pk.flits.push_back(seal_flit(d));
    end
    pk.dest = dst; pk.t0 = $time;
    exp_pk[key] = pk;
    n_sent++;
    foreach (pk.flits[f]) send_flit(g, pk.flits[f]);
  endtask

  bit phase1_go = 0;
  int done_src = 0;
  for (genvar g = 0; g <= M; g++) begin : g_core
    // source
    initial begin
      wait (phase1_go);
      for (int s = 0; s < PKTS; s++) begin
        automatic int dst;
        dst = $urandom_range(M);
        if (dst == g) dst = (dst + 1) % NN;
        send_pkt(g, s, dst, $urandom_range(MAXLEN));
        repeat ($urandom_range(GAP)) @(negedge clk);
      end
      done_src++;
    end
    // sink
    initial begin
      automatic int key = -1, idx = 0, len = 0;
      forever begin
        @(negedge clk);
        if (loc_out_req[g] && !(dead && g == DEAD)) begin
          automatic int dly = $urandom_range(3);
          automatic logic [31:0] f;
          repeat (dly) @(negedge clk);
          if (loc_out_req[g]) begin
            f = loc_out_data[g];
            loc_out_ack[g] = 1;
            chk(f[7:0] == crc8_calc(f[31:8]), "CRC intact at the destination");
            if (f[31:30] == NAT_HEAD) begin
              chk(key < 0, "no packet interleaved with another");
              key = int'(f[19:14]);
              chk(exp_pk.exists(key), "header of a sent packet");
              if (exp_pk.exists(key)) begin
                chk(f == exp_pk[key].flits[0], "header unchanged");
                chk(exp_pk[key].dest == g, "delivered to its destination");
                len = exp_pk[key].flits.size(); idx = 1;
              end
            end else begin
              chk(key >= 0 && exp_pk.exists(key) && idx < len && f == exp_pk[key].flits[idx], "body flit in order");
              idx++;
            end
            flits_deliv++;
            if (key >= 0 && idx == len) begin
              lat_sum += ($time - exp_pk[key].t0) / 10;
              exp_pk.delete(key); key = -1; n_deliv++;
            end
            while (loc_out_req[g]) @(negedge clk);
            loc_out_ack[g] = 0;
          end
        end
      end
    end
  end

  initial begin
    #5000000; failures++;
    $display("INFO watchdog delivered=%0d of %0d", n_deliv, n_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int w = 0, drops0, w_last = 0, f_last = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(ev_clk_off == '1, "all port clocks stopped while the network is idle");
    phase1_go = 1;
    // ends early when nothing has been delivered for 100000 cycles
    while ((done_src < NN || n_deliv < n_sent) && w < 400000 && w - w_last < 100000) begin
      @(negedge clk); w++;
      if (flits_deliv != f_last) begin f_last = flits_deliv; w_last = w; end
    end
    chk(n_deliv == NN * PKTS, "phase 1: every packet delivered");
    chk(n_drop == 0, "phase 1: no flit dropped");
    $display("INFO phase1 packets=%0d flits=%0d cycles=%0d mean_latency=%0d cycles",
             n_deliv, flits_deliv, w, lat_sum / (n_deliv > 0 ? longint'(n_deliv) : longint'(1)));
    // phase 2: dead core at node 5
    dead = 1;
    drops0 = n_drop;
    send_pkt(1, 100, DEAD, 3);
    w = 0;
    while (n_drop - drops0 < 4 && w < 20000) begin @(negedge clk); w++; end
    chk(n_drop - drops0 == 4, "phase 2: 4 flits for the dead core dropped");
    exp_pk.delete(1 * 4 + 0);
    send_pkt(2, 101, 6, 4);
    w = 0;
    while (exp_pk.size() != 0 && w < 20000) begin @(negedge clk); w++; end
    chk(exp_pk.size() == 0, "phase 2: network still delivers after the drop");
    repeat (40) @(negedge clk);
    chk(ev_clk_off != 0, "port clocks stop again");
    chk(n_ref > 0, "arbitration refusals happened");
    chk(n_rer > 0, "rerouting to the alternative port happened");
    chk(n_retx > 0, "Aloha retransmissions happened");
    chk(n_drop > 0, "drops happened");
    chk(n_crc > 0, "CRC rejections happened");
    chk(n_dup > 0, "duplicates happened");
    chk(n_off > 0, "clock stops happened");
    $display("INFO refused=%0d rerouted=%0d retx=%0d drop=%0d crc_rej=%0d dup=%0d clk_off_cycles=%0d",
             n_ref, n_rer, n_retx, n_drop, n_crc, n_dup, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
