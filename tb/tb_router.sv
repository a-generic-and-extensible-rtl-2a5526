// tb_router: peripheral router 1 of a valence-8 polygon with a neighbour
// model on each of its four ports. Every input sends random packets (random
// destination, priority and length) with 4-phase handshakes; every output
// acknowledges after a random delay, sometimes longer than the time-out so
// that flits are retransmitted. Checks: each packet comes out whole on its
// preferred port or, after repeated refusals, on the alternative one; the
// flits of a packet are never interleaved with another packet on a port
// (wormhole); every flit keeps a valid CRC; nothing is lost or duplicated.
// Counts contention refusals, reroutes and retransmissions.
module tb_router;
  import noc_pkg::*;
  localparam int N = 4, M = 8, NODE = 1, TO = 16, PKTS = 60;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_req = 0, in_ack, out_req, out_ack = 0;
  logic [N-1:0][31:0] in_data = 0, out_data;
  logic [N-1:0] ev_crc_err, ev_dup, ev_refused, ev_rerouted, ev_abandon, ev_retx, ev_drop, ev_sent, clk_on;
  int checks = 0, failures = 0;
  int n_ref = 0, n_rer = 0, n_retx = 0, n_drop = 0, n_deliv = 0, n_sent_pk = 0, n_alt = 0;

  router #(.M(M), .NODE_ID(NODE), .IS_CENTER(1'b0)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", s, $time); end
  endtask

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < N; i++) begin
      n_ref  += int'(ev_refused[i]);
      n_rer  += int'(ev_rerouted[i]);
      n_retx += int'(ev_retx[i]);
      n_drop += int'(ev_drop[i]);
    end

  function automatic int pref(int d);
    int cw;
    if (d == NODE) return 0;
    if (d == 0) return 3;
    cw = (d - NODE + M) % M;
    return (cw <= M / 2) ? 1 : 2;
  endfunction
  function automatic int altp(int d);
    if (d == NODE) return 0;
    if (d == 0) return 1;
    return 3;
  endfunction

  // expected packets, keyed by the header's src field {input, seq}
  typedef struct { logic [31:0] flits[$]; int p1, p2; } pkt_t;
  pkt_t exp_pk [int];

  // sources
  for (genvar g = 0; g < N; g++) begin : g_src
    initial begin
      @(posedge rst_n);
      for (int s = 0; s < PKTS; s++) begin
        automatic head_flit_t h;
        automatic pkt_t pk;
        automatic int n, key;
        n = $urandom_range(12);
        key = g * 16 + (s % 16);
        while (exp_pk.exists(key)) @(negedge clk);
        h = '{nat: NAT_HEAD, qos_id: 4'h1, dest: 6'($urandom_range(M)), src: 6'(key),
              prio: prio_e'($urandom), nbre: 4'(n), crc: 8'h00};
        pk.flits.push_back(seal_flit(h));
        for (int k = 1; k <= n; k++) begin
          data_flit_t d;
          d = '{nat: (k == n) ? NAT_TAIL : NAT_BODY, data: {2'(g), 8'(s), 8'(k)}, nbre: 4'(k), crc: 8'h00};
          pk.flits.push_back(seal_flit(d));
        end
        pk.p1 = pref(int'(h.dest)); pk.p2 = altp(int'(h.dest));
        exp_pk[key] = pk;
        n_sent_pk++;
        foreach (pk.flits[f]) begin
          automatic bit ok = 0;
          while (!ok) begin
            automatic int w = 0;
            @(negedge clk); in_data[g] = pk.flits[f]; in_req[g] = 1;
            while (!in_ack[g] && w < 8) begin @(negedge clk); w++; end
            ok = in_ack[g];
            in_req[g] = 0;
            while (in_ack[g]) @(negedge clk);
          end
        end
        repeat ($urandom_range(20)) @(negedge clk);
      end
    end
  end

  // sinks
  for (genvar g = 0; g < N; g++) begin : g_snk
    initial begin
      int key, idx, len;
      key = -1; idx = 0; len = 0;
      forever begin
        @(negedge clk);
        if (out_req[g]) begin
          int dly;
          logic [31:0] f;
          dly = ($urandom_range(9) == 0) ? $urandom_range(TO + 4) : $urandom_range(2);
          repeat (dly) @(negedge clk);
          if (out_req[g]) begin
            f = out_data[g];
            out_ack[g] = 1;
            chk(f[7:0] == crc8_calc(f[31:8]), "CRC intact");
            if (f[31:30] == NAT_HEAD) begin
              chk(key < 0, "no packet interleaved with another");
              key = int'(f[19:14]);
              chk(exp_pk.exists(key), "header of a sent packet");
              if (exp_pk.exists(key)) begin
                chk(f == exp_pk[key].flits[0], "header unchanged");
                chk(g == exp_pk[key].p1 || g == exp_pk[key].p2, "packet on its preferred or alternative port");
                if (g != exp_pk[key].p1) n_alt++;
                len = exp_pk[key].flits.size(); idx = 1;
              end
            end else begin
              chk(key >= 0 && exp_pk.exists(key) && idx < len && f == exp_pk[key].flits[idx], "body flit in order");
              idx++;
            end
            if (key >= 0 && idx == len) begin
              exp_pk.delete(key); key = -1; n_deliv++;
            end
            while (out_req[g]) @(negedge clk);
            out_ack[g] = 0;
          end
        end
      end
    end
  end

  initial begin
    #20000000; failures++;
    $display("INFO watchdog delivered=%0d", n_deliv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    w = 0;
    while (n_deliv < N * PKTS && w < 400000) begin @(negedge clk); w++; end
    chk(n_deliv == N * PKTS, "all packets delivered");
    chk(n_drop == 0, "no flit dropped");
    chk(n_ref > 0 && n_rer > 0 && n_retx > 0, "contention, rerouting and retransmission exercised");
    $display("INFO delivered=%0d refused=%0d rerouted=%0d via_alt=%0d retx=%0d drop=%0d",
             n_deliv, n_ref, n_rer, n_alt, n_retx, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
