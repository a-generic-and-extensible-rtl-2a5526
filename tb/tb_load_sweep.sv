// tb_load_sweep: average latency against offered load on an elementary
// polygon of valence 12 (13 routers), in the manner of the latency/load
// curves the Spidergon NoC is evaluated with. The source design's curves use
// a 37-router network and 64-flit packets; here the elementary polygon of the
// same valence is used, and packets have the largest length the 4-bit Nbre
// field allows (a header and 15 data flits).
// Each core creates packets for random other nodes, one per cycle with
// probability p (geometric intervals), and queues them until it can send
// them; latency runs from the creation of a packet to the arrival of its last
// flit and so includes the time spent queued at the source. The load is the
// offered flit rate per node as a fraction of one link's capacity (one flit
// per 3 cycles). Each core creates PKTS packets per load level; the first
// WARM of them are left out of the mean. A level ends once all its packets
// are sent and the network has been quiet for QUIET cycles.
// Checks on every level: each flit reaching a core has an intact CRC, each
// header belongs to a sent packet for that core, and the data flits of a
// packet arrive in order (at high load the Aloha senders may drop flits, so
// a packet may arrive cut short, which is counted, not failed). At the
// lowest load every packet must arrive whole with no drop, and the mean
// latency must grow with the load.
module tb_load_sweep;
  import noc_pkg::*;
  localparam int M = 12, NN = M + 1, PKTS = 100, WARM = 10, LEN = 15, QUIET = 2000;
  localparam int NLVL = 8;
  localparam int LOAD_PCT [NLVL] = '{5, 10, 20, 30, 40, 50, 60, 70};
  logic clk = 0, rst_n = 0;
  logic [M:0] loc_in_req = 0, loc_in_ack, loc_out_req, loc_out_ack = 0;
  logic [M:0][31:0] loc_in_data = 0, loc_out_data;
  logic [M:0] ev_crc_err, ev_dup, ev_refused, ev_rerouted, ev_abandon, ev_retx, ev_drop, ev_clk_off;
  int checks = 0, failures = 0;
  int n_drop = 0, n_rer = 0, n_whole = 0, n_cut = 0, n_meas = 0, flits_rx = 0, n_orphan = 0;
  longint lat_sum = 0;
  longint last_act = 0;

  spidergon_polygon #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", s, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i <= M; i++) begin
      n_drop += int'(ev_drop[i]);
      n_rer  += int'(ev_rerouted[i]);
    end
    if (loc_in_req != 0 || loc_out_req != 0) last_act = $time / 10;
  end

  // packets of the current level, per source node, indexed by sequence number
  typedef struct { logic [31:0] flits[$]; int dest; longint t0; } pkt_t;
  pkt_t sent [NN][int];
  int q [NN][$];          // created, not yet sent (sequence numbers)
  int lvl = -1, gen_done = 0, tx_done = 0;

  task automatic send_flit(int g, logic [31:0] f);
    automatic bit ok = 0;
    while (!ok) begin
      automatic int w = 0;
      @(negedge clk); loc_in_data[g] = f; loc_in_req[g] = 1;
      while (!loc_in_ack[g] && w < 16) begin @(negedge clk); w++; end
      ok = loc_in_ack[g];
      loc_in_req[g] = 0;
      while (loc_in_ack[g]) @(negedge clk);
    end
  endtask

  function automatic pkt_t make_pkt(int g, int s, int dst);
    automatic pkt_t pk;
    automatic head_flit_t h;
    h = '{nat: NAT_HEAD, qos_id: 4'h1, dest: 6'(dst), src: 6'(g),
          prio: prio_e'($urandom), nbre: 4'(LEN), crc: 8'h00};
    pk.flits.push_back(seal_flit(h));
    for (int k = 1; k <= LEN; k++) begin
      automatic data_flit_t d;
      d = '{nat: (k == LEN) ? NAT_TAIL : NAT_BODY, data: {4'(g), 8'(s), 4'(k), 2'(lvl)},
            nbre: 4'(k), crc: 8'h00};
      pk.flits.push_back(seal_flit(d));
    end
    pk.dest = dst; pk.t0 = $time / 10;
    return pk;
  endfunction

  for (genvar g = 0; g <= M; g++) begin : g_core
    // generator: one packet per cycle with probability p = load * cap / LEN
    initial begin
      automatic int cur = -1;
      forever begin
        wait (lvl != cur);
        cur = lvl;
        for (int s = 0; s < PKTS; s++) begin
          automatic int dst = $urandom_range(M);
          // mean interval in cycles: LEN+1 flits at 1/3 flit per cycle, over the load
          automatic int period = (300 * (LEN + 1)) / LOAD_PCT[cur];
          if (dst == g) dst = (dst + 1) % NN;
          while ($urandom_range(period - 1) != 0) @(negedge clk);
          sent[g][s] = make_pkt(g, s, dst);
          q[g].push_back(s);
          @(negedge clk);
        end
        gen_done++;
      end
    end
    // sender
    initial begin
      automatic int cur = -1;
      forever begin
        wait (lvl != cur);
        cur = lvl;
        for (int s = 0; s < PKTS; s++) begin
          automatic int sq;
          wait (q[g].size() != 0);
          sq = q[g].pop_front();
          for (int f = 0; f <= LEN; f++) begin
            automatic logic [31:0] fl = sent[g][sq].flits[f];
            send_flit(g, fl);
          end
        end
        tx_done++;
      end
    end
    // sink: a data flit names its packet (source, sequence number, flit
    // number), so it can be checked on its own even when flits were lost
    initial begin
      automatic int src = -1, sq = -1, idx = 0, cnt = 0;
      forever begin
        @(negedge clk);
        if (loc_out_req[g]) begin
          automatic logic [31:0] f;
          repeat ($urandom_range(1)) @(negedge clk);
          f = loc_out_data[g];
          loc_out_ack[g] = 1;
          flits_rx++;
          chk(f[7:0] == crc8_calc(f[31:8]), "CRC intact at the destination");
          if (f[31:30] == NAT_HEAD) begin
            if (src >= 0) n_cut++;
            src = int'(f[19:14]); sq = -1; idx = 0; cnt = 0;
            chk(src < NN && int'(f[25:20]) == g, "header of a packet for this node");
            if (src >= NN) src = -1;
          end else begin
            automatic int ps = int'(f[29:26]), s = int'(f[25:18]), k = int'(f[17:14]);
            chk(ps < NN && sent[ps].exists(s) && k >= 1 && k <= LEN &&
                f == sent[ps][s].flits[k] && sent[ps][s].dest == g,
                "data flit of a sent packet, at its destination");
            if (src >= 0 && ps == src && (sq < 0 || sq == s)) begin
              chk(k > idx, "data flits of a packet in order");
              sq = s; idx = k; cnt++;
              if (k == LEN) begin
                if (cnt == LEN && ps < NN && sent[ps].exists(s)) begin
                  n_whole++;
                  if (s >= WARM) begin
                    lat_sum += $time / 10 - sent[ps][s].t0; n_meas++;
                  end
                end else n_cut++;
                src = -1;
              end
            end else begin
              // header lost: flits of a packet whose header did not arrive
              if (src >= 0) n_cut++;
              n_orphan++; src = -1;
            end
          end
          while (loc_out_req[g]) @(negedge clk);
          loc_out_ack[g] = 0;
        end
      end
    end
  end

  initial begin
    #400000000; failures++;
    $display("INFO watchdog at level %0d", lvl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic longint mean [NLVL];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    $display("INFO load%%  cycles  whole  cut  orphan_flits  drops  rerouted  accepted_flits/node/cycle  mean_latency");
    for (int L = 0; L < NLVL; L++) begin
      automatic longint t0 = $time / 10, t1;
      automatic int w0 = n_whole, c0 = n_cut, o0 = n_orphan, d0 = n_drop, r0 = n_rer, f0 = flits_rx;
      n_meas = 0; lat_sum = 0;
      gen_done = 0; tx_done = 0;
      lvl = L;
      wait (tx_done == NN);
      while ($time / 10 - last_act < longint'(QUIET)) @(negedge clk);
      t1 = last_act;
      mean[L] = lat_sum / (n_meas > 0 ? longint'(n_meas) : longint'(1));
      $display("INFO %5d  %6d  %5d  %3d  %5d  %5d  %8d  %0.3f  %0d",
               LOAD_PCT[L], t1 - t0, n_whole - w0, n_cut - c0, n_orphan - o0, n_drop - d0, n_rer - r0,
               real'(flits_rx - f0) / real'(NN) / real'(t1 - t0), mean[L]);
      chk(n_whole - w0 > 0, "packets arrive whole at every load");
      if (L == 0) begin
        chk(n_whole - w0 == NN * PKTS, "lowest load: every packet arrives whole");
        chk(n_drop == d0, "lowest load: no flit dropped");
      end
      for (int g = 0; g < NN; g++) sent[g].delete();
    end
    chk(mean[NLVL-1] > mean[0], "latency grows with the load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
