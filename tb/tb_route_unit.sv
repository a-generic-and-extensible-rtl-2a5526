// tb_route_unit: the routing unit of peripheral router 1 (valence 8) is fed
// random packets from a FIFO model; an arbiter model refuses a random number
// of request episodes before granting (two cycles after the request, as the
// real arbiter does). Checks: requested port is the preferred one and, after
// NMAX_REQ refusals, the alternative; TD idle cycles between two request
// episodes; priority passed on; every flit forwarded in order to the granted
// port; the request held through the packet and dropped after its last flit.
module tb_route_unit;
  import noc_pkg::*;
  localparam int M = 8, TD = 4, NMAX = 4;
  logic clk = 0, rst_n = 0;
  logic [31:0] fifo_data, sw_data;
  logic fifo_empty, fifo_rd, arb_req, arb_gnt = 0, sw_valid, sw_ready = 0, busy, refused, rerouted, abandoned;
  logic [1:0] arb_port, sw_adr, arb_prio;
  logic [31:0] fq[$], outq[$];
  int checks = 0, failures = 0, n_refused = 0, n_rerouted = 0, n_pkts = 0, n_aband = 0;

  route_unit #(.M(M), .NODE_ID(1), .IS_CENTER(1'b0), .TD(TD), .NMAX_REQ(NMAX)) dut (.*);
  always #5 clk = ~clk;

  assign fifo_empty = (fq.size() == 0);
  assign fifo_data  = fifo_empty ? 32'h0 : fq[0];

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t", s, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (fifo_rd) void'(fq.pop_front());
    if (sw_valid && sw_ready) begin
      chk(outq.size() > 0 && sw_data == outq[0], "flit forwarded in order");
      chk(arb_req && arb_gnt && sw_adr == arb_port, "flit sent while owning the port");
      void'(outq.pop_front());
    end
    if (refused) n_refused++;
    if (rerouted) n_rerouted++;
    if (abandoned) n_aband++;
    sw_ready <= ($urandom_range(2) != 0);
  end

  // independent routing reference for node 1
  function automatic int pref(int d);
    int cw;
    if (d == 1) return 0;
    if (d == 0) return 3;
    cw = (d - 1 + M) % M;
    return (cw <= M / 2) ? 1 : 2;
  endfunction

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      head_flit_t h;
      int n, refusals, ep, low, exp_port, alt_port;
      n = $urandom_range(15);
      refusals = $urandom_range(2) == 0 ? $urandom_range(2 * NMAX) : 0;
      h = '{nat: NAT_HEAD, qos_id: 4'h1, dest: 6'($urandom_range(8)), src: 6'd1,
            prio: prio_e'($urandom), nbre: 4'(n), crc: 8'h00};
      exp_port = pref(int'(h.dest));
      alt_port = (h.dest == 0) ? 1 : (h.dest == 1 ? 0 : 3);
      fq.push_back(h); outq.push_back(h);
      for (int k = 1; k <= n; k++) begin
        data_flit_t d;
        d = '{nat: (k == n) ? NAT_TAIL : NAT_BODY, data: 18'($urandom), nbre: 4'(k), crc: 8'h00};
        fq.push_back(d); outq.push_back(d);
      end
      // request episodes
      for (ep = 0; ep <= refusals; ep++) begin
        int hold;
        while (!arb_req) @(negedge clk);
        chk(int'(arb_port) == (((ep / NMAX) % 2 != 0) ? alt_port : exp_port), "requested port");
        chk(arb_prio == h.prio, "priority of the header");
        hold = 0;
        if (ep < refusals) begin
          while (arb_req) begin @(negedge clk); hold++; end
          chk(hold == 3, "request held three cycles");
          low = 0;
          while (!arb_req) begin @(negedge clk); low++; end
          chk(low == TD, "waits TD cycles before requesting again");
        end else begin
          @(negedge clk); @(negedge clk);
          arb_gnt = 1;
          while (arb_req) @(negedge clk);
          arb_gnt = 0;
          chk(outq.size() == 0, "whole packet forwarded before the request drops");
        end
      end
      n_pkts++;
    end
    chk(n_aband == 0, "no complete packet ended early");
    // truncated packet: header announces 3 flits, only 1 arrives
    begin
      automatic head_flit_t h = '{nat: NAT_HEAD, qos_id: 4'h1, dest: 6'd2, src: 6'd1,
                                  prio: PRIO_RT, nbre: 4'd3, crc: 8'h00};
      automatic data_flit_t d = '{nat: NAT_BODY, data: 18'h155, nbre: 4'd1, crc: 8'h00};
      automatic int w = 0;
      fq.push_back(h); fq.push_back(d); outq.push_back(h); outq.push_back(d);
      while (!arb_req) @(negedge clk);
      @(negedge clk); @(negedge clk); arb_gnt = 1;
      while (arb_req && w < 400) begin @(negedge clk); w++; end
      arb_gnt = 0;
      chk(!arb_req && n_aband == 1, "stalled packet abandoned");
      chk(w >= 256 && w < 270, "after STALL_MAX idle cycles");
    end
    chk(n_rerouted > 0 && n_refused > 0, "refusal and rerouting exercised");
    $display("INFO packets=%0d refused=%0d rerouted=%0d", n_pkts, n_refused, n_rerouted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
