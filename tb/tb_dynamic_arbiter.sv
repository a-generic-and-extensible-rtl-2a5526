// tb_dynamic_arbiter: requesters modelled like routing units (hold the request
// while waiting, keep it while owning the port for a random packet time, then
// drop it). Checks against a reference: a grant goes only to a requester that
// had the highest priority among the requests when the port was last offered,
// equal priorities are served round robin, at most one grant at a time, claim
// and release pulse with grant start and end, no grant while the table says
// the port is occupied, and a free port grants two cycles after a request.
module tb_dynamic_arbiter;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, port_free = 1;
  logic [3:0] req = 0, gnt, gnt_q;
  logic [3:0][1:0] prio = 0;
  logic claim, release_o;
  int checks = 0, failures = 0;
  int n_grant = 0, n_prio_win = 0;

  dynamic_arbiter #(.NREQ(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s t=%0t req=%b gnt=%b", s, $time, req, gnt); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // latency of a lone request on a free port
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); prio[2] = 2'b01; req[2] = 1;
    @(negedge clk); chk(gnt == 0, "no grant after one cycle");
    @(negedge clk); chk(gnt == 4'b0100, "grant after two cycles");
    req[2] = 0;
    @(negedge clk); chk(gnt == 0, "grant dropped with the request");
    // occupied port: no grant
    port_free = 0; req[1] = 1; prio[1] = 2'b11;
    repeat (5) @(negedge clk);
    chk(gnt == 0, "no grant while the table reports occupied");
    port_free = 1; req[1] = 0;
    repeat (3) @(negedge clk);
    // random traffic
    fork
      for (int i = 0; i < 4; i++) begin
        automatic int id = i;
        fork
          forever begin
            repeat ($urandom_range(6)) @(negedge clk);
            prio[id] = 2'($urandom);
            req[id] = 1;
            while (!gnt[id]) @(negedge clk);
            repeat ($urandom_range(1, 8)) @(negedge clk);
            req[id] = 0;
            @(negedge clk);
          end
        join_none
      end
    join_none
    repeat (4000) @(negedge clk);
    chk(n_grant > 200, "many grants");
    chk(n_prio_win > 20, "priority decided some conflicts");
    $display("INFO grants=%0d priority_decided=%0d", n_grant, n_prio_win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of comparator + C-elements + round robin, computed from
  // the requests alone (the DUT's grant is only used as the En input)
  logic [3:0] rsel_q = 0, rc_q = 0, rc_d, elig, exp_gnt;
  int last_win = 3;
  always_comb begin
    int mx;
    rc_d = (req & rsel_q) | (rc_q & (req | rsel_q));
    elig = rc_d & req;
    exp_gnt = 0;
    for (int o = 1; o <= 4; o++)
      if (exp_gnt == 0 && elig[(last_win + o) % 4]) exp_gnt[(last_win + o) % 4] = 1'b1;
  end
  always @(posedge clk) if (rst_n) begin
    int mx;
    logic [3:0] sd;
    mx = 0;
    for (int i = 0; i < 4; i++) if (req[i] && int'(prio[i]) > mx) mx = int'(prio[i]);
    for (int i = 0; i < 4; i++) sd[i] = req[i] && int'(prio[i]) == mx;
    chk(claim == (gnt == 0 && port_free && elig != 0), "claim when free and someone eligible");
    chk_pending <= claim;
    exp_hold    <= exp_gnt;
    if (claim) begin
      n_grant++;
      for (int i = 0; i < 4; i++) if (req[i] && !elig[i] && prio[i] < prio[$clog2(exp_gnt)]) n_prio_win++;
      last_win = $clog2(exp_gnt);
    end
    rsel_q <= (gnt == 0) ? sd : 4'b0;
    rc_q   <= rc_d;
  end
  logic chk_pending = 0;
  logic [3:0] exp_hold;
  always @(negedge clk) if (rst_n) begin
    chk($onehot0(gnt), "one grant at most");
    if (chk_pending) chk(gnt == exp_hold, "grant to the next eligible requester in round-robin order");
  end

  // claim/release pulses
  always @(posedge clk) if (rst_n) begin
    if (claim)     chk(gnt == 0, "claim only when no grant is held");
    if (release_o) chk(gnt != 0 && (gnt & req) == 0, "release when the winner dropped");
  end
endmodule
