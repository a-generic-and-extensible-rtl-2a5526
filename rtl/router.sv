// router: generic router of the Spidergon NoC.
//
// N bidirectional ports, each an input link (in_req/in_data/in_ack) and an
// output link (out_req/out_data/out_ack), both 4-phase. Port 0 is the local
// port to the core. Inside:
//   N PMUs       one per input port: flow control, FIFO, routing and
//                services unit, stoppable clock;
//   N dynamic arbiters, one per output port, each with N requesters; input i
//                requests output j when its arb_port is j;
//   port_table   free/occupied register of the output ports;
//   noc_switch   crossbar from the PMUs (UX, ADRX) to the outputs;
//   N aloha_tx   output link senders with time-out and retransmission.
// Wormhole switching: the header reserves the output port through the
// arbiter and the body follows it, one flit per link handshake. Position in
// the network (M, NODE_ID, IS_CENTER) selects the routing function and the
// port count: 4 for a peripheral router, M+1 for the central router.
// Organisation as in the source design; all units share one clock here,
// where the source router is asynchronous.
module router
  import noc_pkg::*;
#(
  parameter int M         = 8,
  parameter int NODE_ID   = 1,
  parameter bit IS_CENTER = 1'b0,
  parameter int DEPTH     = 6,
  parameter int TD        = 4,
  parameter int NMAX_REQ  = 4,
  parameter int TIMEOUT   = 16,
  parameter int NMAX_RETX = 8,
  localparam int N  = IS_CENTER ? M + 1 : 4,
  localparam int PW = $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             in_req,
  input  logic [N-1:0][FLIT_W-1:0] in_data,
  output logic [N-1:0]             in_ack,
  output logic [N-1:0]             out_req,
  output logic [N-1:0][FLIT_W-1:0] out_data,
  input  logic [N-1:0]             out_ack,
  // event pulses per port, for statistics
  output logic [N-1:0]             ev_crc_err,
  output logic [N-1:0]             ev_dup,
  output logic [N-1:0]             ev_refused,
  output logic [N-1:0]             ev_rerouted,
  output logic [N-1:0]             ev_abandon,
  output logic [N-1:0]             ev_retx,
  output logic [N-1:0]             ev_drop,
  output logic [N-1:0]             ev_sent,
  output logic [N-1:0]             clk_on
);
  logic [N-1:0]             a_req, a_gnt, sw_valid, sw_ready, reject;
  logic [N-1:0][PW-1:0]     a_port, sw_adr, owner;
  logic [N-1:0][PRIO_W-1:0] a_prio;
  logic [N-1:0][FLIT_W-1:0] sw_data, o_data;
  logic [N-1:0]             o_valid, o_ready, owned, claim, rel, pfree;
  logic [N-1:0][N-1:0]      req_m, gnt_m;   // [output][input]

  for (genvar i = 0; i < N; i++) begin : g_in
    pmu #(.M(M), .NODE_ID(NODE_ID), .IS_CENTER(IS_CENTER), .DEPTH(DEPTH),
          .TD(TD), .NMAX_REQ(NMAX_REQ)) u_pmu (
      .clk, .rst_n,
      .link_req_i(in_req[i]), .link_data_i(in_data[i]), .link_ack_o(in_ack[i]),
      .arb_req(a_req[i]), .arb_port(a_port[i]), .arb_prio(a_prio[i]),
      .arb_gnt(a_gnt[i]),
      .sw_data(sw_data[i]), .sw_adr(sw_adr[i]), .sw_valid(sw_valid[i]),
      .sw_ready(sw_ready[i]),
      .crc_err(ev_crc_err[i]), .reject(reject[i]), .dup(ev_dup[i]),
      .refused(ev_refused[i]), .rerouted(ev_rerouted[i]), .abandoned(ev_abandon[i]), .clk_on(clk_on[i]));
  end

  always_comb begin
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        req_m[j][i] = a_req[i] && (int'(a_port[i]) == j);
    for (int i = 0; i < N; i++) begin
      a_gnt[i] = 1'b0;
      for (int j = 0; j < N; j++)
        if (int'(a_port[i]) == j) a_gnt[i] = gnt_m[j][i];
    end
    for (int j = 0; j < N; j++) begin
      owned[j] = |gnt_m[j];
      owner[j] = '0;
      for (int i = 0; i < N; i++)
        if (gnt_m[j][i]) owner[j] = PW'(i);
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    dynamic_arbiter #(.NREQ(N)) u_arb (
      .clk, .rst_n, .req(req_m[j]), .prio(a_prio), .port_free(pfree[j]),
      .gnt(gnt_m[j]), .claim(claim[j]), .release_o(rel[j]));

    aloha_tx #(.TIMEOUT(TIMEOUT), .NMAX_RETX(NMAX_RETX)) u_tx (
      .clk, .rst_n, .in_data(o_data[j]), .in_valid(o_valid[j]),
      .in_ready(o_ready[j]), .link_req_o(out_req[j]), .link_data_o(out_data[j]),
      .link_ack_i(out_ack[j]), .retx(ev_retx[j]), .drop(ev_drop[j]),
      .sent(ev_sent[j]));
  end

  port_table #(.N(N)) u_tab (
    .clk, .rst_n, .claim, .release_i(rel), .free(pfree), .occupied());

  noc_switch #(.N(N)) u_sw (
    .ux(sw_data), .adrx(sw_adr), .in_valid(sw_valid), .in_ready(sw_ready),
    .owner, .owned, .out_data(o_data), .out_valid(o_valid), .out_ready(o_ready));
endmodule
