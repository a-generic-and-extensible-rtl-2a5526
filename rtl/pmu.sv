// pmu: port management unit, one per router input port.
//
// Chains the four parts of an input port: the flow control unit receives
// flits from the neighbour over the 4-phase link and writes the good ones into
// the FIFO; the routing and services unit takes them from the FIFO, obtains
// the output port from the dynamic arbiter and passes the packet to the
// switch. All of them run on a stoppable clock from clock_gen, which runs
// while a request is up on the link, the flow control unit is inside a
// handshake (so it sees the request drop), the FIFO holds flits or the
// routing unit is busy, and stops otherwise. It also runs during reset, so
// that a reset applied from power-up reaches every register. The arbiter and switch
// interface signals are held steady while the clock is stopped (the routing
// unit is idle then). This structure is the source design's; the enable
// condition of the clock is this design's.
module pmu
  import noc_pkg::*;
#(
  parameter int M         = 8,
  parameter int NODE_ID   = 1,
  parameter bit IS_CENTER = 1'b0,
  parameter int DEPTH     = 6,
  parameter int TD        = 4,
  parameter int NMAX_REQ  = 4,
  localparam int N  = IS_CENTER ? M + 1 : 4,
  localparam int PW = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              link_req_i,
  input  logic [FLIT_W-1:0] link_data_i,
  output logic              link_ack_o,
  output logic              arb_req,
  output logic [PW-1:0]     arb_port,
  output logic [PRIO_W-1:0] arb_prio,
  input  logic              arb_gnt,
  output logic [FLIT_W-1:0] sw_data,
  output logic [PW-1:0]     sw_adr,
  output logic              sw_valid,
  input  logic              sw_ready,
  output logic              crc_err,
  output logic              reject,
  output logic              dup,
  output logic              refused,
  output logic              rerouted,
  output logic              abandoned,
  output logic              clk_on      // the port clock is running
);
  logic              gclk, en;
  logic              wr_en, rd_en, full, empty, busy, fc_busy;
  logic [FLIT_W-1:0] wr_data, rd_data;

  assign en     = !rst_n || link_req_i || fc_busy || !empty || busy;
  assign clk_on = en;

  clock_gen u_clk (.clk_i(clk), .en_i(en), .gclk_o(gclk));

  flow_ctrl u_fc (
    .clk(gclk), .rst_n, .link_req_i, .link_data_i, .link_ack_o,
    .fifo_full(full), .wr_en, .wr_data, .crc_err, .reject, .dup, .busy(fc_busy));

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_fifo (
    .clk(gclk), .rst_n, .wr_en, .wr_data, .rd_en, .rd_data,
    .full, .empty, .count());

  route_unit #(.M(M), .NODE_ID(NODE_ID), .IS_CENTER(IS_CENTER),
               .TD(TD), .NMAX_REQ(NMAX_REQ)) u_ru (
    .clk(gclk), .rst_n, .fifo_data(rd_data), .fifo_empty(empty),
    .fifo_rd(rd_en), .arb_req, .arb_port, .arb_prio, .arb_gnt,
    .sw_data, .sw_adr, .sw_valid, .sw_ready, .busy, .refused, .rerouted, .abandoned);
endmodule
