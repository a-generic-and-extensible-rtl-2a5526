// spidergon_polygon: elementary polygon network of the Spidergon NoC.
//
// A star combined with a ring: a central router (address 0, M+1 ports)
// is linked point to point with M = 4R peripheral routers (addresses 1..M,
// 4 ports each), and the peripheral routers form a bidirectional ring. Each
// link is a pair of 4-phase channels, one per direction (2M channels to the
// centre, 2M on the ring). Wiring, with peripheral ports 0 local,
// 1 clockwise, 2 counter-clockwise, 3 centre, and central port k facing
// peripheral k:
//   peripheral k out 1 -> peripheral k+1 in 2,  peripheral k out 2 ->
//   peripheral k-1 in 1, peripheral k out 3 -> centre in k, centre out k ->
//   peripheral k in 3 (indices modulo M in 1..M).
// The local port of node n is brought out as loc_in_* (core to network) and
// loc_out_* (network to core), with the same 4-phase protocol; a core sends
// 32-bit flits with their CRC and must acknowledge every flit it receives.
// Valence 8 is the example of the source design. One clock for all routers.
module spidergon_polygon
  import noc_pkg::*;
#(
  parameter int M         = 8,
  parameter int DEPTH     = 6,
  parameter int TD        = 4,
  parameter int NMAX_REQ  = 4,
  parameter int TIMEOUT   = 16,
  parameter int NMAX_RETX = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [M:0]             loc_in_req,
  input  logic [M:0][FLIT_W-1:0] loc_in_data,
  output logic [M:0]             loc_in_ack,
  output logic [M:0]             loc_out_req,
  output logic [M:0][FLIT_W-1:0] loc_out_data,
  input  logic [M:0]             loc_out_ack,
  // event pulses of all routers, OR-ed over their ports, per node
  output logic [M:0]             ev_crc_err,
  output logic [M:0]             ev_dup,
  output logic [M:0]             ev_refused,
  output logic [M:0]             ev_rerouted,
  output logic [M:0]             ev_abandon,
  output logic [M:0]             ev_retx,
  output logic [M:0]             ev_drop,
  output logic [M:0]             ev_clk_off    // some port of the node has its clock stopped
);
  // ring and spoke channels of peripheral k (1..M), indexed by their sender k;
  // *_ack[k] is the acknowledge of channel *[k], driven by its receiver
  logic [M:0]             cw_req, cw_ack, ccw_req, ccw_ack, up_req, up_ack, dn_req, dn_ack;
  logic [M:0][FLIT_W-1:0] cw_data, ccw_data, up_data, dn_data;

  function automatic int nxt(int k); return (k == M) ? 1 : k + 1; endfunction
  function automatic int prv(int k); return (k == 1) ? M : k - 1; endfunction

  // central router
  logic [M:0]             c_in_req, c_in_ack, c_out_req, c_out_ack;
  logic [M:0][FLIT_W-1:0] c_in_data, c_out_data;
  logic [M:0]             c_crc, c_dup, c_ref, c_rer, c_ab, c_retx, c_drop, c_on;

  always_comb begin
    c_in_req[0]    = loc_in_req[0];
    c_in_data[0]   = loc_in_data[0];
    loc_in_ack[0]  = c_in_ack[0];
    loc_out_req[0] = c_out_req[0];
    loc_out_data[0]= c_out_data[0];
    c_out_ack[0]   = loc_out_ack[0];
    for (int k = 1; k <= M; k++) begin
      c_in_req[k]  = up_req[k];
      c_in_data[k] = up_data[k];
      up_ack[k]    = c_in_ack[k];
      dn_req[k]    = c_out_req[k];
      dn_data[k]   = c_out_data[k];
      c_out_ack[k] = dn_ack[k];
    end
    up_ack[0]  = 1'b0;
    dn_req[0]  = 1'b0;
    dn_data[0] = '0;
  end

  router #(.M(M), .NODE_ID(0), .IS_CENTER(1'b1), .DEPTH(DEPTH), .TD(TD),
           .NMAX_REQ(NMAX_REQ), .TIMEOUT(TIMEOUT), .NMAX_RETX(NMAX_RETX)) u_center (
    .clk, .rst_n,
    .in_req(c_in_req), .in_data(c_in_data), .in_ack(c_in_ack),
    .out_req(c_out_req), .out_data(c_out_data), .out_ack(c_out_ack),
    .ev_crc_err(c_crc), .ev_dup(c_dup), .ev_refused(c_ref), .ev_rerouted(c_rer), .ev_abandon(c_ab),
    .ev_retx(c_retx), .ev_drop(c_drop), .ev_sent(), .clk_on(c_on));

  assign ev_crc_err[0]  = |c_crc;
  assign ev_dup[0]      = |c_dup;
  assign ev_refused[0]  = |c_ref;
  assign ev_rerouted[0] = |c_rer;
  assign ev_abandon[0]  = |c_ab;
  assign ev_retx[0]     = |c_retx;
  assign ev_drop[0]     = |c_drop;
  assign ev_clk_off[0]  = ~&c_on;

  assign cw_req[0] = 1'b0;  assign cw_data[0]  = '0;  assign cw_ack[0]  = 1'b0;
  assign ccw_req[0] = 1'b0; assign ccw_data[0] = '0;  assign ccw_ack[0] = 1'b0;
  assign up_req[0] = 1'b0;  assign up_data[0]  = '0;  assign dn_ack[0]  = 1'b0;

  // peripheral routers; cw_* is the channel leaving k clockwise (to k+1),
  // ccw_* the channel leaving k counter-clockwise (to k-1)
  for (genvar k = 1; k <= M; k++) begin : g_per
    logic [3:0]             p_in_req, p_in_ack, p_out_req, p_out_ack;
    logic [3:0][FLIT_W-1:0] p_in_data, p_out_data;
    logic [3:0]             p_crc, p_dup, p_ref, p_rer, p_ab, p_retx, p_drop, p_on;

    always_comb begin
      p_in_req  = {dn_req[k],  cw_req[prv(k)],  ccw_req[nxt(k)],  loc_in_req[k]};
      p_in_data = {dn_data[k], cw_data[prv(k)], ccw_data[nxt(k)], loc_in_data[k]};
      p_out_ack = {up_ack[k],  ccw_ack[k],      cw_ack[k],        loc_out_ack[k]};
    end

    router #(.M(M), .NODE_ID(k), .IS_CENTER(1'b0), .DEPTH(DEPTH), .TD(TD),
             .NMAX_REQ(NMAX_REQ), .TIMEOUT(TIMEOUT), .NMAX_RETX(NMAX_RETX)) u_per (
      .clk, .rst_n,
      .in_req(p_in_req), .in_data(p_in_data), .in_ack(p_in_ack),
      .out_req(p_out_req), .out_data(p_out_data), .out_ack(p_out_ack),
      .ev_crc_err(p_crc), .ev_dup(p_dup), .ev_refused(p_ref), .ev_rerouted(p_rer), .ev_abandon(p_ab),
      .ev_retx(p_retx), .ev_drop(p_drop), .ev_sent(), .clk_on(p_on));

    assign loc_in_ack[k]   = p_in_ack[0];
    assign loc_out_req[k]  = p_out_req[0];
    assign loc_out_data[k] = p_out_data[0];
    // acks this router gives on its ring and spoke inputs
    assign ccw_ack[nxt(k)] = p_in_ack[1];   // this router acknowledges ccw[k+1]
    assign cw_ack[prv(k)]  = p_in_ack[2];   // and cw[k-1]
    assign dn_ack[k]       = p_in_ack[3];
    assign cw_req[k]       = p_out_req[1];
    assign cw_data[k]      = p_out_data[1];
    assign ccw_req[k]      = p_out_req[2];
    assign ccw_data[k]     = p_out_data[2];
    assign up_req[k]       = p_out_req[3];
    assign up_data[k]      = p_out_data[3];

    assign ev_crc_err[k]  = |p_crc;
    assign ev_dup[k]      = |p_dup;
    assign ev_refused[k]  = |p_ref;
    assign ev_rerouted[k] = |p_rer;
    assign ev_abandon[k]  = |p_ab;
    assign ev_retx[k]     = |p_retx;
    assign ev_drop[k]     = |p_drop;
    assign ev_clk_off[k]  = ~&p_on;
  end
endmodule
