// route_fn: routing function of a router of the elementary polygon network.
//
// Combinational path calculation from the router's position (parameters) and
// the destination address of a packet header. Addresses: the central router
// is 0, the peripheral routers are 1..M in clockwise order.
//   Peripheral router (4 ports: 0 local, 1 clockwise, 2 counter-clockwise,
//   3 central): a packet for this node leaves on the local port; one for the
//   centre goes to port 3, with the clockwise ring as alternative; any other
//   takes the shorter way round the ring (clockwise on a tie) and has the way
//   through the central router as alternative.
//   Central router (M+1 ports: 0 local, k to peripheral k): the direct port to
//   the destination, with the port of the destination's counter-clockwise
//   neighbour (one clockwise hop away from it) as alternative.
// The alternative is used after repeated arbitration refusals, so the central
// router takes over traffic when the ring is congested. The source design
// states that routing depends on the router position and that the central
// router intervenes under congestion; the concrete rule is this design's own.
// Addresses outside 0..M are delivered to the local port.
module route_fn #(
  parameter int M         = 8,
  parameter int NODE_ID   = 1,
  parameter bit IS_CENTER = 1'b0,
  localparam int N  = IS_CENTER ? M + 1 : 4,
  localparam int PW = $clog2(N)
) (
  input  logic [5:0]    dest_i,
  output logic [PW-1:0] primary_o,
  output logic [PW-1:0] alt_o
);
  localparam int PORT_CW  = 1;
  localparam int PORT_CCW = 2;
  localparam int PORT_CTR = 3;

  always_comb begin
    automatic int d  = int'(dest_i);
    automatic int cw = 0;
    primary_o = '0;
    alt_o     = '0;
    if (d == NODE_ID || d > M) begin
      primary_o = '0;
      alt_o     = '0;
    end else if (IS_CENTER) begin
      primary_o = PW'(d);
      alt_o     = PW'(((d + M - 2) % M) + 1);
    end else if (d == 0) begin
      primary_o = PW'(PORT_CTR);
      alt_o     = PW'(PORT_CW);
    end else begin
      cw        = (d - NODE_ID + M) % M;
      primary_o = (cw <= M / 2) ? PW'(PORT_CW) : PW'(PORT_CCW);
      alt_o     = PW'(PORT_CTR);
    end
  end
endmodule
