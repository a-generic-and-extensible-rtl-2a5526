// dynamic_arbiter: arbiter of one output port.
//
// Resolves conflicts between the input ports that want this output, first by
// packet priority, then round robin. Structure:
//   En        = NOR of the grants (the OR gate of the source design, inverted
//               to mean "port not held"); it enables the comparator.
//   prio_comparator  flags the active requesters of highest priority (sel),
//               registered, one cycle after the requests.
//   C-elements  one per requester, inputs req and sel: the output rises when
//               both are high, falls when both are low, else holds. It stays
//               high after the comparator clears sel, until the request drops.
//   rr_arbiter  picks one of the C-element outputs (gated by req).
// A grant is given when the port is not held and the routing table reports
// the port free (port_free); claim pulses with it so the table marks the port
// occupied. The grant (one-hot gnt) is held until the winner lowers its
// request; then release pulses and the port is offered again. Latency from a
// request to its grant is two clock cycles on a free port.
// The composition follows the source design; the clocked C-element and the
// registered comparator are this design's synchronous rendering of it.
module dynamic_arbiter
  import noc_pkg::*;
#(
  parameter int NREQ = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NREQ-1:0]             req,
  input  logic [NREQ-1:0][PRIO_W-1:0] prio,
  input  logic                        port_free,
  output logic [NREQ-1:0]             gnt,
  output logic                        claim,
  output logic                        release_o
);
  logic            en;
  logic [NREQ-1:0] sel, c_q, c_d, rr_in, rr_gnt;

  assign en = ~|gnt;

  prio_comparator #(.NREQ(NREQ)) u_cmp (
    .clk, .rst_n, .en, .req, .prio, .sel);

  // Muller C-elements (req, sel)
  always_comb begin
    c_d   = (req & sel) | (c_q & (req | sel));
    rr_in = c_d & req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_q <= '0;
    else        c_q <= c_d;
  end

  rr_arbiter #(.NREQ(NREQ)) u_rr (
    .clk, .rst_n, .req(rr_in), .advance(claim), .gnt(rr_gnt));

  assign claim     = en && port_free && (|rr_in);
  assign release_o = !en && !(|(gnt & req));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         gnt <= '0;
    else if (claim)     gnt <= rr_gnt;
    else if (release_o) gnt <= '0;
  end

`ifndef SYNTHESIS
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
`endif
endmodule
