// port_table: routing table holding the state of the router's output ports.
//
// One register bit per output port, set (occupied) when that port's arbiter
// claims it for a packet and cleared (free) when the arbiter releases it at
// the end of the packet. free[j] is the table's acknowledge to arbiter j: the
// arbiter may only grant while its port is free. A claim and a release of the
// same port in one cycle cannot happen (the arbiter does one or the other);
// release wins. Occupancy is also counted for statistics. Register per port
// as in the source design.
module port_table #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] claim,
  input  logic [N-1:0] release_i,
  output logic [N-1:0] free,
  output logic [N-1:0] occupied
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) occupied <= '0;
    else        occupied <= (occupied | claim) & ~release_i;
  end

  assign free = ~occupied;

`ifndef SYNTHESIS
  for (genvar j = 0; j < N; j++) begin : g_chk
    a_no_double_claim: assert property (@(posedge clk) disable iff (!rst_n)
                                        claim[j] |-> !occupied[j]);
  end
`endif
endmodule
