// noc_switch: crossbar of the router.
//
// Each input port X presents a flit UX (ux[X]), the output address ADRX
// (adrx[X]) it has chosen, and in_valid[X]. Each output j is owned by at most
// one input, the one its arbiter granted (owned[j], owner[j]). Output j
// carries the owner's flit when that input's ADRX names j; the owner is told
// the flit was taken (in_ready) when output j accepts it (out_ready[j]).
// Purely combinational. ADRX is clog2(N) bits wide, 4 bits for the 9-port
// central router (the source design quotes 3 bits, enough for 8 ports).
module noc_switch
  import noc_pkg::*;
#(
  parameter int N = 4,
  localparam int PW = $clog2(N)
) (
  input  logic [N-1:0][FLIT_W-1:0] ux,
  input  logic [N-1:0][PW-1:0]     adrx,
  input  logic [N-1:0]             in_valid,
  output logic [N-1:0]             in_ready,
  input  logic [N-1:0][PW-1:0]     owner,
  input  logic [N-1:0]             owned,
  output logic [N-1:0][FLIT_W-1:0] out_data,
  output logic [N-1:0]             out_valid,
  input  logic [N-1:0]             out_ready
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_data[j]  = ux[owner[j]];
      out_valid[j] = owned[j] && in_valid[owner[j]] && (int'(adrx[owner[j]]) == j);
    end
    for (int i = 0; i < N; i++) begin
      in_ready[i] = 1'b0;
      for (int j = 0; j < N; j++)
        if (int'(adrx[i]) == j && owned[j] && int'(owner[j]) == i && out_ready[j])
          in_ready[i] = 1'b1;
    end
  end
endmodule
