// prio_comparator: priority comparator of a dynamic arbiter.
//
// While enabled (en high: no grant is held on this output port) it compares
// the 2-bit priorities of the active requests and, at the next clock edge,
// raises sel for every requester whose priority equals the highest one among
// the active requests. While en is low (a requester holds the port) sel is
// cleared. Priority codes: 11 signalling, 10 real time, 01 register/memory
// access, 00 block transfer. Behaviour follows the source design's
// comparator; storing the result in a register is this design's timing.
module prio_comparator
  import noc_pkg::*;
#(
  parameter int NREQ = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic [NREQ-1:0]             req,
  input  logic [NREQ-1:0][PRIO_W-1:0] prio,
  output logic [NREQ-1:0]             sel
);
  logic [PRIO_W-1:0] best;
  logic [NREQ-1:0]   sel_d;

  always_comb begin
    best = '0;
    for (int i = 0; i < NREQ; i++)
      if (req[i] && prio[i] > best) best = prio[i];
    for (int i = 0; i < NREQ; i++)
      sel_d[i] = req[i] && (prio[i] == best);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sel <= '0;
    else if (en) sel <= sel_d;
    else         sel <= '0;
  end
endmodule
