// rr_arbiter: round-robin arbitration module of a dynamic arbiter.
//
// gnt is one-hot: the first active request at or after the pointer, going
// upwards and wrapping around (combinational). When advance is high the
// pointer moves to the requester after the winner, so the winner becomes the
// last in the list: the priority list is shifted circularly after each grant,
// as in the source design. The source arbiter is speed independent; this one
// is clocked.
module rr_arbiter #(
  parameter int NREQ = 4,
  localparam int IW = (NREQ > 1) ? $clog2(NREQ) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NREQ-1:0] req,
  input  logic            advance,
  output logic [NREQ-1:0] gnt
);
  logic [IW-1:0] ptr, win;
  logic          found;

  always_comb begin
    gnt   = '0;
    win   = '0;
    found = 1'b0;
    for (int o = 0; o < NREQ; o++) begin
      automatic int k = (int'(ptr) + o) % NREQ;
      if (!found && req[k]) begin
        found  = 1'b1;
        win    = IW'(k);
        gnt[k] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ptr <= '0;
    else if (advance && found)  ptr <= (win == IW'(NREQ - 1)) ? '0 : win + 1'b1;
  end
endmodule
