// aloha_tx: sender side of a router output link, with Aloha retransmission.
//
// Takes one flit at a time from the switch (in_valid/in_ready) and sends it
// over the 4-phase link: link_data_o holds the flit while link_req_o is high.
//   SEND  request up; an acknowledge ends the transfer (DONE). If none has
//         arrived after TIMEOUT cycles the request is withdrawn (GAP).
//   GAP   request down for at least one cycle. An acknowledge that arrives
//         now (the receiver accepted in the very last cycle) still counts as
//         success. Otherwise the flit is sent again, unless it has already
//         been retransmitted NMAX_RETX times: then it is dropped (drop pulse)
//         so that a dead or blocked neighbour cannot stall the router for ever.
//   DONE  request down, wait for the acknowledge to drop, then take the next
//         flit.
// After a drop the rest of that packet is discarded as well: the flits that
// follow, up to the next header, are taken from the switch at once and not
// sent (each with a drop pulse). The next router would otherwise see a packet
// with a hole, and since data flits carry only their order number Nbre, a
// later flit could be taken as the continuation of another packet waiting
// there. Discarding the remainder is this design's addition.
// A flit therefore takes at least 3 cycles on the link. Time-out and maximum
// number of retransmissions follow the source design's Aloha scheme; their
// values are this design's (the source leaves them generic).
module aloha_tx
  import noc_pkg::*;
#(
  parameter int TIMEOUT   = 16,
  parameter int NMAX_RETX = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FLIT_W-1:0] in_data,
  input  logic              in_valid,
  output logic              in_ready,
  output logic              link_req_o,
  output logic [FLIT_W-1:0] link_data_o,
  input  logic              link_ack_i,
  output logic              retx,   // pulse: a retransmission starts
  output logic              drop,   // pulse: flit abandoned or discarded
  output logic              sent    // pulse: flit acknowledged
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_GAP, S_DONE} state_e;
  state_e state;

  localparam int TW = $clog2(TIMEOUT + 1);
  localparam int RW = $clog2(NMAX_RETX + 1);
  localparam logic [TW-1:0] T_LAST = TW'(TIMEOUT - 1);
  localparam logic [RW-1:0] R_MAX  = RW'(NMAX_RETX);
  logic [TW-1:0] tcnt;
  logic [RW-1:0] rcnt;
  logic          purge;     // a flit of the current packet was dropped
  logic          give_up, discard;

  assign in_ready   = (state == S_IDLE);
  assign link_req_o = (state == S_SEND);
  assign sent       = ((state == S_SEND) || (state == S_GAP)) && link_ack_i;
  assign retx       = (state == S_GAP) && !link_ack_i && (rcnt != R_MAX);
  assign give_up    = (state == S_GAP) && !link_ack_i && (rcnt == R_MAX);
  assign discard    = (state == S_IDLE) && in_valid && purge && (in_data[31:30] != NAT_HEAD);
  assign drop       = give_up || discard;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      link_data_o <= '0;
      tcnt        <= '0;
      rcnt        <= '0;
      purge       <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid && !discard) begin
          purge       <= 1'b0;
          link_data_o <= in_data;
          tcnt        <= '0;
          rcnt        <= '0;
          state       <= S_SEND;
        end
        S_SEND: begin
          if (link_ack_i)                state <= S_DONE;
          else if (tcnt == T_LAST)  state <= S_GAP;
          else                           tcnt  <= tcnt + 1'b1;
        end
        S_GAP: begin
          if (link_ack_i) begin
            state <= S_DONE;
          end else if (give_up) begin
            purge <= (link_data_o[31:30] != NAT_TAIL);
            state <= S_IDLE;
          end else begin
            rcnt  <= rcnt + 1'b1;
            tcnt  <= '0;
            state <= S_SEND;
          end
        end
        default: if (!link_ack_i) state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             (link_req_o && !link_ack_i) |=> $stable(link_data_o));
`endif
endmodule
