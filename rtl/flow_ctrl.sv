// flow_ctrl: flow control unit, receiver side of a router input link.
//
// The link uses a 4-phase handshake: the sender holds the flit on link_data_i
// and raises link_req_i; the receiver raises link_ack_o; the sender lowers the
// request; the receiver lowers the acknowledge. When a request is seen, the
// flit is checked in the same cycle:
//   * CRC: the 8-bit code is recomputed over bits 31:8 and compared with 7:0;
//   * room: the FIFO must not be full;
//   * order: a data flit must carry the expected order number Nbre (1, 2, ..
//     up to the count announced by the header). A header is accepted at any
//     time and restarts the count;
//   * duplicate: a flit equal to the last one stored is a retransmission whose
//     acknowledge was lost; it is acknowledged again but not stored.
// A flit that passes is written to the FIFO (wr_en for one cycle) and
// acknowledged (link_ack_o rises one cycle after the request was seen). A flit
// that fails is rejected: no acknowledge is sent and the unit waits for the
// request to drop, after which the sender's retransmission is checked afresh.
// Rejection without acknowledge, CRC check and duplicate avoidance follow the
// source design; the order and duplicate rules above are this design's choice.
module flow_ctrl
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              link_req_i,
  input  logic [FLIT_W-1:0] link_data_i,
  output logic              link_ack_o,
  input  logic              fifo_full,
  output logic              wr_en,
  output logic [FLIT_W-1:0] wr_data,
  output logic              crc_err,   // pulse: flit rejected, bad CRC
  output logic              reject,    // pulse: flit rejected for any reason
  output logic              dup,       // pulse: duplicate acknowledged
  output logic              busy       // a handshake is in progress
);
  typedef enum logic [1:0] {S_IDLE, S_ACK, S_REJ} state_e;
  state_e state;

  logic [FLIT_W-1:0] last_flit;
  logic              have_last;
  logic              exp_head;         // next data flit would be out of a packet
  logic [NBRE_W-1:0] exp_n, total_n;

  logic       crc_ok;
  head_flit_t hf;
  data_flit_t df;
  logic       is_dup, order_ok, accept, evaluate;

  crc8 u_crc (.flit_i(link_data_i), .crc_o(), .ok_o(crc_ok));

  always_comb begin
    hf       = head_flit_t'(link_data_i);
    df       = data_flit_t'(link_data_i);
    evaluate = (state == S_IDLE) && link_req_i;
    is_dup   = have_last && (link_data_i == last_flit);
    unique case (hf.nat)
      NAT_HEAD:           order_ok = 1'b1;
      NAT_BODY, NAT_TAIL: order_ok = !exp_head && (df.nbre == exp_n);
      default:            order_ok = 1'b0;
    endcase
    accept   = evaluate && crc_ok && !is_dup && order_ok && !fifo_full;
    wr_en    = accept;
    wr_data  = link_data_i;
    dup      = evaluate && crc_ok && is_dup;
    crc_err  = evaluate && !crc_ok;
    reject   = evaluate && !accept && !dup;
    busy     = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      link_ack_o <= 1'b0;
      last_flit  <= '0;
      have_last  <= 1'b0;
      exp_head   <= 1'b1;
      exp_n      <= '0;
      total_n    <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (accept || dup) begin
            state      <= S_ACK;
            link_ack_o <= 1'b1;
          end else if (evaluate) begin
            state <= S_REJ;
          end
          if (accept) begin
            last_flit <= link_data_i;
            have_last <= 1'b1;
            if (hf.nat == NAT_HEAD) begin
              exp_head <= (hf.nbre == '0);
              exp_n    <= NBRE_W'(1);
              total_n  <= hf.nbre;
            end else begin
              exp_head <= (df.nbre == total_n) || (df.nat == NAT_TAIL);
              exp_n    <= exp_n + 1'b1;
            end
          end
        end
        S_ACK: if (!link_req_i) begin
          state      <= S_IDLE;
          link_ack_o <= 1'b0;
        end
        default: if (!link_req_i) state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // Acknowledge only while the sender requests, or one cycle after it gave up.
  a_ack_drop: assert property (@(posedge clk) disable iff (!rst_n)
                               (link_ack_o && !link_req_i) |=> !link_ack_o);
`endif
endmodule
