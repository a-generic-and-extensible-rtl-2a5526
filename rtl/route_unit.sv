// route_unit: routing and services unit of one input port.
//
// Works on the flit at the head of the port's FIFO.
//   IDLE  a header at the FIFO head is decoded: destination, priority P and
//         the flit count Nbre are kept, and route_fn gives a preferred and an
//         alternative output port. A data flit without a header is discarded.
//   REQ   the request (arb_req, arb_port, arb_prio) is held for REQ_HOLD
//         cycles. A grant moves to SEND. No grant is a refusal: the refusal
//         counter is incremented and the unit waits TD cycles (WAIT) before
//         requesting again. After NMAX_REQ refusals it switches between the
//         preferred and the alternative port and the count restarts.
//   SEND  the request is kept up, which keeps the grant and so reserves the
//         output port; the header and then the data flits are passed to the
//         switch (sw_data = UX, sw_adr = ADRX, sw_valid/sw_ready handshake,
//         one flit per cycle at most). The packet ends after the Nbre data
//         flits announced by the header, or at a tail flit. A header found
//         in the middle of a packet ends the packet early, and so does a
//         wait of STALL_MAX cycles for the next flit of the packet (a flit
//         lost upstream must not hold the output port for ever).
//   DONE  one cycle with the request down, so the arbiter frees the port.
// The retry-after-Td, the switch to another port after Nmax refusals and the
// port reservation until the last flit follow the source design; REQ_HOLD,
// TD and NMAX_REQ values and the early end of a packet are this design's
// (the source leaves the values generic).
module route_unit
  import noc_pkg::*;
#(
  parameter int M         = 8,
  parameter int NODE_ID   = 1,
  parameter bit IS_CENTER = 1'b0,
  parameter int TD        = 4,
  parameter int NMAX_REQ  = 4,
  parameter int REQ_HOLD  = 3,
  parameter int STALL_MAX = 256,
  localparam int N  = IS_CENTER ? M + 1 : 4,
  localparam int PW = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FLIT_W-1:0] fifo_data,
  input  logic              fifo_empty,
  output logic              fifo_rd,
  output logic              arb_req,
  output logic [PW-1:0]     arb_port,
  output logic [PRIO_W-1:0] arb_prio,
  input  logic              arb_gnt,
  output logic [FLIT_W-1:0] sw_data,
  output logic [PW-1:0]     sw_adr,
  output logic              sw_valid,
  input  logic              sw_ready,
  output logic              busy,
  output logic              refused,    // pulse: a request was refused
  output logic              rerouted,   // pulse: switched to the other port
  output logic              abandoned   // pulse: packet ended early
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_SEND, S_DONE} state_e;
  state_e state;

  head_flit_t          hf, hdr;
  data_flit_t          df;
  logic [PW-1:0]       prim, alt;
  logic                use_alt, first;
  logic [NBRE_W-1:0]   remain;
  localparam int RW = $clog2(NMAX_REQ + 1);
  localparam int TW = $clog2(TD + 1);
  localparam int HW = $clog2(REQ_HOLD + 1);
  localparam logic [RW-1:0] TRIES_LAST = RW'(NMAX_REQ - 1);
  localparam logic [TW-1:0] TD_LAST    = TW'(TD - 1);
  localparam logic [HW-1:0] HOLD_LAST  = HW'(REQ_HOLD - 1);
  logic [RW-1:0] tries;
  logic [TW-1:0] tcnt;
  logic [HW-1:0] hcnt;
  localparam int SW = $clog2(STALL_MAX + 1);
  localparam logic [SW-1:0] STALL_LAST = SW'(STALL_MAX - 1);
  logic [SW-1:0] scnt;
  logic          stalled;
  logic                xfer, mid_head, last_flit;

  route_fn #(.M(M), .NODE_ID(NODE_ID), .IS_CENTER(IS_CENTER)) u_fn (
    .dest_i(hdr.dest), .primary_o(prim), .alt_o(alt));

  always_comb begin
    hf        = head_flit_t'(fifo_data);
    df        = data_flit_t'(fifo_data);
    arb_port  = use_alt ? alt : prim;
    arb_prio  = hdr.prio;
    arb_req   = (state == S_REQ) || (state == S_SEND);
    mid_head  = (state == S_SEND) && !first && !fifo_empty && (hf.nat == NAT_HEAD);
    sw_valid  = (state == S_SEND) && !fifo_empty && !mid_head;
    sw_data   = fifo_data;
    sw_adr    = arb_port;
    xfer      = sw_valid && sw_ready;
    fifo_rd   = xfer || ((state == S_IDLE) && !fifo_empty && (hf.nat != NAT_HEAD));
    last_flit = first ? (hf.nbre == '0) : ((remain == NBRE_W'(1)) || (df.nat == NAT_TAIL));
    busy      = (state != S_IDLE);
    refused   = (state == S_REQ) && !arb_gnt && (hcnt == HOLD_LAST);
    rerouted  = refused && (tries == TRIES_LAST);
    stalled   = (state == S_SEND) && fifo_empty && (scnt == STALL_LAST);
    abandoned = mid_head || stalled;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      hdr     <= '0;
      use_alt <= 1'b0;
      first   <= 1'b0;
      remain  <= '0;
      tries   <= '0;
      tcnt    <= '0;
      hcnt    <= '0;
      scnt    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!fifo_empty && hf.nat == NAT_HEAD) begin
          hdr     <= hf;
          use_alt <= 1'b0;
          tries   <= '0;
          hcnt    <= '0;
          first   <= 1'b1;
          scnt    <= '0;
          state   <= S_REQ;
        end
        S_REQ: begin
          if (arb_gnt) begin
            state <= S_SEND;
          end else if (hcnt == HOLD_LAST) begin
            hcnt <= '0;
            tcnt <= '0;
            state <= S_WAIT;
            if (tries == TRIES_LAST) begin
              tries   <= '0;
              use_alt <= !use_alt;
            end else begin
              tries <= tries + 1'b1;
            end
          end else begin
            hcnt <= hcnt + 1'b1;
          end
        end
        S_WAIT: begin
          if (tcnt == TD_LAST) state <= S_REQ;
          else                tcnt  <= tcnt + 1'b1;
        end
        S_SEND: begin
          if (xfer || !fifo_empty) scnt <= '0;
          else                     scnt <= scnt + 1'b1;
          if (mid_head || stalled) begin
            state <= S_DONE;
          end else if (xfer) begin
            first <= 1'b0;
            if (first) remain <= hf.nbre;
            else       remain <= remain - 1'b1;
            if (last_flit) state <= S_DONE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
