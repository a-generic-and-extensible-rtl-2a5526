// noc_pkg: types and constants shared by the Spidergon NoC.
//
// A flit is 32 bits. A header flit carries Nat(2) QoS_id(4) Destination(6)
// Source(6) P(2) Nbre(4) CRC(8); a data flit carries Nat(2) Data(18) Nbre(4)
// CRC(8). These field widths are the ones of the source design. The CRC is an
// 8-bit code over the 24 bits that precede it; its polynomial (x^8+x^2+x+1)
// and the encoding of Nat are choices of this implementation.
package noc_pkg;

  localparam int FLIT_W  = 32;
  localparam int CRC_W   = 8;
  localparam int NBRE_W  = 4;
  localparam int ADDR_W  = 6;
  localparam int PRIO_W  = 2;
  localparam int QOS_W   = 4;
  localparam int DATA_W  = 18;
  localparam logic [7:0] CRC_POLY = 8'h07;

  typedef enum logic [1:0] {
    NAT_NONE = 2'b00,
    NAT_BODY = 2'b01,
    NAT_TAIL = 2'b10,   // end-of-packet data flit
    NAT_HEAD = 2'b11
  } nat_e;

  // Priority codes: 11 signalling, 10 real time, 01 read/write, 00 block transfer
  typedef enum logic [1:0] {
    PRIO_BLOCK = 2'b00,
    PRIO_RDWR  = 2'b01,
    PRIO_RT    = 2'b10,
    PRIO_SIG   = 2'b11
  } prio_e;

  typedef struct packed {
    nat_e               nat;
    logic [QOS_W-1:0]   qos_id;
    logic [ADDR_W-1:0]  dest;
    logic [ADDR_W-1:0]  src;
    prio_e              prio;
    logic [NBRE_W-1:0]  nbre;   // number of data flits that follow
    logic [CRC_W-1:0]   crc;
  } head_flit_t;

  typedef struct packed {
    nat_e               nat;
    logic [DATA_W-1:0]  data;
    logic [NBRE_W-1:0]  nbre;   // order number of this data flit, 1..
    logic [CRC_W-1:0]   crc;
  } data_flit_t;

  // Bitwise CRC-8, MSB first, initial value 0.
  function automatic logic [CRC_W-1:0] crc8_calc(input logic [FLIT_W-CRC_W-1:0] d);
    logic [CRC_W-1:0] c;
    c = '0;
    for (int i = FLIT_W-CRC_W-1; i >= 0; i--) begin
      if (c[7] ^ d[i]) c = {c[6:0], 1'b0} ^ CRC_POLY;
      else             c = {c[6:0], 1'b0};
    end
    return c;
  endfunction

  // Appends the CRC to the 24 leading bits of a flit.
  function automatic logic [FLIT_W-1:0] seal_flit(input logic [FLIT_W-1:0] f);
    return {f[FLIT_W-1:CRC_W], crc8_calc(f[FLIT_W-1:CRC_W])};
  endfunction

endpackage
