// crc8: combinational CRC-8 generator/checker for one flit.
//
// Computes the 8-bit code over the 24 leading bits of a 32-bit flit
// (polynomial x^8+x^2+x+1, MSB first, initial value 0) and compares it with
// the code carried in the flit's last 8 bits. The source design specifies an
// 8-degree polynomial code appended to every flit; the polynomial itself is
// this implementation's choice. The circuit is an XOR tree, unrolled from the
// bit-serial division; no clock, result valid in the same cycle.
module crc8
  import noc_pkg::*;
(
  input  logic [FLIT_W-1:0] flit_i,
  output logic [CRC_W-1:0]  crc_o,    // code recomputed over flit_i[31:8]
  output logic              ok_o      // recomputed code equals flit_i[7:0]
);
  always_comb begin
    crc_o = crc8_calc(flit_i[FLIT_W-1:CRC_W]);
    ok_o  = (crc_o == flit_i[CRC_W-1:0]);
  end
endmodule
