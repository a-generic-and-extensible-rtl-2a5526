// tb_crc8: checks the CRC-8 generator against a table-free reference that
// divides the 24-bit word by x^8+x^2+x+1 as a polynomial (long division over
// a 32-bit dividend), and checks that a corrupted flit is flagged.
module tb_crc8;
  import noc_pkg::*;
  logic [31:0] flit;
  logic [7:0]  crc;
  logic        ok;
  int checks = 0, failures = 0;

  crc8 dut (.flit_i(flit), .crc_o(crc), .ok_o(ok));

  // remainder of d(x) * x^8 modulo 0x107
  function automatic logic [7:0] ref_crc(logic [23:0] d);
    logic [31:0] r;
    r = {d, 8'h00};
    for (int b = 31; b >= 8; b--)
      if (r[b]) r[b -: 9] = r[b -: 9] ^ 9'h107;
    return r[7:0];
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s flit=%h crc=%h", what, flit, crc); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // known value: CRC-8 (poly 07, init 0) of 0x000001 is 0x07
    flit = {24'h000001, 8'h00}; #1;
    check(crc == 8'h07, "crc of 1");
    for (int t = 0; t < 2000; t++) begin
      logic [23:0] d;
      d = 24'($urandom);
      flit = {d, ref_crc(d)}; #1;
      check(crc == ref_crc(d), "crc value");
      check(ok, "good flit accepted");
      flit[$urandom_range(31, 0)] ^= 1'b1; #1;
      check(!ok, "single bit error detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
