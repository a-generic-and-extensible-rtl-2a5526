// tb_port_table: random claims of free ports and releases of occupied ones
// (as the arbiters issue them) against a bit-vector model of the table.
module tb_port_table;
  localparam int N = 9;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] claim = 0, release_i = 0, free, occupied, model = 0;
  int checks = 0, failures = 0;

  port_table #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (free != '1) begin failures++; $display("FAIL not free after reset"); end
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] r;
      r = N'($urandom);
      claim     = r & ~model & N'($urandom);
      release_i = model & N'($urandom) & N'($urandom);
      @(negedge clk);
      model = (model | claim) & ~release_i;
      checks++;
      if (occupied !== model || free !== ~model) begin
        failures++; $display("FAIL occ=%b exp=%b", occupied, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
