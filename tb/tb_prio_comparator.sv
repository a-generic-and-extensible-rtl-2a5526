// tb_prio_comparator: random request and priority patterns; sel must, one
// clock later, flag exactly the active requesters carrying the highest
// priority, and be all zero while en is low.
module tb_prio_comparator;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] req = 0, sel;
  logic [3:0][1:0] prio = 0;
  int checks = 0, failures = 0;

  prio_comparator #(.NREQ(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      logic [3:0] e;
      int mx;
      @(negedge clk);
      req = 4'($urandom); prio = 8'($urandom); en = ($urandom_range(4) != 0);
      mx = -1; e = 0;
      for (int i = 0; i < 4; i++) if (req[i] && int'(prio[i]) > mx) mx = int'(prio[i]);
      for (int i = 0; i < 4; i++) e[i] = req[i] && int'(prio[i]) == mx && en;
      @(negedge clk);
      checks++;
      if (sel !== e) begin failures++; $display("FAIL req=%b prio=%h en=%b sel=%b exp=%b", req, prio, en, sel, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
