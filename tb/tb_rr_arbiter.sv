// tb_rr_arbiter: compares the grant with a reference round-robin pointer on
// random request patterns, and checks fairness: with all four requesting
// continuously each one is granted once every four grants.
module tb_rr_arbiter;
  logic clk = 0, rst_n = 0, advance = 0;
  logic [3:0] req = 0, gnt;
  int checks = 0, failures = 0, ptr = 0;
  int cnt[4];

  rr_arbiter #(.NREQ(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1400; t++) begin
      logic [3:0] e;
      int w;
      @(negedge clk);
      req = (t < 1000) ? 4'($urandom) : 4'hf;
      advance = (t < 1000) ? ($urandom_range(1) == 1) : 1'b1;
      #1;
      e = 0; w = -1;
      for (int o = 0; o < 4; o++)
        if (w < 0 && req[(ptr + o) % 4]) w = (ptr + o) % 4;
      if (w >= 0) e[w] = 1;
      checks++;
      if (gnt !== e) begin failures++; $display("FAIL req=%b gnt=%b exp=%b", req, gnt, e); end
      if (advance && w >= 0) begin
        ptr = (w + 1) % 4;
        if (t >= 1000) cnt[w]++;
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (cnt[i] != 100) begin failures++; $display("FAIL unfair %0d: %0d", i, cnt[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
