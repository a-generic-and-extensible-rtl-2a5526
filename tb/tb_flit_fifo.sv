// tb_flit_fifo: random pushes and pops against a queue model; checks data
// order, full/empty flags and the occupancy count, at the default depth 6.
module tb_flit_fifo;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] wr_data = 0, rd_data;
  logic [2:0] count;
  logic [31:0] q[$];
  int checks = 0, failures = 0;
  int n_full = 0;

  flit_fifo dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 6) || count != 3'(q.size())) begin
        failures++; $display("FAIL flags size=%0d full=%b empty=%b count=%0d", q.size(), full, empty, count);
      end
      if (!empty) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("FAIL data %h exp %h", rd_data, q[0]); end
      end
      if (full) n_full++;
      wr_en   = ($urandom_range(99) < ((t / 500) % 2 != 0 ? 70 : 35));
      rd_en   = ($urandom_range(99) < ((t / 500) % 2 != 0 ? 35 : 70));
      wr_data = $urandom;
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update on the same edge
  always @(posedge clk) if (rst_n) begin
    automatic bit f = (q.size() == 6), e = (q.size() == 0);
    if (rd_en && !e) void'(q.pop_front());
    if (wr_en && !f) q.push_back(wr_data);
  end
endmodule
