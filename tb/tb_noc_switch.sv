// tb_noc_switch: random ownership (each output owned by at most one input,
// each input owning at most one output), addresses and handshakes on a
// 9-port crossbar; outputs, valids and readies are compared with a model.
module tb_noc_switch;
  localparam int N = 9;
  logic [N-1:0][31:0] ux, out_data;
  logic [N-1:0][3:0]  adrx, owner;
  logic [N-1:0]       in_valid, in_ready, owned, out_valid, out_ready;
  int checks = 0, failures = 0;

  noc_switch #(.N(N)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int perm[N];
      logic [N-1:0] ev, er;
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        ux[i] = $urandom; in_valid[i] = 1'($urandom_range(1));
        out_ready[i] = 1'($urandom_range(1));
        adrx[i] = 4'($urandom_range(N - 1));
      end
      for (int j = 0; j < N; j++) begin
        owned[j] = ($urandom_range(2) != 0);
        owner[j] = owned[j] ? 4'(perm[j]) : 4'($urandom_range(N - 1));
        // mostly point the owner at its output
        if (owned[j] && $urandom_range(3) != 0) adrx[perm[j]] = 4'(j);
      end
      #1;
      er = 0;
      for (int j = 0; j < N; j++) begin
        ev[j] = owned[j] && in_valid[perm[j]] && int'(adrx[perm[j]]) == j;
        if (owned[j] && int'(adrx[perm[j]]) == j && out_ready[j]) er[perm[j]] = 1;
        checks++;
        if (out_valid[j] !== ev[j] || (ev[j] && out_data[j] !== ux[perm[j]])) begin
          failures++; $display("FAIL out %0d", j);
        end
      end
      checks++;
      if (in_ready !== er) begin failures++; $display("FAIL in_ready %b exp %b", in_ready, er); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
