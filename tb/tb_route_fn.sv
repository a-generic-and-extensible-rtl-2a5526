// tb_route_fn: instantiates the routing function for every position of an
// elementary polygon of valence 8 and checks each destination against a
// hop-count model of the network: the preferred port must lead one hop closer
// around the ring by the shorter way (clockwise on a tie), the alternative of
// a peripheral router must lead to the centre, and the central router must go
// straight to the destination or, as alternative, to the node just before it.
module tb_route_fn;
  localparam int M = 8;
  int checks = 0, failures = 0;
  logic [5:0] dest;
  logic [3:0] cp, ca;
  logic [1:0] pp [1:M];
  logic [1:0] pa [1:M];

  route_fn #(.M(M), .NODE_ID(0), .IS_CENTER(1'b1)) u_c (.dest_i(dest), .primary_o(cp), .alt_o(ca));
  for (genvar k = 1; k <= M; k++) begin : g
    route_fn #(.M(M), .NODE_ID(k), .IS_CENTER(1'b0)) u_p (.dest_i(dest), .primary_o(pp[k]), .alt_o(pa[k]));
  end

  function automatic int nxt(int k); return k % M + 1; endfunction
  function automatic int prv(int k); return (k + M - 2) % M + 1; endfunction
  function automatic int ring_d(int a, int b);
    int cw = (b - a + M) % M; return (cw < M - cw) ? cw : M - cw;
  endfunction
  // neighbour reached through port p of peripheral k
  function automatic int hop(int k, int p);
    case (p) 0: return k; 1: return nxt(k); 2: return prv(k); default: return 0; endcase
  endfunction

  task automatic chk(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s dest=%0d", s, dest); end
  endtask

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int d = 0; d <= M + 2; d++) begin
      dest = 6'(d); #1;
      // centre
      if (d == 0 || d > M) chk(cp == 0, "centre local");
      else begin
        chk(int'(cp) == d, "centre direct");
        chk(nxt(int'(ca)) == d, "centre alternative is the node before");
      end
      for (int k = 1; k <= M; k++) begin
        if (d == k || d > M) chk(pp[k] == 0, "peripheral local");
        else if (d == 0) begin
          chk(pp[k] == 3, "peripheral to centre");
          chk(pa[k] == 1, "peripheral to centre, alternative clockwise");
        end else begin
          int n;
          n = hop(k, int'(pp[k]));
          chk(ring_d(n, d) == ring_d(k, d) - 1, "preferred port one hop closer");
          if (ring_d(k, d) == M / 2) chk(pp[k] == 1, "tie goes clockwise");
          chk(pa[k] == 3, "alternative through the centre");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
