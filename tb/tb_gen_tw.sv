// tb_gen_tw: requests four twiddle sets back to back (one every T = n/w
// cycles; n = 64, w = 2) for different primes, and checks that each set
// arrives rpm_pkg::lat_gen() cycles after its request, is exactly
// psi^0 .. psi^(n-1) in stream order, and carries its q and n^-1.
module tb_gen_tw;
  import tb_util_pkg::*;
  localparam int N = 64, W = 2, QW = 30, NS = 4, T = N / W;
  logic clk = 0, rst = 1;
  logic next_in, tw_next;
  logic [QW-1:0] q, ninv, seed [W], tw [W], tw_q, tw_ninv;
  logic [QW:0]   v, tw_v;
  int checks = 0, failures = 0, cyc = 0;
  longint unsigned qs [NS], ps [NS];
  int tin [NS];

  gen_tw #(.N(N), .W(W), .QW(QW)) dut (.clk, .rst, .next_in, .q, .v, .ninv, .seed,
                                       .tw_next, .tw, .tw_q, .tw_v, .tw_ninv);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int s = 0; s < NS; s++) begin
      qs[s] = find_prime(QW, N, s);
      ps[s] = find_psi(qs[s], N);
    end
    next_in = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int s = 0; s < NS; s++) begin
      next_in = 1;
      q = QW'(qs[s]); v = (QW+1)'(barrett_v(qs[s], QW));
      ninv = QW'(s + 5);
      for (int k = 0; k < W; k++) seed[k] = QW'(powm(ps[s], k + 1, qs[s]));
      tin[s] = cyc;
      @(negedge clk);
      next_in = 0;
      q = '0; v = '0;
      for (int k = 0; k < W; k++) seed[k] = '0;
      repeat (T - 1) @(negedge clk);
    end
  end

  initial begin
    for (int s = 0; s < NS; s++) begin
      @(negedge clk); while (!tw_next) @(negedge clk);
      checks++;
      if (cyc - tin[s] != rpm_pkg::lat_gen()) begin
        failures++; $display("FAIL latency %0d", cyc - tin[s]);
      end
      for (int c = 0; c < T; c++) begin
        checks++;
        if (tw_q != QW'(qs[s]) || tw_ninv != QW'(s + 5)) failures++;
        for (int k = 0; k < W; k++) begin
          checks++;
          if (tw[k] != QW'(powm(ps[s], c * W + k, qs[s]))) begin
            failures++;
            if (failures < 10) $display("FAIL set %0d j=%0d got %0d", s, c * W + k, tw[k]);
          end
        end
        if (c != T - 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
