// tb_rpm_top: end-to-end test of the residue polynomial multiplier at n = 64,
// w = 2. Twenty products of random polynomials are started, most of them back
// to back (one every T = n/w cycles) and one after a gap, cycling over three
// primes, so that several products are in flight at once, consecutive
// products use different channels, and the twiddle banks of both NTTs wrap
// around. Each result is compared with a direct negacyclic convolution
// c_k = sum_{i+j=k} a_i b_j - sum_{i+j=k+n} a_i b_j mod q, and its latency
// with rpm_pkg::lat_rpm. The counts of those situations are printed and a
// situation that never occurred counts as a failure.
module tb_rpm_top;
  import tb_util_pkg::*;
  localparam int N = 64, W = 2, QW = 30, NP = 20, T = N / W;
  logic clk = 0, rst = 1;
  logic next_in, next_out;
  logic [QW-1:0] a [W], b [W], q, ninv, seed [W], c [W];
  logic [QW:0]   v;
  int checks = 0, failures = 0, cyc = 0;
  longint unsigned qs [NP], ps [NP];
  longint unsigned as [NP][N], bs [NP][N];
  int tin [NP];
  int n_overlap = 0, n_switch = 0, n_gap = 0;

  rpm_top #(.N(N), .W(W), .QW(QW)) dut (.clk, .rst, .next_in, .a, .b, .q, .v, .ninv, .seed,
                                       .next_out, .c);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int p = 0; p < NP; p++) begin
      qs[p] = find_prime(QW, N, p % 3);
      ps[p] = find_psi(qs[p], N);
      for (int j = 0; j < N; j++) begin
        as[p][j] = (p == 0 && j > 0) ? 0 : $urandom % qs[p];
        bs[p][j] = $urandom % qs[p];
      end
      if (p > 0 && qs[p] != qs[p-1]) n_switch++;
    end
    next_in = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int p = 0; p < NP; p++) begin
      if (p == 7) begin
        repeat (5) @(negedge clk);
        n_gap++;
      end
      if (p > 0 && cyc - tin[0] < rpm_pkg::lat_rpm(N, W)) n_overlap++;
      for (int cc = 0; cc < T; cc++) begin
        next_in = (cc == 0);
        if (cc == 0) tin[p] = cyc;
        q = QW'(qs[p]); v = (QW+1)'(barrett_v(qs[p], QW));
        ninv = QW'(powm(N, qs[p] - 2, qs[p]));
        for (int k = 0; k < W; k++) begin
          seed[k] = QW'(powm(ps[p], k + 1, qs[p]));
          a[k] = QW'(as[p][cc * W + k]);
          b[k] = QW'(bs[p][cc * W + k]);
        end
        @(negedge clk);
      end
      next_in = 0;
    end
  end

  initial begin
    longint unsigned e;
    for (int p = 0; p < NP; p++) begin
      @(negedge clk); while (!next_out) @(negedge clk);
      checks++;
      if (cyc - tin[p] != rpm_pkg::lat_rpm(N, W)) begin
        failures++; $display("FAIL latency %0d", cyc - tin[p]);
      end
      for (int cc = 0; cc < T; cc++) begin
        for (int k = 0; k < W; k++) begin
          int m;
          m = cc * W + k;
          e = 0;
          for (int i = 0; i < N; i++) begin
            int j;
            j = (m - i + N) % N;
            if (i <= m) e = (e + mulm(as[p][i], bs[p][j], qs[p])) % qs[p];
            else        e = (e + qs[p] - mulm(as[p][i], bs[p][j], qs[p])) % qs[p];
          end
          checks++;
          if (c[k] != QW'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL product %0d c[%0d] got %0d exp %0d", p, m, c[k], e);
          end
        end
        if (cc != T - 1) @(negedge clk);
      end
    end
    $display("mechanisms: overlapping products %0d, channel switches %0d, gaps %0d, bank wraps fwd %0d inv %0d",
             n_overlap, n_switch, n_gap, NP / dut.G_FWD, NP / dut.G_INV);
    if (n_overlap == 0 || n_switch == 0 || n_gap == 0) failures++;
    if (NP <= dut.G_FWD || NP <= dut.G_INV) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
