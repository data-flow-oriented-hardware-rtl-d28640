// tb_gen_itw: feeds three Psi sets (n = 32, w = 2, different primes, back to
// back) and checks that each output set is psi^-j at position j, computed
// here as psi^(2n-j) mod q, with its q and n^-1, n/w + 1 cycles after input.
module tb_gen_itw;
  import tb_util_pkg::*;
  localparam int N = 32, W = 2, QW = 30, NS = 3, T = N / W;
  logic clk = 0, rst = 1;
  logic next_in, next_out;
  logic [QW-1:0] din [W], dout [W], q, ninv, q_out, ninv_out;
  logic [QW:0]   v, v_out;
  int checks = 0, failures = 0, cyc = 0;
  longint unsigned qs [NS], ps [NS];
  int tin [NS];

  gen_itw #(.N(N), .W(W), .QW(QW)) dut (.clk, .rst, .next_in, .din, .q, .v, .ninv,
                                        .next_out, .dout, .q_out, .v_out, .ninv_out);
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
    for (int s = 0; s < NS; s++)
      for (int c = 0; c < T; c++) begin
        next_in = (c == 0);
        if (c == 0) tin[s] = cyc;
        q = QW'(qs[s]); v = (QW+1)'(barrett_v(qs[s], QW)); ninv = QW'(s + 9);
        for (int k = 0; k < W; k++) din[k] = QW'(powm(ps[s], c * W + k, qs[s]));
        @(negedge clk);
      end
    next_in = 0;
  end

  initial begin
    for (int s = 0; s < NS; s++) begin
      @(negedge clk); while (!next_out) @(negedge clk);
      checks += 2;
      if (cyc - tin[s] != T + 1) failures++;
      if (q_out != QW'(qs[s]) || ninv_out != QW'(s + 9)) failures++;
      for (int c = 0; c < T; c++) begin
        for (int k = 0; k < W; k++) begin
          checks++;
          if (dout[k] != QW'(powm(ps[s], 2 * N - (c * W + k), qs[s]))) begin
            failures++;
            if (failures < 10) $display("FAIL set %0d j=%0d got %0d", s, c * W + k, dout[k]);
          end
          // and psi^j * psi^-j = 1
          checks++;
          if (mulm(dout[k], powm(ps[s], c * W + k, qs[s]), qs[s]) != 1) failures++;
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
