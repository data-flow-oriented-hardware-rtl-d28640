// tb_gen_pctw: streams inverse twiddles psi^-j with their n^-1 (n = 64,
// w = 2) and checks n^-1 * psi^-j mod q word by word, MM_LAT cycles later,
// including that n * output * psi^j = 1 mod q.
module tb_gen_pctw;
  import tb_util_pkg::*;
  localparam int N = 64, W = 2, QW = 30, T = N / W, ML = rpm_pkg::MM_LAT;
  logic clk = 0, rst = 1;
  logic next_in, next_out;
  logic [QW-1:0] din [W], dout [W], q, ninv, q_out;
  logic [QW:0]   v, v_out;
  int checks = 0, failures = 0;
  longint unsigned qq, ps, ni;

  gen_pctw #(.W(W), .QW(QW)) dut (.clk, .rst, .next_in, .din, .q, .v, .ninv,
                                  .next_out, .dout, .q_out, .v_out);
  always #5 clk = ~clk;

  initial begin
    qq = find_prime(QW, N, 2);
    ps = find_psi(qq, N);
    ni = powm(N, qq - 2, qq);
    next_in = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < T + ML - 1; c++) begin
      next_in = (c == 0);
      q = QW'(qq); v = (QW+1)'(barrett_v(qq, QW)); ninv = QW'(ni);
      for (int k = 0; k < W; k++) din[k] = QW'(powm(ps, 2 * N - (c * W + k), qq));
      @(negedge clk);
      if (c >= ML - 1) begin
        int j;
        checks++;
        if (next_out != (c == ML - 1) || q_out != QW'(qq)) failures++;
        for (int k = 0; k < W; k++) begin
          j = (c - ML + 1) * W + k;
          checks++;
          if (dout[k] != QW'(mulm(ni, powm(ps, 2 * N - j, qq), qq))) failures++;
          checks++;
          if (mulm(mulm(dout[k], N, qq), powm(ps, j, qq), qq) != 1) failures++;
        end
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
