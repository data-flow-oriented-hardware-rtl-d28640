// tb_ntt_dp: runs 5 back-to-back transforms of random data through a
// two-lane (VEC = 2) NTT data path with n = 32, w = 4, each transform with a
// different prime, and compares every output with a direct evaluation of
// X_k = sum_j x_j omega^(jk) mod q. The twiddle flow of each transform starts
// MM_LAT cycles before its data, as in the RPM. Also checks the latency
// (rpm_pkg::lat_ntt) and the prime reported with each output frame.
module tb_ntt_dp;
  import tb_util_pkg::*;
  localparam int N = 32, W = 4, QW = 30, VEC = 2, NF = 5;
  localparam int T = N / W;
  localparam int LEAD = rpm_pkg::MM_LAT;
  logic clk = 0, rst = 1;
  logic next_in, prg_next, next_out;
  logic [QW-1:0] din [VEC][W], dout [VEC][W];
  logic [QW-1:0] prg_tw [W/2], prg_q, q_out;
  logic [QW:0]   prg_v, v_out;
  int checks = 0, failures = 0;
  int cyc = 0;
  longint unsigned qs [NF], om [NF];
  longint unsigned xs [NF][VEC][N];
  int tin [NF];

  ntt_dp #(.N(N), .W(W), .QW(QW), .VEC(VEC)) dut (.clk, .rst, .next_in, .din,
    .prg_next, .prg_tw, .prg_q, .prg_v, .next_out, .dout, .q_out, .v_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int f = 0; f < NF; f++) begin
      qs[f] = find_prime(QW, N, f % 3);
      om[f] = mulm(find_psi(qs[f], N), find_psi(qs[f], N), qs[f]);
      for (int vi = 0; vi < VEC; vi++)
        for (int j = 0; j < N; j++) xs[f][vi][j] = $urandom % qs[f];
    end
    next_in = 0; prg_next = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // twiddle flow and data, data LEAD cycles behind, frames back to back
    for (int c = 0; c < NF * T + LEAD; c++) begin
      int ft, ct, fd, cd;
      ft = c / T; ct = c % T;
      prg_next = (ft < NF) && ct == 0;
      if (ft < NF) begin
        prg_q = QW'(qs[ft]);
        prg_v = (QW+1)'(barrett_v(qs[ft], QW));
        for (int k = 0; k < W/2; k++) prg_tw[k] = QW'(powm(om[ft], ct * (W/2) + k, qs[ft]));
      end
      fd = (c - LEAD) / T; cd = (c - LEAD) % T;
      next_in = (c >= LEAD) && cd == 0;
      if (c >= LEAD) begin
        if (cd == 0) tin[fd] = cyc;
        for (int vi = 0; vi < VEC; vi++)
          for (int k = 0; k < W; k++) din[vi][k] = QW'(xs[fd][vi][cd * W + k]);
      end
      @(negedge clk);
    end
    next_in = 0; prg_next = 0;
  end

  initial begin
    longint unsigned e;
    for (int f = 0; f < NF; f++) begin
      @(negedge clk); while (!next_out) @(negedge clk);
      checks++;
      if (cyc - tin[f] != rpm_pkg::lat_ntt(N, W)) begin
        failures++; $display("FAIL latency %0d", cyc - tin[f]);
      end
      checks++;
      if (q_out != QW'(qs[f])) failures++;
      for (int c = 0; c < T; c++) begin
        for (int vi = 0; vi < VEC; vi++)
          for (int k = 0; k < W; k++) begin
            e = 0;
            for (int j = 0; j < N; j++)
              e = (e + mulm(xs[f][vi][j], powm(om[f], j * (c * W + k), qs[f]), qs[f])) % qs[f];
            checks++;
            if (dout[vi][k] != QW'(e)) begin
              failures++;
              if (failures < 10) $display("FAIL f%0d v%0d X[%0d] got %0d exp %0d", f, vi, c*W+k, dout[vi][k], e);
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
