// tb_pwmm: streams random vectors through a 4-lane point-wise multiplier,
// switching prime every 50 cycles, and checks each lane, the delayed prime
// and the frame marker exactly MM_LAT cycles later.
module tb_pwmm;
  import tb_util_pkg::*;
  localparam int QW = 30;
  localparam int LN = 4;
  localparam int ML = rpm_pkg::MM_LAT;
  logic clk = 0, rst = 1;
  logic next_in, next_out;
  logic [QW-1:0] x [LN], y [LN], r [LN], q, q_out;
  logic [QW:0]   v, v_out;
  int checks = 0, failures = 0;
  typedef struct { longint unsigned p [LN]; longint unsigned q; bit nx; } exp_t;
  exp_t expq[$];

  pwmm #(.QW(QW), .LANES(LN)) dut (.clk, .rst, .next_in, .x, .y, .q, .v,
                                   .next_out, .r, .q_out, .v_out);
  always #5 clk = ~clk;

  initial begin
    longint unsigned qq, xx, yy;
    exp_t e;
    next_in = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 2000 + ML; i++) begin
      qq = find_prime(QW, 16, (i / 50) % 3);
      q = QW'(qq); v = (QW+1)'(barrett_v(qq, QW));
      next_in = (i % 13 == 0);
      e.q = qq; e.nx = next_in;
      for (int k = 0; k < LN; k++) begin
        xx = $urandom % qq; yy = $urandom % qq;
        x[k] = QW'(xx); y[k] = QW'(yy);
        e.p[k] = mulm(xx, yy, qq);
      end
      expq.push_back(e);
      @(posedge clk); #1;
      if (i >= ML - 1) begin
        e = expq.pop_front();
        checks++;
        if (q_out != QW'(e.q) || next_out != e.nx) failures++;
        for (int k = 0; k < LN; k++) begin
          checks++;
          if (r[k] != QW'(e.p[k])) begin
            failures++;
            if (failures < 10) $display("FAIL i=%0d lane %0d got %0d exp %0d", i, k, r[k], e.p[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
