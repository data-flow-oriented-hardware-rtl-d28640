// tb_ntt2: checks the radix-2 butterfly x0 = u + v, x1 = u - v (mod q) one
// cycle after the operands, for random operands streamed every cycle.
module tb_ntt2;
  import tb_util_pkg::*;
  localparam int QW = 30;
  logic clk = 0;
  logic [QW-1:0] u, v, q, x0, x1;
  int checks = 0, failures = 0;
  ntt2 #(.QW(QW)) dut (.clk, .u, .v, .q, .x0, .x1);
  always #5 clk = ~clk;

  initial begin
    longint unsigned qq, uu, vv, e0, e1;
    qq = find_prime(QW, 16, 1);
    q = QW'(qq);
    for (int i = 0; i < 3000; i++) begin
      uu = (i % 5 == 0) ? qq - 1 : $urandom % qq;
      vv = (i % 7 == 0) ? qq - 1 : $urandom % qq;
      u = QW'(uu); v = QW'(vv);
      e0 = (uu + vv) % qq;
      e1 = (uu + qq - vv) % qq;
      @(posedge clk); #1;
      checks += 2;
      if (x0 != QW'(e0) || x1 != QW'(e1)) begin
        failures++;
        if (failures < 10) $display("FAIL u=%0d v=%0d got %0d %0d", uu, vv, x0, x1);
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
