// tb_mod_sub: random and corner-case check of r = (a - b) mod q against
// integer arithmetic, for 30-bit primes.
module tb_mod_sub;
  import tb_util_pkg::*;
  localparam int QW = 30;
  logic [QW-1:0] a, b, q, r;
  int checks = 0, failures = 0;
  mod_sub #(.QW(QW)) dut (.a, .b, .q, .r);

  task automatic chk(longint unsigned qq, longint unsigned aa, longint unsigned bb);
    q = QW'(qq); a = QW'(aa); b = QW'(bb);
    #1;
    checks++;
    if (r != QW'((aa + qq - bb) % qq)) begin
      failures++;
      $display("FAIL %0d - %0d mod %0d = %0d", aa, bb, qq, r);
    end
  endtask

  initial begin
    longint unsigned qq;
    qq = find_prime(QW, 64, 0);
    chk(qq, qq - 1, qq - 1);
    chk(qq, 0, 0);
    chk(qq, qq - 1, 1);
    chk(qq, 1, qq - 2);
    for (int i = 0; i < 2000; i++) chk(qq, $urandom % qq, $urandom % qq);
    qq = find_prime(QW, 64, 3);
    for (int i = 0; i < 2000; i++) chk(qq, $urandom % qq, $urandom % qq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
