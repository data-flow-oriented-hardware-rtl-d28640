// tb_mod_mul: streams random operand pairs into the pipelined Barrett
// multiplier, one per cycle and with changing primes, and checks every result
// against (a*b) % q exactly MM_LAT cycles later.
module tb_mod_mul;
  import tb_util_pkg::*;
  localparam int QW = 30;
  localparam int ML = rpm_pkg::MM_LAT;
  logic clk = 0;
  logic [QW-1:0] a, b, q, r;
  logic [QW:0]   v;
  longint unsigned expq[$];
  int checks = 0, failures = 0;
  longint unsigned primes [4];

  mod_mul #(.QW(QW)) dut (.clk, .a, .b, .q, .v, .r);
  always #5 clk = ~clk;

  initial begin
    longint unsigned qq, aa, bb;
    for (int i = 0; i < 4; i++) primes[i] = find_prime(QW, 8 << i, i);
    for (int i = 0; i < 4000 + ML; i++) begin
      qq = primes[(i / 500) % 4];
      case (i % 7)
        0: begin aa = qq - 1; bb = qq - 1; end
        1: begin aa = 0; bb = $urandom % qq; end
        default: begin aa = $urandom % qq; bb = $urandom % qq; end
      endcase
      a = QW'(aa); b = QW'(bb); q = QW'(qq); v = (QW+1)'(barrett_v(qq, QW));
      expq.push_back(mulm(aa, bb, qq));
      @(posedge clk); #1;
      if (i >= ML - 1 && expq.size() > ML - 1) begin
        // result of the operand applied ML cycles ago
        longint unsigned e;
        e = expq.pop_front();
        checks++;
        if (r != QW'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d got %0d exp %0d", i, r, e);
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
