// tb_twb: programs a twiddle bank (n = 16, w = 4, G = 3) with four flows of
// different primes (the fourth reuses bank 0), and after each flow steps the
// stages through their frame markers, stage l lagging by l frames where
// possible so that stages read different banks at the same time. Every
// twiddle read, tw(l,t) at stage cycle c, must equal
// omega^(((c*w/2 + t) mod 2^l) * n/2^(l+1)) of the flow that filled the bank,
// and st_q must be that flow's prime.
module tb_twb;
  import tb_util_pkg::*;
  localparam int N = 16, W = 4, QW = 30, G = 3, L = 4, T = N / W, HW = W / 2;
  logic clk = 0, rst = 1;
  logic prg_next;
  logic [QW-1:0] prg_tw [HW], prg_q;
  logic [QW:0]   prg_v;
  logic [L-1:0]  st_next;
  logic [QW-1:0] tw [L][HW], st_q [L];
  logic [QW:0]   st_v [L];
  int checks = 0, failures = 0;
  longint unsigned qs [4], om [4];

  twb #(.N(N), .W(W), .QW(QW), .G(G)) dut (.clk, .rst, .prg_next, .prg_tw, .prg_q, .prg_v,
                                           .st_next, .tw, .st_q, .st_v);
  always #5 clk = ~clk;

  task automatic flow(int f);
    for (int c = 0; c < T; c++) begin
      prg_next = (c == 0);
      prg_q = QW'(qs[f]);
      prg_v = (QW+1)'(barrett_v(qs[f], QW));
      for (int k = 0; k < HW; k++) prg_tw[k] = QW'(powm(om[f], c * HW + k, qs[f]));
      @(negedge clk);
    end
    prg_next = 0;
  endtask

  // stage l reads frame fr[l] (-1: idle) for T cycles
  task automatic read_frames(int fr [L]);
    for (int c = 0; c < T; c++) begin
      for (int l = 0; l < L; l++) st_next[l] = (fr[l] >= 0) && (c == 0);
      #1;
      for (int l = 0; l < L; l++) begin
        if (fr[l] < 0) continue;
        checks++;
        if (st_q[l] != QW'(qs[fr[l]])) failures++;
        for (int t = 0; t < HW; t++) begin
          longint unsigned e;
          e = powm(om[fr[l]], ((c * HW + t) % (1 << l)) * (N >> (l + 1)), qs[fr[l]]);
          checks++;
          if (tw[l][t] != QW'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL frame %0d l%0d t%0d c%0d got %0d exp %0d",
                                        fr[l], l, t, c, tw[l][t], e);
          end
        end
      end
      @(negedge clk);
    end
    st_next = '0;
  endtask

  initial begin
    int fr [L];
    for (int f = 0; f < 4; f++) begin
      qs[f] = find_prime(QW, N, f);
      om[f] = mulm(find_psi(qs[f], N), find_psi(qs[f], N), qs[f]);
    end
    prg_next = 0; st_next = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    flow(0);
    flow(1);
    fr = '{0, -1, -1, -1}; read_frames(fr);
    fr = '{1, 0, -1, -1};  read_frames(fr);
    flow(2);
    fr = '{2, 1, 0, -1};   read_frames(fr);
    fr = '{-1, 2, 1, 0};   read_frames(fr);
    flow(3);               // bank 0 again: frame 0 is finished everywhere
    fr = '{3, -1, 2, 1};   read_frames(fr);
    fr = '{-1, 3, -1, 2};  read_frames(fr);
    fr = '{-1, -1, 3, -1}; read_frames(fr);
    fr = '{-1, -1, -1, 3}; read_frames(fr);
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
