// tb_stream_perm: drives frames of labelled words (frame*4096 + position)
// through three permutation buffers, back to back and with gaps, and checks
// that every output word is the expected input word, that next_out comes
// n/w + 1 cycles after next_in and that the side-band word follows its frame.
//   u_br : bit reversal, n = 32, w = 4
//   u_rv : reversal (n - p) mod n, n = 16, w = 2
//   u_st : re-pairing after stage 1, n = 32, w = 2; the expected order is
//          derived from the pairing rule (pair b of stage l holds elements
//          i and i + 2^l with the low l bits of b equal to those of i).
module tb_stream_perm;
  import rpm_pkg::*;
  localparam int QW = 30;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // independent reference: element held at position p in stage l's pairing
  function automatic int elem_of(int l, int p, int logn);
    int b, e, i;
    b = p / 2; e = p % 2;
    // i: low l bits from b, bit l = e, upper bits = b >> l
    i = (b % (1 << l)) + e * (1 << l) + (b / (1 << l)) * (1 << (l + 1));
    return i;
  endfunction
  function automatic int pos_of(int l, int el, int logn);
    for (int p = 0; p < (1 << logn); p++) if (elem_of(l, p, logn) == el) return p;
    return -1;
  endfunction
  function automatic int brev(int p, int logn);
    int r = 0;
    for (int b = 0; b < logn; b++) if (p & (1 << b)) r += 1 << (logn - 1 - b);
    return r;
  endfunction

  // expected input position for output position p
  function automatic int exp_src(int kind, int n, int p);
    case (kind)
      0: return brev(p, $clog2(n));
      1: return (n - p) % n;
      default: return pos_of(1, (1 < $clog2(n) - 1) ? elem_of(2, p, $clog2(n)) : p, $clog2(n));
    endcase
  endfunction

  // generic driver/checker per instance
  `define PERM_INST(NAME, NN, WW, KD, ST, KIND_ID)                                        \
    logic NAME``_ni, NAME``_no;                                                            \
    logic [QW-1:0] NAME``_di [WW], NAME``_do [WW];                                         \
    logic [7:0] NAME``_ci, NAME``_co;                                                      \
    stream_perm #(.N(NN), .W(WW), .QW(QW), .KIND(KD), .STAGE(ST), .CTXW(8)) NAME (         \
      .clk, .rst, .next_in(NAME``_ni), .din(NAME``_di), .ctx_in(NAME``_ci),               \
      .next_out(NAME``_no), .dout(NAME``_do), .ctx_out(NAME``_co));                        \
    int NAME``_tin[$];                                                                     \
    initial begin : NAME``_drv                                                             \
      NAME``_ni = 0;                                                                       \
      @(negedge clk); while (rst) @(negedge clk);                                          \
      for (int f = 0; f < 6; f++) begin                                                    \
        for (int c = 0; c < NN / WW; c++) begin                                            \
          NAME``_ni = (c == 0);                                                            \
          NAME``_ci = 8'(f + 17);                                                          \
          if (c == 0) NAME``_tin.push_back(cyc);                                           \
          for (int k = 0; k < WW; k++) NAME``_di[k] = QW'(f * 4096 + c * WW + k);          \
          @(negedge clk);                                                                  \
        end                                                                                \
        NAME``_ni = 0;                                                                     \
        repeat ((f % 2) * 3) @(negedge clk);                                               \
      end                                                                                  \
    end                                                                                    \
    initial begin : NAME``_chk                                                             \
      for (int f = 0; f < 6; f++) begin                                                    \
        int t0;                                                                            \
        @(negedge clk); while (!NAME``_no) @(negedge clk);                                 \
        t0 = NAME``_tin.pop_front();                                                       \
        checks++;                                                                          \
        if (cyc - t0 != NN / WW + 1) begin failures++;                                     \
          $display("FAIL %s latency %0d", `"NAME`", cyc - t0); end                        \
        checks++;                                                                          \
        if (NAME``_co != 8'(f + 17)) failures++;                                           \
        for (int c = 0; c < NN / WW; c++) begin                                            \
          for (int k = 0; k < WW; k++) begin                                               \
            checks++;                                                                      \
            if (NAME``_do[k] != QW'(f * 4096 + exp_src(KIND_ID, NN, c * WW + k))) begin    \
              failures++;                                                                  \
              if (failures < 10) $display("FAIL %s f%0d p%0d got %0d", `"NAME`", f,        \
                                          c * WW + k, NAME``_do[k]);                       \
            end                                                                            \
          end                                                                              \
          if (c != NN / WW - 1) @(negedge clk);                                            \
        end                                                                                \
      end                                                                                  \
      done++;                                                                              \
    end

  int cyc = 0;
  int done = 0;
  always @(posedge clk) cyc <= cyc + 1;

  `PERM_INST(u_br, 32, 4, PERM_BITREV, 0, 0)
  `PERM_INST(u_rv, 16, 2, PERM_REVERSE, 0, 1)
  `PERM_INST(u_st, 32, 2, PERM_STAGE, 1, 2)

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (done == 3);
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
