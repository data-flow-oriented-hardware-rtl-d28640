// tb_rpm_system: end-to-end test of the multiplier behind its AXI4-Stream
// wrapper. A host model pushes channel records and the A/B polynomials of
// NP products over three streams with random valid gaps, cycling over three
// primes, and drains the result stream with a random ready. Every result is
// compared with a direct negacyclic convolution mod q, with tlast on the
// last beat of each product. The testbench counts how often each mechanism
// occurred, and a mechanism that never occurred is a failure:
//   launches while earlier products are still in the pipeline, channel
//   switches between consecutive products, launches held back by the
//   output-FIFO reservation, launches waiting for input data, output beats
//   held by the consumer (tvalid && !tready), full input FIFOs (tready low).
// With N = 4096 (the default size) the same body serves as the full-size run.
module tb_rpm_system;
  import tb_util_pkg::*;
  localparam int N = 64, W = 2, QW = 30, NP = 16, T = N / W;
  localparam int DSW = (W + 3) * QW + 1;
  localparam bit SYS_DEFAULT = 0;
  localparam int WATCHDOG = 20000;
  logic clk = 0, rst = 1;
  logic [DSW-1:0]  s_ds_tdata;
  logic            s_ds_tvalid, s_ds_tready;
  logic [W*QW-1:0] s_a_tdata, s_b_tdata, m_c_tdata;
  logic            s_a_tvalid, s_a_tready, s_b_tvalid, s_b_tready;
  logic            m_c_tvalid, m_c_tready, m_c_tlast;
  int checks = 0, failures = 0, cyc = 0;
  longint unsigned qs [NP], ps [NP];
  longint unsigned as [NP][N], bs [NP][N];
  int n_overlap = 0, n_switch = 0, n_credit = 0, n_starve = 0, n_bp = 0, n_full = 0;
  int launches = 0, returned = 0;
  bit slow_out = 0;

  rpm_system #(.N(N), .W(W), .QW(QW)) dut (.clk, .rst, .s_ds_tdata, .s_ds_tvalid, .s_ds_tready,
    .s_a_tdata, .s_a_tvalid, .s_a_tready, .s_b_tdata, .s_b_tvalid, .s_b_tready,
    .m_c_tdata, .m_c_tvalid, .m_c_tready, .m_c_tlast);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism monitors
  always @(posedge clk) if (!rst) begin
    automatic logic l, busy, full_inputs;
    l           = dut.u_wrap.launch;
    busy        = dut.u_wrap.busy;
    full_inputs = dut.u_wrap.ds_cnt != 0 && int'(dut.u_wrap.a_cnt) >= T &&
                  int'(dut.u_wrap.b_cnt) >= T;
    if (l && launches > returned) n_overlap++;
    if (l) launches++;
    if (!busy && full_inputs && !l) n_credit++;
    if (!busy && !full_inputs && launches < NP) n_starve++;
    if (m_c_tvalid && !m_c_tready) n_bp++;
    if (s_a_tvalid && !s_a_tready) n_full++;
    if (dut.rpm_next_out) returned++;
  end

  function automatic longint unsigned negacyclic(int p, int m);
    longint unsigned e = 0;
    for (int i = 0; i < N; i++) begin
      int j = (m - i + N) % N;
      if (i <= m) e = (e + mulm(as[p][i], bs[p][j], qs[p])) % qs[p];
      else        e = (e + qs[p] - mulm(as[p][i], bs[p][j], qs[p])) % qs[p];
    end
    return e;
  endfunction

  initial begin
    for (int p = 0; p < NP; p++) begin
      qs[p] = find_prime(QW, N, p % 3);
      ps[p] = find_psi(qs[p], N);
      for (int j = 0; j < N; j++) begin
        as[p][j] = $urandom % qs[p];
        bs[p][j] = $urandom % qs[p];
      end
      if (p > 0 && qs[p] != qs[p-1]) n_switch++;
    end
    s_ds_tvalid = 0; s_a_tvalid = 0; s_b_tvalid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
  end

  // parameter stream
  initial begin
    wait (!rst);
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      s_ds_tvalid = 1;
      s_ds_tdata = '0;
      s_ds_tdata[QW-1:0]       = QW'(qs[p]);
      s_ds_tdata[2*QW:QW]      = (QW+1)'(barrett_v(qs[p], QW));
      s_ds_tdata[3*QW:2*QW+1]  = QW'(powm(N, qs[p] - 2, qs[p]));
      for (int k = 0; k < W; k++) s_ds_tdata[(3 + k) * QW + 1 +: QW] = QW'(powm(ps[p], k + 1, qs[p]));
      @(posedge clk); while (!s_ds_tready) @(posedge clk);
      @(negedge clk) s_ds_tvalid = 0;
    end
  end

  // operand streams: A with occasional gaps, B at full rate
  initial begin
    wait (!rst);
    @(negedge clk);
    for (int p = 0; p < NP; p++)
      for (int cc = 0; cc < T; cc++) begin
        while (p >= 4 && p < 6 && $urandom % 4 == 0) begin
          s_a_tvalid = 0; @(negedge clk);
        end
        s_a_tvalid = 1;
        for (int k = 0; k < W; k++) s_a_tdata[k*QW +: QW] = QW'(as[p][cc * W + k]);
        @(posedge clk); while (!s_a_tready) @(posedge clk);
        @(negedge clk);
      end
    s_a_tvalid = 0;
  end
  initial begin
    wait (!rst);
    @(negedge clk);
    for (int p = 0; p < NP; p++)
      for (int cc = 0; cc < T; cc++) begin
        s_b_tvalid = 1;
        for (int k = 0; k < W; k++) s_b_tdata[k*QW +: QW] = QW'(bs[p][cc * W + k]);
        @(posedge clk); while (!s_b_tready) @(posedge clk);
        @(negedge clk);
      end
    s_b_tvalid = 0;
  end

  // result consumer: stalls during products 2..5, then drains at full rate
  always @(negedge clk) m_c_tready <= slow_out ? ($urandom % 8 == 0) : 1'b1;

  initial begin
    m_c_tready = 1;
    wait (!rst);
    for (int p = 0; p < NP; p++) begin
      slow_out = (p >= 2 && p < 6);
      for (int m = 0; m < N; m += W) begin
        @(posedge clk); while (!(m_c_tvalid && m_c_tready)) @(posedge clk);
        for (int k = 0; k < W; k++) begin
          longint unsigned e;
          e = negacyclic(p, m + k);
          checks++;
          if (m_c_tdata[k*QW +: QW] != QW'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL product %0d c[%0d] got %0d exp %0d", p, m + k,
                                        m_c_tdata[k*QW +: QW], e);
          end
        end
        checks++;
        if (m_c_tlast != (m + W == N)) failures++;
      end
    end
    $display("mechanisms: launches in flight %0d, channel switches %0d, reservation holds %0d, input waits %0d, output stalls %0d, input full %0d",
             n_overlap, n_switch, n_credit, n_starve, n_bp, n_full);
    checks++;
    if (NP > 1 && (n_overlap == 0 || n_switch == 0)) failures++;
    if (!SYS_DEFAULT && (n_credit == 0 || n_starve == 0 || n_bp == 0 || n_full == 0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
