// tb_wrap_axi: tests the AXI4-Stream wrapper on its own (n = 16, w = 2,
// OUT_DEPTH = 2 products) with a stand-in for the multiplier that returns,
// a fixed 40 cycles after each launch, the burst c = a + b (per word, no
// reduction) and records the channel record it was launched with. Checks:
// every launch finds the record and n/w beats of A and B in order, a launch
// is a burst of exactly n/w cycles, results come back on m_c in order with
// tlast on each product's last beat, no result beat is lost while m_c is
// stalled (the reservation rule), and launches are held while the output
// FIFO is reserved. Counts of held launches, output stalls and input waits
// must all be non-zero.
module tb_wrap_axi;
  localparam int N = 16, W = 2, QW = 30, T = N / W, NP = 10, LAT = 40;
  localparam int DSW = (W + 3) * QW + 1;
  logic clk = 0, rst = 1;
  logic [DSW-1:0]  s_ds_tdata;
  logic            s_ds_tvalid, s_ds_tready;
  logic [W*QW-1:0] s_a_tdata, s_b_tdata, m_c_tdata;
  logic            s_a_tvalid, s_a_tready, s_b_tvalid, s_b_tready;
  logic            m_c_tvalid, m_c_tready, m_c_tlast;
  logic            rpm_next, rpm_next_out;
  logic [QW-1:0]   rpm_a [W], rpm_b [W], rpm_seed [W], rpm_c [W], rpm_q, rpm_ninv;
  logic [QW:0]     rpm_v;
  int checks = 0, failures = 0;
  int n_hold = 0, n_bp = 0, n_wait = 0;
  bit slow = 1;

  wrap_axi #(.N(N), .W(W), .QW(QW), .IN_DEPTH(2 * T), .OUT_DEPTH(2 * T), .DS_DEPTH(2)) dut (
    .clk, .rst, .s_ds_tdata, .s_ds_tvalid, .s_ds_tready, .s_a_tdata, .s_a_tvalid, .s_a_tready,
    .s_b_tdata, .s_b_tvalid, .s_b_tready, .m_c_tdata, .m_c_tvalid, .m_c_tready, .m_c_tlast,
    .rpm_next, .rpm_a, .rpm_b, .rpm_q, .rpm_v, .rpm_ninv, .rpm_seed, .rpm_next_out, .rpm_c);

  always #5 clk = ~clk;

  function automatic logic [QW-1:0] aval(int p, int j); return QW'(p * 1000 + j); endfunction
  function automatic logic [QW-1:0] bval(int p, int j); return QW'(p * 7 + j * 3 + 100000); endfunction

  // stand-in multiplier: fixed latency, result a + b
  logic [QW-1:0] pipe_c [LAT][W];
  logic          pipe_n [LAT];
  int launch_no = 0, burst = 0;
  always @(posedge clk) begin
    pipe_n[0] <= rpm_next && !rst;
    for (int k = 0; k < W; k++) pipe_c[0][k] <= rpm_a[k] + rpm_b[k];
    for (int i = 1; i < LAT; i++) begin
      pipe_n[i] <= pipe_n[i-1] && !rst;
      pipe_c[i] <= pipe_c[i-1];
    end
  end
  assign rpm_next_out = pipe_n[LAT-1];
  assign rpm_c = pipe_c[LAT-1];

  // check what the wrapper hands to the multiplier
  always @(posedge clk) if (!rst) begin
    if (rpm_next) begin
      checks++;
      if (burst != 0) failures++;                      // launch inside a burst
      if (rpm_q != QW'(launch_no + 11) || rpm_seed[W-1] != QW'(launch_no + 22)) failures++;
      burst = T;
      launch_no++;
    end
    if (burst > 0) begin
      for (int k = 0; k < W; k++) begin
        checks++;
        if (rpm_a[k] != aval(launch_no - 1, (T - burst) * W + k) ||
            rpm_b[k] != bval(launch_no - 1, (T - burst) * W + k)) failures++;
      end
      burst--;
    end
    if (!dut.busy && !dut.launch && dut.ds_cnt != 0 && int'(dut.a_cnt) >= T && int'(dut.b_cnt) >= T) n_hold++;
    if (!dut.busy && !dut.launch && launch_no < NP && (int'(dut.a_cnt) < T || dut.ds_cnt == 0)) n_wait++;
    if (m_c_tvalid && !m_c_tready) n_bp++;
  end

  initial begin
    s_ds_tvalid = 0; s_a_tvalid = 0; s_b_tvalid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
  end
  initial begin
    wait (!rst);
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      s_ds_tvalid = 1;
      s_ds_tdata = '0;
      s_ds_tdata[QW-1:0] = QW'(p + 11);
      s_ds_tdata[(3 + W - 1) * QW + 1 +: QW] = QW'(p + 22);
      @(posedge clk); while (!s_ds_tready) @(posedge clk);
      @(negedge clk) s_ds_tvalid = 0;
    end
  end
  initial begin
    wait (!rst);
    @(negedge clk);
    for (int p = 0; p < NP; p++)
      for (int c = 0; c < T; c++) begin
        if (p == 1) repeat (3) @(negedge clk);         // a slow producer for a while
        s_a_tvalid = 1;
        for (int k = 0; k < W; k++) s_a_tdata[k*QW +: QW] = aval(p, c * W + k);
        @(posedge clk); while (!s_a_tready) @(posedge clk);
        @(negedge clk);
        s_a_tvalid = 0;
      end
  end
  initial begin
    wait (!rst);
    @(negedge clk);
    for (int p = 0; p < NP; p++)
      for (int c = 0; c < T; c++) begin
        s_b_tvalid = 1;
        for (int k = 0; k < W; k++) s_b_tdata[k*QW +: QW] = bval(p, c * W + k);
        @(posedge clk); while (!s_b_tready) @(posedge clk);
        @(negedge clk);
        s_b_tvalid = 0;
      end
  end

  always @(negedge clk) m_c_tready <= slow ? ($urandom % 6 == 0) : 1'b1;

  initial begin
    m_c_tready = 0;
    wait (!rst);
    for (int p = 0; p < NP; p++) begin
      slow = (p < 6);
      for (int c = 0; c < T; c++) begin
        @(posedge clk); while (!(m_c_tvalid && m_c_tready)) @(posedge clk);
        for (int k = 0; k < W; k++) begin
          checks++;
          if (m_c_tdata[k*QW +: QW] != aval(p, c * W + k) + bval(p, c * W + k)) begin
            failures++;
            if (failures < 10) $display("FAIL product %0d beat %0d", p, c);
          end
        end
        checks++;
        if (m_c_tlast != (c == T - 1)) failures++;
      end
    end
    $display("held launches %0d, output stalls %0d, input waits %0d", n_hold, n_bp, n_wait);
    checks++;
    if (n_hold == 0 || n_bp == 0 || n_wait == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
