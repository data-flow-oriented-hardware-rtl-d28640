// wrap_axi: AXI4-Stream wrapper with FIFOs between the host-side DMA
// streams and the residue polynomial multiplier (RPM).
//
// Three slave streams feed the RPM: s_ds carries one channel record per
// product {seeds psi^w..psi^1, n^-1, v, q} (the parameter stream), s_a and
// s_b carry the coefficients of A and B, w per beat, n/w beats per
// polynomial. The master stream m_c returns C, w coefficients per beat, with
// tlast on the last beat of each product.
// The RPM takes a product as an uninterrupted burst of n/w cycles and has no
// back-pressure, so the wrapper
//   * buffers the inputs in FIFOs and launches a product (rpm_next for one
//     cycle, then n/w cycles of A/B words) only when a channel record and n/w
//     beats of A and of B are present, and
//   * reserves n/w entries of the output FIFO per product in flight, so that
//     every result word finds room even when m_c is stalled: a product is
//     launched only if fill + reserved + n/w <= OUT_DEPTH.
// FIFO depths are parameters; with OUT_DEPTH below the RPM latency times the
// rate, a stalled output eventually throttles the launches.
// The wrapper's existence and its FIFOs follow the integration the design is
// based on; stream formats, depths and the reservation rule are this
// design's own.
module wrap_axi
  import rpm_pkg::*;
#(
  parameter int unsigned N         = DEF_N,
  parameter int unsigned W         = DEF_W,
  parameter int unsigned QW        = DEF_QW,
  parameter int unsigned IN_DEPTH  = 2 * (N / W),
  parameter int unsigned OUT_DEPTH = 4 * (N / W),
  parameter int unsigned DS_DEPTH  = 4
) (
  input  logic                    clk,
  input  logic                    rst,
  // parameter stream
  input  logic [(W+2)*QW+QW:0]    s_ds_tdata,
  input  logic                    s_ds_tvalid,
  output logic                    s_ds_tready,
  // operand streams
  input  logic [W*QW-1:0]         s_a_tdata,
  input  logic                    s_a_tvalid,
  output logic                    s_a_tready,
  input  logic [W*QW-1:0]         s_b_tdata,
  input  logic                    s_b_tvalid,
  output logic                    s_b_tready,
  // result stream
  output logic [W*QW-1:0]         m_c_tdata,
  output logic                    m_c_tvalid,
  input  logic                    m_c_tready,
  output logic                    m_c_tlast,
  // RPM side
  output logic                    rpm_next,
  output logic [QW-1:0]           rpm_a [W],
  output logic [QW-1:0]           rpm_b [W],
  output logic [QW-1:0]           rpm_q,
  output logic [QW:0]             rpm_v,
  output logic [QW-1:0]           rpm_ninv,
  output logic [QW-1:0]           rpm_seed [W],
  input  logic                    rpm_next_out,
  input  logic [QW-1:0]           rpm_c [W]
);
  localparam int unsigned T   = N / W;
  localparam int unsigned DSW = (W + 2) * QW + QW + 1;
  localparam int unsigned CW  = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned RW  = $clog2(OUT_DEPTH + 1) + 1;

  // ---- input FIFOs ----
  logic [$clog2(DS_DEPTH+1)-1:0] ds_cnt;
  logic [$clog2(IN_DEPTH+1)-1:0] a_cnt, b_cnt;
  logic [DSW-1:0]  ds_q;
  logic [W*QW-1:0] a_q, b_q;
  logic ds_pop, ab_pop;

  assign s_ds_tready = int'(ds_cnt) < DS_DEPTH;
  assign s_a_tready  = int'(a_cnt) < IN_DEPTH;
  assign s_b_tready  = int'(b_cnt) < IN_DEPTH;

  sync_fifo #(.DW(DSW), .DEPTH(DS_DEPTH)) u_ds (.clk, .rst, .push(s_ds_tvalid && s_ds_tready),
    .din(s_ds_tdata), .pop(ds_pop), .dout(ds_q), .count(ds_cnt));
  sync_fifo #(.DW(W*QW), .DEPTH(IN_DEPTH)) u_a (.clk, .rst, .push(s_a_tvalid && s_a_tready),
    .din(s_a_tdata), .pop(ab_pop), .dout(a_q), .count(a_cnt));
  sync_fifo #(.DW(W*QW), .DEPTH(IN_DEPTH)) u_b (.clk, .rst, .push(s_b_tvalid && s_b_tready),
    .din(s_b_tdata), .pop(ab_pop), .dout(b_q), .count(b_cnt));

  // ---- launch control ----
  logic          busy, launch;
  logic [CW-1:0] icnt;
  logic [RW-1:0] reserved;
  logic [$clog2(OUT_DEPTH+1)-1:0] c_cnt;
  logic          c_push;

  always_comb begin
    launch = !busy && ds_cnt != 0 && int'(a_cnt) >= T && int'(b_cnt) >= T &&
             int'(c_cnt) + int'(reserved) + T <= OUT_DEPTH;
    ds_pop = launch;
    ab_pop = launch || busy;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      icnt <= '0;
    end else if (launch) begin
      busy <= (T > 1);
      icnt <= CW'(1);
    end else if (busy) begin
      icnt <= icnt + 1'b1;
      busy <= (int'(icnt) != T - 1);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) reserved <= '0;
    else     reserved <= reserved + (launch ? RW'(T) : '0) - (c_push ? RW'(1) : '0);
  end

  assign rpm_next = launch;
  always_comb begin
    for (int k = 0; k < W; k++) begin
      rpm_a[k]    = a_q[k*QW +: QW];
      rpm_b[k]    = b_q[k*QW +: QW];
      rpm_seed[k] = ds_q[(3 + k) * QW + 1 +: QW];
    end
    rpm_q    = ds_q[QW-1:0];
    rpm_v    = ds_q[2*QW:QW];
    rpm_ninv = ds_q[3*QW:2*QW+1];
  end

  // ---- output FIFO ----
  logic          obusy;
  logic [CW-1:0] ocnt, oc;
  logic [W*QW:0] c_word, c_q;

  always_comb begin
    c_push = rpm_next_out || obusy;
    oc     = rpm_next_out ? '0 : ocnt;
    for (int k = 0; k < W; k++) c_word[k*QW +: QW] = rpm_c[k];
    c_word[W*QW] = (int'(oc) == T - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      obusy <= 1'b0;
      ocnt  <= '0;
    end else if (c_push) begin
      ocnt  <= oc + 1'b1;
      obusy <= (int'(oc) != T - 1);
    end
  end

  sync_fifo #(.DW(W*QW+1), .DEPTH(OUT_DEPTH)) u_c (.clk, .rst, .push(c_push), .din(c_word),
    .pop(m_c_tvalid && m_c_tready), .dout(c_q), .count(c_cnt));

  assign m_c_tvalid = c_cnt != 0;
  assign m_c_tdata  = c_q[W*QW-1:0];
  assign m_c_tlast  = c_q[W*QW];
endmodule
