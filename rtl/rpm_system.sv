// rpm_system: the residue polynomial multiplier behind its AXI4-Stream
// wrapper, as integrated on the accelerator board: the host interface
// (PCIe endpoint, DMA engines, parameter stream) is outside and connects to
// the four streams below.
//   s_ds : one channel record per product {psi^w..psi^1, n^-1, v, q}
//   s_a  : A, w coefficients per beat, n/w beats per product
//   s_b  : B, likewise
//   m_c  : C = A*B mod (X^n + 1, q), w coefficients per beat, tlast on the
//          last beat of a product
// Products are accepted at up to one every n/w cycles; results come back in
// order. See wrap_axi for the flow control and rpm_top for the datapath.
module rpm_system
  import rpm_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned W  = DEF_W,
  parameter int unsigned QW = DEF_QW
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [(W+3)*QW:0]    s_ds_tdata,
  input  logic                 s_ds_tvalid,
  output logic                 s_ds_tready,
  input  logic [W*QW-1:0]      s_a_tdata,
  input  logic                 s_a_tvalid,
  output logic                 s_a_tready,
  input  logic [W*QW-1:0]      s_b_tdata,
  input  logic                 s_b_tvalid,
  output logic                 s_b_tready,
  output logic [W*QW-1:0]      m_c_tdata,
  output logic                 m_c_tvalid,
  input  logic                 m_c_tready,
  output logic                 m_c_tlast
);
  logic          rpm_next, rpm_next_out;
  logic [QW-1:0] rpm_a [W], rpm_b [W], rpm_seed [W], rpm_c [W];
  logic [QW-1:0] rpm_q, rpm_ninv;
  logic [QW:0]   rpm_v;

  wrap_axi #(.N(N), .W(W), .QW(QW)) u_wrap (
    .clk, .rst,
    .s_ds_tdata, .s_ds_tvalid, .s_ds_tready,
    .s_a_tdata, .s_a_tvalid, .s_a_tready,
    .s_b_tdata, .s_b_tvalid, .s_b_tready,
    .m_c_tdata, .m_c_tvalid, .m_c_tready, .m_c_tlast,
    .rpm_next, .rpm_a, .rpm_b, .rpm_q, .rpm_v, .rpm_ninv, .rpm_seed,
    .rpm_next_out, .rpm_c);

  rpm_top #(.N(N), .W(W), .QW(QW)) u_rpm (
    .clk, .rst, .next_in(rpm_next), .a(rpm_a), .b(rpm_b), .q(rpm_q), .v(rpm_v),
    .ninv(rpm_ninv), .seed(rpm_seed), .next_out(rpm_next_out), .c(rpm_c));
endmodule
