// rpm_top: residue polynomial multiplier (RPM) for one RNS channel at a time.
//
// Computes C = A * B in Z_q[X]/(X^n + 1) by negative wrapped convolution:
//   A' = Psi .* A, B' = Psi .* B          (VEC PW MM, Psi = (psi^j))
//   A^ = NTT(A'), B^ = NTT(B')            (VEC NTT, omega = psi^2)
//   C^ = A^ .* B^                         (PW MM)
//   C' = NTT^-1(C^)                       (NTT with omega^-1)
//   C  = (n^-1 Psi^-1) .* C'              (PW MM)
// All twiddles are generated on the fly from w seeds per channel: GEN TW
// streams Psi, GEN ITW derives Psi^-1 = Reorder(q - Psi), GEN PCTW scales it
// by n^-1. The NTT twiddles are the even-indexed words of those flows
// (omega^j = psi^2j) and are loaded into each NTT's twiddle bank while data
// streams, so consecutive products may use different primes.
//
// Interface: a product starts with next_in; in that cycle the channel data
// (q, v = floor(2^(2*QW)/q), n^-1 mod q, seeds psi^1..psi^w) must be valid,
// and A and B stream in natural coefficient order, w words per cycle, for
// T = n/w cycles (word k of cycle c is coefficient c*w+k). C leaves in the
// same order starting with next_out, rpm_pkg::lat_rpm(N, W) cycles later.
// A new product may start every max(T, MM_LAT^2 + 1) cycles (T for the
// default sizes): one product per T cycles.
// Conditions on the channel: q prime, q = 1 mod 2n, 2^(QW-1) < q < 2^QW,
// psi a primitive 2n-th root of unity mod q.
// Alignment between the data and the twiddle flows is by fixed latencies
// (delay_line for A/B and for the n^-1 Psi^-1 flow); the number of twiddle
// banks of each NTT follows G = ceil(Lat/T) + 1 with Lat measured from the
// start of its twiddle flow to the end of its last stage. The sizes of these
// delays are a consequence of this implementation's permutation buffers.
module rpm_top
  import rpm_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned W  = DEF_W,
  parameter int unsigned QW = DEF_QW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          next_in,
  input  logic [QW-1:0] a [W],
  input  logic [QW-1:0] b [W],
  input  logic [QW-1:0] q,
  input  logic [QW:0]   v,
  input  logic [QW-1:0] ninv,
  input  logic [QW-1:0] seed [W],
  output logic          next_out,
  output logic [QW-1:0] c [W]
);
  localparam int unsigned ML    = MM_LAT;
  localparam int unsigned LNTT  = lat_ntt(N, W);
  localparam int unsigned G_FWD = twb_banks(LNTT + ML, N, W);
  localparam int unsigned G_INV = twb_banks(LNTT + t_inv(N, W) - t_itw(N, W), N, W);
  localparam int unsigned D_PC  = t_last(N, W) - (t_itw(N, W) + ML);
  localparam int unsigned ABW   = 1 + 2 * W * QW;
  localparam int unsigned PCW   = 1 + W * QW + 2 * QW + 1;

  // ---------------- twiddle flows ----------------
  logic          tw_next;
  logic [QW-1:0] tw [W];
  logic [QW-1:0] tw_q, tw_ninv;
  logic [QW:0]   tw_v;

  gen_tw #(.N(N), .W(W), .QW(QW)) u_gen_tw (
    .clk, .rst, .next_in, .q, .v, .ninv, .seed,
    .tw_next, .tw, .tw_q, .tw_v, .tw_ninv);

  logic          itw_next;
  logic [QW-1:0] itw [W];
  logic [QW-1:0] itw_q, itw_ninv;
  logic [QW:0]   itw_v;

  gen_itw #(.N(N), .W(W), .QW(QW)) u_gen_itw (
    .clk, .rst, .next_in(tw_next), .din(tw), .q(tw_q), .v(tw_v), .ninv(tw_ninv),
    .next_out(itw_next), .dout(itw), .q_out(itw_q), .v_out(itw_v), .ninv_out(itw_ninv));

  logic          pc_next;
  logic [QW-1:0] pc [W];
  logic [QW-1:0] pc_q;
  logic [QW:0]   pc_v;

  gen_pctw #(.W(W), .QW(QW)) u_gen_pctw (
    .clk, .rst, .next_in(itw_next), .din(itw), .q(itw_q), .v(itw_v), .ninv(itw_ninv),
    .next_out(pc_next), .dout(pc), .q_out(pc_q), .v_out(pc_v));

  // n^-1 Psi^-1 flow held back until the inverse NTT delivers the frame
  logic [PCW-1:0] pc_pack, pcd_pack;
  logic           pcd_next;
  logic [QW-1:0]  pcd [W];
  logic [QW-1:0]  pcd_q;
  logic [QW:0]    pcd_v;
  always_comb begin
    pc_pack[PCW-1] = pc_next;
    for (int k = 0; k < W; k++) pc_pack[2*QW+1 + k*QW +: QW] = pc[k];
    pc_pack[2*QW:0] = {pc_q, pc_v};
    pcd_next = pcd_pack[PCW-1];
    for (int k = 0; k < W; k++) pcd[k] = pcd_pack[2*QW+1 + k*QW +: QW];
    {pcd_q, pcd_v} = pcd_pack[2*QW:0];
  end
  delay_line #(.DW(PCW), .DELAY(D_PC)) u_pc_dly (.clk, .rst, .din(pc_pack), .dout(pcd_pack));

  // ---------------- data flow ----------------
  // A, B held back by the generation latency of Psi
  logic [ABW-1:0] ab_pack, abd_pack;
  logic           abd_next;
  logic [QW-1:0]  ab [2*W];
  logic [QW-1:0]  psi2 [2*W];
  always_comb begin
    ab_pack[ABW-1] = next_in;
    for (int k = 0; k < W; k++) begin
      ab_pack[k*QW +: QW]       = a[k];
      ab_pack[(W+k)*QW +: QW]   = b[k];
    end
    abd_next = abd_pack[ABW-1];
    for (int k = 0; k < 2*W; k++) ab[k] = abd_pack[k*QW +: QW];
    for (int k = 0; k < W; k++) begin
      psi2[k]     = tw[k];
      psi2[W + k] = tw[k];
    end
  end
  delay_line #(.DW(ABW), .DELAY(lat_gen())) u_ab_dly (.clk, .rst, .din(ab_pack), .dout(abd_pack));

  // VEC PW MM: weighting by psi^j
  logic          w_next;
  logic [QW-1:0] wab [2*W];
  logic [QW-1:0] w_q;
  logic [QW:0]   w_v;
  pwmm #(.QW(QW), .LANES(2*W)) u_pw_psi (
    .clk, .rst, .next_in(abd_next), .x(ab), .y(psi2), .q(tw_q), .v(tw_v),
    .next_out(w_next), .r(wab), .q_out(w_q), .v_out(w_v));

  // VEC NTT
  logic [QW-1:0] fin  [2][W];
  logic [QW-1:0] fout [2][W];
  logic [QW-1:0] om   [W/2];
  logic [QW-1:0] iom  [W/2];
  logic          f_next;
  logic [QW-1:0] f_q;
  logic [QW:0]   f_v;
  always_comb begin
    for (int k = 0; k < W; k++) begin
      fin[0][k] = wab[k];
      fin[1][k] = wab[W + k];
    end
    for (int k = 0; k < W/2; k++) begin
      om[k]  = tw[2*k];
      iom[k] = itw[2*k];
    end
  end
  ntt_dp #(.N(N), .W(W), .QW(QW), .VEC(2), .G(G_FWD)) u_vec_ntt (
    .clk, .rst, .next_in(w_next), .din(fin),
    .prg_next(tw_next), .prg_tw(om), .prg_q(tw_q), .prg_v(tw_v),
    .next_out(f_next), .dout(fout), .q_out(f_q), .v_out(f_v));

  // PW MM: product of the transforms
  logic          p_next;
  logic [QW-1:0] prod [1][W];
  logic [QW-1:0] p_q;
  logic [QW:0]   p_v;
  pwmm #(.QW(QW), .LANES(W)) u_pw_prod (
    .clk, .rst, .next_in(f_next), .x(fout[0]), .y(fout[1]), .q(f_q), .v(f_v),
    .next_out(p_next), .r(prod[0]), .q_out(p_q), .v_out(p_v));

  // inverse NTT
  logic          i_next;
  logic [QW-1:0] iout [1][W];
  logic [QW-1:0] i_q;
  logic [QW:0]   i_v;
  ntt_dp #(.N(N), .W(W), .QW(QW), .VEC(1), .G(G_INV)) u_intt (
    .clk, .rst, .next_in(p_next), .din(prod),
    .prg_next(itw_next), .prg_tw(iom), .prg_q(itw_q), .prg_v(itw_v),
    .next_out(i_next), .dout(iout), .q_out(i_q), .v_out(i_v));

  // PW MM: unweighting and 1/n
  logic [QW-1:0] c_q;
  logic [QW:0]   c_v;
  pwmm #(.QW(QW), .LANES(W)) u_pw_post (
    .clk, .rst, .next_in(i_next), .x(iout[0]), .y(pcd), .q(pcd_q), .v(pcd_v),
    .next_out, .r(c), .q_out(c_q), .v_out(c_v));

  // The flows must meet the data where the fixed latencies say they do.
  a_psi_aligned:  assert property (@(posedge clk) disable iff (rst) abd_next == tw_next);
  a_post_aligned: assert property (@(posedge clk) disable iff (rst) i_next == pcd_next);
  a_post_prime:   assert property (@(posedge clk) disable iff (rst) i_next |-> i_q == pcd_q);
endmodule
