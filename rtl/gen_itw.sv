// gen_itw: inverse twiddle generation ("GEN ITW"): Psi^-1 = Reorder(q - Psi).
//
// Because psi^n = -1 mod q, psi^-j = q - psi^(n-j) for 0 < j < n, so the
// inverse set needs no multiplication: each word of the incoming Psi flow
// (psi^j in order, w per cycle) is replaced by q - psi^j, except position 0
// (psi^0 = 1, its own inverse), and the frame is reversed, output position j
// taking input position (n - j) mod n. The reversal is a stream_perm double
// buffer. (q, v, n^-1) travel with the set.
// Timing: next_out follows next_in after rpm_pkg::lat_perm(N, W) = n/w + 1
// cycles; the output set then streams for n/w cycles, psi^-j at position j.
module gen_itw
  import rpm_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned W  = DEF_W,
  parameter int unsigned QW = DEF_QW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          next_in,
  input  logic [QW-1:0] din [W],
  input  logic [QW-1:0] q,
  input  logic [QW:0]   v,
  input  logic [QW-1:0] ninv,
  output logic          next_out,
  output logic [QW-1:0] dout [W],
  output logic [QW-1:0] q_out,
  output logic [QW:0]   v_out,
  output logic [QW-1:0] ninv_out
);
  localparam int unsigned CTXW = 3 * QW + 1;

  logic [QW-1:0] neg [W];
  logic [QW-1:0] sel [W];
  logic [CTXW-1:0] ctx_o;

  for (genvar k = 0; k < W; k++) begin : g_neg
    mod_sub #(.QW(QW)) u_sub (.a('0), .b(din[k]), .q(q), .r(neg[k]));
    assign sel[k] = (k == 0 && next_in) ? din[k] : neg[k];
  end

  stream_perm #(.N(N), .W(W), .QW(QW), .KIND(PERM_REVERSE), .STAGE(0), .CTXW(CTXW)) u_rev (
    .clk, .rst, .next_in, .din(sel), .ctx_in({q, v, ninv}),
    .next_out, .dout, .ctx_out(ctx_o));

  assign q_out    = ctx_o[CTXW-1 -: QW];
  assign v_out    = ctx_o[2*QW -: QW+1];
  assign ninv_out = ctx_o[QW-1:0];
endmodule
