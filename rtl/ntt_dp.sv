// ntt_dp: streaming NTT data path ("NTT DP"; "VEC NTT" when VEC > 1).
//
// Computes X_k = sum_j x_j * omega^(j*k) mod q for frames of n words that
// arrive in natural order, w words per cycle (one transform every T = n/w
// cycles), and returns X in natural order, w words per cycle. The structure
// is the constant-geometry radix-2 decimation-in-time pipeline:
//   Init Perm (bit reversal) -> L = log2 n stages, each
//   [ twiddle multiply on the odd word of every pair -> NTT 2 -> Perm ].
// In stage l the pair at stream positions (2b, 2b+1) holds elements i and
// i + 2^l of the in-place DIT transform and is multiplied by
// omega^((b mod 2^l) * n/2^(l+1)); Perm l re-pairs the words for stage l+1,
// the last one restores natural order. Multipliers whose twiddle is always
// omega^0 = 1 (stage 0, and way 0 of the stages with 2^l <= w/2) are left out
// and replaced by a delay of the same length.
// Twiddles, q and v come from the twiddle bank (twb) which is reprogrammed by
// the twiddle flow prg_*: omega^0 .. omega^(n/2-1), w/2 words per cycle,
// starting with prg_next. A forward transform gets omega, an inverse one
// omega^-1 (the scaling by n^-1 is done outside).
// VEC data paths run in lock step and share one twiddle bank.
// Latency: rpm_pkg::lat_ntt(N, W) cycles from next_in to next_out; q_out and
// v_out give the prime of the frame that is leaving. The twiddle flow of a
// frame must start no later than the frame itself, and at most
// G*T - lat_ntt cycles before it.
module ntt_dp
  import rpm_pkg::*;
#(
  parameter int unsigned N   = DEF_N,
  parameter int unsigned W   = DEF_W,
  parameter int unsigned QW  = DEF_QW,
  parameter int unsigned VEC = 1,
  parameter int unsigned G   = twb_banks(lat_ntt(N, W) + MM_LAT, N, W)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          next_in,
  input  logic [QW-1:0] din  [VEC][W],
  input  logic          prg_next,
  input  logic [QW-1:0] prg_tw [W/2],
  input  logic [QW-1:0] prg_q,
  input  logic [QW:0]   prg_v,
  output logic          next_out,
  output logic [QW-1:0] dout [VEC][W],
  output logic [QW-1:0] q_out,
  output logic [QW:0]   v_out
);
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned HW = W / 2;
  localparam int unsigned ML = MM_LAT;
  localparam int unsigned CTXW = 2 * QW + 1;

  logic [L-1:0]  st_next;
  logic [QW-1:0] tw   [L][HW];
  logic [QW-1:0] st_q [L];
  logic [QW:0]   st_v [L];

  twb #(.N(N), .W(W), .QW(QW), .G(G)) u_twb (
    .clk, .rst, .prg_next, .prg_tw, .prg_q, .prg_v,
    .st_next, .tw, .st_q, .st_v
  );

  // stream between blocks: x[l] enters stage l, y[l] leaves its butterflies
  logic [QW-1:0] x [L+1][VEC][W];
  logic          xn [L+1];
  logic [QW-1:0] y [L][VEC][W];
  logic          yn [L];

  for (genvar vi = 0; vi < VEC; vi++) begin : g_init
    logic          nx_unused;
    logic [0:0]    ctx_unused;
    if (vi == 0) begin : g_first
      stream_perm #(.N(N), .W(W), .QW(QW), .KIND(PERM_BITREV), .STAGE(0), .CTXW(1)) u_perm (
        .clk, .rst, .next_in(next_in), .din(din[vi]), .ctx_in(1'b0),
        .next_out(xn[0]), .dout(x[0][vi]), .ctx_out(ctx_unused));
      assign nx_unused = 1'b0;
    end else begin : g_other
      stream_perm #(.N(N), .W(W), .QW(QW), .KIND(PERM_BITREV), .STAGE(0), .CTXW(1)) u_perm (
        .clk, .rst, .next_in(next_in), .din(din[vi]), .ctx_in(1'b0),
        .next_out(nx_unused), .dout(x[0][vi]), .ctx_out(ctx_unused));
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_stage
    assign st_next[l] = xn[l];

    // q delayed to the butterfly, frame marker delayed over multiply + butterfly
    logic [QW-1:0] qd [ML];
    logic [ML:0]   nd;
    always_ff @(posedge clk) begin
      qd[0] <= st_q[l];
      for (int i = 1; i < ML; i++) qd[i] <= qd[i-1];
      if (rst) nd <= '0;
      else     nd <= {nd[ML-1:0], xn[l]};
    end
    assign yn[l] = nd[ML];

    for (genvar vi = 0; vi < VEC; vi++) begin : g_vec
      for (genvar t = 0; t < HW; t++) begin : g_way
        logic [QW-1:0] ud [ML];
        logic [QW-1:0] vm;
        always_ff @(posedge clk) begin
          ud[0] <= x[l][vi][2*t];
          for (int i = 1; i < ML; i++) ud[i] <= ud[i-1];
        end
        if (l == 0 || ((1 << l) <= HW && (t % (1 << l)) == 0)) begin : g_one
          logic [QW-1:0] vd [ML];
          always_ff @(posedge clk) begin
            vd[0] <= x[l][vi][2*t+1];
            for (int i = 1; i < ML; i++) vd[i] <= vd[i-1];
          end
          assign vm = vd[ML-1];
        end else begin : g_mul
          mod_mul #(.QW(QW)) u_mm (.clk, .a(x[l][vi][2*t+1]), .b(tw[l][t]),
                                   .q(st_q[l]), .v(st_v[l]), .r(vm));
        end
        ntt2 #(.QW(QW)) u_bf (.clk, .u(ud[ML-1]), .v(vm), .q(qd[ML-1]),
                              .x0(y[l][vi][2*t]), .x1(y[l][vi][2*t+1]));
      end
    end

    for (genvar vi = 0; vi < VEC; vi++) begin : g_perm
      logic [CTXW-1:0] ctx_o;
      logic            nx_o;
      stream_perm #(.N(N), .W(W), .QW(QW), .KIND(PERM_STAGE), .STAGE(l), .CTXW(CTXW)) u_perm (
        .clk, .rst, .next_in(yn[l]), .din(y[l][vi]), .ctx_in({st_q[L-1], st_v[L-1]}),
        .next_out(nx_o), .dout(x[l+1][vi]), .ctx_out(ctx_o));
      if (vi == 0) begin : g_first
        assign xn[l+1] = nx_o;
        if (l == L - 1) begin : g_last
          assign q_out = ctx_o[CTXW-1 -: QW];
          assign v_out = ctx_o[QW:0];
        end
      end
    end
  end

  assign next_out = xn[L];
  for (genvar vi = 0; vi < VEC; vi++) begin : g_out
    assign dout[vi] = x[L][vi];
  end
endmodule
