// gen_tw: on-the-fly generation of the NWC twiddle set ("GEN TW").
//
// From the w seeds psi^1 .. psi^w of an RNS channel (psi a primitive 2n-th
// root of unity mod q) it streams Psi = (psi^j), j = 0..n-1, w words per
// cycle for T = n/w cycles, word k of cycle c being psi^(c*w+k). Channel data
// (q, v, n^-1) travel with the set.
// Consecutive words are grouped in bunches of w (bunch c = psi^(cw..cw+w-1)).
// With f = psi^(J*w), bunch c+J = f * bunch c, so once J bunches exist a
// multiplier bank of w modular multipliers whose latency is J cycles can
// produce one new bunch per cycle from the bunch it emits, with no other
// storage: the local storage does not depend on n. Here J = MM_LAT.
//   * init (J*MM_LAT cycles after next_in): bunch 0 = (1, psi^1..psi^(w-1))
//     and bunches 1..J by repeated multiplication with psi^w on a second
//     multiplier bank; f = first word of bunch J. Results go to one of two
//     slots so that the init of a set overlaps the streaming of the previous.
//   * run: bunches 0..J-1 are taken from the slot, the rest from the feedback
//     multiplier bank.
// Timing: tw_next rises rpm_pkg::lat_gen() cycles after next_in. next_in may
// be asserted again after max(T, J*MM_LAT + 1) cycles.
// The bunch recurrence and its local storage follow the generation scheme the
// design is based on; its several generation handlers sharing one multiplier
// bank under a cyclic priority and the sorting buffers are replaced here by
// this two-bank arrangement, which gives the same rate for T >= J*MM_LAT.
module gen_tw
  import rpm_pkg::*;
#(
  parameter int unsigned N  = DEF_N,
  parameter int unsigned W  = DEF_W,
  parameter int unsigned QW = DEF_QW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          next_in,
  input  logic [QW-1:0] q,
  input  logic [QW:0]   v,
  input  logic [QW-1:0] ninv,
  input  logic [QW-1:0] seed [W],     // psi^1 .. psi^w
  output logic          tw_next,
  output logic [QW-1:0] tw [W],
  output logic [QW-1:0] tw_q,
  output logic [QW:0]   tw_v,
  output logic [QW-1:0] tw_ninv
);
  localparam int unsigned T   = N / W;
  localparam int unsigned J   = MM_LAT;
  localparam int unsigned IT  = J * MM_LAT;          // init duration
  localparam int unsigned LG  = lat_gen() - 1;       // next_in to run start
  localparam int unsigned CW  = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned ICW = $clog2(IT + 1);

  // ---- per-slot channel data ----
  logic [QW-1:0] sq   [2];
  logic [QW:0]   sv   [2];
  logic [QW-1:0] sni  [2];
  logic [QW-1:0] sf   [2];
  logic [QW-1:0] ib   [2][J][W];
  logic          islot;            // slot of the set being initialised
  logic [QW-1:0] step;             // psi^w
  logic          ibusy;
  logic [ICW-1:0] ic;

  // ---- init multiplier bank ----
  logic [QW-1:0] ia [W];
  logic [QW-1:0] ir [W];
  logic [QW-1:0] ib_q, ib_b;
  logic [QW:0]   ib_v;
  logic          nslot;

  always_comb begin
    nslot = ~islot;
    for (int k = 0; k < W; k++) begin
      if (next_in) ia[k] = (k == 0) ? QW'(1) : seed[k-1];
      else         ia[k] = ir[k];
    end
    ib_b = next_in ? seed[W-1] : step;
    ib_q = next_in ? q : sq[islot];
    ib_v = next_in ? v : sv[islot];
  end

  for (genvar k = 0; k < W; k++) begin : g_imm
    mod_mul #(.QW(QW)) u_mm (.clk, .a(ia[k]), .b(ib_b), .q(ib_q), .v(ib_v), .r(ir[k]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ibusy <= 1'b0;
      ic    <= '0;
      islot <= 1'b1;
    end else if (next_in) begin
      ibusy <= 1'b1;
      ic    <= ICW'(1);
      islot <= nslot;
    end else if (ibusy) begin
      ic    <= ic + 1'b1;
      ibusy <= (int'(ic) != IT);
    end
  end

  always_ff @(posedge clk) begin
    if (next_in) begin
      sq[nslot]  <= q;
      sv[nslot]  <= v;
      sni[nslot] <= ninv;
      step       <= seed[W-1];
      for (int k = 0; k < W; k++) ib[nslot][0][k] <= ia[k];
    end else if (ibusy && int'(ic) % MM_LAT == 0) begin
      if (int'(ic) / MM_LAT < J) begin
        for (int k = 0; k < W; k++) ib[islot][int'(ic) / MM_LAT][k] <= ir[k];
      end else begin
        sf[islot] <= ir[0];
      end
    end
  end

  // ---- run ----
  logic [LG-1:0] sd;     // delayed next_in
  logic [LG-1:0] sld;    // delayed slot number
  logic          rbusy, rsl, start, cur;
  logic [CW-1:0] rp, rpe;
  logic [QW-1:0] e  [W];
  logic [QW-1:0] fr [W];

  always_ff @(posedge clk) begin
    if (rst) sd <= '0;
    else     sd <= {sd[LG-2:0], next_in};
    sld <= {sld[LG-2:0], nslot};
  end

  always_comb begin
    start = sd[LG-1];
    cur   = start ? sld[LG-1] : rsl;
    rpe   = start ? '0 : rp;
    for (int k = 0; k < W; k++)
      e[k] = (int'(rpe) < J) ? ib[cur][int'(rpe) % J][k] : fr[k];
  end

  for (genvar k = 0; k < W; k++) begin : g_rmm
    mod_mul #(.QW(QW)) u_mm (.clk, .a(e[k]), .b(sf[cur]), .q(sq[cur]), .v(sv[cur]), .r(fr[k]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rbusy   <= 1'b0;
      rp      <= '0;
      rsl     <= 1'b0;
      tw_next <= 1'b0;
    end else begin
      tw_next <= start;
      if (start) rsl <= sld[LG-1];
      if (start || rbusy) begin
        rp    <= rpe + 1'b1;
        rbusy <= (int'(rpe) != T - 1);
      end
    end
  end

  always_ff @(posedge clk) begin
    tw      <= e;
    tw_q    <= sq[cur];
    tw_v    <= sv[cur];
    tw_ninv <= sni[cur];
  end

  a_init_free: assert property (@(posedge clk) disable iff (rst) next_in |-> !ibusy);
endmodule
