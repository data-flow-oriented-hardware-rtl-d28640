// gen_pctw: post-computation twiddles ("GEN PCTW"): n^-1 * Psi^-1 mod q.
//
// Multiplies every word of the inverse twiddle flow by n^-1 mod q, which
// arrives with the flow, so that the last point-wise product of the RPM both
// removes the psi^j weighting and applies the 1/n factor of the inverse NTT.
// w modular multipliers (a pwmm with the second operand broadcast);
// latency rpm_pkg::MM_LAT cycles, (q, v) delayed with the words.
module gen_pctw #(
  parameter int unsigned W  = rpm_pkg::DEF_W,
  parameter int unsigned QW = rpm_pkg::DEF_QW
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
  output logic [QW:0]   v_out
);
  logic [QW-1:0] nb [W];
  for (genvar k = 0; k < W; k++) begin : g_b
    assign nb[k] = ninv;
  end
  pwmm #(.QW(QW), .LANES(W)) u_mm (
    .clk, .rst, .next_in, .x(din), .y(nb), .q, .v,
    .next_out, .r(dout), .q_out, .v_out);
endmodule
