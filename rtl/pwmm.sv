// pwmm: point-wise modular multiplier (PW MM, and VEC PW MM with LANES > w).
//
// Every cycle it multiplies LANES word pairs x[k] * y[k] mod q with one
// mod_mul per lane. The prime (q, v) comes with the stream, one value per
// cycle, and is passed on delayed like the data so that the next block sees
// the prime of the words it receives. The frame marker next_in is delayed
// the same way (next_out). Latency rpm_pkg::MM_LAT cycles, no stall.
module pwmm #(
  parameter int unsigned QW    = rpm_pkg::DEF_QW,
  parameter int unsigned LANES = rpm_pkg::DEF_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          next_in,
  input  logic [QW-1:0] x [LANES],
  input  logic [QW-1:0] y [LANES],
  input  logic [QW-1:0] q,
  input  logic [QW:0]   v,
  output logic          next_out,
  output logic [QW-1:0] r [LANES],
  output logic [QW-1:0] q_out,
  output logic [QW:0]   v_out
);
  localparam int unsigned L = rpm_pkg::MM_LAT;

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    mod_mul #(.QW(QW)) u_mm (.clk(clk), .a(x[k]), .b(y[k]), .q(q), .v(v), .r(r[k]));
  end

  logic [L-1:0]  nx;
  logic [QW-1:0] qd [L];
  logic [QW:0]   vd [L];
  always_ff @(posedge clk) begin
    if (rst) nx <= '0;
    else     nx <= {nx[L-2:0], next_in};
    qd[0] <= q;
    vd[0] <= v;
    for (int i = 1; i < L; i++) begin
      qd[i] <= qd[i-1];
      vd[i] <= vd[i-1];
    end
  end
  assign next_out = nx[L-1];
  assign q_out    = qd[L-1];
  assign v_out    = vd[L-1];
endmodule
