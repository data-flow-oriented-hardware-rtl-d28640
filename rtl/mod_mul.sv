// mod_mul: pipelined modular multiplication r = a * b mod q.
//
// Reduction is a Barrett reduction with a per-prime constant
// v = floor(2^(2*QW) / q), which the caller supplies together with q (the
// pair (q_i, v_i) that travels with every twiddle flow). The primes must
// satisfy 2^(QW-1) < q < 2^QW so that v fits in QW+1 bits.
//   stage 1: z  = a * b                              (2*QW bits)
//   stage 2: t  = (z >> (QW-1)) * v
//   stage 3: r3 = z - (t >> (QW+1)) * q               (r3 < 3q)
//   stage 4: r  = r3 minus 0, q or 2q
// Latency is rpm_pkg::MM_LAT = 4 cycles, one result per cycle, no stall.
// The multiply/estimate/correct structure follows the usual software form of
// the operation; the pipeline cut is this design's own.
module mod_mul #(
  parameter int unsigned QW = rpm_pkg::DEF_QW
) (
  input  logic          clk,
  input  logic [QW-1:0] a,
  input  logic [QW-1:0] b,
  input  logic [QW-1:0] q,
  input  logic [QW:0]   v,
  output logic [QW-1:0] r
);
  logic [2*QW-1:0]   z1, z2;
  logic [QW-1:0]     q1, q2, q3;
  logic [QW:0]       v1;
  logic [2*QW+1:0]   t2;
  logic [QW+1:0]     r3;
  logic [QW:0]       est;
  logic [2*QW+1:0]   eq;

  always_comb begin
    est = t2[2*QW+1:QW+1];
    eq  = est * q2;
  end

  always_ff @(posedge clk) begin
    z1 <= a * b;
    q1 <= q;
    v1 <= v;
    t2 <= {1'b0, z1[2*QW-1:QW-1]} * v1;
    z2 <= z1;
    q2 <= q1;
    r3 <= z2[QW+1:0] - eq[QW+1:0];
    q3 <= q2;
    if (r3 >= ({2'b0, q3} << 1))  r <= QW'(r3 - ({2'b0, q3} << 1));
    else if (r3 >= {2'b0, q3})    r <= QW'(r3 - {2'b0, q3});
    else                          r <= r3[QW-1:0];
  end
endmodule
