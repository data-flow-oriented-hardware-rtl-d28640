// ntt2: radix-2 NTT butterfly ("NTT 2") over Z_q.
//
// Takes the pair (u, v), where v has already been multiplied by the stage
// twiddle, and returns x0 = u + v mod q, x1 = u - v mod q. Both outputs are
// registered: latency one cycle, one butterfly per cycle.
module ntt2 #(
  parameter int unsigned QW = rpm_pkg::DEF_QW
) (
  input  logic          clk,
  input  logic [QW-1:0] u,
  input  logic [QW-1:0] v,
  input  logic [QW-1:0] q,
  output logic [QW-1:0] x0,
  output logic [QW-1:0] x1
);
  logic [QW-1:0] s, d;
  mod_add #(.QW(QW)) u_add (.a(u), .b(v), .q(q), .r(s));
  mod_sub #(.QW(QW)) u_sub (.a(u), .b(v), .q(q), .r(d));
  always_ff @(posedge clk) begin
    x0 <= s;
    x1 <= d;
  end
endmodule
