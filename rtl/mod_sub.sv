// mod_sub: modular subtraction r = (a - b) mod q for residues a, b < q.
//
// Combinational: one subtraction and, when it borrows, one addition of q.
// Operands must already be reduced (a, b < q).
module mod_sub #(
  parameter int unsigned QW = rpm_pkg::DEF_QW
) (
  input  logic [QW-1:0] a,
  input  logic [QW-1:0] b,
  input  logic [QW-1:0] q,
  output logic [QW-1:0] r
);
  logic [QW:0] d;
  logic [QW:0] s;
  always_comb begin
    d = {1'b0, a} - {1'b0, b};
    s = d + {1'b0, q};
    r = d[QW] ? s[QW-1:0] : d[QW-1:0];
  end
endmodule
