// mod_add: modular addition r = (a + b) mod q for residues a, b < q.
//
// Combinational: one (QW+1)-bit adder and one conditional subtraction of q.
// Operands must already be reduced (a, b < q). The single conditional
// subtraction is the usual hardware form of the addition; the surrounding
// butterfly registers the result.
module mod_add #(
  parameter int unsigned QW = rpm_pkg::DEF_QW
) (
  input  logic [QW-1:0] a,
  input  logic [QW-1:0] b,
  input  logic [QW-1:0] q,
  output logic [QW-1:0] r
);
  logic [QW:0] s, d;
  always_comb begin
    s = {1'b0, a} + {1'b0, b};
    d = s - {1'b0, q};
    r = (s >= {1'b0, q}) ? d[QW-1:0] : s[QW-1:0];
  end
endmodule
