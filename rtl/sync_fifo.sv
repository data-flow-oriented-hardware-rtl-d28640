// sync_fifo: single-clock first-word-fall-through FIFO of DEPTH entries of
// DW bits. dout shows the oldest entry whenever count > 0; push and pop may
// happen in the same cycle. count gives the fill level for the flow control
// of the AXI wrapper. Pushing when full or popping when empty is an error
// (checked by assertions).
module sync_fifo #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     push,
  input  logic [DW-1:0]            din,
  input  logic                     pop,
  output logic [DW-1:0]            dout,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign dout = mem[rp];

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push && !pop |-> int'(count) < DEPTH);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> count != 0);
endmodule
