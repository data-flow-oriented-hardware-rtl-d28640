// delay_line: fixed delay of a DW-bit stream by DELAY cycles (DELAY >= 2),
// built as a circular buffer of DELAY-1 entries read before it is written,
// followed by an output register. Bit DW-1 is treated as a frame marker and
// held low until the buffer has been filled once after reset, so that the
// uninitialised contents never produce a false marker. Used to align the
// data and twiddle flows of the RPM.
module delay_line #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DELAY = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  localparam int unsigned D  = DELAY - 1;
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1;

  logic [DW-1:0] mem [D];
  logic [AW-1:0] ptr;
  logic          full;
  logic [DW-1:0] rd;

  always_comb begin
    rd = mem[ptr];
    if (!full) rd[DW-1] = 1'b0;
  end

  always_ff @(posedge clk) begin
    mem[ptr] <= din;
    dout     <= rd;
    if (rst) begin
      ptr  <= '0;
      full <= 1'b0;
      dout[DW-1] <= 1'b0;
    end else if (int'(ptr) == D - 1) begin
      ptr  <= '0;
      full <= 1'b1;
    end else begin
      ptr <= ptr + 1'b1;
    end
  end
endmodule
