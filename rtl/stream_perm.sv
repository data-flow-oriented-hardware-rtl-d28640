// stream_perm: streaming permutation of an n-word frame arriving w words per
// cycle ("Init Perm", "Perm" of the NTT data path, and the reordering of
// GEN ITW).
//
// A frame starts with next_in and then occupies n/w consecutive cycles in
// stream order: cycle c carries positions c*w .. c*w+w-1. The block
// is a double buffer of two n-word halves: a frame is written in stream order
// into one half while the previous frame is read from the other half. Output
// position p reads input position rpm_pkg::perm_src(KIND, STAGE, log2 n, p).
// The frame leaves n/w + 1 cycles after it entered (next_out marks its first
// cycle) and again occupies n/w consecutive cycles. A side-band word ctx_in,
// sampled with next_in, is returned with the frame on ctx_out.
// Frames may follow each other back to back (next_in every n/w cycles) or
// with gaps. Only the permutations themselves come from the NTT structure;
// this memory-based double buffer is the simplest way to realise them and is
// this design's own choice.
module stream_perm
  import rpm_pkg::*;
#(
  parameter int unsigned N     = DEF_N,
  parameter int unsigned W     = DEF_W,
  parameter int unsigned QW    = DEF_QW,
  parameter perm_kind_e  KIND  = PERM_BITREV,
  parameter int unsigned STAGE = 0,
  parameter int unsigned CTXW  = 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            next_in,
  input  logic [QW-1:0]   din [W],
  input  logic [CTXW-1:0] ctx_in,
  output logic            next_out,
  output logic [QW-1:0]   dout [W],
  output logic [CTXW-1:0] ctx_out
);
  localparam int unsigned T    = N / W;
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned CW   = (T > 1) ? $clog2(T) : 1;

  logic [QW-1:0]   mem [2*N];          // two halves: address {half, position}
  logic [CTXW-1:0] ctx_mem [2];

  // write side
  logic          whalf, wbusy;
  logic [CW-1:0] wcnt;
  logic          hw;
  logic [CW-1:0] cw;
  logic          wr;
  // read side
  logic          rhalf, rbusy;
  logic [CW-1:0] rcnt;

  always_comb begin
    hw = next_in ? ~whalf : whalf;
    cw = next_in ? '0 : wcnt;
    wr = next_in | wbusy;
  end

  always_ff @(posedge clk) begin
    if (wr) begin
      for (int k = 0; k < W; k++) mem[{hw, LOGN'(int'(cw) * W + k)}] <= din[k];
    end
    if (next_in) ctx_mem[hw] <= ctx_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      whalf    <= 1'b1;
      wbusy    <= 1'b0;
      wcnt     <= '0;
      rhalf    <= 1'b0;
      rbusy    <= 1'b0;
      rcnt     <= '0;
      next_out <= 1'b0;
    end else begin
      whalf <= hw;
      if (wr) begin
        wcnt  <= cw + 1'b1;
        wbusy <= (int'(cw) != T - 1);
      end
      // the last word of a frame is written: start reading it next cycle
      next_out <= 1'b0;
      if (wr && int'(cw) == T - 1) begin
        rbusy <= 1'b1;
        rhalf <= hw;
        rcnt  <= '0;
      end else if (rbusy) begin
        rcnt  <= rcnt + 1'b1;
        rbusy <= (int'(rcnt) != T - 1);
      end
      if (rbusy && rcnt == '0) next_out <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < W; k++)
      dout[k] <= mem[{rhalf, LOGN'(perm_src(KIND, STAGE, LOGN, int'(rcnt) * W + k))}];
    ctx_out <= ctx_mem[rhalf];
  end

  // A new frame may not start before the previous one is completely written.
  a_no_overlap: assert property (@(posedge clk) disable iff (rst) next_in |-> !wbusy);
endmodule
