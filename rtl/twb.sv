// twb: twiddle bank (TWB) of one NTT data path, with G banks that are
// reprogrammed from the twiddle flow.
//
// Each bank g holds everything that is specific to one RNS channel: the
// prime (q, v) and, for every stage l >= 1 and butterfly way t (0..w/2-1),
// the twiddles that way needs. When 2^l <= w/2 a way needs one constant
// ("reg (l,t)"); otherwise it cycles through D_l = 2^l/(w/2) values
// ("mem (l,t)", read at address rd_addr_l = stage cycle mod D_l). Way t of
// stage l at stage cycle c uses omega^(((c*w/2 + t) mod 2^l) * n/2^(l+1)).
//
// Reprogramming: the flow carries Omega = (omega^j), j < n/2, in order, w/2
// words per cycle for n/w cycles after prg_next (word k of flow cycle c is
// omega^(c*w/2+k)), with (q, v) valid at prg_next. Each (l,t) memory picks
// the words it needs out of the flow: a word with exponent E is kept when
// n/2^(l+1) divides E, at address (E/(n/2^(l+1)))/(w/2). This is the
// offset/step/index selection of the reprogramming counters, written as a
// decode of the flow position. Successive flows fill banks 0,1,..,G-1,0,..
// Stage l moves to the next bank each time its own frame marker st_next[l]
// arrives, so different stages may work on different channels at once.
// Twiddle reads are asynchronous (distributed memory). Stage 0 needs no
// twiddle; its output is the constant 1.
module twb #(
  parameter int unsigned N  = rpm_pkg::DEF_N,
  parameter int unsigned W  = rpm_pkg::DEF_W,
  parameter int unsigned QW = rpm_pkg::DEF_QW,
  parameter int unsigned G  = 16
) (
  input  logic          clk,
  input  logic          rst,
  // twiddle flow
  input  logic          prg_next,
  input  logic [QW-1:0] prg_tw [W/2],
  input  logic [QW-1:0] prg_q,
  input  logic [QW:0]   prg_v,
  // stage side
  input  logic [$clog2(N)-1:0] st_next,
  output logic [QW-1:0] tw   [$clog2(N)][W/2],
  output logic [QW-1:0] st_q [$clog2(N)],
  output logic [QW:0]   st_v [$clog2(N)]
);
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned T  = N / W;
  localparam int unsigned HW = W / 2;
  localparam int unsigned CW = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;

  function automatic logic [GW-1:0] inc(logic [GW-1:0] x);
    return (int'(x) == G - 1) ? '0 : x + 1'b1;
  endfunction

  // ---- write side ----
  logic          factive;
  logic [CW-1:0] fcnt, fc;
  logic          fwr;
  logic [GW-1:0] wptr, wcur, wbank;

  always_comb begin
    fc    = prg_next ? '0 : fcnt;
    fwr   = prg_next | factive;
    wbank = prg_next ? wptr : wcur;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      factive <= 1'b0;
      fcnt    <= '0;
      wptr    <= '0;
      wcur    <= '0;
    end else begin
      if (prg_next) begin
        wcur <= wptr;
        wptr <= inc(wptr);
      end
      if (fwr) begin
        fcnt    <= fc + 1'b1;
        factive <= (int'(fc) != T - 1);
      end
    end
  end

  logic [QW-1:0] qb [G];
  logic [QW:0]   vb [G];
  always_ff @(posedge clk) begin
    if (prg_next) begin
      qb[wptr] <= prg_q;
      vb[wptr] <= prg_v;
    end
  end

  // ---- read side: one bank pointer and cycle counter per stage ----
  logic [GW-1:0] rptr [L];
  logic [GW-1:0] scur [L];
  logic [CW-1:0] scnt [L];
  logic [GW-1:0] rbank [L];
  logic [CW-1:0] rc [L];

  always_comb begin
    for (int l = 0; l < L; l++) begin
      rbank[l] = st_next[l] ? rptr[l] : scur[l];
      rc[l]    = st_next[l] ? '0 : scnt[l];
      st_q[l]  = qb[rbank[l]];
      st_v[l]  = vb[rbank[l]];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < L; l++) begin
        rptr[l] <= '0;
        scur[l] <= '0;
        scnt[l] <= '0;
      end
    end else begin
      for (int l = 0; l < L; l++) begin
        if (st_next[l]) begin
          scur[l] <= rptr[l];
          rptr[l] <= inc(rptr[l]);
        end
        scnt[l] <= rc[l] + 1'b1;
      end
    end
  end

  // ---- twiddle storage ----
  for (genvar t = 0; t < HW; t++) begin : g_s0
    assign tw[0][t] = QW'(1);
  end

  for (genvar l = 1; l < L; l++) begin : g_stage
    localparam int unsigned S  = N >> (l + 1);       // exponent spacing
    localparam int unsigned D  = ((1 << l) > HW) ? (1 << l) / HW : 1;
    localparam int unsigned AW = (D > 1) ? $clog2(D) : 1;
    for (genvar t = 0; t < HW; t++) begin : g_way
      logic [QW-1:0] mem [G*D];           // address bank*D + ra
      logic [AW-1:0] ra;
      always_comb ra = (D > 1) ? AW'(int'(rc[l]) % D) : '0;
      assign tw[l][t] = mem[int'(rbank[l]) * D + int'(ra)];

      always_ff @(posedge clk) begin
        if (fwr) begin
          for (int k = 0; k < HW; k++) begin
            automatic int unsigned e = int'(fc) * HW + k;   // flow exponent
            automatic int unsigned m = e / S;
            if (e % S == 0) begin
              if (D > 1) begin
                if (m % HW == t) mem[int'(wbank) * D + int'(m / HW)] <= prg_tw[k];
              end else begin
                if (m == t % (1 << l)) mem[int'(wbank) * D] <= prg_tw[k];
              end
            end
          end
        end
      end
    end
  end

  a_flow_gap: assert property (@(posedge clk) disable iff (rst) prg_next |-> !factive);
endmodule
