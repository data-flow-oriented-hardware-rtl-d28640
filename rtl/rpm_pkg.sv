// rpm_pkg: constants, types and helper functions shared by the residue
// polynomial multiplier (RPM).
//
// The RPM multiplies two polynomials of Z_q[X]/(X^n+1) for one RNS prime q
// by negative wrapped convolution (NWC): weight by psi^j, forward NTT,
// point-wise product, inverse NTT, weight by n^-1 psi^-j. Default sizes are
// those of the proof-of-concept configuration: n = 2^12, log2 q = 30, w = 2
// words per cycle. The modular multiplier latency (MM_LAT) and the stream
// timing helpers below are choices of this implementation.
package rpm_pkg;

  // Proof-of-concept configuration.
  localparam int unsigned DEF_N  = 4096;  // polynomial degree n
  localparam int unsigned DEF_W  = 2;     // streaming width w (words per cycle)
  localparam int unsigned DEF_QW = 30;    // log2 q_i, bits of one residue word

  // Pipeline depth of mod_mul (registered product, Barrett estimate,
  // remainder, correction).
  localparam int unsigned MM_LAT = 4;

  // Kinds of streaming permutation.
  typedef enum logic [1:0] {
    PERM_BITREV  = 2'd0,  // output p <- input bitrev(p)       (Init Perm)
    PERM_STAGE   = 2'd1,  // re-pairing after NTT stage STAGE   (Perm)
    PERM_REVERSE = 2'd2   // output p <- input (n-p) mod n      (GEN ITW)
  } perm_kind_e;

  // Bit reversal of the LOGN low bits of p.
  function automatic int unsigned bitrev(int unsigned p, int unsigned logn);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < logn; b++) r |= ((p >> b) & 1) << (logn - 1 - b);
    return r;
  endfunction

  // Constant-geometry pairing of stage l: stream position p = 2*b + e holds
  // the element whose index has e moved to bit l and bits 1..l of p moved
  // down to bits 0..l-1. The butterfly at positions (2b, 2b+1) then combines
  // elements i and i + 2^l of an in-place radix-2 DIT transform.
  function automatic int unsigned stage_elem(int unsigned l, int unsigned p);
    int unsigned e, low, high;
    e    = p & 1;
    low  = (p >> 1) & ((1 << l) - 1);
    high = p >> (l + 1);
    return (high << (l + 1)) | (e << l) | low;
  endfunction

  function automatic int unsigned stage_pos(int unsigned l, int unsigned el);
    int unsigned e, low, high;
    e    = (el >> l) & 1;
    low  = el & ((1 << l) - 1);
    high = el >> (l + 1);
    return (high << (l + 1)) | (low << 1) | e;
  endfunction

  // Input stream position read by output stream position p.
  function automatic int unsigned perm_src(perm_kind_e kind, int unsigned stage,
                                           int unsigned logn, int unsigned p);
    int unsigned n;
    n = 1 << logn;
    case (kind)
      PERM_BITREV:  return bitrev(p, logn);
      PERM_REVERSE: return (n - p) & (n - 1);
      default: begin
        if (stage + 1 >= logn) return stage_pos(stage, p);
        return stage_pos(stage, stage_elem(stage + 1, p));
      end
    endcase
  endfunction

  // Latencies (cycles from a frame's first word in to its first word out).
  function automatic int unsigned lat_perm(int unsigned n, int unsigned w);
    return n / w + 1;
  endfunction

  function automatic int unsigned lat_stage();
    return MM_LAT + 1;
  endfunction

  function automatic int unsigned lat_ntt(int unsigned n, int unsigned w);
    return lat_perm(n, w) + $clog2(n) * (lat_stage() + lat_perm(n, w));
  endfunction

  // GEN TW: seeds in to first twiddle bunch out (J = MM_LAT bunch steps of
  // MM_LAT cycles each, one cycle to store, one output register).
  function automatic int unsigned lat_gen();
    return MM_LAT * MM_LAT + 2;
  endfunction

  // Arrival times, relative to next_in of the RPM, of the frame at the inputs
  // of its blocks (see rpm_top).
  function automatic int unsigned t_fwd(int unsigned n, int unsigned w);   // VEC NTT input
    return lat_gen() + MM_LAT;
  endfunction
  function automatic int unsigned t_inv(int unsigned n, int unsigned w);   // inverse NTT input
    return t_fwd(n, w) + lat_ntt(n, w) + MM_LAT;
  endfunction
  function automatic int unsigned t_itw(int unsigned n, int unsigned w);   // GEN ITW output
    return lat_gen() + lat_perm(n, w);
  endfunction
  function automatic int unsigned t_last(int unsigned n, int unsigned w);  // last PW MM input
    return t_inv(n, w) + lat_ntt(n, w);
  endfunction
  function automatic int unsigned lat_rpm(int unsigned n, int unsigned w); // next_in to next_out
    return t_last(n, w) + MM_LAT;
  endfunction

  // Number of twiddle banks so that a bank is not rewritten while a stage
  // still reads it: G = ceil(Lat / T) + 1, where Lat counts from the first
  // twiddle of a set entering the bank to the last stage finishing.
  function automatic int unsigned twb_banks(int unsigned lat, int unsigned n, int unsigned w);
    int unsigned t;
    t = n / w;
    return (lat + t - 1) / t + 1;
  endfunction

endpackage
