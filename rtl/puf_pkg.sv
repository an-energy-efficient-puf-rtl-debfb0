// puf_pkg: shared constants and elaboration-time functions of the racing/computing PUF.
//
// * segment_init() builds the 64-bit INIT word that turns a LUT6_2 into one arbiter-PUF
//   segment that also XORs two logic inputs into the phase of the racing signal.
//   Pin use: I5 = 1 (split into two LUT5s), I4 = challenge bit, I3/I2 = logic inputs,
//   I1 = racing signal of the lower path, I0 = racing signal of the upper path.
//   Rules that follow the design: the upper 32 INIT bits are the lower 32 with the eight
//   4-bit groups in reverse order (identical upper and lower LUT5), and within every group
//   INIT[4k] ^ INIT[4k+3] = 1, with the fixed 0/1 positions of the XOR rule table
//   (0: 0,7,11,12,16,23,27,28; 1: 3,4,8,15,19,20,24,31). The free bits 4k+1 and 4k+2 are
//   this design's choice: they make the output follow I1 when the challenge is 0 and I0
//   when it is 1 (lower LUT5, O5), which gives the path swap of a classic arbiter PUF.
//   Result: 64'hC33CA55A_A55AC33C.
// * leap_rows() gives the rows of A^W for a W-bit LFSR Q(i+1) = A*Q(i), A being the
//   shift matrix of the published 4-bit example generalised: q[j]' = q[j+1] for j < W-1,
//   q[W-1]' = XOR of q[t] over the set bits t of TAPS (characteristic polynomial
//   x^W + sum TAPS[t] x^t). One clock then leaps W steps.
// * make_layout() places those XOR rows on the segments of the delay chains. A segment
//   inverts the racing signal when its two logic inputs differ, so the phase after segment
//   s is the parity of all logic inputs up to s (prefix XOR). Rows are placed in order;
//   after the first row of a chain each row only adds the bits in which it differs from
//   the previous row, two per segment, and the state bit is captured at the row's last
//   segment. A row that no longer fits any chain is marked for plain XOR logic.
// * lut_delay_ps() is the process-variation model: a fixed, hashed delay per LUT output.
package puf_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned MAXW   = 64;     // widest LFSR the layout functions handle
  localparam int unsigned MAXSEG = 256;    // most segments one LFSR may own
  localparam logic [7:0]  NO_BIT = 8'hFF;  // segment logic input tied to 0

  // x^64 + x^4 + x^3 + x + 1, a primitive polynomial (this design's choice)
  localparam logic [MAXW-1:0] TAPS64 = 64'h0000_0000_0000_001B;

  typedef logic [MAXW-1:0][MAXW-1:0] rows_t;

  typedef struct packed {
    logic [MAXSEG-1:0][7:0] seg_a;     // state bit on I3 of each segment, NO_BIT = 0
    logic [MAXSEG-1:0][7:0] seg_b;     // state bit on I2 of each segment, NO_BIT = 0
    logic [MAXW-1:0][8:0]   tap;       // segment whose output gives row j; bit 8 = plain XOR
    logic [15:0]            used_segs; // segments that carry logic
    logic [7:0]             fallback;  // rows computed outside the chains
  } layout_t;

  function automatic logic [63:0] segment_init();
    logic [63:0] init;
    init = '0;
    for (int n = 0; n < 8; n++) begin        // n = {I4,I3,I2}
      logic inv, chal;
      chal = n[2];
      inv  = n[1] ^ n[0];                    // phase flips when I3 != I2
      for (int k = 0; k < 4; k++) begin      // k = {I1,I0}
        logic follow;
        follow = chal ? k[0] : k[1];         // O5: lower input unless swapped
        init[4*n + k] = follow ^ inv;
      end
    end
    for (int n = 0; n < 8; n++)
      init[32 + 4*n +: 4] = init[4*(7-n) +: 4];
    return init;
  endfunction

  function automatic rows_t leap_rows(int unsigned w, logic [MAXW-1:0] taps);
    rows_t s;
    s = '0;
    for (int unsigned j = 0; j < w; j++) begin
      logic [MAXW-1:0] r;
      r = '0;
      for (int unsigned t = 0; t < w; t++)
        if (taps[t]) begin
          if (t + j < w) r[t+j] = ~r[t+j];
          else           r = r ^ s[t+j-w];
        end
      s[j] = r;
    end
    return s;
  endfunction

  function automatic int unsigned popcount(logic [MAXW-1:0] v);
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < MAXW; i++) c += int'(v[i]);
    return c;
  endfunction

  function automatic layout_t make_layout(int unsigned w, logic [MAXW-1:0] taps,
                                          int unsigned seg_per_chain, int unsigned chains);
    layout_t L;
    rows_t rows;
    int unsigned ch, used, n, k, seg;
    logic [MAXW-1:0] prev, diff;
    rows = leap_rows(w, taps);
    for (int unsigned s = 0; s < MAXSEG; s++) begin
      L.seg_a[s] = NO_BIT;
      L.seg_b[s] = NO_BIT;
    end
    L.tap = '0;
    L.fallback = '0;
    ch = 0; used = 0; prev = '0;
    for (int unsigned j = 0; j < w; j++) begin
      diff = rows[j] ^ prev;
      n = (popcount(diff) + 1) / 2;
      if (ch < chains && used + n > seg_per_chain) begin
        ch++; used = 0; prev = '0;
        diff = rows[j];
        n = (popcount(diff) + 1) / 2;
      end
      if (ch >= chains || n > seg_per_chain) begin
        L.tap[j] = 9'h100;
        L.fallback++;
      end else begin
        k = 0;
        for (int unsigned b = 0; b < w; b++)
          if (diff[b]) begin
            seg = ch * seg_per_chain + used + k / 2;
            if (k % 2 == 0) L.seg_a[seg] = 8'(b);
            else            L.seg_b[seg] = 8'(b);
            k++;
          end
        used += n;
        L.tap[j] = 9'(ch * seg_per_chain + used - 1);
        prev = rows[j];
      end
    end
    L.used_segs = 16'(ch * seg_per_chain + used);
    return L;
  endfunction

  // Delay of one LUT output (ps): base plus a hashed offset in [0, spread).
  function automatic int unsigned lut_delay_ps(int unsigned seed, int unsigned chain,
                                               int unsigned seg, int unsigned path,
                                               int unsigned base, int unsigned spread);
    logic [31:0] h;
    h = seed ^ (chain * 32'h9E37_79B1) ^ (seg * 32'h85EB_CA6B) ^ (path * 32'hC2B2_AE35);
    h = h ^ (h >> 16);
    h = h * 32'h7FEB_352D;
    h = h ^ (h >> 15);
    h = h * 32'h846C_A68B;
    h = h ^ (h >> 16);
    return base + (spread == 0 ? 0 : h % spread);
  endfunction
endpackage
