// afb_pkg -- shared constants and types of the 18-band quasi-ANSI 1/3-octave
// analysis filter bank (AFB).
//
// The bank is a multirate IFIR structure built from 14 linear-phase FIR
// sub-filters: two image-suppression/decimation filters (IA1, 35 taps, feeding
// the 2 kHz..4 kHz octave at fs/2; IA2, 49 taps, feeding the octaves below
// 2 kHz at fs/4), three octave prototype filters H16..H18 reused on all three
// sample rates, and the relaxed low-band filters H1..H9 at fs/4. Tap lengths,
// decimation factors, the MAC allocation (3, 1, 4) and the 33-cycle sample
// period (792 kHz clock for 24 kHz audio) follow the published design.
//
// Coefficients are stored once per symmetric pair, (N+1)/2 words per filter,
// 513 words in all, laid out in the order of filt_e below. The word formats
// (Q1.15 data and coefficients, 40-bit accumulator, round-to-nearest and
// saturation back to 16 bits) and the order of the jobs inside a sample
// period are choices of this implementation.
package afb_pkg;

  localparam int unsigned DW     = 16;  // data and coefficient word length
  localparam int unsigned ACCW   = 40;  // accumulator width
  localparam int unsigned FRAC   = 15;  // fractional bits of coefficients
  localparam int unsigned NBANDS = 18;
  localparam int unsigned NFILT  = 14;
  localparam int unsigned CYCLES_PER_SAMPLE = 33;  // 792 kHz / 24 kHz

  // MACs per delay line and delay-line depths
  localparam int unsigned NMAC1 = 3, NMAC2 = 1, NMAC3 = 4;
  localparam int unsigned DEPTH1 = 49, DEPTH2 = 41, DEPTH3 = 97;

  typedef enum logic [3:0] {
    F_IA1 = 4'd0, F_IA2 = 4'd1, F_H16 = 4'd2, F_H17 = 4'd3, F_H18 = 4'd4,
    F_H9  = 4'd5, F_H8  = 4'd6, F_H7  = 4'd7, F_H6  = 4'd8, F_H5  = 4'd9,
    F_H4  = 4'd10, F_H3 = 4'd11, F_H2 = 4'd12, F_H1 = 4'd13
  } filt_e;

  // Tap length of each sub-filter, indexed by filt_e
  function automatic int unsigned taps(filt_e f);
    case (f)
      F_IA1: return 35;
      F_IA2: return 49;
      F_H16: return 41;
      F_H17: return 33;
      F_H18: return 27;
      F_H9:  return 67;
      F_H8:  return 83;
      F_H7:  return 95;
      default: return 97;  // H6..H1
    endcase
  endfunction

  // Unique (symmetric-half) coefficients of a sub-filter
  function automatic int unsigned half(filt_e f);
    return (taps(f) + 1) / 2;
  endfunction

  // Base address of a sub-filter in the coefficient memory
  function automatic int unsigned cbase(filt_e f);
    int unsigned a;
    a = 0;
    for (int unsigned i = 0; i < NFILT; i++)
      if (i < int'(f)) a += half(filt_e'(i));
    return a;
  endfunction

  localparam int unsigned NCOEF = 513;  // sum of half() over all sub-filters
  localparam int unsigned NCOEF_IS = 43; // IA1 + IA2 words, also used by IS1/IS2
  localparam int unsigned CAW   = 10;   // coefficient address width

  // Destination of a job result: a band number 1..18, or a feed into
  // delay line 2 (after IA1) or delay line 3 (after IA2).
  localparam logic [4:0] DEST_DL2 = 5'd30;
  localparam logic [4:0] DEST_DL3 = 5'd31;
  localparam logic [4:0] DEST_SFB = 5'd29;  // interpolator result in the synthesis bank

  typedef struct packed {
    filt_e      filt;
    logic [4:0] dest;
    logic [6:0] off;   // first delay-line word the filter reads
  } job_t;

  // Tap offset that centres a filter of N taps on a reference length, so that
  // all band filters sharing a delay line have the same group delay.
  function automatic logic [6:0] centre(filt_e f, int unsigned ref_len);
    return 7'((ref_len - taps(f)) / 2);
  endfunction

  // Job lists. Line 1 runs at fs: IA1 (even samples), IA2 (every 4th
  // sample), then bands 18..16. Line 2 runs at fs/2: bands 15..13. Line 3 runs
  // at fs/4: bands 12..10 with the octave prototypes, then bands 9..1.
  // Band filters are centred: on lines 1 and 2 on the 41-tap H16 (group delay
  // 20 samples), on line 3 on the 97-tap H1..H6 (48 samples), so every band of
  // a line leaves with the same delay.
  localparam int unsigned NJOB1 = 5, NJOB2 = 3, NJOB3 = 12;
  localparam int unsigned MAXJOB = 12;

  function automatic job_t job_of(int unsigned line, int unsigned j);
    job_t r;
    r.filt = F_H16;
    r.dest = 5'd0;
    case (line)
      1: case (j)
           0: r = '{F_IA1, DEST_DL2, 7'd0};
           1: r = '{F_IA2, DEST_DL3, 7'd0};
           2: r = '{F_H18, 5'd18, centre(F_H18, 41)};
           3: r = '{F_H17, 5'd17, centre(F_H17, 41)};
           default: r = '{F_H16, 5'd16, 7'd0};
         endcase
      // lines 4 and 5: interpolation filters of the synthesis bank, which
      // reuse the IA1 and IA2 coefficients (IS1 = IA1, IS2 = IA2)
      4: r = '{F_IA1, DEST_SFB, 7'd0};
      5: r = '{F_IA2, DEST_SFB, 7'd0};
      2: case (j)
           0: r = '{F_H18, 5'd15, centre(F_H18, 41)};
           1: r = '{F_H17, 5'd14, centre(F_H17, 41)};
           default: r = '{F_H16, 5'd13, 7'd0};
         endcase
      default: begin
         case (j)
           0: begin r.filt = F_H18; r.dest = 5'd12; end
           1: begin r.filt = F_H17; r.dest = 5'd11; end
           2: begin r.filt = F_H16; r.dest = 5'd10; end
           default: begin
             // j = 3..11 -> H9..H1 -> band 9..1
             r.filt = filt_e'(int'(F_H9) + int'(j) - 3);
             r.dest = 5'(12 - j);
           end
         endcase
         r.off = centre(r.filt, 97);
      end
    endcase
    return r;
  endfunction

  // Cycles one job needs on a set of nmac multipliers
  function automatic int unsigned steps(filt_e f, int unsigned nmac);
    return (half(f) + nmac - 1) / nmac;
  endfunction

  // One cycle of work for a MAC set
  typedef struct packed {
    logic       valid;
    logic       first;   // first step of a job: accumulator restarts
    logic       last;    // last step of a job: result is written out
    filt_e      filt;
    logic [5:0] step;    // step index inside the job
    logic [4:0] dest;
    logic [6:0] off;     // tap offset of the job (see centre())
  } step_t;

  // Round to nearest and saturate an accumulator to a 16-bit Q1.15 word
  localparam logic signed [ACCW-1:0] RND_HALF = ACCW'(1) <<< (FRAC - 1);
  localparam logic signed [ACCW-1:0] OUT_MAX  = ACCW'(32767);
  localparam logic signed [ACCW-1:0] OUT_MIN  = -ACCW'(32768);

  function automatic logic signed [ACCW-1:0] round_shift(logic signed [ACCW-1:0] acc);
    return (acc + RND_HALF) >>> FRAC;
  endfunction

  function automatic logic signed [DW-1:0] round_sat(logic signed [ACCW-1:0] acc);
    logic signed [ACCW-1:0] r;
    r = round_shift(acc);
    if (r > OUT_MAX) return 16'sh7fff;
    if (r < OUT_MIN) return 16'sh8000;
    return r[DW-1:0];
  endfunction

endpackage
