// dwt_pkg: word format, lifting constants and the slice-control record shared by every
// block of the one-level 3-D (2-D + t) discrete wavelet transform processor.
//
// Word format: every coefficient inside the processor is a 17-bit two's-complement number
// with 2 fractional bits (a pixel p enters as p*4). Lifting constants are held with 11
// fractional bits; a constant product is (x*K) >>> 11, rounded towards minus infinity, and
// the divisions by 16 and 2 of the flipped lifting equations are arithmetic right shifts.
// The 17-bit width, the 11-bit coefficient precision and the 2 fractional data bits follow
// the published implementation figures; the rounding (plain truncation) is this design's
// own choice.
package dwt_pkg;

  localparam int unsigned W     = 17;  // datapath word length
  localparam int unsigned FRAC  = 2;   // fractional bits of a data word
  localparam int unsigned KFRAC = 11;  // fractional bits of a lifting constant
  localparam int unsigned KW    = 14;  // signed width that holds every constant below

  typedef logic signed [W-1:0] coef_t;

  // Flipped Daubechies (9,7) constants, rounded to 11 fractional bits:
  //   A = 1/alpha, B = 1/(16 alpha beta), C = 1/(32 beta gamma), D = 1/(4 gamma delta),
  //   K0, K1 = output scaling of the low and high band.
  localparam logic signed [KW-1:0] K_A  = -14'sd1291;  // -0.630463
  localparam logic signed [KW-1:0] K_B  =  14'sd1523;  //  0.743750
  localparam logic signed [KW-1:0] K_C  = -14'sd1368;  // -0.668067
  localparam logic signed [KW-1:0] K_D  =  14'sd1308;  //  0.638443
  localparam logic signed [KW-1:0] K_K0 =  14'sd5306;  //  2.590697
  localparam logic signed [KW-1:0] K_K1 =  14'sd3953;  //  1.929981

  // Right shifts applied to the neighbour sum in each lifting step of the flipped scheme.
  localparam int unsigned SH_P1 = 0;
  localparam int unsigned SH_U1 = 4;
  localparam int unsigned SH_P2 = 1;
  localparam int unsigned SH_U2 = 1;

  // Control of one slice of the lifting signal-flow graph. A slice is split in two halves
  // that may belong to different sequences (row, frame, or frame sequence):
  //   first half  (P1, U1): d1[i], s1[i] from x[2i], x[2i+1], x[2i+2] and d1[i-1]
  //   second half (P2, U2): d2[i-1], s2[i-1] from d1[i-1], s1[i-1], s1[i], d2[i-2]
  typedef struct packed {
    logic h1_valid;   // first half computes something that must be kept
    logic p1_last;    // i is the last slice: mirror x[2i+2] := x[2i]
    logic u1_first;   // i == 0: mirror d1[-1] := d1[0]
    logic h2_valid;   // second half produces an output pair
    logic p2_flush;   // second half of the closing slice: mirror s1[i] := s1[i-1]
    logic u2_second;  // output index 0: mirror d2[-1] := d2[0]
  } slice_ctl_t;

  localparam slice_ctl_t SLICE_IDLE = '0;

endpackage
