// smem: spatial memory, the two dual-port frame buffers between the spatial and the
// temporal processor.
//
// In every phase (two frames' time, M = N*ROWS clocks) the temporal processor handles
// pixel t at clock t. Port A of each bank reads one pixel of the two stored frames
// (E = frame 2i, O = frame 2i+1) and, read-before-write, stores in the same word one of
// the two pixels arriving in that clock from the spatial processor (frame 2i+2 during the
// first half of the phase, frame 2i+3 during the second). Port B reads pixel t of frame
// 2i+2 a second time, at one pixel per clock, after it was written at twice that rate; the
// very first pixel is passed on directly from the input.
//
// Decimated addressing: because every new pixel lands where an old one has just been
// read, the layout of a frame changes from phase to phase. Pixel p of frame F of the
// stored pair (F = 0 for E, 1 for O) always sits in bank F xor p[0], so E[t] and O[t] are
// in opposite banks, and within a bank the pixels are simply numbered by p. Bank 1
// receives new pixel q where old pixel t was read with q + 1 = 2(t + 1) mod (M + 1), bank
// 0 with q = 2t mod (M - 1) (pixel M-1 stays in place). So after k phases the word
// address is a multiplication by a constant:
//   bank 0: address = p * c0 mod (M - 1)        (p = M-1: address M-1), c0 = 2^-k mod (M-1)
//   bank 1: address = (p + 1) * c1 mod (M + 1) - 1,                    c1 = 2^-k mod (M+1)
// Each constant is halved modulo its modulus at the end of a phase, and along a phase
// the addresses are kept in accumulators that add c modulo M-1 or M+1 on every beat: a
// pure counter-and-adder address generator that works for any even frame size M. For
// M a power of two the bank-0 pattern repeats after log2(M) phases and the bank-1
// pattern after 2*log2(M). Port B reads the frame being written, so it follows the next
// phase's constants, with accumulators that step once every two beats.
//
// Interface: one beat per clock at most, with t the pixel index of the phase;
// phase_end on the beat that ends a phase; restart returns to the initial layout before a
// new sequence. Reads are asynchronous, writes take effect at the clock edge.
// Storage: 2 x M words. Two dual-port frame buffers, port A read-before-write, port B
// for the second read of the third frame, and decimated, periodic addressing follow the
// published design; the modular address function is this design's own.
module smem
  import dwt_pkg::*;
#(
  parameter int unsigned N    = 256,   // pixels per row
  parameter int unsigned ROWS = N      // rows per frame
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      restart,
  input  logic                      beat,
  input  logic [$clog2(N*ROWS)-1:0] t,
  input  logic                      phase_end,
  input  logic                      wr_en,
  input  coef_t                     in_lo,    // arriving coefficient 2t of the phase
  input  coef_t                     in_hi,    // arriving coefficient 2t+1 of the phase
  output coef_t                     e_old,    // pixel t of frame 2i
  output coef_t                     o_old,    // pixel t of frame 2i+1
  output coef_t                     e_new     // pixel t of frame 2i+2
);

  localparam int unsigned M  = N * ROWS;
  localparam int unsigned AW = $clog2(M);

  typedef logic [AW-1:0] addr_t;
  typedef logic [AW:0]   res_t;     // residue modulo M-1 or M+1 (at most M)

  localparam res_t P0 = res_t'(M - 1);
  localparam res_t P1 = res_t'(M + 1);

  coef_t bank0 [M];
  coef_t bank1 [M];

  // (a + b) mod p for a, b < p
  function automatic res_t addmod(res_t a, res_t b, res_t p);
    logic [AW+1:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= {1'b0, p}) ? res_t'(s - {1'b0, p}) : res_t'(s);
  endfunction

  // c / 2 mod p for odd p
  function automatic res_t halfmod(res_t c, res_t p);
    logic [AW+1:0] s;
    s = c[0] ? ({1'b0, c} + {1'b0, p}) : {1'b0, c};
    return res_t'(s >> 1);
  endfunction

  res_t c0_q, c1_q;     // this phase's multipliers (port A)
  res_t c0n_q, c1n_q;   // next phase's multipliers (port B)
  res_t a0_q, a1_q;     // t * c0 mod P0, (t + 1) * c1 mod P1
  res_t b0_q, b1_q;     // u * c0n mod P0, u * c1n mod P1, u = t rounded up to even

  logic t0, fnew;
  assign t0   = t[0];
  assign fnew = (t >= addr_t'(M / 2));   // which new frame arrives (0: first half of the phase)

  addr_t a0, a1, ab0, ab1;
  assign a0  = (t == addr_t'(M - 1)) ? addr_t'(M - 1) : addr_t'(a0_q);
  assign a1  = addr_t'(a1_q - res_t'(1));
  assign ab0 = addr_t'(b0_q);
  assign ab1 = addr_t'(b1_q - res_t'(1));

  // port A: bank b holds pixel t of frame b ^ t[0]; port B: pixel t of the new frame E'
  // is in bank t[0]
  coef_t rd_a0, rd_a1, rd_b0, rd_b1, rd_b;
  assign rd_a0 = bank0[a0];
  assign rd_a1 = bank1[a1];
  assign rd_b0 = bank0[ab0];
  assign rd_b1 = bank1[ab1];
  assign rd_b  = t0 ? rd_b1 : rd_b0;

  assign e_old = t0 ? rd_a1 : rd_a0;
  assign o_old = t0 ? rd_a0 : rd_a1;
  assign e_new = (t == '0) ? in_lo : rd_b;

  // bank b takes arriving coefficient 2t + (b ^ fnew)
  always_ff @(posedge clk) begin
    if (beat && wr_en) begin
      bank0[a0] <= fnew ? in_hi : in_lo;
      bank1[a1] <= fnew ? in_lo : in_hi;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      c0_q  <= res_t'(1);
      c1_q  <= res_t'(1);
      c0n_q <= halfmod(res_t'(1), P0);
      c1n_q <= halfmod(res_t'(1), P1);
      a0_q  <= '0;
      a1_q  <= res_t'(1);
      b0_q  <= '0;
      b1_q  <= '0;
    end else if (beat) begin
      if (phase_end) begin
        c0_q  <= c0n_q;
        c1_q  <= c1n_q;
        c0n_q <= halfmod(c0n_q, P0);
        c1n_q <= halfmod(c1n_q, P1);
        a0_q  <= '0;
        a1_q  <= c1n_q;
        b0_q  <= '0;
        b1_q  <= '0;
      end else begin
        a0_q <= addmod(a0_q, c0_q, P0);
        a1_q <= addmod(a1_q, c1_q, P1);
        if (!t0) begin
          b0_q <= addmod(b0_q, addmod(c0n_q, c0n_q, P0), P0);
          b1_q <= addmod(b1_q, addmod(c1n_q, c1n_q, P1), P1);
        end
      end
    end
  end

  initial assert (M >= 8 && (M % 2) == 0) else $error("smem: frames must hold an even number of pixels, at least 8");

endmodule
