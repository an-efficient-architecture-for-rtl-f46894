// dwt3d_top: one-level lifting-based 3-D discrete wavelet transform (2-D + t) of a video
// of frames of ROWS rows by N pixels (N x N by default), with no group-of-pictures limit.
//
// Frames are scanned row by row, two pixels per clock. The spatial processor (sp: row
// processor, row memory, column processor, column memory) transforms every frame in two
// dimensions and hands two coefficients per clock to the temporal processor (tp), which
// transforms each coefficient position along time, using the spatial memory (smem, two
// frame buffers) and the temporal memory (tmem, three frame buffers). Every stage uses
// the flipped Daubechies (9,7) lifting scheme with whole-sample mirror extension at row,
// column and sequence ends. Storage: 5N*ROWS words of frame memory and 10 x N/2 words of
// line memory.
//
// Interface: in_valid with pix_e/pix_o (an even and an odd pixel of a row, 8-bit
// unsigned); rows and frames back to back; in_last on the last pair of the final frame
// (the number of frames must be even, at least 4). The processor then finishes on its own
// and must get no input while busy is set. Output: out_l/out_h, the temporal low- and
// high-pass coefficient (17-bit, 2 fractional bits) of 2-D coefficient out_idx, frame
// pair after frame pair, two results per clock; out_last ends the sequence.
// Timing: with a gap-free input the first result leaves 2N*ROWS + 2N + 29 clocks after the
// first pixel pair, and results then follow at two per clock.
// Frame size is set by two parameters: N pixels per row (even, at least 10) and ROWS rows
// (even, at least 6); the defaults give the 256 x 256 frames of the published design, and
// formats such as QCIF (176 x 144) or CIF (352 x 288) are other settings of the same
// counter-based control, as the published controller claims. The frame count and the
// handshake are this design's own choices.
module dwt3d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N     = 256,   // pixels per row
  parameter int unsigned ROWS  = N,     // rows per frame
  parameter int unsigned PIX_W = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_last,
  input  logic [PIX_W-1:0]       pix_e,
  input  logic [PIX_W-1:0]       pix_o,
  output logic                   busy,
  output logic                   out_valid,
  output logic                   out_last,
  output logic [$clog2(N*ROWS)-1:0] out_idx,
  output coef_t                  out_l,
  output coef_t                  out_h
);

  localparam int unsigned AW = $clog2(N*ROWS);

  logic  s_valid, s_last, s_busy, t_busy;
  coef_t s_lo, s_hi;

  sp #(.N(N), .ROWS(ROWS), .PIX_W(PIX_W)) u_sp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_last(in_last), .pix_e(pix_e), .pix_o(pix_o),
    .busy(s_busy),
    .out_valid(s_valid), .out_last(s_last), .out_lo(s_lo), .out_hi(s_hi)
  );

  logic          sm_restart, sm_beat, sm_phase_end, sm_wr_en;
  logic [AW-1:0] sm_t;
  coef_t         sm_in_lo, sm_in_hi, sm_e_old, sm_o_old, sm_e_new;

  smem #(.N(N), .ROWS(ROWS)) u_smem (
    .clk(clk), .rst_n(rst_n),
    .restart(sm_restart), .beat(sm_beat), .t(sm_t), .phase_end(sm_phase_end),
    .wr_en(sm_wr_en), .in_lo(sm_in_lo), .in_hi(sm_in_hi),
    .e_old(sm_e_old), .o_old(sm_o_old), .e_new(sm_e_new)
  );

  logic [AW-1:0] tm_rd_addr, tm_wr_addr;
  logic          tm_we_h1, tm_we_h2;
  coef_t         tm_rd_d1, tm_rd_s1, tm_rd_d2, tm_wr_d1, tm_wr_s1, tm_wr_d2;

  tmem #(.N(N), .ROWS(ROWS)) u_tmem (
    .clk(clk), .rd_addr(tm_rd_addr),
    .rd_d1(tm_rd_d1), .rd_s1(tm_rd_s1), .rd_d2(tm_rd_d2),
    .we_h1(tm_we_h1), .we_h2(tm_we_h2), .wr_addr(tm_wr_addr),
    .wr_d1(tm_wr_d1), .wr_s1(tm_wr_s1), .wr_d2(tm_wr_d2)
  );

  tp #(.N(N), .ROWS(ROWS)) u_tp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s_valid), .in_last(s_last), .in_lo(s_lo), .in_hi(s_hi),
    .busy(t_busy),
    .sm_restart(sm_restart), .sm_beat(sm_beat), .sm_t(sm_t), .sm_phase_end(sm_phase_end),
    .sm_wr_en(sm_wr_en), .sm_in_lo(sm_in_lo), .sm_in_hi(sm_in_hi),
    .sm_e_old(sm_e_old), .sm_o_old(sm_o_old), .sm_e_new(sm_e_new),
    .tm_rd_addr(tm_rd_addr), .tm_rd_d1(tm_rd_d1), .tm_rd_s1(tm_rd_s1), .tm_rd_d2(tm_rd_d2),
    .tm_we_h1(tm_we_h1), .tm_we_h2(tm_we_h2), .tm_wr_addr(tm_wr_addr),
    .tm_wr_d1(tm_wr_d1), .tm_wr_s1(tm_wr_s1), .tm_wr_d2(tm_wr_d2),
    .out_valid(out_valid), .out_last(out_last), .out_idx(out_idx),
    .out_l(out_l), .out_h(out_h)
  );

  // busy covers the whole closing of a sequence, across the hand-over between stages
  logic closing_q;
  always_ff @(posedge clk) begin
    if (!rst_n)                            closing_q <= 1'b0;
    else if (in_valid && in_last && !busy) closing_q <= 1'b1;
    else if (out_last)                     closing_q <= 1'b0;
  end

  assign busy = closing_q || s_busy || t_busy;

endmodule
