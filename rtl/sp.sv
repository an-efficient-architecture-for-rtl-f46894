// sp: spatial processor, a one-level 2-D DWT of every frame of a row-scanned video.
//
// The row processing element (rpe) transforms two pixels per clock along rows; its l/h
// output goes both to the row memory (rmem) and, online, to the column processing element
// (cpe), which lifts the columns slice by slice and keeps its intermediate results in the
// column memory (cmem). Line storage is 4 x N/2 (rmem) + 6 x N/2 (cmem) words.
//
// Interface: pix_e/pix_o with in_valid, two pixels of a row per clock, rows and frames
// back to back; in_last marks the last pair of the last frame of a sequence. After it the
// processor closes the sequence on its own and takes no input while busy is set.
// Output: two 2-D coefficients per clock in the order described in cpe; out_last marks
// the final pair of the sequence.
// Timing: frames of ROWS rows of N pixels pass at N*ROWS/2 clocks each with no gap; the first coefficients of a frame
// leave four rows (2N clocks) plus 20 clocks of pipeline after its first pixels entered.
// The structure follows the published spatial processor.
module sp
  import dwt_pkg::*;
#(
  parameter int unsigned N     = 256,   // pixels per row
  parameter int unsigned ROWS  = N,     // rows per frame
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_last,
  input  logic [PIX_W-1:0] pix_e,
  input  logic [PIX_W-1:0] pix_o,
  output logic             busy,
  output logic             out_valid,
  output logic             out_last,
  output coef_t            out_lo,
  output coef_t            out_hi
);

  localparam int unsigned JW = $clog2(N/2);

  logic  r_valid, r_last, r_busy, c_busy;
  coef_t r_lo, r_hi;

  rpe #(.N(N), .PIX_W(PIX_W)) u_rpe (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_last(in_last), .pix_e(pix_e), .pix_o(pix_o),
    .busy(r_busy),
    .out_valid(r_valid), .out_last(r_last), .out_lo(r_lo), .out_hi(r_hi)
  );

  logic          rm_beat, rm_row_odd, rm_row_end;
  logic [JW-1:0] rm_addr;
  coef_t         rm_wr_l, rm_wr_h, rm_rd0, rm_rd1, rm_rd2;

  rmem #(.N(N)) u_rmem (
    .clk(clk), .rst_n(rst_n),
    .beat(rm_beat), .row_odd(rm_row_odd), .row_end(rm_row_end), .addr(rm_addr),
    .wr_l(rm_wr_l), .wr_h(rm_wr_h), .rd0(rm_rd0), .rd1(rm_rd1), .rd2(rm_rd2)
  );

  logic          cm_rd_band, cm_we_h1, cm_we_h2, cm_wr_band;
  logic [JW-1:0] cm_rd_addr, cm_wr_addr;
  coef_t         cm_rd_d1, cm_rd_s1, cm_rd_d2, cm_wr_d1, cm_wr_s1, cm_wr_d2;

  cmem #(.N(N)) u_cmem (
    .clk(clk),
    .rd_band(cm_rd_band), .rd_addr(cm_rd_addr),
    .rd_d1(cm_rd_d1), .rd_s1(cm_rd_s1), .rd_d2(cm_rd_d2),
    .we_h1(cm_we_h1), .we_h2(cm_we_h2), .wr_band(cm_wr_band), .wr_addr(cm_wr_addr),
    .wr_d1(cm_wr_d1), .wr_s1(cm_wr_s1), .wr_d2(cm_wr_d2)
  );

  cpe #(.N(N), .ROWS(ROWS)) u_cpe (
    .clk(clk), .rst_n(rst_n),
    .in_valid(r_valid), .in_last(r_last), .in_l(r_lo), .in_h(r_hi),
    .busy(c_busy),
    .rm_beat(rm_beat), .rm_row_odd(rm_row_odd), .rm_row_end(rm_row_end), .rm_addr(rm_addr),
    .rm_wr_l(rm_wr_l), .rm_wr_h(rm_wr_h), .rm_rd0(rm_rd0), .rm_rd1(rm_rd1), .rm_rd2(rm_rd2),
    .cm_rd_band(cm_rd_band), .cm_rd_addr(cm_rd_addr),
    .cm_rd_d1(cm_rd_d1), .cm_rd_s1(cm_rd_s1), .cm_rd_d2(cm_rd_d2),
    .cm_we_h1(cm_we_h1), .cm_we_h2(cm_we_h2), .cm_wr_band(cm_wr_band), .cm_wr_addr(cm_wr_addr),
    .cm_wr_d1(cm_wr_d1), .cm_wr_s1(cm_wr_s1), .cm_wr_d2(cm_wr_d2),
    .out_valid(out_valid), .out_last(out_last), .out_lo(out_lo), .out_hi(out_hi)
  );

  // busy spans the whole closing of a sequence, from in_last to out_last, so that the
  // gap between the two units' own closing phases is covered as well
  logic closing_q;
  always_ff @(posedge clk) begin
    if (!rst_n)                         closing_q <= 1'b0;
    else if (in_valid && in_last && !busy) closing_q <= 1'b1;
    else if (out_last)                  closing_q <= 1'b0;
  end

  assign busy = closing_q || r_busy || c_busy;

endmodule
