// cpe: column processing element of the spatial processor, with its part of the
// counter-based controller.
//
// The row processor delivers one l and one h coefficient per clock, row after row. The
// column transform works slice by slice: while an even row 2i+2 passes, the CPE lifts the
// l band of slice i for every column (l[2i], l[2i+1] from the row memory, l[2i+2] online);
// while the following odd row passes it lifts the h band of the same slice, all three
// inputs then coming from the row memory. The intermediate results d1, s1, d2 of each
// column and band go to the column memory and come back two rows later. Each clock thus
// yields two 2-D coefficients: LL/LH pairs during even rows and HL/HH pairs during odd
// rows, for output row i-1.
//
// Frames follow each other without idle rows: the first two rows of a frame close the
// previous frame (its last slice with x[ROWS] := x[ROWS-2], then its last output), overlapped
// with the opening slice of the new frame. After the final frame (in_last) the unit runs
// four rows of its own to close it, and accepts nothing until busy falls.
//
// Output order inside a frame: for each output row i = 0..ROWS/2-1, first N/2 beats of
// (LL[i][j], LH[i][j]) then N/2 beats of (HL[i][j], HH[i][j]), j = 0..N/2-1; out_last marks
// the final beat of the sequence.
// Timing: a coefficient pair leaves 9 clocks after the beat that completes it. The column
// memory is written back 9 clocks after a read of the same word and read again 2 rows
// (N clocks) later, so N >= 10. Frames have ROWS rows, an even number of at least 6,
// and N pixels per row, an even number. The slice-wise method, the memory sizes and the frame changeover
// follow the published column processor; the handshake and pipeline depths are this
// design's own.
module cpe
  import dwt_pkg::*;
#(
  parameter int unsigned N    = 256,   // pixels per row
  parameter int unsigned ROWS = N      // rows per frame
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // row-transformed stream from the RPE
  input  logic                   in_valid,
  input  logic                   in_last,
  input  coef_t                  in_l,
  input  coef_t                  in_h,
  output logic                   busy,
  // row memory
  output logic                   rm_beat,
  output logic                   rm_row_odd,
  output logic                   rm_row_end,
  output logic [$clog2(N/2)-1:0] rm_addr,
  output coef_t                  rm_wr_l,
  output coef_t                  rm_wr_h,
  input  coef_t                  rm_rd0,
  input  coef_t                  rm_rd1,
  input  coef_t                  rm_rd2,
  // column memory
  output logic                   cm_rd_band,
  output logic [$clog2(N/2)-1:0] cm_rd_addr,
  input  coef_t                  cm_rd_d1,
  input  coef_t                  cm_rd_s1,
  input  coef_t                  cm_rd_d2,
  output logic                   cm_we_h1,
  output logic                   cm_we_h2,
  output logic                   cm_wr_band,
  output logic [$clog2(N/2)-1:0] cm_wr_addr,
  output coef_t                  cm_wr_d1,
  output coef_t                  cm_wr_s1,
  output coef_t                  cm_wr_d2,
  // 2-D transformed stream
  output logic                   out_valid,
  output logic                   out_last,
  output coef_t                  out_lo,
  output coef_t                  out_hi
);

  localparam int unsigned NP = N / 2;
  localparam int unsigned JW = $clog2(NP);
  localparam int unsigned RW = $clog2(ROWS);

  logic [JW-1:0] j_q;          // column
  logic [RW-1:0] r_q;          // row within the frame
  logic          have_prev_q;  // a frame of this sequence has been completed
  logic          flush_q;      // closing rows of the final frame in progress

  logic beat, real_beat;
  assign real_beat = in_valid && !flush_q;
  assign beat      = real_beat || flush_q;
  assign busy      = flush_q;

  logic          band;
  logic [RW-2:0] rp;
  assign band = r_q[0];
  assign rp   = r_q[RW-1:1];

  slice_ctl_t ctl;
  slice_sched u_sched (
    .pos_is0(rp == (RW-1)'(0)), .pos_is1(rp == (RW-1)'(1)), .pos_is2(rp == (RW-1)'(2)),
    .prev_exists(have_prev_q), .cur_exists(real_beat),
    .prev_n_is2(ROWS == 4), .ctl(ctl)
  );

  logic row_end, frame_end, seq_end;
  assign row_end   = (j_q == JW'(NP - 1));
  assign frame_end = row_end && (r_q == RW'(ROWS - 1));
  assign seq_end   = flush_q && row_end && (r_q == RW'(3));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      j_q         <= '0;
      r_q         <= '0;
      have_prev_q <= 1'b0;
      flush_q     <= 1'b0;
    end else if (beat) begin
      j_q <= row_end ? '0 : j_q + JW'(1);
      if (row_end) r_q <= frame_end ? '0 : r_q + RW'(1);
      if (real_beat && frame_end) have_prev_q <= 1'b1;
      if (real_beat && in_last) flush_q <= 1'b1;
      if (seq_end) begin
        flush_q     <= 1'b0;
        have_prev_q <= 1'b0;
        r_q         <= '0;
      end
    end
  end

  // row memory access: read-before-write of the current column
  assign rm_beat    = beat;
  assign rm_row_odd = band;
  assign rm_row_end = row_end;
  assign rm_addr    = j_q;
  assign rm_wr_l    = in_l;
  assign rm_wr_h    = in_h;

  // column memory read of the kept results
  assign cm_rd_band = band;
  assign cm_rd_addr = j_q;

  coef_t s0n;
  assign s0n = band ? rm_rd2 : in_l;

  logic          sl_valid;
  slice_ctl_t    sl_ctl;
  logic [JW+1:0] sl_tag;     // {last, band, column}

  lift_slice #(.LOCAL_STATE(1'b0), .TAG_W(JW + 2)) u_slice (
    .clk(clk), .rst_n(rst_n),
    .in_valid(beat), .ctl_i(ctl), .tag_i({seq_end, band, j_q}),
    .s0_i(rm_rd0), .d0_i(rm_rd1), .s0n_i(s0n),
    .prev_d1_i(cm_rd_d1), .prev_s1_i(cm_rd_s1), .prev_d2_i(cm_rd_d2),
    .out_valid(sl_valid), .ctl_o(sl_ctl), .tag_o(sl_tag),
    .lo_o(out_lo), .hi_o(out_hi),
    .wb_d1_o(cm_wr_d1), .wb_s1_o(cm_wr_s1), .wb_d2_o(cm_wr_d2)
  );

  assign cm_we_h1   = sl_valid && sl_ctl.h1_valid;
  assign cm_we_h2   = sl_valid && sl_ctl.h2_valid;
  assign cm_wr_band = sl_tag[JW];
  assign cm_wr_addr = sl_tag[JW-1:0];

  assign out_valid = sl_valid && sl_ctl.h2_valid;
  assign out_last  = out_valid && sl_tag[JW+1];

  initial assert (N >= 10 && (N % 2) == 0 && ROWS >= 6 && (ROWS % 2) == 0)
    else $error("cpe: N must be even and at least 10, ROWS even and at least 6");
  a_last_at_frame_end: assert property (@(posedge clk) disable iff (!rst_n)
    (real_beat && in_last) |-> frame_end)
    else $error("cpe: in_last must mark the last beat of a frame");

endmodule
