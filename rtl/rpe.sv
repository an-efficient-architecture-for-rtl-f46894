// rpe: row processing element, the first stage of the spatial processor.
//
// Pixels arrive two per clock (one even and one odd pixel of a row, the "double" scan);
// the splitter keeps the previous pair so that each clock presents the triple
// x[2i], x[2i+1], x[2i+2] to a lift_slice whose kept results live in local registers.
// Each clock therefore yields one low-band and one high-band coefficient of the row
// transform. Rows follow each other without a gap: the first two pairs of a row also
// close the previous row, with whole-sample mirror extension at both row ends.
//
// Interface: in_valid qualifies pix_e/pix_o (8-bit unsigned pixels entering the datapath
// as 17-bit words with 2 fractional bits); in_last marks the final pair of a sequence of
// frames, which must be the last pair of a row. The unit then spends two clocks of its own
// closing the row and accepts no input until busy falls.
// Output: out_lo/out_hi carry l[r][k] and h[r][k] for k = 0..N/2-1 in order, row after
// row; out_last marks the final pair of the sequence.
//
// Timing: the coefficients of pair k leave 11 clocks after pair k+1 entered (9 clocks of
// lifting pipeline plus the splitter register and the next-pair wait); throughput is one
// pair per clock. The lifting itself follows the published row processor; handshake,
// word conversion and the gap-free row changeover mechanism are this design's choices.
module rpe
  import dwt_pkg::*;
#(
  parameter int unsigned N     = 256,  // pixels per row
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

  localparam int unsigned NP = N / 2;              // pairs per row
  localparam int unsigned JW = (NP > 1) ? $clog2(NP) : 1;

  logic [JW-1:0] j_q;          // pair index within the row
  logic          have_prev_q;  // a row of this sequence has been completed
  logic [1:0]    flush_q;      // 2: first closing clock due, 1: second due, 0: none
  coef_t         xe_q, xo_q;   // previous pair x[2i], x[2i+1]

  logic  beat, real_beat, virt_beat;
  coef_t xe_in, xo_in;
  slice_ctl_t ctl;

  assign xe_in = coef_t'({pix_e, FRAC'(0)});
  assign xo_in = coef_t'({pix_o, FRAC'(0)});

  assign virt_beat = (flush_q != 2'd0);
  assign real_beat = in_valid && !virt_beat;
  assign beat      = real_beat || virt_beat;
  assign busy      = virt_beat;

  logic pos0, pos1, pos2;
  assign pos0 = virt_beat ? (flush_q == 2'd2) : (j_q == JW'(0));
  assign pos1 = virt_beat ? (flush_q == 2'd1) : (j_q == JW'(1));
  assign pos2 = !virt_beat && (j_q == JW'(2));

  slice_sched u_sched (
    .pos_is0(pos0), .pos_is1(pos1), .pos_is2(pos2),
    .prev_exists(have_prev_q), .cur_exists(real_beat),
    .prev_n_is2(NP == 2), .ctl(ctl)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      j_q         <= '0;
      have_prev_q <= 1'b0;
      flush_q     <= 2'd0;
      xe_q        <= '0;
      xo_q        <= '0;
    end else if (virt_beat) begin
      flush_q <= flush_q - 2'd1;
      if (flush_q == 2'd1) have_prev_q <= 1'b0;   // sequence fully closed
    end else if (real_beat) begin
      xe_q <= xe_in;
      xo_q <= xo_in;
      if (j_q == JW'(NP - 1)) begin
        j_q         <= '0;
        have_prev_q <= 1'b1;
      end else begin
        j_q <= j_q + JW'(1);
      end
      if (in_last) flush_q <= 2'd2;
    end
  end

  logic       sl_valid;
  slice_ctl_t sl_ctl;
  logic [0:0] sl_tag;
  coef_t      wb_d1, wb_s1, wb_d2;

  lift_slice #(.LOCAL_STATE(1'b1), .TAG_W(1)) u_slice (
    .clk(clk), .rst_n(rst_n),
    .in_valid(beat), .ctl_i(ctl), .tag_i(virt_beat && flush_q == 2'd1),
    .s0_i(xe_q), .d0_i(xo_q), .s0n_i(xe_in),
    .prev_d1_i('0), .prev_s1_i('0), .prev_d2_i('0),
    .out_valid(sl_valid), .ctl_o(sl_ctl), .tag_o(sl_tag),
    .lo_o(out_lo), .hi_o(out_hi),
    .wb_d1_o(wb_d1), .wb_s1_o(wb_s1), .wb_d2_o(wb_d2)
  );

  assign out_valid = sl_valid && sl_ctl.h2_valid;
  assign out_last  = out_valid && sl_tag[0];

  initial assert (N >= 4 && (N % 2) == 0) else $error("rpe: N must be even and at least 4");
  a_last_at_row_end: assert property (@(posedge clk) disable iff (!rst_n)
    (real_beat && in_last) |-> (j_q == JW'(NP - 1)))
    else $error("rpe: in_last must mark the last pair of a row");

endmodule
