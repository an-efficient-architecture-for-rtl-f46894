// tp: temporal processor, the last stage of the one-level 3-D DWT, with its part of the
// counter-based controller.
//
// The spatial processor delivers two coefficients of a 2-D transformed frame per clock.
// The temporal transform runs slice by slice over frame pairs: during phase k (the N*ROWS
// clocks in which frames 2k and 2k+1 arrive) the processor lifts temporal slice k-1 for
// every pixel position t, one position per clock: frames 2k-2 and 2k-1 come from port A
// of the spatial memory (smem), frame 2k from its port B, and the kept results of the
// previous slice from the temporal memory (tmem). Each clock therefore yields a temporal
// low and high coefficient of one pixel, output frame pair k-2.
//
// There is no limit on the number of frames (no group of pictures): after the last frame
// (in_last, which must end an odd frame) the processor runs two phases of its own, the
// first closing the last slice with mirror extension (frame P := frame P-2), the second
// producing the last output pair; it accepts nothing until busy falls.
//
// Output: out_l/out_h are the temporal low and high coefficient of the 2-D coefficient
// out_idx of the frame (index order as emitted by the spatial processor), frame pair by
// frame pair; out_last marks the end of the sequence.
// Timing: a result leaves 9 clocks after the clock that reads its inputs, so the first
// result appears two phases (2*N*ROWS clocks, four frames) plus 9 clocks after the first
// input. The slice-wise method and the use of the two memories follow the published
// temporal processor; the handshake is this design's own. Frames hold N*ROWS pixels,
// any even number; the phase counter wraps explicitly.
module tp
  import dwt_pkg::*;
#(
  parameter int unsigned N    = 256,   // pixels per row
  parameter int unsigned ROWS = N      // rows per frame
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // 2-D transformed stream from the spatial processor
  input  logic                   in_valid,
  input  logic                   in_last,
  input  coef_t                  in_lo,
  input  coef_t                  in_hi,
  output logic                   busy,
  // spatial memory
  output logic                   sm_restart,
  output logic                   sm_beat,
  output logic [$clog2(N*ROWS)-1:0] sm_t,
  output logic                   sm_phase_end,
  output logic                   sm_wr_en,
  output coef_t                  sm_in_lo,
  output coef_t                  sm_in_hi,
  input  coef_t                  sm_e_old,
  input  coef_t                  sm_o_old,
  input  coef_t                  sm_e_new,
  // temporal memory
  output logic [$clog2(N*ROWS)-1:0] tm_rd_addr,
  input  coef_t                  tm_rd_d1,
  input  coef_t                  tm_rd_s1,
  input  coef_t                  tm_rd_d2,
  output logic                   tm_we_h1,
  output logic                   tm_we_h2,
  output logic [$clog2(N*ROWS)-1:0] tm_wr_addr,
  output coef_t                  tm_wr_d1,
  output coef_t                  tm_wr_s1,
  output coef_t                  tm_wr_d2,
  // 3-D transformed stream
  output logic                   out_valid,
  output logic                   out_last,
  output logic [$clog2(N*ROWS)-1:0] out_idx,
  output coef_t                  out_l,
  output coef_t                  out_h
);

  localparam int unsigned M  = N * ROWS;
  localparam int unsigned AW = $clog2(M);

  logic [AW-1:0] t_q;         // pixel position within the phase
  logic [1:0]    ph_q;        // phases completed in this sequence, saturating at 3
  logic          flush_q;     // closing phases in progress
  logic          fph_q;       // which closing phase
  logic          n_is2_q;     // the sequence held exactly two frame pairs

  logic beat, real_beat, phase_end, seq_end;
  assign real_beat = in_valid && !flush_q;
  assign beat      = real_beat || flush_q;
  assign busy      = flush_q;
  assign phase_end = (t_q == AW'(M - 1));
  assign seq_end   = flush_q && fph_q && phase_end;

  slice_ctl_t ctl;
  slice_sched u_sched (
    .pos_is0(flush_q ? !fph_q : (ph_q == 2'd0)),
    .pos_is1(flush_q ?  fph_q : (ph_q == 2'd1)),
    .pos_is2(!flush_q && (ph_q == 2'd2)),
    .prev_exists(flush_q), .cur_exists(real_beat),
    .prev_n_is2(n_is2_q), .ctl(ctl)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t_q     <= '0;
      ph_q    <= 2'd0;
      flush_q <= 1'b0;
      fph_q   <= 1'b0;
      n_is2_q <= 1'b0;
    end else if (beat) begin
      t_q <= phase_end ? '0 : t_q + AW'(1);
      if (phase_end) begin
        if (!flush_q && ph_q != 2'd3) ph_q <= ph_q + 2'd1;
        if (flush_q) fph_q <= 1'b1;
      end
      if (real_beat && in_last) begin
        flush_q <= 1'b1;
        fph_q   <= 1'b0;
        n_is2_q <= (ph_q == 2'd1);   // this beat completes the second phase
      end
      if (seq_end) begin
        flush_q <= 1'b0;
        fph_q   <= 1'b0;
        ph_q    <= 2'd0;
      end
    end
  end

  assign sm_restart   = beat && seq_end;
  assign sm_beat      = beat;
  assign sm_t         = t_q;
  assign sm_phase_end = phase_end;
  assign sm_wr_en     = real_beat;
  assign sm_in_lo     = in_lo;
  assign sm_in_hi     = in_hi;
  assign tm_rd_addr   = t_q;

  logic          sl_valid;
  slice_ctl_t    sl_ctl;
  logic [AW:0]   sl_tag;      // {last, t}

  lift_slice #(.LOCAL_STATE(1'b0), .TAG_W(AW + 1)) u_slice (
    .clk(clk), .rst_n(rst_n),
    .in_valid(beat), .ctl_i(ctl), .tag_i({seq_end, t_q}),
    .s0_i(sm_e_old), .d0_i(sm_o_old), .s0n_i(sm_e_new),
    .prev_d1_i(tm_rd_d1), .prev_s1_i(tm_rd_s1), .prev_d2_i(tm_rd_d2),
    .out_valid(sl_valid), .ctl_o(sl_ctl), .tag_o(sl_tag),
    .lo_o(out_l), .hi_o(out_h),
    .wb_d1_o(tm_wr_d1), .wb_s1_o(tm_wr_s1), .wb_d2_o(tm_wr_d2)
  );

  assign tm_we_h1   = sl_valid && sl_ctl.h1_valid;
  assign tm_we_h2   = sl_valid && sl_ctl.h2_valid;
  assign tm_wr_addr = sl_tag[AW-1:0];

  assign out_valid = sl_valid && sl_ctl.h2_valid;
  assign out_last  = out_valid && sl_tag[AW];
  assign out_idx   = sl_tag[AW-1:0];

  a_last_at_pair_end: assert property (@(posedge clk) disable iff (!rst_n)
    (real_beat && in_last) |-> (phase_end && ph_q != 2'd0))
    else $error("tp: in_last must end the second frame of a pair, after at least two pairs");

endmodule
