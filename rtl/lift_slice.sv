// lift_slice: one slice of the flipped Daubechies (9,7) lifting signal-flow graph, as a
// pipeline of four P/U modules (P1, U1, P2, U2) and the two output scalers (S1, S2).
//
// A slice takes the input block triple x[2i], x[2i+1], x[2i+2] (s0, d0, s0n) together with
// the three results kept from the previous slice (d1[i-1], s1[i-1], d2[i-2]) and computes
//   P1: d1[i]   = A*d0 + (s0 + s0n)
//   U1: s1[i]   = B*s0 + (d1[i-1] + d1[i]) / 16
//   P2: d2[i-1] = C*d1[i-1] + (s1[i-1] + s1[i]) / 2
//   U2: s2[i-1] = D*s1[i-1] + (d2[i-2] + d2[i-1]) / 2
//   S1/S2: lo = K0*s2[i-1], hi = K1*d2[i-1]
// Boundary samples use whole-sample mirror extension, selected by the slice_ctl_t flags
// (see dwt_pkg). The two halves of a slice may belong to different sequences, which lets
// a processor close one row, frame or sequence while it opens the next.
//
// LOCAL_STATE selects where the kept results live. With LOCAL_STATE = 1 (row processor)
// they are registers inside the slice, updated whenever a valid result passes, so slices
// may enter back to back. With LOCAL_STATE = 0 (column and temporal processors) they come
// from external buffers with the slice (prev_*_i) and the new values leave on wb_*_o at
// the end of the pipeline for write-back; the same address is then revisited no sooner
// than LAT+1 clocks later.
//
// Timing: a slice enters each clock at most; results and write-back values appear LAT = 9
// clocks later together with the slice's control word and a caller-defined tag.
// The slice decomposition follows the published signal-flow-graph analysis; the pipeline
// depths are this design's choice.
module lift_slice
  import dwt_pkg::*;
#(
  parameter bit          LOCAL_STATE = 1'b0,
  parameter int unsigned TAG_W       = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,   // a slice enters this clock
  input  slice_ctl_t       ctl_i,
  input  logic [TAG_W-1:0] tag_i,
  input  coef_t            s0_i,       // x[2i]
  input  coef_t            d0_i,       // x[2i+1]
  input  coef_t            s0n_i,      // x[2i+2]
  input  coef_t            prev_d1_i,  // d1[i-1]   (LOCAL_STATE = 0 only)
  input  coef_t            prev_s1_i,  // s1[i-1]   (LOCAL_STATE = 0 only)
  input  coef_t            prev_d2_i,  // d2[i-2]   (LOCAL_STATE = 0 only)
  output logic             out_valid,  // the slice that entered LAT clocks ago
  output slice_ctl_t       ctl_o,
  output logic [TAG_W-1:0] tag_o,
  output coef_t            lo_o,       // low-band result  K0*s2[i-1]
  output coef_t            hi_o,       // high-band result K1*d2[i-1]
  output coef_t            wb_d1_o,    // d1[i]   to keep
  output coef_t            wb_s1_o,    // s1[i]   to keep
  output coef_t            wb_d2_o     // d2[i-1] to keep
);

  localparam int unsigned LAT = 9;

  // ---- control and tag pipeline -------------------------------------------------------
  logic       vld_q [1:LAT];
  slice_ctl_t ctl_q [1:LAT];
  logic [TAG_W-1:0] tag_q [1:LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k <= LAT; k++) begin
        vld_q[k] <= 1'b0;
        ctl_q[k] <= SLICE_IDLE;
      end
    end else begin
      vld_q[1] <= in_valid;
      ctl_q[1] <= in_valid ? ctl_i : SLICE_IDLE;
      for (int k = 2; k <= LAT; k++) begin
        vld_q[k] <= vld_q[k-1];
        ctl_q[k] <= ctl_q[k-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    tag_q[1] <= tag_i;
    for (int k = 2; k <= LAT; k++) tag_q[k] <= tag_q[k-1];
  end

  // ---- data delay lines ---------------------------------------------------------------
  coef_t s0_q  [1:2];   // x[2i] to U1
  coef_t xd1_q [1:2];   // external d1[i-1] to U1
  coef_t xs1_q [1:4];   // external s1[i-1] to P2
  coef_t xd2_q [1:6];   // external d2[i-2] to U2
  coef_t d1p_q [1:2];   // d1[i-1] from U1 stage to P2 stage
  coef_t s1p_q [1:2];   // s1[i-1] from P2 stage to U2 stage
  coef_t d2_q  [1:2];   // d2[i-1] from U2 stage to the S2 scaler
  coef_t wd1_q [1:7];   // write-back alignment
  coef_t ws1_q [1:5];
  coef_t wd2_q [1:3];

  coef_t d1, s1, d2, s2;           // P/U outputs (stage 2, 4, 6, 8)
  coef_t d1p_u1, s1p_p2, d2pp_u2;  // kept values as seen by U1, P2, U2
  coef_t loc_d1, loc_s1, loc_d2;   // local state registers

  always_ff @(posedge clk) begin
    s0_q[1]  <= s0_i;       s0_q[2]  <= s0_q[1];
    xd1_q[1] <= prev_d1_i;  xd1_q[2] <= xd1_q[1];
    xs1_q[1] <= prev_s1_i;  for (int k = 2; k <= 4; k++) xs1_q[k] <= xs1_q[k-1];
    xd2_q[1] <= prev_d2_i;  for (int k = 2; k <= 6; k++) xd2_q[k] <= xd2_q[k-1];
    d1p_q[1] <= d1p_u1;     d1p_q[2] <= d1p_q[1];
    s1p_q[1] <= s1p_p2;     s1p_q[2] <= s1p_q[1];
    d2_q[1]  <= d2;         d2_q[2]  <= d2_q[1];
    wd1_q[1] <= d1;         for (int k = 2; k <= 7; k++) wd1_q[k] <= wd1_q[k-1];
    ws1_q[1] <= s1;         for (int k = 2; k <= 5; k++) ws1_q[k] <= ws1_q[k-1];
    wd2_q[1] <= d2;         for (int k = 2; k <= 3; k++) wd2_q[k] <= wd2_q[k-1];
  end

  // Local state: the last valid d1, s1 and d2 that passed their stage.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loc_d1 <= '0;
      loc_s1 <= '0;
      loc_d2 <= '0;
    end else begin
      if (ctl_q[2].h1_valid) loc_d1 <= d1;
      if (ctl_q[4].h1_valid) loc_s1 <= s1;
      if (ctl_q[6].h2_valid) loc_d2 <= d2;
    end
  end

  assign d1p_u1  = LOCAL_STATE ? loc_d1 : xd1_q[2];
  assign s1p_p2  = LOCAL_STATE ? loc_s1 : xs1_q[4];
  assign d2pp_u2 = LOCAL_STATE ? loc_d2 : xd2_q[6];

  // ---- the four lifting steps ---------------------------------------------------------
  coef_t p1_b, u1_a, p2_b, u2_a;

  assign p1_b = ctl_i.p1_last     ? s0_i   : s0n_i;   // x[2i+2] := x[2i]
  assign u1_a = ctl_q[2].u1_first ? d1     : d1p_u1;  // d1[-1]  := d1[0]
  assign p2_b = ctl_q[4].p2_flush ? s1p_p2 : s1;      // s1[n]   := s1[n-1]
  assign u2_a = ctl_q[6].u2_second ? d2    : d2pp_u2; // d2[-1]  := d2[0]

  lift_pu #(.K(K_A), .SH(SH_P1)) u_p1 (.clk(clk), .self_i(d0_i),     .a_i(s0_i),   .b_i(p1_b), .y_o(d1));
  lift_pu #(.K(K_B), .SH(SH_U1)) u_u1 (.clk(clk), .self_i(s0_q[2]),  .a_i(u1_a),   .b_i(d1),   .y_o(s1));
  lift_pu #(.K(K_C), .SH(SH_P2)) u_p2 (.clk(clk), .self_i(d1p_q[2]), .a_i(s1p_p2), .b_i(p2_b), .y_o(d2));
  lift_pu #(.K(K_D), .SH(SH_U2)) u_u2 (.clk(clk), .self_i(s1p_q[2]), .a_i(u2_a),   .b_i(d2),   .y_o(s2));

  const_mult #(.K(K_K0)) u_s1 (.clk(clk), .x(s2),      .y(lo_o));
  const_mult #(.K(K_K1)) u_s2 (.clk(clk), .x(d2_q[2]), .y(hi_o));

  assign out_valid = vld_q[LAT];
  assign ctl_o     = ctl_q[LAT];
  assign tag_o     = tag_q[LAT];
  assign wb_d1_o   = wd1_q[7];
  assign wb_s1_o   = ws1_q[5];
  assign wb_d2_o   = wd2_q[3];

endmodule
