// tb_dwt3d_rect: the 3-D DWT processor on QCIF frames, 176 x 144 pixels: not square,
// and 25344 pixels per frame, not a power of two. The frame size is set through the top's
// N and ROWS parameters.
//
// Two videos of random frames are sent: six frames gap-free, then eight frames with
// random input gaps. Every temporal low/high result and its position index is compared
// with the reference 3-D transform. For the gap-free video the test also checks the
// latency of the first result (2*N*ROWS + 2N + 29 clocks), that results then leave at
// two per clock with no idle clock, and the end-of-sequence flag. The second video takes
// the spatial memory through 6 layouts with the non-power-of-two moduli 25343 and 25345;
// full address periods are covered for small frames by the spatial memory's own
// testbench.
module tb_dwt3d_rect;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  localparam int N    = 176;
  localparam int ROWS = 144;
  localparam int M    = N * ROWS;
  localparam int AW   = $clog2(M);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0, in_last = 1'b0;
  logic [7:0]    pix_e = '0, pix_o = '0;
  logic          busy, out_valid, out_last;
  logic [AW-1:0] out_idx;
  coef_t         out_l, out_h;

  dwt3d_top #(.N(N), .ROWS(ROWS)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_l[], exp_h[];
  int cyc = 0, first_in = -1, first_out = -1, prev_out = -1, n_out = 0, n_last = 0;
  bit gap_free;
  int c_layout = 0, c_gap = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && dut.u_tp.beat && dut.u_tp.phase_end) c_layout++;
    if (rst_n && out_valid) begin
      checks++;
      if (n_out >= exp_l.size() || longint'(out_l) != exp_l[n_out] || longint'(out_h) != exp_h[n_out]
          || int'(out_idx) != n_out % M) begin
        failures++;
        if (failures < 10) $display("result %0d: got %0d %0d @%0d", n_out, out_l, out_h, out_idx);
      end
      if (gap_free) begin
        if (first_out < 0) begin
          first_out = cyc;
          checks++;
          if (first_out - first_in != 2*M + 2*N + 29) begin
            failures++;
            $display("latency %0d expected %0d", first_out - first_in, 2*M + 2*N + 29);
          end
        end else if (cyc != prev_out + 1) begin
          failures++;
          $display("output gap at %0d", cyc);
        end
      end
      prev_out = cyc;
      if (out_last) n_last++;
      n_out++;
    end
  end

  task automatic video(input int frames, input bit gaps);
    arr_t pix[], s2d[], seq, lo, hi;
    pix = new[frames];
    s2d = new[frames];
    for (int f = 0; f < frames; f++) begin
      pix[f] = new[M];
      foreach (pix[f][k]) pix[f][k] = $urandom_range(0, 255);
      s2d[f] = frame2d_r(N, ROWS, pix[f]);
    end
    exp_l = new[frames / 2 * M];
    exp_h = new[frames / 2 * M];
    seq = new[frames];
    for (int p = 0; p < M; p++) begin
      foreach (seq[f]) seq[f] = s2d[f][p];
      temporal(seq, lo, hi);
      for (int k = 0; k < frames / 2; k++) begin
        exp_l[k*M + p] = lo[k];
        exp_h[k*M + p] = hi[k];
      end
    end
    gap_free = !gaps;
    first_in = -1; first_out = -1; n_out = 0; n_last = 0; c_layout = 0;
    for (int f = 0; f < frames; f++)
      for (int k = 0; k < M/2; k++) begin
        while (gaps && $urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          c_gap++;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        pix_e    <= 8'(pix[f][2*k]);
        pix_o    <= 8'(pix[f][2*k+1]);
        in_last  <= (f == frames - 1) && (k == M/2 - 1);
        @(posedge clk);
        if (first_in < 0) first_in = cyc;
      end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != frames / 2 * M || n_last != 1) begin
      failures++;
      $display("results %0d, sequence ends %0d", n_out, n_last);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    video(6, 1'b0);
    video(8, 1'b1);
    checks++;
    // the second video (8 frames) changes the spatial memory layout 6 times
    if (c_layout != 6 || c_gap == 0) begin
      failures++;
      $display("layout changes %0d, input gaps %0d", c_layout, c_gap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
