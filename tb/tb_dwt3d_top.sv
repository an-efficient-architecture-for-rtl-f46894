// tb_dwt3d_top: end-to-end self-checking testbench of the 3-D DWT processor at N = 16.
//
// Three sequences of random frames (6, 4 and 36 frames) are streamed through the whole
// processor, one after the other, and every temporal low/high pair is compared with the
// reference 3-D transform (row, column, then temporal lifting on whole arrays). The
// second sequence is fed with random idle clocks between pixel pairs. It also checks
// the latency of the first result (2N*N + 2N + 29 clocks) and counts how often each
// mechanism of the design was exercised: row changeovers in the row processor, frame
// changeovers in the column processor, closing phases of both processors at the end of a
// sequence, the direct pass of the first pixel past the spatial memory, spatial-memory
// layout changes (more than one full period, 2*log2(N*N) phases, of the address pattern
// within one sequence) and input gaps.
module tb_dwt3d_top;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  localparam int N  = 16;
  localparam int M  = N * N;
  localparam int AW = $clog2(M);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0, in_last = 1'b0;
  logic [7:0]    pix_e = '0, pix_o = '0;
  logic          busy, out_valid, out_last;
  logic [AW-1:0] out_idx;
  coef_t         out_l, out_h;

  dwt3d_top #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_l[$], exp_h[$];
  int     exp_i[$];
  int     cyc = 0, first_in_cyc = -1, first_out_cyc = -1, n_out = 0, n_last = 0;

  // mechanism counters
  int c_row_change = 0, c_frame_change = 0, c_rpe_close = 0, c_cpe_close = 0, c_tp_close = 0;
  int c_bypass = 0, c_layout = 0, c_layout_max = 0, c_gap = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_sp.u_rpe.beat && dut.u_sp.u_rpe.ctl.h1_valid && dut.u_sp.u_rpe.ctl.u1_first
        && dut.u_sp.u_rpe.ctl.h2_valid) c_row_change++;
    if (dut.u_sp.u_cpe.beat && dut.u_sp.u_cpe.ctl.h1_valid && dut.u_sp.u_cpe.ctl.p2_flush
        && dut.u_sp.u_cpe.ctl.h2_valid) c_frame_change++;
    if (dut.u_sp.u_rpe.virt_beat) c_rpe_close++;
    if (dut.u_sp.u_cpe.flush_q)   c_cpe_close++;
    if (dut.u_tp.flush_q)         c_tp_close++;
    if (dut.u_tp.real_beat && dut.u_tp.t_q == '0 && dut.u_tp.ctl.h1_valid) c_bypass++;
    if (dut.u_tp.beat && dut.u_tp.phase_end) c_layout++;
    if (c_layout > c_layout_max) c_layout_max = c_layout;
    if (!in_valid && !busy && rst_n && first_in_cyc >= 0) c_gap++;
  end

  task automatic run_seq(input int frames, input bit gaps);
    arr_t pix[], s2d[], seq, lo, hi;
    c_layout = 0;
    pix = new[frames];
    s2d = new[frames];
    for (int f = 0; f < frames; f++) begin
      pix[f] = new[M];
      foreach (pix[f][k]) pix[f][k] = $urandom_range(0, 255);
      s2d[f] = frame2d(N, pix[f]);
    end
    seq = new[frames];
    for (int k = 0; k < frames / 2; k++)
      for (int p = 0; p < M; p++) begin
        for (int f = 0; f < frames; f++) seq[f] = s2d[f][p];
        temporal(seq, lo, hi);
        exp_l.push_back(lo[k]);
        exp_h.push_back(hi[k]);
        exp_i.push_back(p);
      end
    for (int f = 0; f < frames; f++)
      for (int k = 0; k < M/2; k++) begin
        if (gaps) while ($urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        pix_e    <= 8'(pix[f][2*k]);
        pix_o    <= 8'(pix[f][2*k+1]);
        in_last  <= (f == frames - 1) && (k == M/2 - 1);
        @(posedge clk);
        if (first_in_cyc < 0) first_in_cyc = cyc;
      end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint el, eh;
      int ei;
      el = exp_l.pop_front();
      eh = exp_h.pop_front();
      ei = exp_i.pop_front();
      checks++;
      if (longint'(out_l) != el || longint'(out_h) != eh || int'(out_idx) != ei) begin
        failures++;
        if (failures < 10)
          $display("mismatch result %0d: got %0d %0d @%0d exp %0d %0d @%0d",
                   n_out, out_l, out_h, out_idx, el, eh, ei);
      end
      if (first_out_cyc < 0) begin
        first_out_cyc = cyc;
        checks++;
        if (first_out_cyc - first_in_cyc != 2*M + 2*N + 29) begin
          failures++;
          $display("latency %0d, expected %0d", first_out_cyc - first_in_cyc, 2*M + 2*N + 29);
        end
      end
      n_out++;
      if (out_last) n_last++;
    end
  end

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_seq(6, 1'b0);
    run_seq(4, 1'b1);
    run_seq(36, 1'b0);
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != 23*M || exp_l.size() != 0 || n_last != 3) begin
      failures++;
      $display("results %0d, left %0d, sequence ends %0d", n_out, exp_l.size(), n_last);
    end
    need("row changeover", c_row_change);
    need("frame changeover", c_frame_change);
    need("row processor closing", c_rpe_close);
    need("column processor closing", c_cpe_close);
    need("temporal processor closing", c_tp_close);
    need("first-pixel pass past spatial memory", c_bypass);
    need("input gap", c_gap);
    checks++;
    if (c_layout_max <= 2 * AW) begin
      failures++;
      $display("only %0d layout changes in one sequence", c_layout_max);
    end
    $display("mechanisms: row %0d frame %0d rpe-close %0d cpe-close %0d tp-close %0d bypass %0d layout %0d gap %0d",
             c_row_change, c_frame_change, c_rpe_close, c_cpe_close, c_tp_close, c_bypass, c_layout_max, c_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
