// tb_dwt3d_full: the 3-D DWT processor at its default size (256 x 256 frames) through one
// complete sequence of four random frames, gap-free.
//
// Every temporal low/high result (2 x 65536 pairs) and its position index is compared
// with the reference 3-D transform; the test also checks the latency of the first result
// (2N*N + 2N + 29 clocks), that results leave at two per clock with no idle clock from the
// first to the last, and the end-of-sequence flag.
module tb_dwt3d_full;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  localparam int N      = 256;
  localparam int M      = N * N;
  localparam int AW     = $clog2(M);
  localparam int FRAMES = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0, in_last = 1'b0;
  logic [7:0]    pix_e = '0, pix_o = '0;
  logic          busy, out_valid, out_last;
  logic [AW-1:0] out_idx;
  coef_t         out_l, out_h;

  dwt3d_top dut (.*);

  int checks = 0, failures = 0;
  arr_t pix[FRAMES], s2d[FRAMES];
  longint exp_l[], exp_h[];
  int cyc = 0, first_in = -1, first_out = -1, prev_out = -1, n_out = 0, n_last = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (n_out >= FRAMES / 2 * M || longint'(out_l) != exp_l[n_out] || longint'(out_h) != exp_h[n_out]
          || int'(out_idx) != n_out % M) begin
        failures++;
        if (failures < 10) $display("result %0d: got %0d %0d @%0d", n_out, out_l, out_h, out_idx);
      end
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
      prev_out = cyc;
      if (out_last) n_last++;
      n_out++;
    end
  end

  initial begin
    arr_t seq, lo, hi;
    for (int f = 0; f < FRAMES; f++) begin
      pix[f] = new[M];
      foreach (pix[f][k]) pix[f][k] = $urandom_range(0, 255);
      s2d[f] = frame2d(N, pix[f]);
    end
    exp_l = new[FRAMES / 2 * M];
    exp_h = new[FRAMES / 2 * M];
    seq = new[FRAMES];
    for (int p = 0; p < M; p++) begin
      foreach (seq[f]) seq[f] = s2d[f][p];
      temporal(seq, lo, hi);
      for (int k = 0; k < FRAMES / 2; k++) begin
        exp_l[k*M + p] = lo[k];
        exp_h[k*M + p] = hi[k];
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++)
      for (int k = 0; k < M/2; k++) begin
        in_valid <= 1'b1;
        pix_e    <= 8'(pix[f][2*k]);
        pix_o    <= 8'(pix[f][2*k+1]);
        in_last  <= (f == FRAMES - 1) && (k == M/2 - 1);
        @(posedge clk);
        if (first_in < 0) first_in = cyc;
      end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != FRAMES / 2 * M || n_last != 1) begin
      failures++;
      $display("results %0d, sequence ends %0d", n_out, n_last);
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
