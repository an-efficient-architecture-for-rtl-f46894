// tb_sp: self-checking testbench of the spatial processor (2-D DWT of every frame).
//
// Two sequences of random frames (3 frames, then 2) are streamed two pixels per clock
// with no gaps, and every output pair is compared with the reference 2-D transform. The
// test also checks the cycle timing: the first coefficient pair of a sequence leaves
// 2N + 20 clocks after its first pixel pair, and the coefficients of a sequence leave on
// consecutive clocks.
module tb_sp;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid = 1'b0, in_last = 1'b0;
  logic [7:0] pix_e = '0, pix_o = '0;
  logic       busy, out_valid, out_last;
  coef_t      out_lo, out_hi;

  sp #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_q[$];
  int     cyc = 0, first_in_cyc = -1, first_out_cyc = -1, last_out_cyc = 0, n_out = 0;
  int     seq_outs = 0;
  bit     seq_start = 1'b1;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic run_seq(input int frames);
    arr_t pix, ref2d;
    pix = new[N*N];
    seq_start = 1'b1;
    for (int f = 0; f < frames; f++) begin
      for (int k = 0; k < N*N; k++) pix[k] = $urandom_range(0, 255);
      ref2d = frame2d(N, pix);
      foreach (ref2d[k]) exp_q.push_back(ref2d[k]);
      for (int k = 0; k < N*N/2; k++) begin
        in_valid <= 1'b1;
        pix_e    <= 8'(pix[2*k]);
        pix_o    <= 8'(pix[2*k+1]);
        in_last  <= (f == frames - 1) && (k == N*N/2 - 1);
        @(posedge clk);
        if (f == 0 && k == 0) first_in_cyc = cyc;
      end
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint el, eh;
      el = exp_q.pop_front();
      eh = exp_q.pop_front();
      checks++;
      if (longint'(out_lo) != el || longint'(out_hi) != eh) begin
        failures++;
        if (failures < 10) $display("mismatch out %0d: got %0d %0d exp %0d %0d", n_out, out_lo, out_hi, el, eh);
      end
      if (first_out_cyc < 0) begin
        first_out_cyc = cyc;
        checks++;
        if (first_out_cyc - first_in_cyc != 2*N + 20) begin
          failures++;
          $display("latency %0d, expected %0d", first_out_cyc - first_in_cyc, 2*N + 20);
        end
      end else begin
        checks++;
        if (cyc != last_out_cyc + 1) begin
          failures++;
          $display("gap in output stream at cycle %0d", cyc);
        end
      end
      last_out_cyc = cyc;
      n_out++;
      if (out_last) first_out_cyc = -1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_seq(3);
    checks++;
    if (n_out != 3*N*N/2) begin failures++; $display("seq1 outputs %0d", n_out); end
    repeat (5) @(posedge clk);
    run_seq(2);
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != 5*N*N/2 || exp_q.size() != 0) begin
      failures++;
      $display("outputs %0d, left %0d", n_out, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
