// tb_rpe: self-checking testbench of the row processing element at N = 16.
//
// Two sequences of random rows (10 rows, then 3) are streamed, the first one gap-free
// and the second one with random idle clocks. Every l/h pair is compared with the
// reference 1-D transform of its row, the end-of-sequence flag is checked, and so are
// the timing figures: the first pair leaves 11 clocks after the first pixel pair was
// taken, and with a gap-free input the pairs of a sequence leave on consecutive clocks.
module tb_rpe;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid = 1'b0, in_last = 1'b0;
  logic [7:0] pix_e = '0, pix_o = '0;
  logic       busy, out_valid, out_last;
  coef_t      out_lo, out_hi;

  rpe #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_lo[$], exp_hi[$];
  bit     exp_last[$];
  int cyc = 0, first_in = -1, first_out = -1, prev_out = -1, n_out = 0;
  bit gapfree = 1'b1;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic run_seq(input int rows, input bit gaps);
    arr_t x, lo, hi;
    x = new[N];
    gapfree = !gaps;
    first_in = -1; first_out = -1; prev_out = -1;
    for (int r = 0; r < rows; r++) begin
      foreach (x[c]) x[c] = $urandom_range(0, 255);
      begin
        arr_t xs;
        xs = new[N];
        foreach (x[c]) xs[c] = x[c] * 4;
        lift1d(xs, lo, hi);
      end
      for (int k = 0; k < N/2; k++) begin
        exp_lo.push_back(lo[k]);
        exp_hi.push_back(hi[k]);
        exp_last.push_back(r == rows - 1 && k == N/2 - 1);
      end
      for (int k = 0; k < N/2; k++) begin
        if (gaps) while ($urandom_range(0, 2) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        pix_e    <= 8'(x[2*k]);
        pix_o    <= 8'(x[2*k+1]);
        in_last  <= (r == rows - 1) && (k == N/2 - 1);
        @(posedge clk);
        if (first_in < 0) first_in = cyc;
      end
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (15) @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint el, eh;
      bit     ex;
      el = exp_lo.pop_front();
      eh = exp_hi.pop_front();
      ex = exp_last.pop_front();
      checks++;
      if (longint'(out_lo) != el || longint'(out_hi) != eh || out_last != ex) begin
        failures++;
        if (failures < 10) $display("pair %0d: got %0d %0d %0b exp %0d %0d %0b", n_out, out_lo, out_hi, out_last, el, eh, ex);
      end
      if (first_out < 0) begin
        first_out = cyc;
        if (gapfree) checks++;
        if (gapfree && first_out - first_in != 11) begin
          failures++;
          $display("latency %0d, expected 11", first_out - first_in);
        end
      end else if (gapfree) begin
        checks++;
        if (cyc != prev_out + 1) begin failures++; $display("output gap at %0d", cyc); end
      end
      prev_out = cyc;
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_seq(10, 1'b0);
    run_seq(3, 1'b1);
    checks++;
    if (n_out != 13*N/2 || exp_lo.size() != 0) begin
      failures++;
      $display("outputs %0d left %0d", n_out, exp_lo.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
