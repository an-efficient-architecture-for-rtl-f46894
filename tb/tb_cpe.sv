// tb_cpe: self-checking testbench of the column processing element at N = 16, connected
// to a row memory and a column memory as in the spatial processor.
//
// The testbench plays the row processor: it streams the reference row transform of
// random frames (two sequences: 3 frames gap-free, 2 frames with random idle clocks) and
// compares every output pair with the reference 2-D transform, in the documented output
// order. It checks the end-of-sequence flag and the timing: with a gap-free input the
// first pair leaves 2N + 9 clocks after the first input beat, and the frames' outputs
// follow each other with no idle clock.
module tb_cpe;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  localparam int N  = 16;
  localparam int NP = N / 2;
  localparam int JW = $clog2(NP);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0, in_last = 1'b0, busy, out_valid, out_last;
  coef_t in_l = '0, in_h = '0, out_lo, out_hi;

  logic          rm_beat, rm_row_odd, rm_row_end;
  logic [JW-1:0] rm_addr;
  coef_t         rm_wr_l, rm_wr_h, rm_rd0, rm_rd1, rm_rd2;
  logic          cm_rd_band, cm_we_h1, cm_we_h2, cm_wr_band;
  logic [JW-1:0] cm_rd_addr, cm_wr_addr;
  coef_t         cm_rd_d1, cm_rd_s1, cm_rd_d2, cm_wr_d1, cm_wr_s1, cm_wr_d2;

  cpe #(.N(N)) dut (.*);
  rmem #(.N(N)) u_rmem (.clk, .rst_n, .beat(rm_beat), .row_odd(rm_row_odd), .row_end(rm_row_end),
                        .addr(rm_addr), .wr_l(rm_wr_l), .wr_h(rm_wr_h), .rd0(rm_rd0), .rd1(rm_rd1), .rd2(rm_rd2));
  cmem #(.N(N)) u_cmem (.clk, .rd_band(cm_rd_band), .rd_addr(cm_rd_addr), .rd_d1(cm_rd_d1), .rd_s1(cm_rd_s1),
                        .rd_d2(cm_rd_d2), .we_h1(cm_we_h1), .we_h2(cm_we_h2), .wr_band(cm_wr_band),
                        .wr_addr(cm_wr_addr), .wr_d1(cm_wr_d1), .wr_s1(cm_wr_s1), .wr_d2(cm_wr_d2));

  int checks = 0, failures = 0;
  longint exp_q[$];
  bit     last_q[$];
  int cyc = 0, first_in = -1, first_out = -1, prev_out = -1, n_out = 0;
  bit gapfree;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic run_seq(input int frames, input bit gaps);
    arr_t pix, l, h, r2;
    pix = new[N*N];
    gapfree = !gaps;
    first_in = -1; first_out = -1;
    for (int f = 0; f < frames; f++) begin
      foreach (pix[k]) pix[k] = $urandom_range(0, 255);
      rows2d(N, pix, l, h);
      r2 = frame2d(N, pix);
      for (int k = 0; k < N*N/2; k++) begin
        exp_q.push_back(r2[2*k]);
        exp_q.push_back(r2[2*k+1]);
        last_q.push_back(f == frames - 1 && k == N*N/2 - 1);
      end
      for (int k = 0; k < N*N/2; k++) begin
        if (gaps) while ($urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_l     <= coef_t'(l[k]);
        in_h     <= coef_t'(h[k]);
        in_last  <= (f == frames - 1) && (k == N*N/2 - 1);
        @(posedge clk);
        if (first_in < 0) first_in = cyc;
      end
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (12) @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint el, eh;
      bit ex;
      el = exp_q.pop_front();
      eh = exp_q.pop_front();
      ex = last_q.pop_front();
      checks++;
      if (longint'(out_lo) != el || longint'(out_hi) != eh || out_last != ex) begin
        failures++;
        if (failures < 10) $display("pair %0d: got %0d %0d exp %0d %0d", n_out, out_lo, out_hi, el, eh);
      end
      if (first_out < 0) begin
        first_out = cyc;
        if (gapfree) begin
          checks++;
          if (first_out - first_in != 2*N + 9) begin
            failures++;
            $display("latency %0d expected %0d", first_out - first_in, 2*N + 9);
          end
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
    run_seq(3, 1'b0);
    run_seq(2, 1'b1);
    checks++;
    if (n_out != 5*N*N/2 || exp_q.size() != 0) begin
      failures++;
      $display("outputs %0d left %0d", n_out, exp_q.size());
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
