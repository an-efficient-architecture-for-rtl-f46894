// tb_tp: self-checking testbench of the temporal processor at N = 8 (64-coefficient
// frames), connected to a spatial memory and a temporal memory.
//
// The testbench plays the spatial processor: it streams random 2-D coefficient frames,
// two per clock, in three sequences (4 frames, 10 frames with random idle clocks, 6
// frames) and compares every temporal low/high pair and its position index with the
// reference temporal transform. With a gap-free input the first result must leave
// 2*N*N + 9 clocks after the first input beat (four frames), and results must then
// follow on consecutive clocks up to the end of the sequence, closing phases included.
module tb_tp;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  localparam int N  = 8;
  localparam int M  = N * N;
  localparam int AW = $clog2(M);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0, in_last = 1'b0, busy, out_valid, out_last;
  coef_t in_lo = '0, in_hi = '0, out_l, out_h;
  logic [AW-1:0] out_idx;

  logic          sm_restart, sm_beat, sm_phase_end, sm_wr_en;
  logic [AW-1:0] sm_t, tm_rd_addr, tm_wr_addr;
  coef_t         sm_in_lo, sm_in_hi, sm_e_old, sm_o_old, sm_e_new;
  logic          tm_we_h1, tm_we_h2;
  coef_t         tm_rd_d1, tm_rd_s1, tm_rd_d2, tm_wr_d1, tm_wr_s1, tm_wr_d2;

  tp #(.N(N)) dut (.*);
  smem #(.N(N)) u_smem (.clk, .rst_n, .restart(sm_restart), .beat(sm_beat), .t(sm_t),
                        .phase_end(sm_phase_end), .wr_en(sm_wr_en), .in_lo(sm_in_lo), .in_hi(sm_in_hi),
                        .e_old(sm_e_old), .o_old(sm_o_old), .e_new(sm_e_new));
  tmem #(.N(N)) u_tmem (.clk, .rd_addr(tm_rd_addr), .rd_d1(tm_rd_d1), .rd_s1(tm_rd_s1), .rd_d2(tm_rd_d2),
                        .we_h1(tm_we_h1), .we_h2(tm_we_h2), .wr_addr(tm_wr_addr),
                        .wr_d1(tm_wr_d1), .wr_s1(tm_wr_s1), .wr_d2(tm_wr_d2));

  int checks = 0, failures = 0;
  longint exp_l[$], exp_h[$];
  int     exp_i[$];
  bit     exp_x[$];
  int cyc = 0, first_in = -1, first_out = -1, prev_out = -1, n_out = 0;
  bit gapfree;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic run_seq(input int frames, input bit gaps);
    arr_t fr[], seq, lo, hi;
    fr = new[frames];
    gapfree = !gaps;
    first_in = -1; first_out = -1;
    foreach (fr[f]) begin
      fr[f] = new[M];
      foreach (fr[f][p]) fr[f][p] = longint'($urandom_range(0, 8000)) - 4000;
    end
    seq = new[frames];
    for (int k = 0; k < frames / 2; k++)
      for (int p = 0; p < M; p++) begin
        foreach (seq[f]) seq[f] = fr[f][p];
        temporal(seq, lo, hi);
        exp_l.push_back(lo[k]); exp_h.push_back(hi[k]); exp_i.push_back(p);
        exp_x.push_back(k == frames / 2 - 1 && p == M - 1);
      end
    for (int f = 0; f < frames; f++)
      for (int k = 0; k < M/2; k++) begin
        if (gaps) while ($urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_lo    <= coef_t'(fr[f][2*k]);
        in_hi    <= coef_t'(fr[f][2*k+1]);
        in_last  <= (f == frames - 1) && (k == M/2 - 1);
        @(posedge clk);
        if (first_in < 0) first_in = cyc;
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
      int ei;
      bit ex;
      el = exp_l.pop_front(); eh = exp_h.pop_front(); ei = exp_i.pop_front(); ex = exp_x.pop_front();
      checks++;
      if (longint'(out_l) != el || longint'(out_h) != eh || int'(out_idx) != ei || out_last != ex) begin
        failures++;
        if (failures < 10) $display("result %0d: got %0d %0d @%0d exp %0d %0d @%0d", n_out, out_l, out_h, out_idx, el, eh, ei);
      end
      if (first_out < 0) begin
        first_out = cyc;
        if (gapfree) begin
          checks++;
          if (first_out - first_in != 2*M + 9) begin
            failures++;
            $display("latency %0d expected %0d", first_out - first_in, 2*M + 9);
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
    run_seq(4, 1'b0);
    run_seq(10, 1'b1);
    run_seq(6, 1'b0);
    checks++;
    if (n_out != 10*M || exp_l.size() != 0) begin
      failures++;
      $display("results %0d left %0d", n_out, exp_l.size());
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
