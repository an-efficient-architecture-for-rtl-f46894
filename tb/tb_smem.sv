// tb_smem: self-checking testbench of the spatial memory at two frame sizes: 4 x 4
// (16 pixels, a power of two) and 4 x 6 (24 pixels, not a power of two).
//
// Frames carry tagged pixels (value = 64*frame + pixel). They are written in the order
// and at the rate of the spatial processor (two per clock) while the testbench reads as
// the temporal processor does. From the second phase on, pixel t of the two stored
// frames (port A) and of the frame being written (port B, or the direct pass for pixel 0)
// must be the right ones. The 16-pixel memory runs 20 phases (more than twice the
// 8-phase period of its address pattern), the 24-pixel one 230 phases (more than the
// 220-phase period: 11 phases in bank 0, 20 in bank 1); both then run again after a
// restart. Each size has its own stimulus process; the two run side by side.
module tb_smem;
  import dwt_pkg::*;

  localparam int NCFG = 2;
  localparam int CN[NCFG]     = '{4, 4};
  localparam int CROWS[NCFG]  = '{4, 6};
  localparam int CPHASE[NCFG] = '{20, 230};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit done [NCFG];

  function automatic coef_t tagv(int f, int p);
    return coef_t'((64 * f + p) % 60000);
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int M  = CN[g] * CROWS[g];
    localparam int AW = $clog2(M);

    logic restart = 1'b0, beat = 1'b0, phase_end = 1'b0, wr_en = 1'b0;
    logic [AW-1:0] t = '0;
    coef_t in_lo = '0, in_hi = '0, e_old, o_old, e_new;

    smem #(.N(CN[g]), .ROWS(CROWS[g])) dut (.*);

    task automatic run(input int phases);
      for (int k = 0; k < phases; k++)
        for (int tt = 0; tt < M; tt++) begin
          int u0, u1;
          @(negedge clk);
          u0 = 2 * tt; u1 = 2 * tt + 1;
          beat = 1'b1; wr_en = 1'b1; t = tt[AW-1:0]; phase_end = (tt == M - 1);
          in_lo = tagv(2*k + u0 / M, u0 % M);
          in_hi = tagv(2*k + u1 / M, u1 % M);
          #1;
          if (k >= 1) begin
            checks++;
            if (e_old != tagv(2*k - 2, tt) || o_old != tagv(2*k - 1, tt) || e_new != tagv(2*k, tt)) begin
              failures++;
              if (failures < 10)
                $display("M %0d phase %0d t %0d: %0d %0d %0d", M, k, tt, e_old, o_old, e_new);
            end
          end
        end
      @(negedge clk);
      beat = 1'b0; wr_en = 1'b0;
    endtask

    initial begin
      repeat (2) @(posedge clk);
      @(negedge clk);
      wait (rst_n);
      run(CPHASE[g]);
      @(negedge clk);
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      run(5);
      done[g] = 1'b1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1]);
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
