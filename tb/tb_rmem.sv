// tb_rmem: self-checking testbench of the row memory at N = 16.
//
// Twenty rows of tagged coefficients (value = 1000*row + 2*column + band) are written
// in the column processor's access pattern. From row 2 on, every read is compared with
// what the column processor needs: on even rows l of the two previous rows, on odd rows
// h of the three previous rows. The test also checks the pairs of buffers refreshed in
// rows 2..7 against the published refresh order (R1/R3, R2/R4, R1/R2, R3/R4, ...).
module tb_rmem;
  import dwt_pkg::*;

  localparam int N  = 16;
  localparam int NP = N / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic beat = 1'b0, row_odd = 1'b0, row_end = 1'b0;
  logic [$clog2(NP)-1:0] addr = '0;
  coef_t wr_l = '0, wr_h = '0, rd0, rd1, rd2;

  rmem #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  function automatic coef_t tagv(int r, int c, int band);
    return coef_t'(1000 * r + 2 * c + band);
  endfunction

  // published refresh order, buffers numbered 0..3 for R1..R4, rows 2..7
  int exp_pair [6][2] = '{'{0, 2}, '{1, 3}, '{0, 1}, '{2, 3}, '{0, 2}, '{1, 3}};

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < 20; r++) begin
      for (int c = 0; c < NP; c++) begin
        beat    <= 1'b1;
        row_odd <= r[0];
        row_end <= (c == NP - 1);
        addr    <= c[$clog2(NP)-1:0];
        wr_l    <= tagv(r, c, 0);
        wr_h    <= tagv(r, c, 1);
        #1;
        @(negedge clk);
        if (r >= 2) begin
          checks++;
          if (!r[0]) begin
            if (rd0 != tagv(r-2, c, 0) || rd1 != tagv(r-1, c, 0)) begin
              failures++;
              if (failures < 10) $display("row %0d col %0d: %0d %0d", r, c, rd0, rd1);
            end
          end else begin
            if (rd0 != tagv(r-3, c, 1) || rd1 != tagv(r-2, c, 1) || rd2 != tagv(r-1, c, 1)) begin
              failures++;
              if (failures < 10) $display("row %0d col %0d: %0d %0d %0d", r, c, rd0, rd1, rd2);
            end
          end
          if (r < 8 && c == 0) begin
            int lo, hi;
            lo = (dut.wa < dut.wb) ? int'(dut.wa) : int'(dut.wb);
            hi = (dut.wa < dut.wb) ? int'(dut.wb) : int'(dut.wa);
            checks++;
            if (lo != exp_pair[r-2][0] || hi != exp_pair[r-2][1]) begin
              failures++;
              $display("row %0d refreshes R%0d/R%0d", r, lo + 1, hi + 1);
            end
          end
        end
        @(posedge clk);
      end
    end
    beat <= 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
