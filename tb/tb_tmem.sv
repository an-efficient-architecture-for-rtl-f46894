// tb_tmem: self-checking testbench of the temporal memory at N = 4 (16 words per buffer).
//
// Random words are written to all addresses with random choices of the two
// write enables, while a shadow copy in the testbench records what each word should
// hold; every word is then read back and compared, and a read in the same clock as a
// write must still return the old contents.
module tb_tmem;
  import dwt_pkg::*;

  localparam int N  = 4;
  localparam int NP = N * N;
  localparam int AW = $clog2(NP);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rd_band = 1'b0, we_h1 = 1'b0, we_h2 = 1'b0, wr_band = 1'b0;  // band unused here
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  coef_t rd_d1, rd_s1, rd_d2, wr_d1 = '0, wr_s1 = '0, wr_d2 = '0;

  tmem #(.N(N)) dut (.clk, .rd_addr, .rd_d1, .rd_s1, .rd_d2, .we_h1, .we_h2, .wr_addr, .wr_d1, .wr_s1, .wr_d2);

  int checks = 0, failures = 0;
  coef_t sh_d1 [1][NP], sh_s1 [1][NP], sh_d2 [1][NP];

  task automatic check_word(int b, int a);
    rd_band = b[0];
    rd_addr = a[AW-1:0];
    #1;
    checks++;
    if (rd_d1 != sh_d1[b][a] || rd_s1 != sh_s1[b][a] || rd_d2 != sh_d2[b][a]) begin
      failures++;
      if (failures < 10) $display("buffer %0d word %0d: %0d %0d %0d", b, a, rd_d1, rd_s1, rd_d2);
    end
  endtask

  initial begin
    // fill everything once
    for (int b = 0; b < 1; b++)
      for (int a = 0; a < NP; a++) begin
        @(negedge clk);
        we_h1 = 1'b1; we_h2 = 1'b1; wr_band = b[0]; wr_addr = a[AW-1:0];
        wr_d1 = coef_t'($urandom); wr_s1 = coef_t'($urandom); wr_d2 = coef_t'($urandom);
        sh_d1[b][a] = wr_d1; sh_s1[b][a] = wr_s1; sh_d2[b][a] = wr_d2;
      end
    for (int i = 0; i < 400; i++) begin
      int b, a;
      @(negedge clk);
      b = 0; a = $urandom_range(0, NP - 1);
      we_h1 = 1'($urandom); we_h2 = 1'($urandom); wr_band = b[0]; wr_addr = a[AW-1:0];
      wr_d1 = coef_t'($urandom); wr_s1 = coef_t'($urandom); wr_d2 = coef_t'($urandom);
      check_word(b, a);   // same clock: old contents
      if (we_h1) begin sh_d1[b][a] = wr_d1; sh_s1[b][a] = wr_s1; end
      if (we_h2) sh_d2[b][a] = wr_d2;
    end
    @(negedge clk);
    we_h1 = 1'b0; we_h2 = 1'b0;
    for (int b = 0; b < 1; b++)
      for (int a = 0; a < NP; a++) check_word(b, a);
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
