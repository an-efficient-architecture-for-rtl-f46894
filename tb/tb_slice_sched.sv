// tb_slice_sched: self-checking testbench of the slice scheduler.
//
// Every combination of the inputs is applied and the control word compared with the
// schedule written out case by case: position 0 closes the previous sequence, position 1
// opens the current one and flushes the previous one, later positions run the current
// sequence alone.
module tb_slice_sched;
  import dwt_pkg::*;

  logic pos_is0, pos_is1, pos_is2, prev_exists, cur_exists, prev_n_is2;
  slice_ctl_t ctl;

  slice_sched dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int v = 0; v < 64; v++) begin
      slice_ctl_t e;
      {pos_is0, pos_is1, pos_is2, prev_exists, cur_exists, prev_n_is2} = 6'(v);
      // at most one position flag is meaningful; position 0 wins over 1, 1 over 2
      #1;
      e = '0;
      case (1'b1)
        pos_is0: e = '{h1_valid: prev_exists, p1_last: 1'b1, u1_first: 1'b0,
                       h2_valid: prev_exists, p2_flush: 1'b0, u2_second: prev_n_is2};
        pos_is1: e = '{h1_valid: cur_exists, p1_last: 1'b0, u1_first: 1'b1,
                       h2_valid: prev_exists, p2_flush: 1'b1, u2_second: 1'b0};
        default: e = '{h1_valid: cur_exists, p1_last: 1'b0, u1_first: 1'b0,
                       h2_valid: cur_exists, p2_flush: 1'b0, u2_second: pos_is2};
      endcase
      checks++;
      if (ctl != e) begin
        failures++;
        $display("inputs %06b: got %06b expected %06b", v[5:0], ctl, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
