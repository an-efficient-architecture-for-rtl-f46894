// tb_lift_pu: self-checking testbench of the generic predict/update module.
//
// Two instances (the P1 form, K = A with no shift, and the U1 form, K = B with a shift of
// 4) get random operands every clock; each result is compared, after the second clock edge, with
// the equation y = floor(K*self / 2^11) + floor((a+b) / 2^SH) wrapped to 17 bits.
module tb_lift_pu;
  import dwt_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  coef_t self_v, a_v, b_v, y_p1, y_u1;
  int checks = 0, failures = 0;

  lift_pu #(.K(K_A), .SH(0)) u_p1 (.clk(clk), .self_i(self_v), .a_i(a_v), .b_i(b_v), .y_o(y_p1));
  lift_pu #(.K(K_B), .SH(4)) u_u1 (.clk(clk), .self_i(self_v), .a_i(a_v), .b_i(b_v), .y_o(y_u1));

  function automatic longint ref_pu(longint s, longint a, longint b, longint k, int sh);
    longint v;
    v = ((s * k) >>> 11);
    v = (v <<< 47) >>> 47;
    v = v + ((a + b) >>> sh);
    return (v <<< 47) >>> 47;
  endfunction

  longint e_p1[$], e_u1[$];

  initial begin
    for (int i = 0; i < 2000; i++) begin
      self_v <= coef_t'($urandom);
      a_v    <= (i < 1000) ? coef_t'($urandom_range(0, 8000)) - 17'sd4000 : coef_t'($urandom);
      b_v    <= (i < 1000) ? coef_t'($urandom_range(0, 8000)) - 17'sd4000 : coef_t'($urandom);
      @(posedge clk);
      #1;
      e_p1.push_back(ref_pu(self_v, a_v, b_v, -1291, 0));
      e_u1.push_back(ref_pu(self_v, a_v, b_v, 1523, 4));
      if (e_p1.size() > 1) begin
        longint x1, x2;
        x1 = e_p1.pop_front();
        x2 = e_u1.pop_front();
        checks += 2;
        if (longint'(y_p1) != x1) begin failures++; if (failures < 10) $display("P1 got %0d exp %0d", y_p1, x1); end
        if (longint'(y_u1) != x2) begin failures++; if (failures < 10) $display("U1 got %0d exp %0d", y_u1, x2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
