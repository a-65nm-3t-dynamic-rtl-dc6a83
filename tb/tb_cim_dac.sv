// Testbench for cim_dac: with compensation the square-law cell current
// computed here from the DAC voltage must equal the weight code for all 16
// codes; the linear curve must hit its end points and be evenly spaced, and
// must give a current that is not proportional to the code.
module tb_cim_dac;
  int checks = 0, failures = 0;
  logic [3:0] code;
  logic       comp_en;
  int         vmem_mv;

  cim_dac dut (.code, .comp_en, .vmem_mv);

  function automatic int cur(int v);   // square law, 15 units at 1.0V
    return int'(real'((v - 450) * (v - 450)) * 15.0 / 302500.0);
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int nonlin = 0;
    for (int k = 0; k < 16; k++) begin
      code = 4'(k); comp_en = 1'b1; #1;
      check(vmem_mv >= 450 && vmem_mv <= 1000, $sformatf("range code %0d v %0d", k, vmem_mv));
      check(cur(vmem_mv) == k, $sformatf("compensated current code %0d v %0d I %0d", k, vmem_mv, cur(vmem_mv)));
      comp_en = 1'b0; #1;
      check(vmem_mv == 450 + k * 550 / 15, $sformatf("linear code %0d v %0d", k, vmem_mv));
      if (cur(vmem_mv) != k) nonlin++;
    end
    check(nonlin > 0, "linear curve should not linearise the current");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
