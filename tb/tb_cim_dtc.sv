// Testbench for cim_dtc: every activation with the row enabled and disabled;
// the pulse must be 50ps per LSB and absent for a disabled or zero row.
module tb_cim_dtc;
  int checks = 0, failures = 0;
  logic [3:0] act;
  logic       en;
  int         pulse_ps;
  logic       fired;

  cim_dtc dut (.act, .en, .pulse_ps, .fired);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int k = 0; k < 16; k++) begin
        act = 4'(k); en = e[0]; #1;
        checks++;
        if (pulse_ps != (e ? k * 50 : 0) || fired != (e == 1 && k != 0)) begin
          failures++;
          $display("FAIL act %0d en %0d pulse %0d fired %0d", k, e, pulse_ps, fired);
        end
      end
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
