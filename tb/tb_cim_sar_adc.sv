// Testbench for cim_sar_adc: random and edge drops; the code must be the
// drop divided by the 512-unit LSB, saturated at 31, with overflow from
// full swing (16384 units) on.
module tb_cim_sar_adc;
  int checks = 0, failures = 0;
  int         drop;
  logic [4:0] code;
  logic       ovf;

  cim_sar_adc dut (.drop, .code, .ovf);

  task automatic try(int d);
    int exp_code;
    drop = d; #1;
    exp_code = d / 512;
    if (exp_code > 31) exp_code = 31;
    checks++;
    if (int'(code) != exp_code || ovf != (d >= 16384)) begin
      failures++;
      $display("FAIL drop %0d code %0d ovf %0d", d, code, ovf);
    end
  endtask

  initial begin
    try(0); try(511); try(512); try(16383); try(16384); try(20000);
    for (int i = 0; i < 500; i++) try(int'($urandom_range(0, 18000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
