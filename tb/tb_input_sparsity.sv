// Testbench for input_sparsity: random activation vectors with many zeros;
// row enables, zero count and activation sum are checked against sums
// computed here.
module tb_input_sparsity;
  int checks = 0, failures = 0;
  logic [63:0][3:0] act;
  logic [63:0]      row_en;
  logic [6:0]       n_zero;
  logic [9:0]       act_sum;

  input_sparsity dut (.act, .row_en, .n_zero, .act_sum);

  initial begin
    for (int i = 0; i < 300; i++) begin
      int nz, s;
      nz = 0; s = 0;
      for (int r = 0; r < 64; r++) begin
        act[r] = ($urandom_range(0, 99) < 40) ? 4'd0 : 4'($urandom_range(1, 15));
        if (i == 1) act[r] = 4'd15;
        if (i == 2) act[r] = 4'd0;
      end
      #1;
      for (int r = 0; r < 64; r++) begin
        if (act[r] == 0) nz++;
        s += int'(act[r]);
        checks++;
        if (row_en[r] != (act[r] != 0)) begin failures++; $display("FAIL row_en %0d", r); end
      end
      checks++;
      if (int'(n_zero) != nz || int'(act_sum) != s) begin
        failures++;
        $display("FAIL n_zero %0d/%0d sum %0d/%0d", n_zero, nz, act_sum, s);
      end
    end
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
