// Testbench for cim_macro.
// 1. Random weights are written (64 cycles); with every column converted and
//    precharged each cycle, the code must be floor(MAC / 512), saturated, and
//    the MAC sum(a * w) is computed here.
// 2. Merging on the bitline: column 0 holds code 15 in every row, and inputs
//    are chosen to draw 12, 56, 9, 12 and 33% of full swing (the published
//    example). Converting and precharging only when the comparator says the
//    drop is no longer below 27% must give Skip, Norm, Skip, Skip, Norm, and
//    the converted codes must reflect the merged drops 68% and 54%.
// 3. Overflow: a merged drop beyond full swing saturates at code 31 with ovf.
module tb_cim_macro;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0, mac_en = 0;
  logic [5:0] wrow = '0;
  logic [31:0][3:0] wcodes = '0;
  logic [63:0][3:0] act = '0;
  logic [63:0] row_en = '0;
  logic [31:0] below_th, adc_en = '0, precharge = '1, ovf;
  logic [31:0][4:0] code;
  int w [64][32];

  cim_macro dut (.clk, .rst_n, .dac_comp_en(1'b1), .we, .wrow, .wcodes, .mac_en, .vth_pct(7'd27), .act, .row_en,
                 .below_th, .adc_en, .precharge, .code, .ovf);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // activations that draw 'units' of charge from a column of code-15 cells
  task automatic set_units(int units);
    int left;
    left = units / 15;
    for (int r = 0; r < 64; r++) begin
      int a;
      a = left > 15 ? 15 : left;
      act[r] = 4'(a);
      left -= a;
      row_en[r] = a != 0;
    end
  endtask

  initial begin
    for (int r = 0; r < 64; r++)
      for (int c = 0; c < 32; c++) w[r][c] = (c == 0) ? 15 : $urandom_range(0, 15);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 64; r++) begin
      we = 1; wrow = 6'(r);
      for (int c = 0; c < 32; c++) wcodes[c] = 4'(w[r][c]);
      @(negedge clk);
    end
    we = 0;
    // 1. single-cycle MACs
    for (int i = 0; i < 30; i++) begin
      mac_en = 1; adc_en = '1; precharge = '1;
      for (int r = 0; r < 64; r++) begin
        act[r] = (i % 3 == 0) ? 4'($urandom_range(10, 15)) : 4'($urandom_range(0, 15));
        row_en[r] = act[r] != 0;
      end
      #1;
      for (int c = 0; c < 32; c++) begin
        int mac, e;
        mac = 0;
        for (int r = 0; r < 64; r++) mac += int'(act[r]) * w[r][c];
        e = mac / 512; if (e > 31) e = 31;
        check(int'(code[c]) == e, $sformatf("single MAC col %0d code %0d exp %0d", c, code[c], e));
        check(below_th[c] == (mac < 16384 * 27 / 100), $sformatf("comparator col %0d", c));
      end
      @(negedge clk);
    end
    // 2. the published five-cycle example on column 0
    begin
      int pct[5] = '{12, 56, 9, 12, 33};
      bit norm[5] = '{0, 1, 0, 0, 1};
      int acc = 0;
      for (int k = 0; k < 5; k++) begin
        int u;
        u = (16384 * pct[k] / 100) / 15 * 15;
        set_units(u);
        acc += u;
        #1;
        check(below_th[0] == !norm[k], $sformatf("example cycle %0d comparator %0d", k + 1, below_th[0]));
        adc_en = {32{!below_th[0]}}; precharge = {32{!below_th[0]}};
        #1;
        if (norm[k]) begin
          check(int'(code[0]) == acc / 512, $sformatf("example cycle %0d code %0d exp %0d", k + 1, code[0], acc / 512));
          acc = 0;
        end
        @(negedge clk);
      end
    end
    // 3. overflow: keep 20% on the bitline, then add 90%
    adc_en = '0; precharge = '0;
    set_units(16384 * 20 / 100); @(negedge clk);
    set_units(16384 * 90 / 100); adc_en = '1; precharge = '1; #1;
    check(code[0] == 5'd31 && ovf[0], $sformatf("overflow code %0d ovf %0d", code[0], ovf[0]));
    @(negedge clk);
    mac_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
