// Testbench for post_proc. Random accumulations in 4b and 8b mode: random
// ADC codes and conversion enables for the four macros, random activation
// sums, weight shifts, calibration offsets, ReLU on or off and random
// terminations. A reference kept here sums code * 512 (8b: high column x16,
// high-nibble cycle x16), adds (shift - 8) or (shift - 128) times the
// activation sums and the calibration, and applies termination and ReLU.
// The running value est_o is compared every cycle, the results once per
// accumulation, one cycle after the last input.
module tb_post_proc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, mode8 = 0, relu_en = 0;
  logic s1_valid = 0, s1_last = 0, s1_hi = 0;
  logic [3:0][31:0][4:0] code = '0;
  logic [3:0][31:0]      adc_en = '0;
  logic [3:0][9:0]       act_sum = '0;
  logic [3:0][31:0][7:0] shift = '0;
  logic signed [31:0][15:0] cal = '0;
  logic [31:0]           term_now = '0;
  logic signed [31:0][39:0] est_o, result;
  logic [31:0] terminated_o, live_o;
  logic all_term_o, out_valid;

  post_proc dut (.clk, .rst_n, .mode8, .relu_en, .s1_valid, .s1_last, .s1_hi, .code, .adc_en,
                 .act_sum, .shift, .cal, .term_now, .est_o, .terminated_o, .live_o, .all_term_o,
                 .out_valid, .result);

  always #5 clk = ~clk;

  longint acc [32];
  longint sa [4];
  bit     term [32];

  function automatic longint value(int j, bit m8);
    longint v;
    v = acc[j] + longint'($signed(cal[j]));
    for (int m = 0; m < 4; m++)
      v += (m8 ? longint'(shift[m][2*j]) - 128 : longint'(shift[m][j]) - 8) * sa[m];
    return v;
  endfunction

  task automatic run(bit m8, int T, bit relu);
    int nout;
    nout = m8 ? 16 : 32;
    @(negedge clk);
    mode8 = m8; relu_en = relu;
    for (int j = 0; j < 32; j++) begin acc[j] = 0; term[j] = 0; cal[j] = 16'($urandom_range(0, 400) - 200); end
    for (int m = 0; m < 4; m++) begin
      sa[m] = 0;
      for (int c = 0; c < 32; c++) shift[m][c] = m8 ? 8'($urandom_range(0, 40)) : 8'($urandom_range(0, 8));
    end
    for (int t = 0; t < T; t++) begin
      bit hi;
      hi = m8 && (t % 2 == 0);
      s1_valid = 1; s1_last = (t == T - 1); s1_hi = hi;
      for (int m = 0; m < 4; m++) begin
        act_sum[m] = 10'($urandom_range(0, 960));
        for (int c = 0; c < 32; c++) begin
          code[m][c] = 5'($urandom_range(0, 31));
          adc_en[m][c] = 1'($urandom_range(0, 2) != 0);
        end
      end
      term_now = '0;
      if (t > T / 2) for (int j = 0; j < 32; j++) term_now[j] = ($urandom_range(0, 40) == 0);
      #1;
      for (int j = 0; j < nout; j++) begin
        checks++;
        if (est_o[j] != 40'(value(j, m8))) begin failures++; $display("FAIL est j %0d t %0d", j, t); end
      end
      // reference update
      for (int m = 0; m < 4; m++) sa[m] += longint'(act_sum[m]) << (hi ? 4 : 0);
      for (int j = 0; j < nout; j++) begin
        longint add;
        add = 0;
        for (int m = 0; m < 4; m++)
          if (!m8) add += adc_en[m][j] ? longint'(code[m][j]) : 0;
          else     add += (adc_en[m][2*j] ? longint'(code[m][2*j]) << 4 : 0) + (adc_en[m][2*j+1] ? longint'(code[m][2*j+1]) : 0);
        acc[j] += (add << 9) << (hi ? 4 : 0);
        if (term_now[j]) term[j] = 1;
      end
      @(negedge clk);
    end
    s1_valid = 0; s1_last = 0; term_now = '0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL no out_valid"); end
    for (int j = 0; j < 32; j++) begin
      longint e;
      e = (j >= nout || term[j]) ? 0 : value(j, m8);
      if (relu && e < 0) e = 0;
      checks++;
      if (result[j] != 40'(e)) begin failures++; $display("FAIL result j %0d got %0d exp %0d", j, result[j], e); end
    end
    for (int j = 0; j < 32; j++) acc[j] = 0;
    for (int m = 0; m < 4; m++) sa[m] = 0;
    for (int j = 0; j < nout; j++) begin
      checks++;
      if (est_o[j] != 40'(value(j, m8))) begin failures++; $display("FAIL state not cleared j %0d", j); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) run(1'b0, 10 + k, k[0]);
    for (int k = 0; k < 6; k++) run(1'b1, 8 + 2 * k, k[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
