// Testbench for adc_skip_ctrl. First the run of five cycles from the
// published skip example: single-cycle bitline drops of 12, 56, 9, 12 and
// 33% of full swing with a 27% threshold must give Skip, Norm, Skip, Skip,
// Norm (accumulated drops 12, 68, 9, 21, 54). Then random inputs against the
// rule: convert when not terminated and (last, skipping off, or drop at or
// above threshold); precharge after a conversion, a termination or the last
// cycle.
module tb_adc_skip_ctrl;
  int checks = 0, failures = 0;
  logic        valid, last, skip_en;
  logic [31:0] below_th, term, adc_en, precharge;
  logic [5:0]  n_skip;

  adc_skip_ctrl #(.COLS(32)) dut (.valid, .last, .skip_en, .below_th, .term, .adc_en, .precharge, .n_skip);

  initial begin
    int drops[5] = '{12, 56, 9, 12, 33};
    bit exp_conv[5] = '{0, 1, 0, 0, 1};
    int acc = 0;
    valid = 1; last = 0; skip_en = 1; term = '0;
    for (int k = 0; k < 5; k++) begin
      acc += drops[k];
      below_th = {32{acc < 27}};
      #1;
      checks++;
      if (adc_en[0] != exp_conv[k] || precharge[0] != exp_conv[k]) begin
        failures++;
        $display("FAIL example cycle %0d acc %0d adc_en %0d", k + 1, acc, adc_en[0]);
      end
      if (precharge[0]) acc = 0;
    end
    for (int i = 0; i < 2000; i++) begin
      int ns;
      ns = 0;
      valid = 1'($urandom); last = 1'($urandom_range(0, 3) == 0); skip_en = 1'($urandom);
      below_th = $urandom; term = $urandom & $urandom;
      #1;
      for (int c = 0; c < 32; c++) begin
        bit e, p;
        e = valid && !term[c] && (last || !skip_en || !below_th[c]);
        p = e || term[c] || (valid && last);
        if (valid && !term[c] && !e) ns++;
        checks++;
        if (adc_en[c] != e || precharge[c] != p) begin
          failures++;
          $display("FAIL col %0d adc_en %0d/%0d pre %0d/%0d", c, adc_en[c], e, precharge[c], p);
        end
      end
      checks++;
      if (int'(n_skip) != ns) begin failures++; $display("FAIL n_skip %0d/%0d", n_skip, ns); end
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
