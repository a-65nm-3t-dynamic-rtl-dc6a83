// Testbench for relu_term: termination only after 70% of the cycles, only
// below the threshold, only for live outputs not yet terminated.
module tb_relu_term;
  int checks = 0, failures = 0;
  logic                      en, valid;
  logic signed [31:0][39:0]  est;
  logic [31:0]               live, done, term_now;
  logic signed [39:0]        thresh;
  logic [15:0]               t, n_cycles;

  relu_term dut (.en, .valid, .est, .live, .done, .thresh, .t, .n_cycles, .term_now);

  initial begin
    // edge of the 70% window: 10 cycles, t = 7 is not past 70%, t = 8 is
    en = 1; valid = 1; live = '1; done = '0; thresh = -40'sd100; n_cycles = 16'd10;
    for (int j = 0; j < 32; j++) est[j] = -40'sd200;
    t = 16'd7; #1; checks++; if (term_now != '0) begin failures++; $display("FAIL terminated at 70%%"); end
    t = 16'd8; #1; checks++; if (term_now != '1) begin failures++; $display("FAIL not terminated at 80%%"); end
    est[3] = -40'sd100; #1; checks++; if (term_now[3]) begin failures++; $display("FAIL equal to threshold"); end
    for (int i = 0; i < 3000; i++) begin
      en = 1'($urandom_range(0, 7) != 0); valid = 1'($urandom_range(0, 7) != 0);
      live = $urandom | $urandom; done = $urandom & $urandom & $urandom;
      thresh = -40'(signed'($urandom_range(0, 5000)));
      n_cycles = 16'($urandom_range(1, 300)); t = 16'($urandom_range(0, 300));
      for (int j = 0; j < 32; j++) est[j] = 40'(signed'($urandom_range(0, 20000)) - 10000);
      #1;
      for (int j = 0; j < 32; j++) begin
        bit e;
        e = en && valid && (int'(t) * 10 > int'(n_cycles) * 7) && live[j] && !done[j] && ($signed(est[j]) < thresh);
        checks++;
        if (term_now[j] != e) begin failures++; $display("FAIL i %0d j %0d", i, j); end
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
