// Testbench for daram_array. All 64 rows are written with random weights
// through compensated voltages (computed here as 450mV + sqrt(w * 302500/15)),
// one row per cycle, and random activation pulses must draw exactly
// sum(w * a) from every column. Then the array is left alone past its
// retention time (shortened to 1000 cycles): a column of code-15 cells must
// read lower, and a rewrite (refresh) must restore the exact value.
module tb_daram_array;
  localparam int RET = 1000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] wrow = '0;
  int vwr_mv [32];
  int pulse_ps [64];
  int col_charge [32];
  int w [64][32];

  daram_array #(.RETENTION_CYCLES(RET)) dut (.clk, .rst_n, .we, .wrow, .vwr_mv, .pulse_ps, .col_charge);

  always #5 clk = ~clk;

  function automatic int v_of(int code);
    return 450 + int'($sqrt(real'(code) * 302500.0 / 15.0));
  endfunction

  task automatic write_row(int r);
    @(negedge clk);
    we = 1; wrow = 6'(r);
    for (int c = 0; c < 32; c++) vwr_mv[c] = v_of(w[r][c]);
    @(negedge clk);
    we = 0;
  endtask

  task automatic check_mac(string tag);
    int a [64];
    for (int r = 0; r < 64; r++) begin
      a[r] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 15);
      pulse_ps[r] = a[r] * 50;
    end
    #1;
    for (int c = 0; c < 32; c++) begin
      int e;
      e = 0;
      for (int r = 0; r < 64; r++) e += a[r] * w[r][c];
      checks++;
      if (col_charge[c] != e) begin failures++; $display("FAIL %s col %0d got %0d exp %0d", tag, c, col_charge[c], e); end
    end
  endtask

  initial begin
    for (int r = 0; r < 64; r++) begin
      pulse_ps[r] = 0;
      for (int c = 0; c < 32; c++) w[r][c] = (c == 0) ? 15 : $urandom_range(0, 15);
    end
    for (int c = 0; c < 32; c++) vwr_mv[c] = 450;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 64; r++) write_row(r);
    for (int i = 0; i < 20; i++) check_mac("fresh");
    // let the cells leak past the retention time
    repeat (RET + 100) @(negedge clk);
    for (int r = 0; r < 64; r++) pulse_ps[r] = (r == 5) ? 50 : 0;
    #1;
    checks++;
    if (col_charge[0] >= 15) begin failures++; $display("FAIL no drift after retention time: %0d", col_charge[0]); end
    write_row(5);
    for (int r = 0; r < 64; r++) pulse_ps[r] = (r == 5) ? 50 : 0;
    #1;
    checks++;
    if (col_charge[0] != 15) begin failures++; $display("FAIL refresh did not restore: %0d", col_charge[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
