// Testbench for data_sequencer with a refresh interval of 100 cycles.
// Checks: the weight write issues rows 0..63 from wbase, one per cycle, and
// the macro write follows each read by one cycle; activation addresses run
// consecutively from abase, one per MAC cycle; each accumulation ends with a
// last tag after n_cycles; a refresh (64 more weight writes) happens between
// accumulations once 100 cycles have passed; an all-terminated report drops
// the rest of an accumulation with one flush slot; done comes after the last
// result, and the total cycle count is 64 + (writes of refreshes) +
// (MAC and flush slots) + 2 of drain.
module tb_data_sequencer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, mode8 = 0, all_term = 0;
  logic [9:0] wbase = 10'd100, abase = 10'd7;
  logic [15:0] n_cycles = 16'd12, n_groups = 16'd20;
  logic out_valid = 0;
  logic busy, done, w_en, m_we, a_en, s1_valid, s1_mac, s1_last, s1_hi;
  logic [9:0] w_addr, a_addr;
  logic [5:0] m_wrow;
  logic [15:0] s1_t, n_refresh, n_flush;

  data_sequencer #(.REFRESH_INTERVAL(100)) dut (
    .clk, .rst_n, .start, .mode8, .wbase, .abase, .n_cycles, .n_groups, .all_term, .out_valid,
    .busy, .done, .w_en, .w_addr, .m_we, .m_wrow, .a_en, .a_addr, .s1_valid, .s1_mac, .s1_last,
    .s1_hi, .s1_t, .n_refresh, .n_flush);

  always #5 clk = ~clk;

  // stand-in for post-processing: result one cycle after the last slot
  always_ff @(posedge clk) out_valid <= s1_valid && s1_last;

  int cyc = 0, n_w = 0, n_we = 0, n_mac = 0, n_last = 0, n_fl = 0, exp_addr;
  int last_w_addr = -1, t_in_grp = 0;
  bit prev_w_en = 0;
  logic [5:0] prev_row;
  bit flushed = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (w_en) begin
      checks++;
      if (int'(w_addr) != 100 + (n_w % 64)) begin failures++; $display("FAIL w_addr %0d at write %0d", w_addr, n_w); end
      n_w++;
    end
    if (m_we) begin
      checks++;
      if (!prev_w_en || m_wrow != prev_row) begin failures++; $display("FAIL macro write not aligned"); end
      n_we++;
    end
    prev_w_en = w_en; prev_row = 6'(w_addr - 10'd100);
    if (s1_valid && s1_mac) begin n_mac++; t_in_grp++; end
    if (s1_valid && s1_last) begin
      n_last++;
      if (!s1_mac) begin n_fl++; exp_addr += 12 - t_in_grp; end
      checks++;
      if (s1_mac && t_in_grp != 12) begin failures++; $display("FAIL group length %0d", t_in_grp); end
      t_in_grp = 0;
    end
    if (a_en) begin
      checks++;
      if (int'(a_addr) != exp_addr) begin failures++; $display("FAIL a_addr %0d exp %0d", a_addr, exp_addr); end
      exp_addr++;
    end
  end

  initial begin
    int t0;
    exp_addr = 7;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; t0 = cyc; @(negedge clk); start = 0;
    // terminate every output in the middle of group 5
    wait (n_last == 5 && t_in_grp == 9);
    @(negedge clk);
    all_term = 1;
    @(negedge clk);
    all_term = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (n_last != 20) begin failures++; $display("FAIL groups %0d", n_last); end
    checks++;
    if (n_fl != 1 || n_flush != 1) begin failures++; $display("FAIL flushes %0d/%0d", n_fl, n_flush); end
    checks++;
    if (n_refresh == 0 || n_w != 64 * (1 + int'(n_refresh)) || n_we != n_w) begin
      failures++; $display("FAIL refresh %0d writes %0d/%0d", n_refresh, n_w, n_we);
    end
    checks++;
    if (cyc - t0 != 1 + n_w + n_mac + n_fl + 2) begin
      failures++; $display("FAIL cycles %0d exp %0d", cyc - t0, 1 + n_w + n_mac + n_fl + 2);
    end
    $display("refreshes %0d, MAC cycles %0d, cycles %0d", n_refresh, n_mac, cyc - t0);
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
