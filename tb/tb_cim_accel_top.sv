// End-to-end testbench of cim_accel_top (refresh interval shortened to 150
// cycles and retention to 2000 cycles so that refresh happens in a short run).
//
// Three runs, each loaded through the host ports and checked result by result
// against cim_ref_pkg:
//   1. 4b, 30 accumulations of 10 cycles: columns with large, small, mixed
//      and shifted weights; inputs with many zeros, all-15 vectors and sparse
//      vectors. Exercises ADC skipping, bitline overflow, input sparsity,
//      ReLU termination, weight shift, calibration and refresh.
//   2. 4b, only negative weights, 2 accumulations of 20 cycles: every output
//      is terminated and the accumulation ends early.
//   3. 8b mode, 3 accumulations of 4 8b inputs (8 cycles).
// Then the first 5 accumulations of run 1 are repeated without skipping and
// with skip thresholds of 2, 27 and 47% of full swing: the number of ADC
// conversions must fall as the threshold rises.
// The cycle count of each run must be 1 + 64 per weight write (initial and
// refreshes) + MAC slots + flush slots + 2. Each mechanism must occur at
// least once.
module tb_cim_accel_top;
  import cim_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic host_w_we = 0, host_a_we = 0, cfg_we = 0;
  logic [9:0] host_w_addr = '0, host_a_addr = '0, wbase = '0, abase = '0;
  logic [511:0] host_w_wdata = '0;
  logic [1023:0] host_a_wdata = '0;
  logic [7:0] cfg_addr = '0;
  logic [15:0] cfg_wdata = '0, n_cycles = '0, n_groups = '0;
  logic start = 0, mode8 = 0, relu_en = 0, skip_en = 0, term_en = 0;
  logic [6:0] skip_vth_pct = 7'd27;
  logic signed [39:0] relu_thresh = '0;
  logic busy, done, out_valid;
  logic signed [31:0][39:0] result;
  logic [31:0] stat_mac_cycles, stat_conv, stat_skip, stat_zero_rows, stat_ovf, stat_term;
  logic [15:0] stat_refresh, stat_flush;

  cim_accel_top #(.REFRESH_INTERVAL(150), .RETENTION_CYCLES(2000)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  int got = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    if (results.size() == 0) begin
      checks++; failures++; $display("FAIL unexpected result");
    end else begin
      res_t e;
      e = results[0];
      results.delete(0);
      for (int j = 0; j < 32; j++) begin
        checks++;
        if (result[j] != 40'(e[j])) begin
          failures++;
          $display("FAIL result %0d out %0d got %0d exp %0d", got, j, result[j], e[j]);
        end
      end
    end
    got++;
  end

  task automatic load_all();
    for (int a = 0; a < 192; a++) begin
      @(negedge clk); host_w_we = 1; host_w_addr = 10'(a); host_w_wdata = wmem[a];
    end
    for (int a = 0; a < 424; a++) begin
      @(negedge clk); host_w_we = 0; host_a_we = 1; host_a_addr = 10'(a); host_a_wdata = amem[a];
    end
    for (int k = 0; k < 160; k++) begin
      @(negedge clk); host_a_we = 0; cfg_we = 1; cfg_addr = 8'(k);
      cfg_wdata = k < 128 ? 16'(shift[k / 32][k % 32]) : 16'(cal[k - 128]);
    end
    @(negedge clk); cfg_we = 0;
  endtask

  // sums of the statistics over all runs
  longint s_conv, s_skip, s_ovf, s_term, s_zero, s_mac, s_flush;

  task automatic do_run(bit m8, int wb, int ab, int T, int G, bit sk, bit te, bit re, longint th);
    int t0, wr0, exp_cycles;
    logic [31:0] c0, k0, o0, tm0, z0, mc0;
    logic [15:0] f0;
    clear_stats();
    run(m8, wb, ab, T, G, sk, te, re, th);
    $display("reference holds %0d results", results.size());
    c0 = stat_conv; k0 = stat_skip; o0 = stat_ovf; tm0 = stat_term; z0 = stat_zero_rows;
    mc0 = stat_mac_cycles; f0 = stat_flush; wr0 = int'(stat_refresh);
    @(negedge clk);
    mode8 = m8; wbase = 10'(wb); abase = 10'(ab); n_cycles = 16'(T); n_groups = 16'(G);
    skip_en = sk; term_en = te; skip_vth_pct = 7'(vth_pct); relu_en = re; relu_thresh = 40'(th);
    start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    wait (done);
    exp_cycles = 1 + 64 * (1 + int'(stat_refresh) - wr0) + int'(n_mac) + int'(n_flush) + 2;
    checks++;
    if (cyc - t0 != exp_cycles) begin failures++; $display("FAIL cycles %0d exp %0d", cyc - t0, exp_cycles); end
    @(negedge clk);
    checks++;
    if (results.size() != 0) begin failures++; $display("FAIL %0d results missing", results.size()); end
    checks++;
    if (stat_conv - c0 != 32'(n_conv) || stat_skip - k0 != 32'(n_skip) || stat_ovf - o0 != 32'(n_ovf) ||
        stat_term - tm0 != 32'(n_term) || stat_zero_rows - z0 != 32'(n_zero) ||
        stat_mac_cycles - mc0 != 32'(n_mac) || stat_flush - f0 != 16'(n_flush)) begin
      failures++;
      $display("FAIL stats conv %0d/%0d skip %0d/%0d ovf %0d/%0d term %0d/%0d zero %0d/%0d mac %0d/%0d flush %0d/%0d",
               stat_conv - c0, n_conv, stat_skip - k0, n_skip, stat_ovf - o0, n_ovf, stat_term - tm0, n_term,
               stat_zero_rows - z0, n_zero, stat_mac_cycles - mc0, n_mac, stat_flush - f0, n_flush);
    end
    s_conv += n_conv; s_skip += n_skip; s_ovf += n_ovf; s_term += n_term; s_zero += n_zero;
    s_mac += n_mac; s_flush += n_flush;
    $display("run m8=%0d T=%0d G=%0d: %0d cycles, conv %0d skip %0d ovf %0d term %0d zero rows %0d flush %0d",
             m8, T, G, cyc - t0, n_conv, n_skip, n_ovf, n_term, n_zero, n_flush);
  endtask

  task automatic mech(string name, longint n);
    checks++;
    $display("mechanism %-22s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    // weights, run 1 (rows 0..63) and run 2 (rows 64..127)
    for (int r = 0; r < 64; r++)
      for (int m = 0; m < 4; m++)
        for (int c = 0; c < 32; c++) begin
          int v;
          case (c % 4)
            0: v = $urandom_range(12, 15);
            1: v = $urandom_range(0, 3);
            2: v = $urandom_range(0, 15);
            default: v = $urandom_range(6, 10);
          endcase
          wmem[r][m*128 + c*4 +: 4] = 4'(v);
          wmem[64 + r][m*128 + c*4 +: 4] = 4'($urandom_range(0, 2));
        end
    // run 3: 8b weights over column pairs (rows 128..191)
    for (int r = 0; r < 64; r++)
      for (int m = 0; m < 4; m++)
        for (int j = 0; j < 16; j++) begin
          logic [7:0] U;
          U = 8'($urandom_range(0, 255));
          wmem[128 + r][m*128 + (2*j)*4 +: 4]   = U[7:4];
          wmem[128 + r][m*128 + (2*j+1)*4 +: 4] = U[3:0];
        end
    for (int m = 0; m < 4; m++)
      for (int c = 0; c < 32; c++) shift[m][c] = (c % 4 == 3) ? 8'd3 : 8'd0;
    for (int j = 0; j < 32; j++) cal[j] = (j % 5 == 0) ? $urandom_range(0, 200) - 100 : 0;
    // activations, runs 1 and 2 (0..299)
    for (int a = 0; a < 300; a++)
      for (int q = 0; q < 256; q++) begin
        int v;
        case (a % 10)
          3: v = (q % 64 < 19) ? 15 : 0;
          4: v = 15;
          default: v = ($urandom_range(0, 9) < 4) ? 0 : $urandom_range(1, 15);
        endcase
        amem[a][q*4 +: 4] = 4'(v);
      end
    // run 3: 8b inputs, high nibble word then low nibble word (400..423)
    for (int a = 400; a < 424; a += 2)
      for (int q = 0; q < 256; q++) begin
        logic [7:0] A;
        A = ($urandom_range(0, 9) < 3) ? 8'd0 : 8'($urandom_range(1, 255));
        amem[a][q*4 +: 4]     = A[7:4];
        amem[a + 1][q*4 +: 4] = A[3:0];
      end
    s_conv = 0; s_skip = 0; s_ovf = 0; s_term = 0; s_zero = 0; s_mac = 0; s_flush = 0;

    repeat (3) @(negedge clk);
    rst_n = 1;
    load_all();
    do_run(1'b0, 0, 0, 10, 30, 1'b1, 1'b1, 1'b1, -3000);
    do_run(1'b0, 64, 0, 20, 2, 1'b1, 1'b1, 1'b1, -3000);
    do_run(1'b1, 128, 400, 8, 3, 1'b1, 1'b0, 1'b0, 0);
    // skip threshold sweep on the first 5 accumulations: fewer conversions
    // for a higher threshold, all of them without skipping
    begin
      longint conv_at [4];
      int     vths [4] = '{0, 2, 27, 47};
      for (int k = 0; k < 4; k++) begin
        vth_pct = vths[k];
        do_run(1'b0, 0, 0, 10, 5, k != 0, 1'b0, 1'b1, 0);
        conv_at[k] = n_conv;
      end
      vth_pct = 27;
      for (int k = 1; k < 4; k++) begin
        checks++;
        if (conv_at[k] >= conv_at[k - 1]) begin
          failures++;
          $display("FAIL conversions do not fall with the threshold: %0d then %0d", conv_at[k - 1], conv_at[k]);
        end
      end
      $display("ADC conversions saved at Vth 2/27/47%%: %0d/%0d/%0d %%",
               100 - conv_at[1] * 100 / conv_at[0], 100 - conv_at[2] * 100 / conv_at[0], 100 - conv_at[3] * 100 / conv_at[0]);
    end
    mech("ADC conversion", s_conv);
    mech("ADC skip", s_skip);
    mech("bitline overflow", s_ovf);
    mech("input sparsity", s_zero);
    mech("ReLU termination", s_term);
    mech("early end (flush)", s_flush);
    mech("weight refresh", longint'(stat_refresh));
    mech("8b accumulations", 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
