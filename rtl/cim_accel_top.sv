// DARAM computing-in-memory CNN accelerator: top level.
//
// Four 64x32 CIM macros compute, in every clock cycle, 4 x 32 dot products
// of 64 4b activations with 64 stored 4b weights; the column sums of the
// four macros belong to the same 32 outputs and are added in the ASIC core
// (inter-macro accumulation), so one cycle is a 256-input x 32-output MAC.
// An output accumulates over n_cycles cycles, each with a new input vector
// and the same stationary weights. Around the macros:
//   - weight SRAM (64KB) and activation SRAM (96KB), loaded by the host
//     while the accelerator is idle;
//   - data sequencer: weight write (64 cycles), input streaming, refresh
//     of the analog weights, early end of an accumulation;
//   - input sparsity: zero activations give no DTC pulse;
//   - MAC-based ADC skipping: a column converts only when its accumulated
//     bitline drop reaches skip_vth_pct percent of full swing (27% is the
//     published setting) or at the last cycle;
//   - ReLU-based termination: after 70% of the cycles, outputs below a
//     negative threshold stop converting and give 0;
//   - post-processing: offset restore for the unsigned weight format and
//     the per-column weight shift, 8b combination, calibration, ReLU.
//
// Host interface: host_w_* and host_a_* write the SRAMs (word layouts:
// weight word bit m*128 + c*4 holds row r of macro m, column c; activation
// word bit m*256 + r*4 holds row r of macro m), cfg_* writes the weight
// shift of macro m, column c at address m*32 + c and the signed calibration
// offset of output j at address 128 + j. A start pulse runs n_groups
// accumulations; each result vector appears with out_valid, done follows the
// last one. In 8b mode (mode8) outputs 0..15 are used, weights are 8b over
// column pairs and inputs take two cycles (n_cycles counts cycles, so it
// must be even). The stat_* counters count, since reset, the events of each
// mechanism. Block structure, sizes and mechanisms follow the published
// accelerator; the host interface, word layouts and result port are this
// design's choices.
module cim_accel_top
  import cim_pkg::*;
#(
  parameter int WDEPTH           = 1024,
  parameter int ADEPTH           = 768,
  parameter int REFRESH_INTERVAL = 5500,
  parameter int RETENTION_CYCLES = 41000
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // host access to the SRAMs (only while idle)
  input  logic                              host_w_we,
  input  logic [$clog2(WDEPTH)-1:0]         host_w_addr,
  input  logic [N_MACRO*COLS*WGT_W-1:0]     host_w_wdata,
  input  logic                              host_a_we,
  input  logic [$clog2(ADEPTH)-1:0]         host_a_addr,
  input  logic [N_MACRO*ROWS*ACT_W-1:0]     host_a_wdata,
  // configuration registers
  input  logic                              cfg_we,
  input  logic [7:0]                        cfg_addr,
  input  logic [15:0]                       cfg_wdata,
  // run control
  input  logic                              start,
  input  logic                              mode8,
  input  logic                              relu_en,
  input  logic                              skip_en,
  input  logic [6:0]                        skip_vth_pct,
  input  logic                              term_en,
  input  logic signed [ACC_W-1:0]           relu_thresh,
  input  logic [$clog2(WDEPTH)-1:0]         wbase,
  input  logic [$clog2(ADEPTH)-1:0]         abase,
  input  logic [CNT_W-1:0]                  n_cycles,
  input  logic [CNT_W-1:0]                  n_groups,
  output logic                              busy,
  output logic                              done,
  output logic                              out_valid,
  output logic signed [COLS-1:0][ACC_W-1:0] result,
  // statistics
  output logic [31:0]                       stat_mac_cycles,
  output logic [31:0]                       stat_conv,
  output logic [31:0]                       stat_skip,
  output logic [31:0]                       stat_zero_rows,
  output logic [31:0]                       stat_ovf,
  output logic [31:0]                       stat_term,
  output logic [15:0]                       stat_refresh,
  output logic [15:0]                       stat_flush
);
  localparam int WA = $clog2(WDEPTH);
  localparam int AA = $clog2(ADEPTH);
  localparam int ASUM_W = $clog2(ROWS * 15 + 1);

  // ---------------- configuration registers (weight data buffer) ----------
  logic [N_MACRO-1:0][COLS-1:0][7:0] shift;
  logic signed [COLS-1:0][15:0]      cal;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift <= '0;
      cal   <= '0;
    end else if (cfg_we) begin
      if (cfg_addr < 8'(N_MACRO * COLS))
        shift[cfg_addr[6:5]][cfg_addr[4:0]] <= cfg_wdata[7:0];
      else if (cfg_addr < 8'(N_MACRO * COLS + COLS))
        cal[cfg_addr[4:0]] <= cfg_wdata;
    end
  end

  // ---------------- sequencer ----------------------------------------------
  logic                    all_term, pp_out_valid;
  logic                    w_en, m_we, a_en;
  logic [WA-1:0]           w_addr;
  logic [AA-1:0]           a_addr;
  logic [$clog2(ROWS)-1:0] m_wrow;
  logic                    s1_valid, s1_mac, s1_last, s1_hi;
  logic [CNT_W-1:0]        s1_t;

  data_sequencer #(
    .WADDR_W(WA), .AADDR_W(AA), .REFRESH_INTERVAL(REFRESH_INTERVAL)
  ) u_seq (
    .clk, .rst_n, .start, .mode8, .wbase, .abase, .n_cycles, .n_groups,
    .all_term, .out_valid(pp_out_valid), .busy, .done,
    .w_en, .w_addr, .m_we, .m_wrow, .a_en, .a_addr,
    .s1_valid, .s1_mac, .s1_last, .s1_hi, .s1_t,
    .n_refresh(stat_refresh), .n_flush(stat_flush));

  // ---------------- SRAMs ---------------------------------------------------
  logic [N_MACRO*COLS*WGT_W-1:0] w_rdata;
  logic [N_MACRO*ROWS*ACT_W-1:0] a_rdata;

  sram_sp #(.WIDTH(N_MACRO*COLS*WGT_W), .DEPTH(WDEPTH)) u_wsram (
    .clk, .en(busy ? w_en : host_w_we), .we(!busy && host_w_we),
    .addr(busy ? w_addr : host_w_addr), .wdata(host_w_wdata), .rdata(w_rdata));

  sram_sp #(.WIDTH(N_MACRO*ROWS*ACT_W), .DEPTH(ADEPTH)) u_asram (
    .clk, .en(busy ? a_en : host_a_we), .we(!busy && host_a_we),
    .addr(busy ? a_addr : host_a_addr), .wdata(host_a_wdata), .rdata(a_rdata));

  // ---------------- ReLU termination ---------------------------------------
  logic signed [COLS-1:0][ACC_W-1:0] est;
  logic [COLS-1:0] live, terminated, term_now, term_out, term_col;

  relu_term #(.NOUT(COLS), .ACC_W(ACC_W), .CNT_W(CNT_W), .PCT(RELU_PCT)) u_relu (
    .en(term_en), .valid(s1_valid && s1_mac), .est, .live, .done(terminated),
    .thresh(relu_thresh), .t(s1_t), .n_cycles, .term_now);

  assign term_out = terminated | term_now;
  always_comb
    for (int c = 0; c < COLS; c++)
      term_col[c] = mode8 ? term_out[c / 2] : term_out[c];

  // ---------------- macros, sparsity, skip control --------------------------
  logic [N_MACRO-1:0][COLS-1:0][ADC_BITS-1:0] code;
  logic [N_MACRO-1:0][COLS-1:0]               adc_en, precharge, below_th, ovf;
  logic [N_MACRO-1:0][ASUM_W-1:0]             act_sum;
  logic [N_MACRO-1:0][$clog2(ROWS+1)-1:0]     n_zero;
  logic [N_MACRO-1:0][$clog2(COLS+1)-1:0]     n_skip;

  for (genvar m = 0; m < N_MACRO; m++) begin : g_macro
    logic [ROWS-1:0][ACT_W-1:0] act;
    logic [COLS-1:0][WGT_W-1:0] wrow_codes;
    logic [ROWS-1:0]            row_en;
    logic [ASUM_W-1:0]          sum_raw;

    assign act        = a_rdata[m*ROWS*ACT_W +: ROWS*ACT_W];
    assign wrow_codes = w_rdata[m*COLS*WGT_W +: COLS*WGT_W];

    input_sparsity #(.ROWS(ROWS)) u_sp (
      .act, .row_en, .n_zero(n_zero[m]), .act_sum(sum_raw));
    assign act_sum[m] = s1_mac ? sum_raw : '0;

    cim_macro #(.RETENTION_CYCLES(RETENTION_CYCLES)) u_macro (
      .clk, .rst_n, .dac_comp_en(1'b1),
      .we(m_we), .wrow(m_wrow), .wcodes(wrow_codes),
      .mac_en(s1_valid && s1_mac), .vth_pct(skip_vth_pct), .act, .row_en,
      .below_th(below_th[m]), .adc_en(adc_en[m]), .precharge(precharge[m]),
      .code(code[m]), .ovf(ovf[m]));

    adc_skip_ctrl #(.COLS(COLS)) u_skip (
      .valid(s1_valid), .last(s1_last), .skip_en(skip_en && !mode8),
      .below_th(below_th[m]), .term(term_col), .adc_en(adc_en[m]),
      .precharge(precharge[m]), .n_skip(n_skip[m]));
  end

  // ---------------- post-processing ----------------------------------------
  post_proc #(.NM(N_MACRO), .COLS(COLS), .ASUM_W(ASUM_W)) u_pp (
    .clk, .rst_n, .mode8, .relu_en, .s1_valid, .s1_last, .s1_hi,
    .code, .adc_en, .act_sum, .shift, .cal, .term_now,
    .est_o(est), .terminated_o(terminated), .live_o(live), .all_term_o(all_term),
    .out_valid(pp_out_valid), .result);
  assign out_valid = pp_out_valid;

  // ---------------- statistics ----------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_mac_cycles <= '0;
      stat_conv       <= '0;
      stat_skip       <= '0;
      stat_zero_rows  <= '0;
      stat_ovf        <= '0;
      stat_term       <= '0;
    end else begin
      logic [31:0] nc, ns, nz, no;
      nc = '0; ns = '0; nz = '0; no = '0;
      for (int m = 0; m < N_MACRO; m++) begin
        for (int c = 0; c < COLS; c++) begin
          nc += 32'(adc_en[m][c]);
          no += 32'(ovf[m][c]);
        end
        ns += 32'(n_skip[m]);
        if (s1_valid && s1_mac) nz += 32'(n_zero[m]);
      end
      stat_conv      <= stat_conv + nc;
      stat_skip      <= stat_skip + ns;
      stat_zero_rows <= stat_zero_rows + nz;
      stat_ovf       <= stat_ovf + no;
      stat_term      <= stat_term + 32'($countones(term_now & live & ~terminated));
      if (s1_valid && s1_mac) stat_mac_cycles <= stat_mac_cycles + 1;
    end
  end

  // One SRAM access per cycle: the host must not write while running.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(host_w_we || host_a_we))
    else $error("host SRAM write while the accelerator is busy");
endmodule
