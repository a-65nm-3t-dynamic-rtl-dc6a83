// Post-processing of the ASIC core: accumulation, offset restore, 8b
// combination, calibration and ReLU.
//
// Weights are stored unsigned in the cells: a signed weight w is written as
// w + Z - s, where Z is 8 (4b mode) or 128 (8b mode) and s is the per-column
// weight shift chosen off-line to lower the cell currents (and so the MAC
// energy) of columns that do not use the full range. The analog MAC therefore
// equals sum(a*w) + (Z - s) * sum(a), and the true value is restored with one
// activation sum per macro and cycle, shared by all columns:
//   value_j = sum over conversions (code << ADC_LSB_SHIFT)
//           + sum over macros (s_mj - Z) * act_sum_m + cal_j
// Conversions of the four macros are added together (inter-macro
// accumulation) over all cycles of an accumulation.
//
// 8b mode: an 8b weight occupies an even column (high nibble) and the next
// odd column (low nibble), giving 16 outputs per macro; an 8b input is sent
// as its high nibble, then its low nibble, in two cycles (s1_hi marks the
// high-nibble cycle). Codes and activation sums are weighted by 16 where the
// nibble is the high one. The weight shift of output j is taken from column
// 2j.
//
// Timing: in a cycle with s1_valid the codes of columns with adc_en are
// added at the clock edge. est_o is the registered running value (previous
// cycles) used by the ReLU termination check. term_now marks outputs
// terminated in this cycle; they stay terminated until the end of the
// accumulation and give 0. On s1_last the results are registered with
// out_valid one cycle later and the state is cleared. all_term_o is high
// when every live output is terminated.
// The offset, 4b-to-8b conversion, inter-macro accumulation and calibration
// offsets follow the published description; the nibble-to-column mapping
// and the output format are this design's choices.
module post_proc
  import cim_pkg::ADC_BITS, cim_pkg::ADC_LSB_SHIFT, cim_pkg::ACC_W, cim_pkg::acc_t;
#(
  parameter int NM    = cim_pkg::N_MACRO,
  parameter int COLS  = cim_pkg::COLS,
  parameter int ASUM_W = 10
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 mode8,
  input  logic                                 relu_en,
  input  logic                                 s1_valid,
  input  logic                                 s1_last,
  input  logic                                 s1_hi,
  input  logic [NM-1:0][COLS-1:0][ADC_BITS-1:0] code,
  input  logic [NM-1:0][COLS-1:0]              adc_en,
  input  logic [NM-1:0][ASUM_W-1:0]            act_sum,
  input  logic [NM-1:0][COLS-1:0][7:0]         shift,
  input  logic signed [COLS-1:0][15:0]         cal,
  input  logic [COLS-1:0]                      term_now,
  output logic signed [COLS-1:0][ACC_W-1:0]    est_o,
  output logic [COLS-1:0]                      terminated_o,
  output logic [COLS-1:0]                      live_o,
  output logic                                 all_term_o,
  output logic                                 out_valid,
  output logic signed [COLS-1:0][ACC_W-1:0]    result
);
  acc_t                acc   [COLS];
  logic signed [31:0]  sum_a [NM];
  logic [COLS-1:0]     term_q;

  acc_t                acc_n   [COLS];
  logic signed [31:0]  sum_a_n [NM];

  // Offset of output j for given activation sums.
  function automatic acc_t offset(input int j, input logic signed [31:0] sa [NM],
                                  input logic m8,
                                  input logic [NM-1:0][COLS-1:0][7:0] sh,
                                  input logic signed [COLS-1:0][15:0] cl);
    acc_t o;
    logic signed [9:0] k;
    o = acc_t'($signed(cl[j]));
    for (int m = 0; m < NM; m++) begin
      k = m8 ? $signed({2'b0, sh[m][2*j]}) - 10'sd128 : $signed({2'b0, sh[m][j]}) - 10'sd8;
      o += acc_t'(k) * acc_t'(sa[m]);
    end
    return o;
  endfunction

  always_comb begin
    for (int j = 0; j < COLS; j++)
      live_o[j] = mode8 ? (j < COLS / 2) : 1'b1;
    all_term_o = &(term_q | ~live_o);
    terminated_o = term_q;
  end

  // Next accumulator values including this cycle's conversions.
  always_comb begin
    for (int m = 0; m < NM; m++)
      sum_a_n[m] = sum_a[m] + (s1_valid ? (32'(act_sum[m]) << ((mode8 && s1_hi) ? 4 : 0)) : 32'sd0);
    for (int j = 0; j < COLS; j++) begin
      acc_t add;
      add = '0;
      if (s1_valid) begin
        for (int m = 0; m < NM; m++) begin
          if (!mode8) begin
            if (adc_en[m][j]) add += acc_t'(code[m][j]);
          end else if (j < COLS / 2) begin
            if (adc_en[m][2*j])   add += acc_t'(code[m][2*j]) << 4;
            if (adc_en[m][2*j+1]) add += acc_t'(code[m][2*j+1]);
          end
        end
        add = add << ADC_LSB_SHIFT;
        if (mode8 && s1_hi) add = add << 4;
      end
      acc_n[j] = acc[j] + add;
    end
  end

  always_comb
    for (int j = 0; j < COLS; j++)
      est_o[j] = live_o[j] ? acc[j] + offset(j, sum_a, mode8, shift, cal) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < COLS; j++) acc[j] <= '0;
      for (int m = 0; m < NM; m++) sum_a[m] <= '0;
      term_q    <= '0;
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (s1_valid && s1_last) begin
        for (int j = 0; j < COLS; j++) begin
          acc_t v;
          v = acc_n[j] + offset(j, sum_a_n, mode8, shift, cal);
          if (!live_o[j] || term_q[j] || term_now[j]) v = '0;
          else if (relu_en && v < 0)                  v = '0;
          result[j] <= v;
          acc[j]    <= '0;
        end
        for (int m = 0; m < NM; m++) sum_a[m] <= '0;
        term_q    <= '0;
        out_valid <= 1'b1;
      end else if (s1_valid) begin
        for (int j = 0; j < COLS; j++) acc[j] <= acc_n[j];
        for (int m = 0; m < NM; m++) sum_a[m] <= sum_a_n[m];
        term_q <= term_q | (term_now & live_o);
      end
    end
  end
endmodule
