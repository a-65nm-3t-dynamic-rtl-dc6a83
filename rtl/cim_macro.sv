// Behavioural model (analog/mixed-signal part): one 64x32 CIM macro.
//
// Inside: a DTC per row, a write DAC per column, the 3T DARAM array, and per
// column the read bitline BL_R with its precharge, a comparator against the
// skip threshold and a 5b SAR ADC.
//
// A MAC cycle (mac_en) fires the DTCs of the enabled rows; each column's
// bitline drops by the MAC charge. The drop is kept across cycles until the
// column is precharged, so several MACs can be merged on the bitline without
// a conversion. The comparator output below_th tells the ASIC that the drop,
// this cycle's MAC included, is still below vth_pct percent of full swing
// (the Skip_ADC signal; 27% is the published setting); the ASIC answers in the same cycle with adc_en and
// precharge. code and ovf are the ADC result of the current drop and are
// valid in the cycle adc_en is given. A drop beyond full swing saturates: that
// is the overflow the skip scheme occasionally causes.
//
// Writing: we/wrow/wcodes store one row of 4b weight codes through the DACs
// at the clock edge. rst_n precharges all bitlines and clears the write
// history of the array.
// Array size, threshold, DTC resolution and ADC width follow the
// published design; the charge units and the same-cycle skip decision are
// this model's own choices.
module cim_macro
  import cim_pkg::ACT_W, cim_pkg::WGT_W, cim_pkg::ADC_BITS, cim_pkg::ADC_LSB_SHIFT, cim_pkg::FULL_SWING;
#(
  parameter int ROWS             = cim_pkg::ROWS,
  parameter int COLS             = cim_pkg::COLS,
  parameter int RETENTION_CYCLES = 41000
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             dac_comp_en,
  input  logic                             we,
  input  logic [$clog2(ROWS)-1:0]          wrow,
  input  logic [COLS-1:0][WGT_W-1:0]       wcodes,
  input  logic                             mac_en,
  input  logic [6:0]                       vth_pct,
  input  logic [ROWS-1:0][ACT_W-1:0]       act,
  input  logic [ROWS-1:0]                  row_en,
  output logic [COLS-1:0]                  below_th,
  input  logic [COLS-1:0]                  adc_en,
  input  logic [COLS-1:0]                  precharge,
  output logic [COLS-1:0][ADC_BITS-1:0]    code,
  output logic [COLS-1:0]                  ovf
);
  localparam int RES_PS = 50;

  int vwr_mv   [COLS];
  int pulse_ps [ROWS];
  int charge   [COLS];
  int carry    [COLS];   // bitline drop kept from earlier cycles
  int drop_now [COLS];
  int vth;              // comparator reference, charge units

  assign vth = FULL_SWING * int'(vth_pct) / 100;

  for (genvar r = 0; r < ROWS; r++) begin : g_dtc
    cim_dtc #(.RES_PS(RES_PS)) u_dtc (
      .act(act[r]), .en(row_en[r] && mac_en), .pulse_ps(pulse_ps[r]), .fired());
  end

  for (genvar c = 0; c < COLS; c++) begin : g_col
    cim_dac u_dac (.code(wcodes[c]), .comp_en(dac_comp_en), .vmem_mv(vwr_mv[c]));

    always_comb begin
      drop_now[c] = carry[c] + charge[c];
      if (drop_now[c] > FULL_SWING) drop_now[c] = FULL_SWING;
      below_th[c] = drop_now[c] < vth;
    end

    logic [ADC_BITS-1:0] adc_code;
    logic                adc_ovf;
    cim_sar_adc #(.BITS(ADC_BITS), .LSB_SHIFT(ADC_LSB_SHIFT)) u_adc (
      .drop(drop_now[c]), .code(adc_code), .ovf(adc_ovf));
    assign code[c] = adc_en[c] ? adc_code : '0;
    assign ovf[c]  = adc_en[c] && adc_ovf;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)            carry[c] <= 0;
      else if (precharge[c]) carry[c] <= 0;
      else                   carry[c] <= drop_now[c];
    end
  end

  daram_array #(
    .ROWS(ROWS), .COLS(COLS), .RES_PS(RES_PS), .RETENTION_CYCLES(RETENTION_CYCLES)
  ) u_array (
    .clk, .rst_n, .we, .wrow, .vwr_mv, .pulse_ps, .col_charge(charge));
endmodule
