// MAC-based ADC skipping control for the columns of one macro.
//
// While the accumulated bitline drop of a column stays below the skip
// threshold (comparator output below_th), neither the ADC nor the bitline
// precharge is activated, and the next MAC adds to the same bitline charge.
// Once the drop reaches the threshold the column converts and precharges.
// At the last cycle of an accumulation every live column converts, so no
// charge is left behind. A column terminated by the ReLU check never
// converts and is kept precharged. With skip_en low every column converts in
// every cycle (used in 8b mode, and to measure the saving).
// The skip rule follows the published scheme; forcing the conversion at the
// last cycle is this design's choice. Combinational; n_skip counts the
// columns that skipped a conversion in this cycle.
module adc_skip_ctrl #(
  parameter int COLS = 32
) (
  input  logic                      valid,
  input  logic                      last,
  input  logic                      skip_en,
  input  logic [COLS-1:0]           below_th,
  input  logic [COLS-1:0]           term,
  output logic [COLS-1:0]           adc_en,
  output logic [COLS-1:0]           precharge,
  output logic [$clog2(COLS+1)-1:0] n_skip
);
  always_comb begin
    n_skip = '0;
    for (int c = 0; c < COLS; c++) begin
      adc_en[c]    = valid && !term[c] && (last || !skip_en || !below_th[c]);
      precharge[c] = adc_en[c] || term[c] || (valid && last);
      if (valid && !term[c] && !adc_en[c]) n_skip += 1'b1;
    end
  end
endmodule
