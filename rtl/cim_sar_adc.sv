// Behavioural model (analog part): 5b SAR ADC at the foot of each column.
//
// The ADC converts the voltage drop of the read bitline (expressed in charge
// units, see cim_pkg) into a 5b code by successive approximation: starting
// from the MSB, each trial bit is kept when the drop is at least the trial
// level. The result equals floor(drop / 2^LSB_SHIFT), saturated at 31; ovf
// flags a drop at or beyond full swing, where information is lost. The 5b
// resolution follows the published design; the LSB size and the conversion
// finishing within one MAC cycle are this model's choices.
//
// Interface: drop (non-negative) -> code, ovf. Combinational.
module cim_sar_adc #(
  parameter int BITS      = 5,
  parameter int LSB_SHIFT = 9
) (
  input  int              drop,
  output logic [BITS-1:0] code,
  output logic            ovf
);
  always_comb begin
    logic [BITS-1:0] trial;
    code = '0;
    for (int b = BITS - 1; b >= 0; b--) begin
      trial    = code;
      trial[b] = 1'b1;
      if (drop >= (int'(trial) << LSB_SHIFT)) code = trial;
    end
    ovf = drop >= ((1 << BITS) << LSB_SHIFT);
  end
endmodule
