// Behavioural model (analog part): column-wise write DAC of a CIM macro.
//
// The DAC drives the write bitline BL_W with the voltage that is stored on
// the MEM node of a 3T cell. Its range is 0.45V to 1.0V. The read transistor
// of the cell turns MEM voltage into current with a square law, so a linear
// DAC would give a current that is not proportional to the weight. With
// comp_en set the DAC uses the inverse curve, V = V_LO + sqrt(code * K), and
// the cell current becomes proportional to the weight code. With comp_en
// clear it is linear in the code. The range and the idea of a non-linear
// compensating curve follow the published design; the square-law model and
// the constant K (chosen so that code 15 lands exactly on V_HI) are this
// model's own.
//
// Interface: code (4b weight), comp_en; vmem_mv is the output voltage in mV.
// Purely combinational.
module cim_dac #(
  parameter int V_LO_MV = 450,
  parameter int V_HI_MV = 1000
) (
  input  logic [3:0] code,
  input  logic       comp_en,
  output int         vmem_mv
);
  // K such that (V_HI - V_LO)^2 / K = 15
  localparam real K = real'((V_HI_MV - V_LO_MV) * (V_HI_MV - V_LO_MV)) / 15.0;

  always_comb begin
    if (comp_en)
      vmem_mv = V_LO_MV + int'($sqrt(real'(code) * K));
    else
      vmem_mv = V_LO_MV + (int'(code) * (V_HI_MV - V_LO_MV)) / 15;
  end
endmodule
