// Input sparsity detection for one macro's 64 rows.
//
// Each activation is compared with zero; a zero row gets no DTC pulse, which
// saves the pulse and the MAC current of that row. n_zero counts the disabled
// rows of the cycle for statistics. act_sum is the sum of the activations,
// needed once per cycle to add back the weight offset for all columns.
// The zero compare and DTC disable follow the published design; placing the
// activation sum here is this design's choice. Combinational.
module input_sparsity
  import cim_pkg::ACT_W;
#(
  parameter int ROWS = cim_pkg::ROWS
) (
  input  logic [ROWS-1:0][ACT_W-1:0]          act,
  output logic [ROWS-1:0]                     row_en,
  output logic [$clog2(ROWS+1)-1:0]           n_zero,
  output logic [$clog2(ROWS*(2**ACT_W-1)+1)-1:0] act_sum
);
  always_comb begin
    n_zero  = '0;
    act_sum = '0;
    for (int r = 0; r < ROWS; r++) begin
      row_en[r] = act[r] != '0;
      n_zero    += {{($bits(n_zero)-1){1'b0}}, ~row_en[r]};
      act_sum   += {{($bits(act_sum)-ACT_W){1'b0}}, act[r]};
    end
  end
endmodule
