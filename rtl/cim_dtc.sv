// Behavioural model (mixed-signal part): row-wise digital-to-time converter.
//
// Each row of a CIM macro has a DTC that turns the 4b activation of that row
// into a read-enable (RE) pulse whose width is the activation times 50ps.
// The charge a cell draws from its read bitline is its current times this
// width, so the pulse performs the activation side of the multiplication.
// When the row is disabled (zero input detected by the sparsity logic) no
// pulse is produced. The pulse is represented by its width in ps; fired tells
// whether a pulse exists. The 50ps resolution is the published value.
//
// Interface: act, en -> pulse_ps, fired. Combinational.
module cim_dtc #(
  parameter int RES_PS = 50
) (
  input  logic [3:0] act,
  input  logic       en,
  output int         pulse_ps,
  output logic       fired
);
  always_comb begin
    fired    = en && (act != 4'd0);
    pulse_ps = fired ? int'(act) * RES_PS : 0;
  end
endmodule
