// Behavioural model (analog part): 64x32 array of 3T dynamic analog RAM cells.
//
// A cell stores a weight as a voltage on its MEM node. Write: the write
// transistor M3, opened by the row's WE line, copies the BL_W voltage of the
// column DAC onto MEM; one row is written per clock, so a full array takes 64
// cycles. Read: the read transistor M1 turns the MEM voltage into a current
// Imem, and the RE switch M2 lets it discharge the read bitline BL_R for the
// width of the row's DTC pulse. The charge drawn from a column is therefore
// the sum over rows of Imem times pulse width, a 4b x 4b MAC in a single read.
//
// Modelling choices of this design: Imem = (Vmem - V_LO)^2 / K rounded to
// whole weight LSBs (square law, zero below V_LO); MEM leaks down linearly
// with the cycles since its row was written, DRIFT_MV_AT_RET millivolts after
// RETENTION_CYCLES cycles. The retention default of 41k cycles is the
// published typical-corner figure, which already includes the 3x storage
// capacitor and the 0.8V write-bitline bias during inference.
//
// Interface: we/wrow/vwr_mv write one row on the clock edge; pulse_ps gives
// the RE pulse of each row; col_charge is the charge of each column in the
// current cycle (combinational), in units of one weight LSB times RES_PS.
// rst_n clears the write history: a row not written since reset draws no
// current.
module daram_array #(
  parameter int ROWS             = 64,
  parameter int COLS             = 32,
  parameter int RES_PS           = 50,
  parameter int V_LO_MV          = 450,
  parameter int V_HI_MV          = 1000,
  parameter int RETENTION_CYCLES = 41000,
  parameter int DRIFT_MV_AT_RET  = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] wrow,
  input  int                      vwr_mv     [COLS],
  input  int                      pulse_ps   [ROWS],
  output int                      col_charge [COLS]
);
  localparam real K = real'((V_HI_MV - V_LO_MV) * (V_HI_MV - V_LO_MV)) / 15.0;

  int          vmem   [ROWS][COLS];  // stored MEM voltage, mV
  longint      wr_at  [ROWS];        // cycle of last write per row
  longint      now;                  // cycle counter
  logic        written [ROWS];       // row holds a written value since reset

  // Current of one cell, in weight LSBs, after drift.
  function automatic int cell_current(int v_stored, longint age);
    real v;
    v = real'(v_stored) - real'(age) * real'(DRIFT_MV_AT_RET) / real'(RETENTION_CYCLES);
    if (v <= real'(V_LO_MV)) return 0;
    return int'($pow(v - real'(V_LO_MV), 2.0) / K);
  endfunction

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      col_charge[c] = 0;
      for (int r = 0; r < ROWS; r++)
        if (pulse_ps[r] != 0 && written[r])
          col_charge[c] += cell_current(vmem[r][c], now - wr_at[r]) * (pulse_ps[r] / RES_PS);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= 0;
      for (int r = 0; r < ROWS; r++) begin
        wr_at[r]   <= 0;
        written[r] <= 1'b0;
      end
    end else begin
      now <= now + 1;
      if (we) begin
        wr_at[wrow]   <= now;
        written[wrow] <= 1'b1;
      end
    end
  end

  // The analog storage itself has no reset.
  always_ff @(posedge clk)
    if (we)
      for (int c = 0; c < COLS; c++) vmem[wrow][c] <= vwr_mv[c];

endmodule
