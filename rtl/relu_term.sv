// ReLU-based early termination check.
//
// A ReLU output is zero whenever its accumulation ends negative. Once more
// than PCT percent of an accumulation's cycles have run, an output whose
// running value is below the preset negative threshold is unlikely to turn
// positive again: it is terminated, and its remaining MAC conversions are
// skipped. The 70% point and the "value < threshold" test follow the
// published flow chart; t counts the cycles already accumulated, so the test
// "runtime > 70%" reads 100*t > PCT*n_cycles. Outputs already terminated
// (done) are not reported again. Combinational.
module relu_term #(
  parameter int NOUT  = 32,
  parameter int ACC_W = 40,
  parameter int CNT_W = 16,
  parameter int PCT   = 70
) (
  input  logic                           en,
  input  logic                           valid,
  input  logic signed [NOUT-1:0][ACC_W-1:0] est,
  input  logic [NOUT-1:0]                live,
  input  logic [NOUT-1:0]                done,
  input  logic signed [ACC_W-1:0]        thresh,
  input  logic [CNT_W-1:0]               t,
  input  logic [CNT_W-1:0]               n_cycles,
  output logic [NOUT-1:0]                term_now
);
  logic late;
  always_comb begin
    late = (32'(t) * 100) > (32'(n_cycles) * PCT);
    for (int j = 0; j < NOUT; j++)
      term_now[j] = en && valid && late && live[j] && !done[j] &&
                    ($signed(est[j]) < thresh);
  end
endmodule
