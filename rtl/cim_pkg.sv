// Shared constants of the DARAM computing-in-memory CNN accelerator.
//
// The accelerator has four CIM macros of 64 rows x 32 columns. Each cell
// holds a 4b weight as an analog voltage, each row is driven by a 4b
// activation turned into a time pulse, and each column is read by a 5b ADC.
// Macro count, array size and bit widths follow the published design. The
// charge unit and the ADC full scale are this design's own choice: one unit is
// one activation LSB times one weight LSB, and the ADC LSB is 2^ADC_LSB_SHIFT
// units. With a shift of 9 the full swing is 16384 units, just above the
// largest single-cycle MAC of 64*15*15 = 14400 units.
package cim_pkg;
  localparam int N_MACRO       = 4;
  localparam int ROWS          = 64;
  localparam int COLS          = 32;
  localparam int ACT_W         = 4;
  localparam int WGT_W         = 4;
  localparam int ADC_BITS      = 5;
  localparam int ADC_LSB_SHIFT = 9;
  localparam int FULL_SWING    = (1 << ADC_BITS) << ADC_LSB_SHIFT;
  localparam int SKIP_VTH_PCT  = 27;   // skip threshold, % of bitline full swing
  localparam int RELU_PCT      = 70;   // ReLU check starts after this % of cycles
  localparam int ACC_W         = 40;   // post-processing accumulator width
  localparam int CNT_W         = 16;   // cycle counters

  typedef logic [ACT_W-1:0]    act_t;
  typedef logic [WGT_W-1:0]    wcode_t;
  typedef logic [ADC_BITS-1:0] adc_code_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Accelerator precision modes.
  typedef enum logic {MODE_4B = 1'b0, MODE_8B = 1'b1} prec_mode_e;
endpackage
