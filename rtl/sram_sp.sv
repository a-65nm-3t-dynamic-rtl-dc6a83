// Single-port synchronous SRAM (behavioural array, one access per cycle).
//
// Used for the global weight SRAM and for the activation SRAM of the
// accelerator. A write stores wdata at addr on the clock edge; a read
// returns the word at addr one cycle after en. The sizes are this design's
// split of the 172KB of on-chip storage: 64KB of weights (1024 words of
// 512b, one row of all four macros per word) and 96KB of activations (768
// words of 1024b, one input vector of all four macros per word).
module sram_sp #(
  parameter int WIDTH = 512,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
