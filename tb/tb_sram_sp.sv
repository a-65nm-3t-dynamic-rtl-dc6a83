// Testbench for sram_sp: random writes into a small instance, then reads of
// every written word, checked one cycle after the read request against a
// copy kept here.
module tb_sram_sp;
  localparam int W = 64, D = 32;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0, we = 0;
  logic [4:0]   addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [D];

  sram_sp #(.WIDTH(W), .DEPTH(D)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 5'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
    end
    for (int i = 0; i < 100; i++) begin
      int a = $urandom_range(0, D - 1);
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        en = 1; we = 1; addr = 5'(a); wdata = {$urandom, $urandom}; model[a] = wdata;
      end else begin
        en = 1; we = 0; addr = 5'(a);
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
