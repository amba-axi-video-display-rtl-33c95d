// tb_sram_sp: writes random words to random addresses of one SRAM bank,
// keeps a reference copy, and reads them back, checking that data appears
// one cycle after the read and holds during a following idle cycle.
//
// One access per cycle is the SRAM behaviour the document assumes; the
// access pattern is this testbench's choice.
module tb_sram_sp;
  localparam int unsigned WORDS = 1792;
  logic clk = 0, en = 0, we = 0;
  logic [10:0] addr = '0;
  logic [63:0] wdata = '0, rdata;
  logic [63:0] refm [WORDS];
  bit          known [WORDS];
  int checks = 0, failures = 0;

  sram_sp #(.WORDS(WORDS)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (known[i]) known[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int a = $urandom % WORDS;
      automatic logic [63:0] d = {$urandom, $urandom};
      @(negedge clk); en = 1; we = 1; addr = 11'(a); wdata = d;
      refm[a] = d; known[a] = 1;
    end
    for (int i = 0; i < 3000; i++) begin
      automatic int a = $urandom % WORDS;
      @(negedge clk); en = 1; we = 0; addr = 11'(a);
      @(negedge clk); en = 0;
      if (known[a]) begin
        checks++;
        if (rdata !== refm[a]) begin failures++; $display("mismatch at %0d", a); end
        @(negedge clk);
        checks++;
        if (rdata !== refm[a]) begin failures++; $display("read data not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
