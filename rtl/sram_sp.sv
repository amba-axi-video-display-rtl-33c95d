// sram_sp: single-port synchronous SRAM bank for the pixel FIFOs.
//
// One access per clock: a write when we=1, otherwise a read whose data
// appears on rdata after the clock edge and holds until the next read. The
// controller uses two of these banks instead of one dual-port RAM (the
// document's area and power argument: 6-transistor rather than 8-transistor
// cells). Written as an array so synthesis maps it to a RAM macro; the
// memory has no reset, like the macro it stands for.
module sram_sp #(
  parameter int unsigned WORDS = 1792,   // 14 KiB of 64-bit words: half of 28 KiB
  parameter int unsigned DW    = 64,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
