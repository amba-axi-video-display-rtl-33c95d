// apb_bfm: APB master for the testbenches (SETUP then ACCESS, waits for
// PREADY). Behavioural.
//
// The APB protocol is standard; the task interface is this testbench's
// choice.
module apb_bfm (
  input  logic        clk,
  output logic        psel,
  output logic        penable,
  output logic        pwrite,
  output logic [11:0] paddr,
  output logic [31:0] pwdata,
  input  logic [31:0] prdata,
  input  logic        pready
);
  initial begin psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0; end

  task automatic write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    do @(posedge clk); while (!pready);
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    do @(posedge clk); while (!pready);
    d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask
endmodule
