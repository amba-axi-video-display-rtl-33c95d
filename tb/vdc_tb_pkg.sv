// vdc_tb_pkg: helpers shared by the testbenches.
//
// Memory contents: any 64-bit word that is not a page-list entry reads as
// mem_word(address), a fixed scramble of the address, so a testbench can
// predict every pixel without storing a frame. ref_rgb is a floating-point
// Y'CbCr -> RGB reference used to check the fixed-point converter.
//
// The reference colour equations follow the document; the memory content
// scramble is this testbench's choice.
package vdc_tb_pkg;

  function automatic logic [63:0] mem_word(input logic [31:0] a);
    logic [31:0] w;
    w = {a[31:3], 3'b000};
    return {w * 32'h9E3779B1 ^ 32'hA5A5_0F0F, w ^ (w >> 7) ^ 32'h1357_9BDF};
  endfunction

  // byte at any physical address
  function automatic logic [7:0] mem_byte(input logic [31:0] a);
    logic [63:0] w;
    w = mem_word(a);
    return w[8*a[2:0] +: 8];
  endfunction

  function automatic int clamp8(input real v);
    int i;
    i = $rtoi(v < 0.0 ? v - 0.5 : v + 0.5);
    if (i < 0) return 0;
    if (i > 255) return 255;
    return i;
  endfunction

  function automatic void ref_rgb(input int y, input int cb, input int cr,
                                  output int r, output int g, output int b);
    r = clamp8(y + 1.402 * (cr - 128));
    g = clamp8(y - 0.34414 * (cb - 128) - 0.71414 * (cr - 128));
    b = clamp8(y + 1.772 * (cb - 128));
  endfunction

  function automatic int ref_blend(input int fg, input int bg, input int a);
    return clamp8((fg * a + bg * (255 - a)) / 255.0);
  endfunction

  function automatic int absdiff(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

endpackage
