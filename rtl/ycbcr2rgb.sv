// ycbcr2rgb: Y'CbCr (full range, 8 bits) to RGB conversion,
//   R = Y' + 1.402 (Cr-128)
//   G = Y' - 0.34414 (Cb-128) - 0.71414 (Cr-128)
//   B = Y' + 1.772 (Cb-128)
// The coefficients are the standard full-range ones; they are applied in
// fixed point with 8 fraction bits (359, 88, 183, 454 /256), rounded to
// nearest and clamped to 0..255. Purely combinational; the display
// formatter registers the result.
//
// From the document: the conversion equations (Appendix A). This design's
// choice: 8 fraction bits, rounding and clamping.
module ycbcr2rgb (
  input  logic [7:0] y,
  input  logic [7:0] cb,
  input  logic [7:0] cr,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b
);
  localparam int signed KR  = 359;   // 1.402   * 256
  localparam int signed KGB = 88;    // 0.34414 * 256
  localparam int signed KGR = 183;   // 0.71414 * 256
  localparam int signed KB  = 454;   // 1.772   * 256

  function automatic logic [7:0] clamp(input logic signed [19:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  logic signed [19:0] ys, cbs, crs, rr, gg, bb;

  always_comb begin
    ys  = 20'(y) <<< 8;
    cbs = 20'(signed'({1'b0, cb})) - 20'sd128;
    crs = 20'(signed'({1'b0, cr})) - 20'sd128;
    rr  = (ys + 20'(KR) * crs + 20'sd128) >>> 8;
    gg  = (ys - 20'(KGB) * cbs - 20'(KGR) * crs + 20'sd128) >>> 8;
    bb  = (ys + 20'(KB) * cbs + 20'sd128) >>> 8;
    r   = clamp(rr);
    g   = clamp(gg);
    b   = clamp(bb);
  end
endmodule
