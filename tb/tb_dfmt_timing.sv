// tb_dfmt_timing: runs the raster generator for three frames of a small
// programmed format, with the pixel enable high every other cycle, and
// measures it independently: visible pixels per frame, line and frame
// length in pixels, HSYNC and VSYNC pulse widths and their position after
// the front porch, and one frame_end per frame on the last visible pixel.
//
// Programmable porches follow the document; the timing values are this
// testbench's choice.
module tb_dfmt_timing;
  import vdc_pkg::*;
  localparam int HA = 40, HF = 3, HS = 5, HB = 7, VA = 12, VF = 2, VS = 3, VB = 4;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  logic clk = 0, rst_n = 0, ce = 0, run = 0;
  timing_t t;
  logic [15:0] h, v;
  logic active, hsync, vsync, frame_end;

  dfmt_timing dut (.*);

  int checks = 0, failures = 0;
  int pix = 0, act = 0, fe = 0, hs_len = 0, vs_pix = 0, hs_start = -1, vs_line_start = -1;
  int hs_rise = 0, frames = 0;
  logic hs_q = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  always @(posedge clk) if (run) begin
    ce <= ~ce;
    if (ce) begin
      pix++;
      if (active) act++;
      if (hsync) hs_len++;
      if (vsync) vs_pix++;
      if (hsync && !hs_q) begin
        hs_rise++;
        if (hs_start < 0) hs_start = pix - 1;
      end
      hs_q <= hsync;
      if (vsync && vs_line_start < 0) vs_line_start = (pix - 1) / HT;
      if (frame_end) begin
        fe++;
        expect_eq("frame_end position", (pix - 1) % (HT * VT), HT * VA - 1);
      end
    end else if (frame_end) begin
      failures++; $display("frame_end without ce");
    end
  end

  initial begin
    t = '{h_active: 16'(HA), h_fp: 16'(HF), h_sync: 16'(HS), h_bp: 16'(HB),
          v_active: 16'(VA), v_fp: 16'(VF), v_sync: 16'(VS), v_bp: 16'(VB)};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); run = 1;
    wait (pix == 3 * HT * VT);
    @(negedge clk); run = 0;
    expect_eq("visible pixels", act, 3 * HA * VA);
    expect_eq("frame_end count", fe, 3);
    expect_eq("hsync pixels", hs_len, 3 * VT * HS);
    expect_eq("hsync pulses", hs_rise, 3 * VT);
    expect_eq("hsync start", hs_start, HA + HF);
    expect_eq("vsync pixels", vs_pix, 3 * VS * HT);
    expect_eq("vsync first line", vs_line_start, VA + VF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
