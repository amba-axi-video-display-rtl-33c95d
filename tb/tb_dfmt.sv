// tb_dfmt: the display formatter with two overlapping layer windows on a
// small raster. The testbench answers the pixel requests of the four
// buffer readers with pseudo-random pixels and predicts every visible
// output pixel from its position: background, YUV->RGB of the video layer,
// and the RGBa overlay alpha-blended over either (floating-point reference,
// tolerance 2 LSB). Checked also: the raster does not start before
// fifo_ready, the number of requests per buffer equals the window area,
// requests stop outside the windows, and in test-frame mode the eight
// colour bars appear without any pixel request.
//
// Window placement and blending over the video layer follow the document;
// the blend rounding checked is this design's choice.
module tb_dfmt;
  import vdc_pkg::*;
  import vdc_tb_pkg::*;
  localparam int HA = 48, VA = 20;
  logic clk = 0, rst_n = 0, enable = 0, test_frame = 0, fifo_ready = 0;
  timing_t timing;
  logic [23:0] bg_color = 24'h30_20_10;
  logic [1:0] layer_en = 2'b11;
  win_t [1:0] win;
  logic [3:0] pix_req;
  logic [3:0][31:0] pix_data;
  logic frame_end, running, vid_pclk, vid_hsync, vid_vsync, vid_de;
  logic [7:0] vid_r, vid_g, vid_b;

  dfmt dut (.*);

  int checks = 0, failures = 0, nreq [4], npix = 0, frames = 0;
  logic pclk_q = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] src(input int b, input int n);
    return 32'(n * 32'h9E3779B1 + b * 32'h7F4A7C15) ^ 32'(n >> 3);
  endfunction

  function automatic bit inw(input int l, input int x, input int y);
    return layer_en[l] && x >= int'(win[l].x0) && x < int'(win[l].x0 + win[l].xsize) &&
           y >= int'(win[l].y0) && y < int'(win[l].y0 + win[l].ysize);
  endfunction

  always @(posedge clk) begin
    for (int b = 0; b < 4; b++) if (pix_req[b]) begin
      pix_data[b] <= src(b, nreq[b]);
      nreq[b]++;
    end
  end

  // output checker: sample on the rising edge of the pixel clock
  always @(posedge clk) begin
    pclk_q <= vid_pclk;
    if (vid_pclk && !pclk_q && vid_de && !test_frame) begin
      automatic int x = npix % HA, y = npix / HA;
      automatic int er, eg, eb, r0, g0, b0;
      r0 = bg_color[7:0]; g0 = bg_color[15:8]; b0 = bg_color[23:16];
      if (inw(0, x, y)) begin
        automatic int n = (y - win[0].y0) * win[0].xsize + (x - win[0].x0);
        ref_rgb(src(1, n) & 8'hFF, src(2, n) & 8'hFF, src(3, n) & 8'hFF, r0, g0, b0);
      end
      er = r0; eg = g0; eb = b0;
      if (inw(1, x, y)) begin
        automatic int n = (y - win[1].y0) * win[1].xsize + (x - win[1].x0);
        automatic logic [31:0] p = src(0, n);
        er = ref_blend(p[7:0],   r0, p[31:24]);
        eg = ref_blend(p[15:8],  g0, p[31:24]);
        eb = ref_blend(p[23:16], b0, p[31:24]);
      end
      checks++;
      if (absdiff(er, vid_r) > 2 || absdiff(eg, vid_g) > 2 || absdiff(eb, vid_b) > 2) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d): got %0d,%0d,%0d want %0d,%0d,%0d", x, y, vid_r, vid_g, vid_b, er, eg, eb);
      end
      npix++;
    end
  end

  initial begin
    timing = '{h_active: 16'(HA), h_fp: 16'd2, h_sync: 16'd4, h_bp: 16'd3,
               v_active: 16'(VA), v_fp: 16'd1, v_sync: 16'd2, v_bp: 16'd2};
    win[0] = '{x0: 16'd4, y0: 16'd2, xsize: 16'd36, ysize: 16'd15};
    win[1] = '{x0: 16'd20, y0: 16'd8, xsize: 16'd24, ysize: 16'd10};
    for (int b = 0; b < 4; b++) nreq[b] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1;
    repeat (50) @(negedge clk);
    checks++;
    if (running || vid_de) begin failures++; $display("raster started before fifo_ready"); end
    fifo_ready = 1;
    wait (frame_end);
    repeat (10) @(negedge clk);
    checks++;
    if (npix != HA * VA) begin failures++; $display("%0d visible pixels", npix); end
    checks++;
    if (nreq[0] != 240 || nreq[1] != 540 || nreq[2] != 540 || nreq[3] != 540) begin
      failures++; $display("requests %0d %0d %0d %0d", nreq[0], nreq[1], nreq[2], nreq[3]);
    end
    // test frame: colour bars, no requests
    enable = 0; test_frame = 1;
    for (int b = 0; b < 4; b++) nreq[b] = 0;
    @(negedge clk);
    begin
      automatic logic [23:0] bars [8] = '{24'hFFFFFF, 24'h00FFFF, 24'hFFFF00, 24'h00FF00,
                                           24'hFF00FF, 24'h0000FF, 24'hFF0000, 24'h000000};
      automatic int seen = 0;
      wait (vid_de);
      for (int x = 0; x < HA; x++) begin
        @(posedge vid_pclk);
        checks++;
        if ({vid_b, vid_g, vid_r} !== bars[x / (HA / 8)]) begin
          failures++; $display("bar at x=%0d: %h", x, {vid_b, vid_g, vid_r});
        end
      end
    end
    checks++;
    if (nreq[0] + nreq[1] + nreq[2] + nreq[3] != 0) begin failures++; $display("requests in test frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
