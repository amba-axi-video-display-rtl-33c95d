// dfmt: display formatter. Turns the FIFO contents into the video signals
// for an HDMI transmitter: pixel clock, HSYNC, VSYNC, data enable and
// 24-bit RGB.
//
// The formatter runs at the pixel rate, half the system clock: ce is high
// every other cycle, and vid_pclk is a registered copy of ce whose rising
// edge falls in the middle of each output pixel (the document supports only
// a system clock that is twice the pixel clock). dfmt_timing produces the
// raster. For each visible pixel inside layer 0's window (x0, y0, xsize,
// ysize) the formatter requests one pixel from each of the Y, U and V
// buffer readers, and inside layer 1's window one pixel from the RGBa
// reader. The data returns the next cycle and is combined:
//   base  = YUV->RGB of layer 0 inside its window, else the background colour
//   out   = a*RGB(layer 1) + (1-a)*base inside layer 1's window, else base
// where a = A/255 is applied as (A + A[7])/256 (picture in picture with an
// alpha-blended overlay). RGBa words hold R in bits 7:0, G 15:8, B 23:16,
// A 31:24. The blend rule, byte order and background colour are this
// design's choices; the document only states that the frame is a blend of
// layers and gives the colour conversion.
//
// Start-up: after enable the formatter waits until fifo_ready (the FIFOs
// hold enough words) before starting the raster, so a long first bus
// latency does not underflow the first frame. With test_frame set it runs
// without any FIFO data and shows eight vertical colour bars (white,
// yellow, cyan, green, magenta, red, blue, black), a pattern of this
// design's choice. Output latency: video outputs change one system cycle
// after the ce cycle that addressed the pixel.
module dfmt
  import vdc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic                  test_frame,
  input  timing_t               timing,
  input  logic [23:0]           bg_color,
  input  logic [NUM_LAYER-1:0]  layer_en,
  input  win_t [NUM_LAYER-1:0]  win,
  input  logic                  fifo_ready,
  // buffer readers
  output logic [NUM_BUF-1:0]    pix_req,
  input  logic [NUM_BUF-1:0][31:0] pix_data,
  // raster events
  output logic                  frame_end,
  output logic                  running,
  // video out
  output logic                  vid_pclk,
  output logic                  vid_hsync,
  output logic                  vid_vsync,
  output logic                  vid_de,
  output logic [7:0]            vid_r,
  output logic [7:0]            vid_g,
  output logic [7:0]            vid_b
);
  logic        ce;
  logic [15:0] h, v;
  logic        active, hsync, vsync;
  logic [NUM_LAYER-1:0] inwin;
  logic [15:0] bar_w, bar_cnt;
  logic [2:0]  bar_idx;

  // stage 1: registered at the ce edge
  logic        s1, s1_de, s1_hs, s1_vs, s1_test;
  logic [NUM_LAYER-1:0] s1_in;
  logic [2:0]  s1_bar;

  dfmt_timing u_tg (
    .clk, .rst_n, .ce, .run(running), .t(timing),
    .h, .v, .active, .hsync, .vsync, .frame_end
  );

  always_comb begin
    for (int l = 0; l < NUM_LAYER; l++)
      inwin[l] = layer_en[l] &&
                 (h >= win[l].x0) && (17'(h) < 17'(win[l].x0) + 17'(win[l].xsize)) &&
                 (v >= win[l].y0) && (17'(v) < 17'(win[l].y0) + 17'(win[l].ysize));
    pix_req = '0;
    if (ce && active && !test_frame) begin
      pix_req[BUF_RGBA] = inwin[1];
      pix_req[BUF_Y]    = inwin[0];
      pix_req[BUF_U]    = inwin[0];
      pix_req[BUF_V]    = inwin[0];
    end
  end

  assign bar_w = (timing.h_active >> 3) == 0 ? 16'd1 : (timing.h_active >> 3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ce <= 1'b0; running <= 1'b0; bar_cnt <= '0; bar_idx <= '0;
      s1 <= 1'b0; s1_de <= 1'b0; s1_hs <= 1'b0; s1_vs <= 1'b0; s1_test <= 1'b0;
      s1_in <= '0; s1_bar <= '0;
    end else begin
      ce <= ~ce;
      if (!(enable || test_frame))                      running <= 1'b0;
      else if (!running && (test_frame || fifo_ready)) running <= 1'b1;

      if (!running || (ce && h + 16'd1 >= timing.h_active + timing.h_fp + timing.h_sync + timing.h_bp)) begin
        bar_cnt <= '0; bar_idx <= '0;
      end else if (ce) begin
        if (bar_cnt + 16'd1 >= bar_w) begin
          bar_cnt <= '0;
          if (bar_idx != 3'd7) bar_idx <= bar_idx + 3'd1;
        end else bar_cnt <= bar_cnt + 16'd1;
      end

      s1 <= ce;
      if (ce) begin
        s1_de   <= active;
        s1_hs   <= hsync;
        s1_vs   <= vsync;
        s1_in   <= inwin & {NUM_LAYER{active && !test_frame}};
        s1_test <= test_frame;
        s1_bar  <= bar_idx;
      end
    end
  end

  // stage 2: colour conversion and blend
  logic [7:0]  cr, cg, cb;
  logic [7:0]  base_r, base_g, base_b, fr, fg, fb;
  logic [8:0]  alpha;
  logic [23:0] bar_rgb;

  ycbcr2rgb u_csc (
    .y(pix_data[BUF_Y][7:0]), .cb(pix_data[BUF_U][7:0]), .cr(pix_data[BUF_V][7:0]),
    .r(cr), .g(cg), .b(cb)
  );

  function automatic logic [7:0] blend(input logic [7:0] fgc, input logic [7:0] bgc,
                                       input logic [8:0] a);
    logic [16:0] s;
    s = 17'(fgc) * 17'(a) + 17'(bgc) * (17'd256 - 17'(a));
    return s[15:8];
  endfunction

  always_comb begin
    unique case (s1_bar)   // {B,G,R}
      3'd0: bar_rgb = 24'hFFFFFF;
      3'd1: bar_rgb = 24'h00FFFF;
      3'd2: bar_rgb = 24'hFFFF00;
      3'd3: bar_rgb = 24'h00FF00;
      3'd4: bar_rgb = 24'hFF00FF;
      3'd5: bar_rgb = 24'h0000FF;
      3'd6: bar_rgb = 24'hFF0000;
      default: bar_rgb = 24'h000000;
    endcase
    if (s1_in[0]) {base_b, base_g, base_r} = {cb, cg, cr};
    else          {base_b, base_g, base_r} = bg_color;
    alpha = 9'(pix_data[BUF_RGBA][31:24]) + 9'(pix_data[BUF_RGBA][31]);
    if (s1_in[1]) begin
      fr = blend(pix_data[BUF_RGBA][7:0],   base_r, alpha);
      fg = blend(pix_data[BUF_RGBA][15:8],  base_g, alpha);
      fb = blend(pix_data[BUF_RGBA][23:16], base_b, alpha);
    end else begin
      fr = base_r; fg = base_g; fb = base_b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vid_pclk <= 1'b0; vid_hsync <= 1'b0; vid_vsync <= 1'b0; vid_de <= 1'b0;
      vid_r <= '0; vid_g <= '0; vid_b <= '0;
    end else begin
      vid_pclk <= ce;
      if (s1) begin
        vid_hsync <= s1_hs;
        vid_vsync <= s1_vs;
        vid_de    <= s1_de;
        if (!s1_de)       {vid_b, vid_g, vid_r} <= '0;
        else if (s1_test) {vid_b, vid_g, vid_r} <= bar_rgb;
        else              {vid_b, vid_g, vid_r} <= {fb, fg, fr};
      end
    end
  end
endmodule
