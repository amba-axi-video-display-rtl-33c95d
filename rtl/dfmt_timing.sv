// dfmt_timing: programmable raster timing generator of the display
// formatter.
//
// A line is H_ACTIVE visible pixels, then front porch, sync pulse and back
// porch; a frame is V_ACTIVE visible lines, then the same three vertical
// intervals. All eight lengths are registers. The counters advance on cycles
// with ce (the pixel clock enable) while run is high, and restart at the
// first visible pixel when run rises. Outputs are decoded from the current
// counter values: h and v, active (inside the visible area), hsync and vsync
// (active-high pulses; polarity is this design's choice), and frame_end, a
// one-cycle pulse on the ce cycle that leaves the last visible pixel of a
// frame.
//
// From the document: programmable porches and sync widths. This design's
// choice: the order active/front porch/sync/back porch, active-high syncs
// and the frame_end strobe.
module dfmt_timing
  import vdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        run,
  input  timing_t     t,
  output logic [15:0] h,
  output logic [15:0] v,
  output logic        active,
  output logic        hsync,
  output logic        vsync,
  output logic        frame_end
);
  logic [17:0] h_tot, v_tot, hs_b, vs_b;
  logic        h_last, v_last;

  assign h_tot  = 18'(t.h_active) + 18'(t.h_fp) + 18'(t.h_sync) + 18'(t.h_bp);
  assign v_tot  = 18'(t.v_active) + 18'(t.v_fp) + 18'(t.v_sync) + 18'(t.v_bp);
  assign hs_b   = 18'(t.h_active) + 18'(t.h_fp);
  assign vs_b   = 18'(t.v_active) + 18'(t.v_fp);
  assign h_last = 18'(h) + 18'd1 >= h_tot;
  assign v_last = 18'(v) + 18'd1 >= v_tot;

  assign active    = run && (h < t.h_active) && (v < t.v_active);
  assign hsync     = run && (18'(h) >= hs_b) && (18'(h) < hs_b + 18'(t.h_sync));
  assign vsync     = run && (18'(v) >= vs_b) && (18'(v) < vs_b + 18'(t.v_sync));
  assign frame_end = run && ce && h_last && (18'(v) + 18'd1 == 18'(t.v_active));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0; v <= '0;
    end else if (!run) begin
      h <= '0; v <= '0;
    end else if (ce) begin
      if (h_last) begin
        h <= '0;
        v <= v_last ? '0 : v + 16'd1;
      end else h <= h + 16'd1;
    end
  end
endmodule
