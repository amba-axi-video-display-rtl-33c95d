// vdc_pkg: types and constants shared by the video display controller.
//
// A "buffer" is one plane of a layer in paged memory. It is described by
// its Buffer Page List address (BPLA, physical address of the first 64-bit
// page-list entry), the page-list size (BPLS, number of 4 KiB pages), the
// buffer stride (BS, bytes between vertically adjacent pixels) and OFFSET,
// the virtual address of the first displayed pixel
//   OFFSET = (OffsetY*Stride + OffsetX)*UnitSize + OriginalPageOffset.
// A "job" is one complete frame: two layer windows on the screen plus the
// four buffers (RGBa, Y, U, V). Two jobs exist so that the host can fill the
// back job while the front job is displayed. The register fields follow the
// document; their widths beyond those it gives (32-bit addresses, 16-bit
// sizes, strides and positions) are this design's choice.
package vdc_pkg;

  localparam int unsigned AXI_AW   = 32;
  localparam int unsigned AXI_DW   = 64;
  localparam int unsigned AXI_IDW  = 4;
  localparam int unsigned PAGE_BITS = 12;       // 4 KiB pages
  localparam int unsigned MAX_BURST = 16;       // beats
  localparam int unsigned NUM_BUF   = 4;        // RGBa, Y, U, V
  localparam int unsigned NUM_LAYER = 2;        // 0: YUV444 video, 1: RGBa overlay

  // buffer indices
  localparam int unsigned BUF_RGBA = 0;
  localparam int unsigned BUF_Y    = 1;
  localparam int unsigned BUF_U    = 2;
  localparam int unsigned BUF_V    = 3;

  typedef struct packed {
    logic [31:0] bpla;    // physical address of the page list
    logic [31:0] bpls;    // number of entries in the page list
    logic [15:0] bs;      // stride in bytes
    logic [31:0] offset;  // virtual address of the first pixel
  } buf_cfg_t;

  typedef struct packed {
    logic [15:0] x0;      // screen position of the upper left corner
    logic [15:0] y0;
    logic [15:0] xsize;   // window width in pixels
    logic [15:0] ysize;   // window height in lines
  } win_t;

  typedef struct packed {
    logic     [NUM_LAYER-1:0] layer_en;
    win_t     [NUM_LAYER-1:0] layer;
    buf_cfg_t [NUM_BUF-1:0]   buffer;
  } job_cfg_t;

  typedef struct packed {
    logic [15:0] h_active, h_fp, h_sync, h_bp;
    logic [15:0] v_active, v_fp, v_sync, v_bp;
  } timing_t;

  // AXI read address request from one buffer reader
  typedef struct packed {
    logic [AXI_AW-1:0] addr;
    logic [3:0]        len;   // beats - 1
  } ar_req_t;

  // layer a buffer belongs to
  function automatic int unsigned layer_of(input int unsigned b);
    return (b == BUF_RGBA) ? 1 : 0;
  endfunction

endpackage
