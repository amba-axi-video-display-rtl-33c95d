// buffer_reader: fetches one buffer (one plane of a layer) from paged
// memory into its pixel FIFO and hands pixels to the display formatter.
//
// It joins three parts: br_addr_gen (virtual addresses, page-list
// translation, AXI burst issue), br_fifo_ctrl (FIFO writes from the AXI
// read data, page-base capture, SRAM reads into prefetch registers) and
// br_pixel_unpack (64-bit words to pixels). Four instances run
// independently, each with its own translation, for RGBa, Y, U and V.
//
// Interface: start (one cycle) latches the job's buffer definition and
// window size and begins a frame; done stays high once all addresses of
// the window are issued. The AXI side is a request/ready address port and
// a read data input that is never stalled. pix_req / pix_data (one cycle
// later) is the pixel port; level counts FIFO words for the formatter's
// start-up wait.
//
// From the document: one reader per plane, built from address generation,
// the AXI master side and FIFO control. This design's choice: the split
// into three submodules and latching the window width at start.
//
// The SRAM write data is the AXI beat passed straight through, and a few
// upper bits of the status outputs are constant.
module buffer_reader
  import vdc_pkg::*;
#(
  parameter int unsigned UNIT     = 4,
  parameter int unsigned DEPTH    = 2048,
  parameter int unsigned BASE     = 0,
  parameter int unsigned GAW      = 12,
  parameter int unsigned OUTS     = 8,
  localparam int unsigned CW      = $clog2(DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           enable,
  input  buf_cfg_t       cfg,
  input  logic [15:0]    xsize,
  input  logic [15:0]    ysize,
  output logic           done,
  output logic           bpl_err,
  // AXI
  output logic           ar_valid,
  output ar_req_t        ar_req,
  input  logic           ar_ready,
  input  logic           r_valid,
  input  logic [63:0]    r_data,
  input  logic           r_last,
  // SRAM arbiter
  output logic           wr_req,
  output logic [GAW-1:0] wr_addr,
  output logic [63:0]    wr_data,
  output logic           rd_req,
  output logic           rd_urgent,
  output logic [GAW-1:0] rd_addr,
  input  logic           rd_gnt,
  input  logic           rd_valid,
  input  logic [63:0]    rd_data,
  // display formatter
  input  logic           pix_req,
  output logic [31:0]    pix_data,
  output logic           underflow,
  output logic [CW-1:0]  level
);
  logic          flush, fifo_idle, xlat_valid, ar_is_bpl;
  logic [31:0]   xlat_base;
  logic [CW-1:0] free_words;
  logic          word_valid, word_pop;
  logic [63:0]   word_data;
  logic [15:0]   xs_q;

  // the unpacker needs the width of the frame being fetched
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     xs_q <= '0;
    else if (start) xs_q <= xsize;

  br_addr_gen #(.UNIT(UNIT), .DEPTH(DEPTH)) u_ag (
    .clk, .rst_n, .start, .enable, .cfg, .xsize, .ysize, .done, .bpl_err, .flush,
    .free_words, .fifo_idle, .xlat_valid, .xlat_base,
    .ar_valid, .ar_req, .ar_is_bpl, .ar_ready
  );

  br_fifo_ctrl #(.DEPTH(DEPTH), .BASE(BASE), .GAW(GAW), .OUTS(OUTS)) u_fc (
    .clk, .rst_n, .flush,
    .ar_fire(ar_valid && ar_ready), .ar_is_bpl, .ar_len(ar_req.len),
    .free_words, .idle(fifo_idle), .xlat_valid, .xlat_base,
    .r_valid, .r_data, .r_last,
    .wr_req, .wr_addr, .wr_data, .rd_req, .rd_urgent, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .word_valid, .word_data, .word_pop, .level
  );

  br_pixel_unpack #(.UNIT(UNIT)) u_up (
    .clk, .rst_n, .flush, .xsize(xs_q), .pix_req, .pix_data, .underflow,
    .word_valid, .word_data, .word_pop
  );
endmodule
