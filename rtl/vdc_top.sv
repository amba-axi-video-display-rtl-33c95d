// vdc_top: video display controller for paged (virtual) frame buffers.
//
// The controller reads two layers from shared system memory over a 64-bit
// AXI read master and drives an HDMI transmitter: a YUV444 video layer
// stored as three planes (Y, U, V) and an RGBa overlay stored as one plane,
// shown picture-in-picture. Every plane lives in scattered 4 KiB physical
// pages; a per-plane page list in memory gives each page's physical base,
// and each of the four buffer readers translates its own addresses with it.
//
// Data path: buffer_reader x4 -> axi_arbiter -> AXI; AXI read data ->
// buffer_reader FIFO control -> sram_arbiter -> two single-port SRAM banks
// (the pixel FIFOs, 28 KiB: 16 KiB RGBa, 4 KiB each for Y, U, V) ->
// buffer_reader prefetch -> dfmt -> video out. apb_host_if holds the
// registers (two jobs for double buffering) and the interrupt;
// vdc_controller starts each frame's fetch and chooses front or back job.
//
// The system clock must be twice the pixel clock. Only the read channels of
// AXI exist; the controller never writes memory.
//
// From the document: the block structure, 64-bit AXI, 4 KiB pages, FIFO
// sizes, 8-burst credit and the clock ratio of two. This design's choice:
// the port list, the prefill rule and the fixed AXI attributes. Lint notes
// (not circuit problems): ARSIZE/ARBURST/ARPROT/ARCACHE/RREADY and the
// unused ARID bits are constant outputs by design; RRESP is not used; the
// upper PREFILL register bits exceed the largest FIFO and are ignored; the
// asynchronous reset also appears in assertion disable conditions.
module vdc_top
  import vdc_pkg::*;
#(
  parameter int unsigned FIFO_RGBA = 2048,   // 64-bit words (16 KiB)
  parameter int unsigned FIFO_YUV  = 512,    // 64-bit words (4 KiB) per plane
  parameter int unsigned CREDIT    = 8,      // outstanding AXI bursts
  localparam int unsigned TOTAL    = FIFO_RGBA + 3 * FIFO_YUV,
  localparam int unsigned GAW      = $clog2(TOTAL),
  localparam int unsigned BANK     = (TOTAL + 1) / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // APB slave
  input  logic                s_apb_psel,
  input  logic                s_apb_penable,
  input  logic                s_apb_pwrite,
  input  logic [11:0]         s_apb_paddr,
  input  logic [31:0]         s_apb_pwdata,
  output logic [31:0]         s_apb_prdata,
  output logic                s_apb_pready,
  output logic                s_apb_pslverr,
  output logic                irq,
  // AXI read master
  output logic                m_axi_arvalid,
  input  logic                m_axi_arready,
  output logic [AXI_IDW-1:0]  m_axi_arid,
  output logic [AXI_AW-1:0]   m_axi_araddr,
  output logic [7:0]          m_axi_arlen,
  output logic [2:0]          m_axi_arsize,
  output logic [1:0]          m_axi_arburst,
  output logic [2:0]          m_axi_arprot,
  output logic [3:0]          m_axi_arcache,
  input  logic                m_axi_rvalid,
  output logic                m_axi_rready,
  input  logic [AXI_IDW-1:0]  m_axi_rid,
  input  logic [AXI_DW-1:0]   m_axi_rdata,
  input  logic [1:0]          m_axi_rresp,
  input  logic                m_axi_rlast,
  // video out to the HDMI transmitter
  output logic                vid_pclk,
  output logic                vid_hsync,
  output logic                vid_vsync,
  output logic                vid_de,
  output logic [7:0]          vid_r,
  output logic [7:0]          vid_g,
  output logic [7:0]          vid_b
);
  localparam int unsigned DEPTH [NUM_BUF] = '{FIFO_RGBA, FIFO_YUV, FIFO_YUV, FIFO_YUV};
  localparam int unsigned BASE  [NUM_BUF] = '{0, FIFO_RGBA, FIFO_RGBA + FIFO_YUV,
                                              FIFO_RGBA + 2 * FIFO_YUV};
  localparam int unsigned CW = $clog2(FIFO_RGBA + 1);

  // registers
  logic           enable, test_frame, valid_job;
  timing_t        timing;
  logic [23:0]    bg_color;
  logic [15:0]    prefill;
  job_cfg_t [1:0] job;
  job_cfg_t       fj;
  // controller
  logic           start, front, set_end_job, no_job, clr_valid_job, frame_end, running;
  // readers
  logic [NUM_BUF-1:0]            rd_done, rd_bpl_err, rd_underflow, ready_b;
  logic [NUM_BUF-1:0]            ar_valid, ar_ready, r_valid;
  ar_req_t [NUM_BUF-1:0]         ar_req;
  logic [63:0]                   r_data;
  logic                          r_last;
  logic [NUM_BUF-1:0]            wr_req, rd_req, rd_urgent, rd_gnt, rd_valid, pix_req;
  logic [NUM_BUF-1:0][GAW-1:0]   wr_addr, rd_addr;
  logic [NUM_BUF-1:0][63:0]      wr_data, rd_data;
  logic [NUM_BUF-1:0][31:0]      pix_data;
  logic [NUM_BUF-1:0][CW-1:0]    level;
  // SRAM
  logic                          s_wr_req;
  logic [GAW-1:0]                s_wr_addr;
  logic [63:0]                   s_wr_data;
  logic [1:0]                    b_en, b_we;
  logic [1:0][GAW-2:0]           b_addr;
  logic [1:0][63:0]              b_wdata, b_rdata;
  logic [$clog2(CREDIT+1)-1:0]   outstanding;

  assign fj = job[front];

  apb_host_if u_host (
    .clk, .rst_n,
    .psel(s_apb_psel), .penable(s_apb_penable), .pwrite(s_apb_pwrite),
    .paddr(s_apb_paddr), .pwdata(s_apb_pwdata), .prdata(s_apb_prdata),
    .pready(s_apb_pready), .pslverr(s_apb_pslverr),
    .enable, .test_frame, .timing, .bg_color, .prefill, .job, .valid_job,
    .set_end_job, .no_job_in(no_job), .clr_valid_job,
    .set_underflow(|rd_underflow), .bpl_err(|rd_bpl_err), .front_job(front), .irq
  );

  vdc_controller #(.NBUF(NUM_BUF)) u_ctrl (
    .clk, .rst_n, .enable(enable && !test_frame), .valid_job, .frame_end, .rd_done,
    .start, .front, .set_end_job, .no_job, .clr_valid_job
  );

  for (genvar b = 0; b < NUM_BUF; b++) begin : g_br
    localparam int unsigned L = layer_of(b);
    localparam int unsigned U = (b == BUF_RGBA) ? 4 : 1;
    logic [$clog2(DEPTH[b] + 1)-1:0] lvl;

    buffer_reader #(.UNIT(U), .DEPTH(DEPTH[b]), .BASE(BASE[b]), .GAW(GAW), .OUTS(CREDIT)) u_br (
      .clk, .rst_n, .start, .enable(fj.layer_en[L]), .cfg(fj.buffer[b]),
      .xsize(fj.layer[L].xsize), .ysize(fj.layer[L].ysize),
      .done(rd_done[b]), .bpl_err(rd_bpl_err[b]),
      .ar_valid(ar_valid[b]), .ar_req(ar_req[b]), .ar_ready(ar_ready[b]),
      .r_valid(r_valid[b]), .r_data, .r_last,
      .wr_req(wr_req[b]), .wr_addr(wr_addr[b]), .wr_data(wr_data[b]),
      .rd_req(rd_req[b]), .rd_urgent(rd_urgent[b]), .rd_addr(rd_addr[b]), .rd_gnt(rd_gnt[b]),
      .rd_valid(rd_valid[b]), .rd_data(rd_data[b]),
      .pix_req(pix_req[b]), .pix_data(pix_data[b]), .underflow(rd_underflow[b]),
      .level(lvl)
    );
    assign level[b] = CW'(lvl);
    // enough data to start the raster: PREFILL words, or the whole frame
    assign ready_b[b] = !fj.layer_en[L] || rd_done[b] || (level[b] >= CW'(prefill));
  end

  axi_arbiter #(.NREQ(NUM_BUF), .CREDIT(CREDIT)) u_axi (
    .clk, .rst_n,
    .req_valid(ar_valid), .req(ar_req), .req_ready(ar_ready),
    .rsp_valid(r_valid), .rsp_data(r_data), .rsp_last(r_last),
    .m_arvalid(m_axi_arvalid), .m_arready(m_axi_arready), .m_arid(m_axi_arid),
    .m_araddr(m_axi_araddr), .m_arlen(m_axi_arlen), .m_arsize(m_axi_arsize),
    .m_arburst(m_axi_arburst), .m_arprot(m_axi_arprot), .m_arcache(m_axi_arcache),
    .m_rvalid(m_axi_rvalid), .m_rready(m_axi_rready), .m_rid(m_axi_rid),
    .m_rdata(m_axi_rdata), .m_rresp(m_axi_rresp), .m_rlast(m_axi_rlast),
    .outstanding
  );

  // one AXI beat per cycle, so at most one reader writes at a time
  always_comb begin
    s_wr_req  = 1'b0;
    s_wr_addr = '0;
    s_wr_data = '0;
    for (int b = 0; b < NUM_BUF; b++)
      if (wr_req[b]) begin
        s_wr_req  = 1'b1;
        s_wr_addr = wr_addr[b];
        s_wr_data = wr_data[b];
      end
  end

  sram_arbiter #(.NRD(NUM_BUF), .GAW(GAW)) u_sarb (
    .clk, .rst_n,
    .wr_req(s_wr_req), .wr_addr(s_wr_addr), .wr_data(s_wr_data),
    .rd_req, .rd_urgent, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  for (genvar k = 0; k < 2; k++) begin : g_bank
    sram_sp #(.WORDS(BANK), .DW(64)) u_ram (
      .clk, .en(b_en[k]), .we(b_we[k]), .addr(b_addr[k][$clog2(BANK)-1:0]),
      .wdata(b_wdata[k]), .rdata(b_rdata[k])
    );
  end

  dfmt u_dfmt (
    .clk, .rst_n, .enable(enable && (running || &ready_b)), .test_frame, .timing, .bg_color,
    .layer_en(fj.layer_en), .win(fj.layer), .fifo_ready(&ready_b),
    .pix_req, .pix_data, .frame_end, .running,
    .vid_pclk, .vid_hsync, .vid_vsync, .vid_de, .vid_r, .vid_g, .vid_b
  );

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wr_req))
    else $error("vdc_top: two FIFO writes in one cycle");
endmodule
