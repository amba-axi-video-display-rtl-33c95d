// tb_buffer_reader: one RGBa buffer reader fetching a window of a paged
// buffer from the behavioural AXI memory (random 20..120 cycle latency)
// through the AXI arbiter, with the SRAM arbiter and banks. The page list
// scatters the buffer's pages; every pixel handed out is compared with the
// byte values the memory holds at the translated physical address,
// computed here from OFFSET, stride and the page list. Two frames are
// fetched to check the restart. The display side waits for a prefill and
// then requests one pixel every two cycles; checked also: no underflow,
// done after each frame, FIFO never overflowed (assertion in the DUT).
//
// Page translation through the page list follows the document; the
// window, latency and page scatter are this testbench's choice.
module tb_buffer_reader;
  import vdc_pkg::*;
  import vdc_tb_pkg::*;
  localparam int unsigned DEPTH = 128, GAW = 12, U = 4;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int XS = 90, YS = 24, STRIDE = 512, OFFX = 10, OFFY = 2, POFF = 'h2C8;

  logic clk = 0, rst_n = 0, start = 0;
  buf_cfg_t cfg;
  logic done, bpl_err, ar_valid, ar_ready, r_valid, r_last;
  ar_req_t ar_req;
  logic [63:0] r_data;
  logic wr_req, rd_req, rd_gnt, rd_valid, pix_req = 0, underflow;
  logic [GAW-1:0] wr_addr, rd_addr;
  logic [63:0] wr_data, rd_data;
  logic [31:0] pix_data;
  logic [CW-1:0] level;

  // AXI
  logic [3:0] req_ready, rsp_valid;
  logic m_arvalid, m_arready, m_rvalid, m_rready, m_rlast;
  logic [3:0] m_arid, m_rid, m_arcache;
  logic [31:0] m_araddr;
  logic [7:0] m_arlen;
  logic [2:0] m_arsize, m_arprot;
  logic [1:0] m_arburst;
  logic [63:0] m_rdata;
  logic [3:0] outstanding;
  // SRAM
  logic [3:0] a_gnt, a_valid;
  logic [3:0][63:0] a_data;
  logic [1:0] b_en, b_we;
  logic [1:0][GAW-2:0] b_addr;
  logic [1:0][63:0] b_wdata, b_rdata;

  buffer_reader #(.UNIT(U), .DEPTH(DEPTH), .BASE(0), .GAW(GAW)) dut (
    .clk, .rst_n, .start, .enable(1'b1), .cfg, .xsize(16'(XS)), .ysize(16'(YS)),
    .done, .bpl_err, .ar_valid, .ar_req, .ar_ready, .r_valid, .r_data, .r_last,
    .wr_req, .wr_addr, .wr_data, .rd_req, .rd_urgent(), .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .pix_req, .pix_data, .underflow, .level);

  axi_arbiter u_axi (.clk, .rst_n, .req_valid({3'b000, ar_valid}), .req({4{ar_req}}),
    .req_ready, .rsp_valid, .rsp_data(r_data), .rsp_last(r_last),
    .m_arvalid, .m_arready, .m_arid, .m_araddr, .m_arlen, .m_arsize, .m_arburst,
    .m_arprot, .m_arcache, .m_rvalid, .m_rready, .m_rid, .m_rdata, .m_rresp(2'b00),
    .m_rlast, .outstanding);
  assign ar_ready = req_ready[0];
  assign r_valid  = rsp_valid[0];

  axi_mem_model #(.LAT_MIN(20), .LAT_MAX(120)) u_mem (.clk, .rst_n, .arvalid(m_arvalid),
    .arready(m_arready), .arid(m_arid), .araddr(m_araddr), .arlen(m_arlen),
    .rvalid(m_rvalid), .rready(m_rready), .rid(m_rid), .rdata(m_rdata), .rlast(m_rlast));

  sram_arbiter #(.NRD(4), .GAW(GAW)) u_arb (.clk, .rst_n, .wr_req, .wr_addr, .wr_data,
    .rd_req({3'b000, rd_req}), .rd_urgent(4'b0000), .rd_addr({{3{GAW'(0)}}, rd_addr}), .rd_gnt(a_gnt),
    .rd_valid(a_valid), .rd_data(a_data), .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  assign rd_gnt = a_gnt[0];
  assign rd_valid = a_valid[0];
  assign rd_data = a_data[0];
  for (genvar k = 0; k < 2; k++) begin : g_b
    sram_sp #(.WORDS(2048)) u_ram (.clk, .en(b_en[k]), .we(b_we[k]), .addr(b_addr[k]),
      .wdata(b_wdata[k]), .rdata(b_rdata[k]));
  end

  int checks = 0, failures = 0, underflows = 0;
  logic [31:0] pmap [64];

  always #5 clk = ~clk;
  always @(posedge clk) if (underflow) underflows++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] exp_pix(input int x, input int y);
    logic [31:0] va, pa, v;
    va = cfg.offset + 32'(y * STRIDE + x * U);
    pa = pmap[va[17:12]] | {20'd0, va[11:0]};
    for (int i = 0; i < 4; i++) v[8*i +: 8] = mem_byte(pa + 32'(i));
    return v;
  endfunction

  initial begin
    cfg.bpla = 32'h0040_0000;
    cfg.bs = 16'(STRIDE);
    cfg.offset = 32'((OFFY * STRIDE + OFFX) * U + POFF);
    cfg.bpls = ((cfg.offset + 32'(YS * STRIDE)) >> 12) + 1;
    for (int p = 0; p < 64; p++) begin
      pmap[p] = 32'h2000_0000 + 32'((p * 29 + 7) % 97) * 32'h1000;
      u_mem.set_word(cfg.bpla + 32'(8 * p), {32'd0, pmap[p]});
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      // prefill
      while (int'(level) < DEPTH - 16) @(negedge clk);
      for (int y = 0; y < YS; y++)
        for (int x = 0; x < XS; x++) begin
          @(negedge clk); pix_req = 1;
          @(negedge clk); pix_req = 0;
          checks++;
          if (pix_data !== exp_pix(x, y)) begin
            failures++;
            if (failures < 10) $display("frame %0d (%0d,%0d): got %h want %h", f, x, y, pix_data, exp_pix(x, y));
          end
        end
      checks++;
      if (!done) begin failures++; $display("done not set after the frame"); end
    end
    checks++;
    if (underflows != 0 || bpl_err) begin failures++; $display("underflow %0d / range error", underflows); end
    $display("bursts %0d, mean latency %0d cycles", u_mem.n_bursts, u_mem.lat_sum / u_mem.n_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
