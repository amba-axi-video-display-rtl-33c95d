// vdc_tb_env: end-to-end test environment for vdc_top (behavioural).
//
// It builds, in the behavioural AXI memory, a page list for each of the
// four buffers of both jobs that scatters the buffer's 4 KiB pages over
// physical memory, programs the controller over APB (raster timing, two
// layer windows, buffer definitions with stride, window offset and a
// non-page-aligned first page), enables it and then acts as the host: on
// each interrupt it refills the back job with a shifted window (on two
// frames in three) and sets VALID_JOB, else it leaves VALID_JOB clear so
// the frame must repeat. At every VSYNC it reads which job is in front.
//
// Every visible output pixel is compared with a value predicted from the
// memory contents: the pixel's virtual address in each buffer, translated
// through the page lists, gives the Y, U, V and RGBa bytes; the expected
// colour is background, YUV->RGB and alpha blend (floating-point reference,
// tolerance 2 LSB). The memory returns bursts with random latency and out of
// order, optionally switched off for OFF_CYCLES of every ON+OFF cycles to
// create peak latency. The mechanisms of the design are counted and each
// must occur: page translations, bursts cut at line end, at page end and
// by FIFO space, read stalls in the SRAM arbiter, out-of-order returns,
// the credit limit, the first-frame prefill wait, job switches, repeated
// frames, bus-off periods survived, and the test frame at the end.
//
// The host behaviour (refill back job on interrupt, set VALID_JOB) and the
// ON/OFF bus follow the document; rates, sizes and tolerances are this
// environment's choice.
module vdc_tb_env #(
  parameter int HA = 160, parameter int VA = 64,
  parameter int HF = 4, parameter int HS = 8, parameter int HB = 8,
  parameter int VF = 2, parameter int VS = 2, parameter int VB = 6,
  parameter int L0X = 8, parameter int L0Y = 4, parameter int L0W = 144, parameter int L0H = 56,
  parameter int L1X = 40, parameter int L1Y = 10, parameter int L1W = 96, parameter int L1H = 48,
  parameter int BUFW = 200, parameter int BUFH = 80,    // buffer size in pixels
  parameter int NFRAMES = 6,
  parameter int LAT_MIN = 50, parameter int LAT_MAX = 250,
  parameter int ON_CYCLES = 5000, parameter int OFF_CYCLES = 1000,
  parameter int PREFILL = 256,
  parameter bit REQUIRE_ALL = 1,
  parameter longint WATCHDOG = 2000000
) ();
  import vdc_pkg::*;
  import vdc_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic psel, penable, pwrite, pready, pslverr, irq;
  logic [11:0] paddr;
  logic [31:0] pwdata, prdata;
  logic arvalid, arready, rvalid, rready, rlast;
  logic [3:0] arid, rid, arcache;
  logic [31:0] araddr;
  logic [7:0] arlen;
  logic [2:0] arsize, arprot;
  logic [1:0] arburst;
  logic [63:0] rdata;
  logic vid_pclk, vid_hsync, vid_vsync, vid_de;
  logic [7:0] vid_r, vid_g, vid_b;

  vdc_top dut (
    .clk, .rst_n,
    .s_apb_psel(psel), .s_apb_penable(penable), .s_apb_pwrite(pwrite), .s_apb_paddr(paddr),
    .s_apb_pwdata(pwdata), .s_apb_prdata(prdata), .s_apb_pready(pready), .s_apb_pslverr(pslverr),
    .irq,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_arid(arid), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst), .m_axi_arprot(arprot),
    .m_axi_arcache(arcache), .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_rid(rid),
    .m_axi_rdata(rdata), .m_axi_rresp(2'b00), .m_axi_rlast(rlast),
    .vid_pclk, .vid_hsync, .vid_vsync, .vid_de, .vid_r, .vid_g, .vid_b
  );
  apb_bfm bfm (.clk, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready);
  axi_mem_model #(.LAT_MIN(LAT_MIN), .LAT_MAX(LAT_MAX), .ON_CYCLES(ON_CYCLES),
                  .OFF_CYCLES(OFF_CYCLES)) u_mem (
    .clk, .rst_n, .arvalid, .arready, .arid, .araddr, .arlen,
    .rvalid, .rready, .rid, .rdata, .rlast);

  always #5 clk = ~clk;

  localparam int UNIT [4] = '{4, 1, 1, 1};
  // page-list entries written per buffer: enough for the largest buffer
  localparam int NPL = (((BUFW * 4 + 7) / 8) * 8 * BUFH + 'h200) / 4096 + 2;

  // testbench copy of both jobs
  job_cfg_t jc [2];
  int checks = 0, failures = 0;
  // mechanism counters
  int n_xlat = 0, n_row_cut = 0, n_page_cut = 0, n_fifo_cut = 0, n_stall = 0, n_credit = 0;
  int n_prefill = 0, n_switch = 0, n_repeat = 0, n_irq = 0, n_off_survived = 0, n_test = 0;
  int frames_checked = 0;

  function automatic logic [31:0] bpla_of(input int j, input int b);
    return 32'h0100_0000 + 32'((j * 4 + b) * 'h8000);   // room for 4096 entries
  endfunction
  function automatic logic [31:0] page_of(input int j, input int b, input int p);
    // scattered, distinct physical pages
    return 32'h2000_0000 + 32'(((j * 4 + b) * 4096 + (p * 389 + 17) % 4093) * 'h1000);
  endfunction

  // buffer geometry
  function automatic int stride_of(input int b);
    return ((BUFW * UNIT[b] + 7) / 8) * 8;
  endfunction

  // job version v: window shifted inside the buffer by v pixels
  task automatic make_job(input int j, input int v);
    job_cfg_t c;
    int poff;
    c = '0;
    c.layer_en = 2'b11;
    c.layer[0] = '{x0: 16'(L0X), y0: 16'(L0Y), xsize: 16'(L0W), ysize: 16'(L0H)};
    c.layer[1] = '{x0: 16'(L1X + 2 * (v % 4)), y0: 16'(L1Y), xsize: 16'(L1W), ysize: 16'(L1H)};
    for (int b = 0; b < 4; b++) begin
      automatic int ox = (8 / UNIT[b]) * (v % 5);    // keeps the window 64-bit aligned
      automatic int oy = 1 + v % 3;
      automatic int bsize;
      poff = 'h148 + 8 * b;                          // original page offset, 64-bit aligned
      c.buffer[b].bpla   = bpla_of(j, b);
      c.buffer[b].bs     = 16'(stride_of(b));
      c.buffer[b].offset = 32'((oy * stride_of(b) + ox * UNIT[b]) + poff);
      bsize = UNIT[b] * stride_of(b) / UNIT[b] * BUFH + poff;  // Formula for Buffer Size
      c.buffer[b].bpls   = 32'((bsize % 4096 == 0) ? bsize / 4096 : bsize / 4096 + 1);
    end
    jc[j] = c;
  endtask

  task automatic write_job(input int j);
    logic [11:0] base;
    base = 12'h400 + 12'(j * 'h200);
    bfm.write(base, 32'(jc[j].layer_en));
    for (int l = 0; l < 2; l++) begin
      bfm.write(base + 12'h10 + 12'(l * 16), 32'(jc[j].layer[l].x0));
      bfm.write(base + 12'h14 + 12'(l * 16), 32'(jc[j].layer[l].y0));
      bfm.write(base + 12'h18 + 12'(l * 16), 32'(jc[j].layer[l].xsize));
      bfm.write(base + 12'h1C + 12'(l * 16), 32'(jc[j].layer[l].ysize));
    end
    for (int b = 0; b < 4; b++) begin
      bfm.write(base + 12'h40 + 12'(b * 16), jc[j].buffer[b].bpla);
      bfm.write(base + 12'h44 + 12'(b * 16), jc[j].buffer[b].bpls);
      bfm.write(base + 12'h48 + 12'(b * 16), 32'(jc[j].buffer[b].bs));
      bfm.write(base + 12'h4C + 12'(b * 16), jc[j].buffer[b].offset);
    end
  endtask

  // expected pixel of buffer b of job j at window position (wx, wy)
  function automatic logic [31:0] buf_pix(input int j, input int b, input int wx, input int wy);
    logic [31:0] va, pa, v;
    va = jc[j].buffer[b].offset + 32'(wy * int'(jc[j].buffer[b].bs) + wx * UNIT[b]);
    pa = page_of(j, b, int'(va >> 12)) | (va & 32'hFFF);
    v = '0;
    for (int i = 0; i < UNIT[b]; i++) v[8*i +: 8] = mem_byte(pa + 32'(i));
    return v;
  endfunction

  function automatic bit inw(input int j, input int l, input int x, input int y);
    return jc[j].layer_en[l] && x >= int'(jc[j].layer[l].x0) &&
           x < int'(jc[j].layer[l].x0) + int'(jc[j].layer[l].xsize) &&
           y >= int'(jc[j].layer[l].y0) && y < int'(jc[j].layer[l].y0) + int'(jc[j].layer[l].ysize);
  endfunction

  // ---------------------------------------------------------------- checker
  int   cur_job = -1, k = 0;
  logic pclk_q = 0, vs_q = 0, vs_rise = 0;
  logic [23:0] bg = 24'h40_30_20;
  bit   test_phase = 0;

  always @(posedge clk) if (rst_n) begin      // outputs are undefined before reset
    pclk_q <= vid_pclk;
    vs_q <= vid_vsync;
    if (vid_vsync && !vs_q) begin
      vs_rise <= 1'b1;
      if (cur_job >= 0 && k == HA * VA) frames_checked++;
      k = 0;
    end
    if (vid_pclk && !pclk_q && vid_de && !test_phase) begin
      automatic int x = k % HA, y = k / HA, j = cur_job;
      automatic int er, eg, eb, r0, g0, b0;
      if (j >= 0) begin
        r0 = bg[7:0]; g0 = bg[15:8]; b0 = bg[23:16];
        if (inw(j, 0, x, y)) begin
          automatic int wx = x - jc[j].layer[0].x0, wy = y - jc[j].layer[0].y0;
          ref_rgb(buf_pix(j, 1, wx, wy), buf_pix(j, 2, wx, wy), buf_pix(j, 3, wx, wy), r0, g0, b0);
        end
        er = r0; eg = g0; eb = b0;
        if (inw(j, 1, x, y)) begin
          automatic logic [31:0] p = buf_pix(j, 0, x - jc[j].layer[1].x0, y - jc[j].layer[1].y0);
          er = ref_blend(p[7:0], r0, p[31:24]);
          eg = ref_blend(p[15:8], g0, p[31:24]);
          eb = ref_blend(p[23:16], b0, p[31:24]);
        end
        checks++;
        if (absdiff(er, vid_r) > 2 || absdiff(eg, vid_g) > 2 || absdiff(eb, vid_b) > 2) begin
          failures++;
          if (failures < 10)
            $display("job %0d (%0d,%0d): got %0d,%0d,%0d want %0d,%0d,%0d", j, x, y,
                     vid_r, vid_g, vid_b, er, eg, eb);
        end
      end
      k++;
    end
  end

  // ------------------------------------------------------ mechanism probes
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.u_axi.outstanding) == 8) n_credit++;
    if (|(dut.u_sarb.rd_req & ~dut.u_sarb.rd_gnt) && dut.u_sarb.wr_req) n_stall++;
    if (dut.enable && !dut.test_frame && !dut.running) n_prefill++;
  end
  for (genvar b = 0; b < 4; b++) begin : g_probe
    always @(posedge clk) if (rst_n) begin
      if (dut.g_br[b].u_br.ar_valid && dut.g_br[b].u_br.ar_ready) begin
        if (dut.g_br[b].u_br.u_ag.ar_is_bpl) n_xlat++;
        else if (dut.g_br[b].u_br.ar_req.len != 4'd15) begin
          automatic logic [31:0] a = dut.g_br[b].u_br.ar_req.addr;
          automatic int n = int'(dut.g_br[b].u_br.ar_req.len) + 1;
          if (int'(a[11:0]) + 8 * n == 4096) n_page_cut++;
          else if (n == int'(dut.g_br[b].u_br.u_ag.words_left)) n_row_cut++;
          else n_fifo_cut++;
        end
      end
    end
  end
  // a bus-off period during which the display kept running without underflow
  int off_len = 0;
  always @(posedge clk) if (rst_n && OFF_CYCLES > 0) begin
    if (!u_mem.bus_on) off_len++;
    else begin
      if (off_len == int'(OFF_CYCLES) && vid_de) n_off_survived++;
      off_len = 0;
    end
  end

  // ------------------------------------------------------------ host model
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d frames", frames_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ver = 0, prev_front = 0, host_valid = 0;
    automatic logic [31:0] d;
    // page lists
    for (int j = 0; j < 2; j++)
      for (int b = 0; b < 4; b++)
        for (int p = 0; p < NPL; p++)
          u_mem.set_word(bpla_of(j, b) + 32'(8 * p), {32'd0, page_of(j, b, p)});
    repeat (5) @(negedge clk);
    rst_n = 1;
    bfm.write(12'h010, HA); bfm.write(12'h014, HF); bfm.write(12'h018, HS); bfm.write(12'h01C, HB);
    bfm.write(12'h020, VA); bfm.write(12'h024, VF); bfm.write(12'h028, VS); bfm.write(12'h02C, VB);
    bfm.write(12'h00C, 32'(bg));
    bfm.write(12'h030, PREFILL);
    make_job(0, ver++); write_job(0);
    make_job(1, ver++); write_job(1);
    bfm.write(12'h000, 32'h1);                         // enable
    while (frames_checked < NFRAMES) begin
      @(negedge clk);
      if (vs_rise) begin
        vs_rise = 0;
        bfm.read(12'h008, d);
        checks++;
        if (d[0]) begin failures++; $display("FIFO underflow reported"); end
        if (cur_job >= 0) begin
          if (int'(d[2]) != prev_front) begin
            n_switch++;
            checks++;
            if (!host_valid) begin failures++; $display("job switched without VALID_JOB"); end
            host_valid = 0;
          end else n_repeat++;
        end
        prev_front = int'(d[2]);
        cur_job = int'(d[2]);
      end else if (irq) begin
        automatic int back;
        n_irq++;
        bfm.read(12'h004, d);
        back = 1 - int'(d[1]);
        if ((n_irq % 3) != 0 && host_valid == 0) begin
          make_job(back, ver++);
          write_job(back);
          host_valid = 1;
          bfm.write(12'h004, 32'h4);       // VALID_JOB, clear END_JOB
        end else
          bfm.write(12'h004, host_valid ? 32'h4 : 32'h0);
      end
    end
    // test frame: bars without bus traffic
    test_phase = 1;
    bfm.write(12'h000, 32'h3);
    wait (vid_vsync); wait (!vid_vsync);
    wait (vid_de);
    for (int x = 0; x < HA; x++) begin
      @(posedge vid_pclk);
      if (x == HA / 16 && {vid_b, vid_g, vid_r} == 24'hFFFFFF) n_test++;
      if (x == HA / 8 + HA / 16 && {vid_b, vid_g, vid_r} == 24'h00FFFF) n_test++;
    end
    checks++;
    if (n_test != 2) begin failures++; $display("test frame bars missing"); end

    $display("frames checked %0d: translations %0d, bursts cut at line end %0d / page end %0d / by FIFO space %0d",
             frames_checked, n_xlat, n_row_cut, n_page_cut, n_fifo_cut);
    $display("SRAM read stalls %0d, out-of-order bursts %0d, cycles at credit limit %0d, prefill wait %0d cycles",
             n_stall, u_mem.n_ooo, n_credit, n_prefill);
    $display("IRQs %0d, job switches %0d, repeated frames %0d, bus-off periods survived %0d, mean latency %0d",
             n_irq, n_switch, n_repeat, n_off_survived, u_mem.lat_sum / (u_mem.n_bursts > 0 ? u_mem.n_bursts : 1));
    begin
      automatic int cnt [string] = '{"translation": n_xlat, "line-end burst": n_row_cut,
        "page-end burst": n_page_cut, "FIFO-space burst": n_fifo_cut, "SRAM read stall": n_stall,
        "out-of-order return": u_mem.n_ooo, "credit limit": n_credit, "prefill wait": n_prefill,
        "job switch": n_switch, "repeated frame": n_repeat, "interrupt": n_irq,
        "bus-off survived": n_off_survived, "test frame": n_test};
      foreach (cnt[s]) begin
        checks++;
        if (cnt[s] == 0 && (REQUIRE_ALL || s == "translation" || s == "interrupt" || s == "test frame")) begin
          failures++; $display("mechanism never happened: %s", s);
        end
      end
    end
    checks++;
    if (frames_checked < NFRAMES) begin failures++; $display("too few frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
