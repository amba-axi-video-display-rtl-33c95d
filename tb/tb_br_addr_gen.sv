// tb_br_addr_gen: drives the address generator with a buffer whose window
// crosses several 4 KiB pages and a FIFO that drains slowly, answering
// page-list reads with a known page map. The expected stream of 64-bit
// word addresses is computed here from OFFSET, stride and the map. Checked:
// every pixel burst continues that stream, is 1..16 beats, stays in its
// page, never exceeds the free FIFO space, and is 16 beats unless the line
// end, the page end or the FIFO space (sampled a cycle before issue) is
// nearer; every page-list read goes
// to BPLA + 8*page exactly when the page changes; done at the end. Short
// bursts of each of the three kinds must occur.
//
// The three burst-cut rules and the BPLA+8*page lookup follow the
// document; the buffer geometry is this testbench's choice.
module tb_br_addr_gen;
  import vdc_pkg::*;
  localparam int unsigned UNIT = 4, DEPTH = 64;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic clk = 0, rst_n = 0, start = 0, enable = 1;
  buf_cfg_t cfg;
  logic [15:0] xsize, ysize;
  logic done, bpl_err, flush, fifo_idle = 1, xlat_valid = 0, ar_valid, ar_is_bpl, ar_ready = 0;
  logic [CW-1:0] free_words;
  logic [31:0] xlat_base = '0;
  ar_req_t ar_req;

  int checks = 0, failures = 0;
  int n_row = 0, n_page = 0, n_fifo = 0, n_full = 0, n_xlat = 0;
  int reserved = 0;
  logic [31:0] exp_va [$];
  int last_page = -1, pending_page = -1, xlat_delay = -1;

  br_addr_gen #(.UNIT(UNIT), .DEPTH(DEPTH)) dut (.*);

  function automatic logic [19:0] page_map(input logic [19:0] p);
    return 20'h80000 + p * 20'd37 + 20'd5;
  endfunction

  assign free_words = CW'(DEPTH - reserved);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus and FIFO side
  always @(posedge clk) if (rst_n) begin
    if (ar_valid && ar_ready) begin
      if (ar_is_bpl) begin
        automatic logic [19:0] pg = exp_va.size() > 0 ? exp_va[0][31:12] : 20'hFFFFF;
        checks++;
        n_xlat++;
        if (ar_req.addr != cfg.bpla + {pg, 3'b000} || ar_req.len != 0 || int'(pg) == last_page) begin
          failures++; $display("bad page-list read %h len %0d", ar_req.addr, ar_req.len);
        end
        pending_page = int'(pg);
        xlat_delay = 5 + $urandom % 20;
      end else begin
        automatic int len = int'(ar_req.len) + 1;
        automatic int words_row, words_page;
        automatic logic [31:0] va0 = exp_va[0];
        checks++;
        if (len > reserved_free()) begin failures++; $display("burst exceeds free space"); end
        // reasons for a short burst
        words_page = (4096 - int'(va0[11:0])) / 8;
        words_row = 0;
        for (int k = 0; k < exp_va.size() && k < 16; k++) begin
          if (k > 0 && exp_va[k] != exp_va[k-1] + 8) break;
          words_row++;
        end
        if (len == 16) n_full++;
        else if (len == words_row) n_row++;
        else if (len == words_page) n_page++;
        else if (len < words_row && len < words_page && len <= reserved_free()) n_fifo++;
        else begin failures++; $display("burst of %0d beats is shorter than needed", len); end
        for (int k = 0; k < len; k++) begin
          automatic logic [31:0] va = exp_va.pop_front();
          automatic logic [31:0] pa = {page_map(va[31:12]), va[11:0]};
          checks++;
          if (ar_req.addr + 32'(8 * k) != pa || int'(va[31:12]) != last_page) begin
            failures++;
            $display("beat %0d: address %h, expected %h", k, ar_req.addr + 32'(8 * k), pa);
          end
        end
        reserved += len;
      end
    end
    if (xlat_delay > 0) xlat_delay--;
    xlat_valid <= 1'b0;
    if (xlat_delay == 0) begin
      xlat_valid <= 1'b1;
      xlat_base  <= {page_map(20'(pending_page)), 12'h000};
      last_page   = pending_page;
      xlat_delay  = -1;
    end
    // the display drains two words every three cycles on average
    if (reserved > 0 && ($urandom % 3) != 0) reserved--;
    ar_ready <= ($urandom % 4) != 0;
  end

  function automatic int reserved_free();
    return DEPTH - reserved;
  endfunction

  initial begin
    cfg.bpla = 32'h0010_0000;
    cfg.bpls = 32'd16;
    cfg.bs   = 16'd1600;           // 400 RGBa pixels per line
    cfg.offset = 32'd1600 * 3 + 32'd40 * 4 + 32'h0000_0128;  // OffsetY=3, OffsetX=40, page offset 0x128
    xsize = 16'd150;               // 75 words per line
    ysize = 16'd20;
    for (int y = 0; y < ysize; y++)
      for (int w = 0; w < (xsize * UNIT + 7) / 8; w++)
        exp_va.push_back(cfg.offset + 32'(y) * 32'(cfg.bs) + 32'(8 * w));
    repeat (3) @(negedge clk);
    rst_n = 1;
    fifo_idle = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (ar_valid) begin failures++; $display("issued before the FIFO was idle"); end
    fifo_idle = 1;
    wait (done);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_va.size() != 0) begin failures++; $display("%0d words never requested", exp_va.size()); end
    checks++;
    if (n_row == 0 || n_page == 0 || n_fifo == 0 || n_full == 0) begin
      failures++; $display("a burst kind never occurred");
    end
    checks++;
    if (bpl_err) begin failures++; $display("unexpected page-list range error"); end
    $display("full=%0d row-end=%0d page-end=%0d fifo-limited=%0d translations=%0d",
             n_full, n_row, n_page, n_fifo, n_xlat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
