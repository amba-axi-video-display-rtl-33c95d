// br_addr_gen: address generation and page translation of one buffer reader.
//
// On start it walks the displayed window of its buffer line by line. The
// virtual address of line y begins at OFFSET + y*BS; a line holds
// ceil(XSIZE*UNIT/8) 64-bit words. The upper 20 bits of a virtual address
// are the page number, the lower 12 the page offset. When the page of the
// next address differs from the one translated last, the generator issues a
// single-beat read of the page-list entry at BPLA + 8*page and waits for the
// physical page base before issuing any burst in that page. Pixel bursts
// are INCR bursts of 64-bit beats, 16 beats long except where they would
// pass the end of the line, the end of the 4 KiB page, or the free space of
// the FIFO (counting data already requested). With no free space it waits
// for the display to drain the FIFO. done rises once every address of the
// window has been issued.
//
// The burst length is computed one cycle before the burst is presented (the
// document moves the address arithmetic off the critical path the same
// way). A restart first waits until nothing is in flight, then flushes the
// FIFO. Page numbers at or beyond BPLS set bpl_err (this design's check);
// the entry is still fetched. OFFSET and BS are taken as multiples of 8
// bytes (the document: windows start at 64-bit aligned addresses).
module br_addr_gen
  import vdc_pkg::*;
#(
  parameter int unsigned UNIT  = 4,       // bytes per pixel
  parameter int unsigned DEPTH = 2048,    // FIFO words
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          enable,
  input  buf_cfg_t      cfg,
  input  logic [15:0]   xsize,
  input  logic [15:0]   ysize,
  output logic          done,
  output logic          bpl_err,
  output logic          flush,
  // FIFO control
  input  logic [CW-1:0] free_words,
  input  logic          fifo_idle,
  input  logic          xlat_valid,
  input  logic [31:0]   xlat_base,
  // AXI read address toward the arbiter
  output logic          ar_valid,
  output ar_req_t       ar_req,
  output logic          ar_is_bpl,
  input  logic          ar_ready
);
  typedef enum logic [3:0] {
    S_IDLE, S_DRAIN, S_ROW, S_CHECK, S_XREQ, S_XWAIT, S_CALC, S_ISSUE, S_DONE
  } state_t;

  state_t       st;
  buf_cfg_t     c;
  logic [15:0]  xs, ys, y;
  logic [31:0]  row_va, cur_va;
  logic [16:0]  words_left;
  logic         tlb_vld;
  logic [19:0]  tlb_page, tlb_base;
  logic [4:0]   blen;
  logic [17:0]  row_bytes;
  logic [16:0]  row_words;
  logic [9:0]   page_words;
  logic [16:0]  lim;

  assign row_bytes  = 18'(xs) * 18'(UNIT);
  assign row_words  = 17'((row_bytes + 18'd7) >> 3);
  assign page_words = 10'd512 - 10'(cur_va[11:3]);

  // burst length: min(16, words left in line, words left in page, free)
  always_comb begin
    lim = 17'(MAX_BURST);
    if (words_left < lim)          lim = words_left;
    if (17'(page_words) < lim)     lim = 17'(page_words);
    if (17'(free_words) < lim)     lim = 17'(free_words);
  end

  always_comb begin
    ar_valid  = 1'b0;
    ar_is_bpl = 1'b0;
    ar_req    = '0;
    if (st == S_XREQ) begin
      ar_valid    = 1'b1;
      ar_is_bpl   = 1'b1;
      ar_req.addr = c.bpla + 32'({cur_va[31:12], 3'b000});
      ar_req.len  = 4'd0;
    end else if (st == S_ISSUE) begin
      ar_valid    = 1'b1;
      ar_req.addr = {tlb_base, cur_va[11:0]};
      ar_req.len  = 4'(blen - 5'd1);
    end
  end

  assign done  = (st == S_DONE);
  assign flush = (st == S_DRAIN) && fifo_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; xs <= '0; ys <= '0; y <= '0;
      row_va <= '0; cur_va <= '0; words_left <= '0;
      tlb_vld <= 1'b0; tlb_page <= '0; tlb_base <= '0; blen <= '0;
      bpl_err <= 1'b0;
    end else if (start) begin
      // latch the buffer definition of the job about to be fetched
      st <= enable ? S_DRAIN : S_DONE;
      c <= cfg; xs <= xsize; ys <= ysize;
      bpl_err <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: ;
        S_DRAIN: if (fifo_idle) begin
          tlb_vld <= 1'b0;
          row_va  <= c.offset;
          y       <= '0;
          st      <= (xs == 0 || ys == 0) ? S_DONE : S_ROW;
        end
        S_ROW: begin
          cur_va     <= row_va;
          words_left <= row_words;
          st         <= S_CHECK;
        end
        S_CHECK: begin
          if (tlb_vld && tlb_page == cur_va[31:12]) st <= S_CALC;
          else begin
            if (32'(cur_va[31:12]) >= c.bpls) bpl_err <= 1'b1;
            st <= S_XREQ;
          end
        end
        S_XREQ:  if (ar_ready) st <= S_XWAIT;
        S_XWAIT: if (xlat_valid) begin
          tlb_vld  <= 1'b1;
          tlb_page <= cur_va[31:12];
          tlb_base <= xlat_base[31:12];
          st       <= S_CALC;
        end
        S_CALC: if (lim != 0) begin
          blen <= 5'(lim);
          st   <= S_ISSUE;
        end
        S_ISSUE: if (ar_ready) begin
          cur_va     <= cur_va + {24'd0, blen, 3'b000};
          words_left <= words_left - 17'(blen);
          if (words_left == 17'(blen)) begin
            if (y + 16'd1 == ys) st <= S_DONE;
            else begin
              y      <= y + 16'd1;
              row_va <= row_va + 32'(c.bs);
              st     <= S_ROW;
            end
          end else st <= S_CHECK;
        end
        S_DONE: ;
        default: st <= S_IDLE;
      endcase
    end
  end

  // a burst never crosses a 4 KiB boundary
  assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_ISSUE) |-> (13'(cur_va[11:0]) + 13'({blen, 3'b000}) <= 13'd4096))
    else $error("br_addr_gen: burst crosses a page");
endmodule
