// br_fifo_ctrl: pixel FIFO control of one buffer reader.
//
// Write side: every beat arriving on the AXI read data channel for this
// reader is either pixel data, written at once into the reader's region of
// the shared FIFO SRAM (the write is always granted), or a page-list entry,
// whose low 32 bits are the physical base of the next page and go back to
// the address generator. Because all bursts of one reader carry the same
// AXI ID they return in issue order, so a small in-order queue with one bit
// per issued burst tells the two kinds apart (the document describes the
// address generator counting the bursts issued before a translation; this
// queue holds the same information).
//
// Space: the address generator may only issue a pixel burst into space that
// is free now, counting data still in flight, so the FIFO can never
// overflow and the bus never has to be stalled. free_words reports
// DEPTH minus (words stored + words requested but not yet arrived).
//
// Read side: words are read from SRAM (grant from the SRAM arbiter, data 3
// cycles later) into PF_DEPTH prefetch registers that the pixel unpacker
// pops. They hide reads stalled by writes to the same bank or by other
// readers; when two or fewer words are left the read is flagged urgent so
// that the arbiter serves it before other readers. The document places
// three registers per reader on this path (SRAM read data plus two); here
// the arbiter's read data register is a pipeline stage and four prefetch
// registers follow it. This depth and the urgency flag are this design's
// choice: the full-system tests starved the RGBa reader with fewer.
//
// The SRAM write data is the AXI beat itself, passed straight through;
// the constant output bits are the unused upper bits of the level count.
module br_fifo_ctrl #(
  parameter int unsigned DEPTH    = 2048,   // FIFO words (16 KiB for RGBa)
  parameter int unsigned BASE     = 0,      // first word of the region in SRAM
  parameter int unsigned GAW      = 12,
  parameter int unsigned OUTS     = 8,      // bursts that may be in flight
  parameter int unsigned PF_DEPTH = 4,
  localparam int unsigned CW      = $clog2(DEPTH + 1),
  localparam int unsigned PW      = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush,
  // bursts issued by the address generator
  input  logic           ar_fire,
  input  logic           ar_is_bpl,
  input  logic [3:0]     ar_len,
  output logic [CW-1:0]  free_words,
  output logic           idle,          // nothing in flight
  output logic           xlat_valid,
  output logic [31:0]    xlat_base,
  // AXI read data for this reader
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
  // words to the pixel unpacker
  output logic           word_valid,
  output logic [63:0]    word_data,
  input  logic           word_pop,
  output logic [CW-1:0]  level          // words held (SRAM + prefetch)
);
  localparam int unsigned QW = $clog2(OUTS);
  localparam int unsigned FW = $clog2(PF_DEPTH);

  // in-order kind queue: 1 = page-list entry
  logic [OUTS-1:0] kq;
  logic [QW-1:0]   kq_wp, kq_rp;
  logic [QW:0]     kq_cnt;
  logic            head_bpl;

  logic [PW-1:0]   wptr, rptr;
  logic [CW-1:0]   stored;      // words in SRAM
  logic [CW-1:0]   reserved;    // stored + in flight on AXI
  logic [$clog2(PF_DEPTH+1)-1:0] pf_cnt, pf_inflight;
  logic [PF_DEPTH-1:0][63:0] pf;
  logic [FW-1:0]   pf_wp, pf_rp;

  logic pix_beat;
  logic [CW-1:0] res_add;

  assign head_bpl   = kq[kq_rp];
  assign pix_beat   = r_valid && !head_bpl;
  assign xlat_valid = r_valid && head_bpl;
  assign xlat_base  = r_data[31:0];

  assign wr_req  = pix_beat;
  assign wr_addr = GAW'(BASE) + GAW'(wptr);
  assign wr_data = r_data;

  assign rd_req  = (stored != 0) && (int'(pf_cnt) + int'(pf_inflight) < PF_DEPTH);
  assign rd_addr = GAW'(BASE) + GAW'(rptr);
  // two words or fewer left for the display: ask the SRAM arbiter for priority
  assign rd_urgent = (int'(pf_cnt) + int'(pf_inflight) <= 2);

  assign word_valid = (pf_cnt != 0);
  assign word_data  = pf[pf_rp];

  assign free_words = CW'(DEPTH) - reserved;
  assign idle       = (kq_cnt == 0) && (pf_inflight == 0);
  assign level      = stored + CW'(pf_cnt) + CW'(pf_inflight);
  assign res_add    = (ar_fire && !ar_is_bpl) ? CW'(ar_len) + CW'(1) : '0;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kq <= '0; kq_wp <= '0; kq_rp <= '0; kq_cnt <= '0;
      wptr <= '0; rptr <= '0; stored <= '0; reserved <= '0;
      pf_cnt <= '0; pf_inflight <= '0; pf <= '0; pf_wp <= '0; pf_rp <= '0;
    end else if (flush) begin
      kq_wp <= '0; kq_rp <= '0; kq_cnt <= '0;
      wptr <= '0; rptr <= '0; stored <= '0; reserved <= '0;
      pf_cnt <= '0; pf_wp <= '0; pf_rp <= '0;
    end else begin
      // kind queue
      if (ar_fire) begin
        kq[kq_wp] <= ar_is_bpl;
        kq_wp     <= (int'(kq_wp) == OUTS - 1) ? '0 : kq_wp + QW'(1);
      end
      if (r_valid && r_last)
        kq_rp <= (int'(kq_rp) == OUTS - 1) ? '0 : kq_rp + QW'(1);
      kq_cnt <= kq_cnt + (QW+1)'(ar_fire) - (QW+1)'(r_valid && r_last);

      // SRAM occupancy
      if (pix_beat) wptr <= inc(wptr);
      if (rd_gnt)   rptr <= inc(rptr);
      stored   <= stored + CW'(pix_beat) - CW'(rd_gnt);
      reserved <= reserved + res_add - CW'(rd_gnt);

      // prefetch registers
      if (rd_valid) begin
        pf[pf_wp] <= rd_data;
        pf_wp     <= (int'(pf_wp) == PF_DEPTH - 1) ? '0 : pf_wp + FW'(1);
      end
      if (word_pop && word_valid)
        pf_rp <= (int'(pf_rp) == PF_DEPTH - 1) ? '0 : pf_rp + FW'(1);
      pf_cnt      <= pf_cnt + $bits(pf_cnt)'(rd_valid) - $bits(pf_cnt)'(word_pop && word_valid);
      pf_inflight <= pf_inflight + $bits(pf_inflight)'(rd_gnt) - $bits(pf_inflight)'(rd_valid);
    end
  end

  // a beat for this reader must belong to an issued burst
  assert property (@(posedge clk) disable iff (!rst_n) r_valid |-> kq_cnt != 0)
    else $error("br_fifo_ctrl: read data with no burst outstanding");
  // the address generator must respect free space
  assert property (@(posedge clk) disable iff (!rst_n) reserved <= CW'(DEPTH))
    else $error("br_fifo_ctrl: FIFO over-reserved");
endmodule
