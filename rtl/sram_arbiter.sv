// sram_arbiter: shares two single-port SRAM banks between the FIFO writes
// (AXI read data) and the FIFO reads of the four buffer readers.
//
// The pixel-FIFO address space is split over the banks by the least
// significant bit of the word address, so consecutive FIFO words alternate
// banks (the "zigzag" pattern): a write stream and a read stream usually hit
// different banks and proceed in the same cycle, which makes two
// single-port RAMs behave almost like one dual-port RAM.
//
// Rules (from the document): a write is always granted, because the AXI
// master never inserts wait states; a read that needs the bank the write is
// using this cycle is stalled (rd_gnt low) and retried. Reads competing for
// the same bank are served round robin (this design's choice; the document
// does not say how reads are ordered). Grants are combinational.
//
// Timing: requests are registered on the way to the SRAM ports, so a write
// lands 2 cycles after its request, and read data is registered per reader
// and appears with rd_valid 3 cycles after the grant.
module sram_arbiter #(
  parameter int unsigned NRD   = 4,
  parameter int unsigned GAW   = 12,             // global FIFO word address
  parameter int unsigned DW    = 64,
  localparam int unsigned BAW  = GAW - 1,        // address inside a bank
  localparam int unsigned IDXW = (NRD > 1) ? $clog2(NRD) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write port, always granted
  input  logic                     wr_req,
  input  logic [GAW-1:0]           wr_addr,
  input  logic [DW-1:0]            wr_data,
  // read ports
  input  logic [NRD-1:0]           rd_req,
  input  logic [NRD-1:0]           rd_urgent,
  input  logic [NRD-1:0][GAW-1:0]  rd_addr,
  output logic [NRD-1:0]           rd_gnt,
  output logic [NRD-1:0]           rd_valid,
  output logic [NRD-1:0][DW-1:0]   rd_data,
  // two SRAM banks
  output logic [1:0]               b_en,
  output logic [1:0]               b_we,
  output logic [1:0][BAW-1:0]      b_addr,
  output logic [1:0][DW-1:0]       b_wdata,
  input  logic [1:0][DW-1:0]       b_rdata
);
  logic [1:0][IDXW-1:0] rr_q;          // round-robin pointer per bank
  logic [1:0]           win_vld;
  logic [1:0][IDXW-1:0] win_idx;

  // stage 1: registered SRAM inputs
  logic [1:0]           s1_rd;
  logic [1:0][IDXW-1:0] s1_own;
  // stage 2: SRAM output valid
  logic [1:0]           s2_rd;
  logic [1:0][IDXW-1:0] s2_own;

  always_comb begin
    rd_gnt  = '0;
    win_vld = '0;
    win_idx = '0;
    for (int b = 0; b < 2; b++) begin
      if (!(wr_req && wr_addr[0] == 1'(b))) begin
        // urgent requests first, round robin within each class
        for (int pass = 0; pass < 2; pass++)
          for (int k = 0; k < NRD; k++) begin
            automatic int unsigned i = (int'(rr_q[b]) + k) % NRD;
            if (!win_vld[b] && rd_req[i] && rd_addr[i][0] == 1'(b) &&
                (pass == 1 || rd_urgent[i])) begin
              win_vld[b] = 1'b1;
              win_idx[b] = IDXW'(i);
            end
          end
      end
      if (win_vld[b]) rd_gnt[win_idx[b]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q    <= '0;
      b_en    <= '0;
      b_we    <= '0;
      b_addr  <= '0;
      b_wdata <= '0;
      s1_rd   <= '0;
      s1_own  <= '0;
      s2_rd   <= '0;
      s2_own  <= '0;
      rd_valid <= '0;
      rd_data  <= '0;
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (wr_req && wr_addr[0] == 1'(b)) begin
          b_en[b]    <= 1'b1;
          b_we[b]    <= 1'b1;
          b_addr[b]  <= wr_addr[GAW-1:1];
          b_wdata[b] <= wr_data;
          s1_rd[b]   <= 1'b0;
        end else if (win_vld[b]) begin
          b_en[b]    <= 1'b1;
          b_we[b]    <= 1'b0;
          b_addr[b]  <= rd_addr[win_idx[b]][GAW-1:1];
          s1_rd[b]   <= 1'b1;
          s1_own[b]  <= win_idx[b];
          rr_q[b]    <= IDXW'((int'(win_idx[b]) + 1) % NRD);
        end else begin
          b_en[b]    <= 1'b0;
          b_we[b]    <= 1'b0;
          s1_rd[b]   <= 1'b0;
        end
      end
      s2_rd  <= s1_rd;
      s2_own <= s1_own;
      rd_valid <= '0;
      for (int b = 0; b < 2; b++) begin
        if (s2_rd[b]) begin
          rd_valid[s2_own[b]] <= 1'b1;
          rd_data[s2_own[b]]  <= b_rdata[b];
        end
      end
    end
  end

  // two reads can never be granted to one reader in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n)
    !(win_vld[0] && win_vld[1] && win_idx[0] == win_idx[1]))
    else $error("sram_arbiter: double grant");
endmodule
