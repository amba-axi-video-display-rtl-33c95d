// axi_arbiter: connects the four buffer readers to one 64-bit AXI read
// master.
//
// Address channel: requests are served round robin and the winner is
// copied into an output register that holds ARVALID and the address stable
// until ARREADY, as AXI requires. ARID is the requester's index, so the
// interconnect may return different readers' bursts out of order while each
// reader's own bursts stay in order. A request is only accepted while fewer
// than CREDIT bursts are outstanding (the document's outstanding burst
// credit; it derives 7 and verifies with 8). Bursts are INCR, 8 bytes per
// beat; ARPROT marks privileged, non-secure data accesses.
//
// Data channel: RREADY is tied high (the controller never inserts wait
// states); each beat is steered to the reader named by RID, and RLAST
// returns a credit. Read responses (RRESP) are not checked.
//
// Outputs that are constant or copied from inputs on purpose: the fixed AR
// attributes, RREADY, and the read data, which goes to all readers
// unchanged while rsp_valid tells each reader whether the beat is its own.
module axi_arbiter
  import vdc_pkg::*;
#(
  parameter int unsigned NREQ   = 4,
  parameter int unsigned CREDIT = 8,
  localparam int unsigned IDXW  = (NREQ > 1) ? $clog2(NREQ) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // requesters
  input  logic [NREQ-1:0]          req_valid,
  input  ar_req_t [NREQ-1:0]       req,
  output logic [NREQ-1:0]          req_ready,
  output logic [NREQ-1:0]          rsp_valid,
  output logic [63:0]              rsp_data,
  output logic                     rsp_last,
  // AXI read address channel
  output logic                     m_arvalid,
  input  logic                     m_arready,
  output logic [AXI_IDW-1:0]       m_arid,
  output logic [AXI_AW-1:0]        m_araddr,
  output logic [7:0]               m_arlen,
  output logic [2:0]               m_arsize,
  output logic [1:0]               m_arburst,
  output logic [2:0]               m_arprot,
  output logic [3:0]               m_arcache,
  // AXI read data channel
  input  logic                     m_rvalid,
  output logic                     m_rready,
  input  logic [AXI_IDW-1:0]       m_rid,
  input  logic [AXI_DW-1:0]        m_rdata,
  input  logic [1:0]               m_rresp,
  input  logic                     m_rlast,
  output logic [$clog2(CREDIT+1)-1:0] outstanding
);
  logic [IDXW-1:0] rr_q, win;
  logic            win_vld, take;

  always_comb begin
    win_vld = 1'b0;
    win     = '0;
    for (int k = 0; k < NREQ; k++) begin
      automatic int unsigned i = (int'(rr_q) + k) % NREQ;
      if (!win_vld && req_valid[i]) begin
        win_vld = 1'b1;
        win     = IDXW'(i);
      end
    end
  end

  // the output register is free, or empties this cycle
  assign take = win_vld && (!m_arvalid || m_arready) &&
                (int'(outstanding) + int'(m_arvalid) < CREDIT);

  always_comb begin
    req_ready = '0;
    if (take) req_ready[win] = 1'b1;
  end

  assign m_arsize  = 3'd3;
  assign m_arburst = 2'b01;
  assign m_arprot  = 3'b011;
  assign m_arcache = 4'b0000;
  assign m_rready  = 1'b1;

  always_comb begin
    rsp_valid = '0;
    if (m_rvalid && int'(m_rid) < NREQ) rsp_valid[IDXW'(m_rid)] = 1'b1;
  end
  assign rsp_data = m_rdata;
  assign rsp_last = m_rlast;

  logic ar_done, r_done;
  assign ar_done = m_arvalid && m_arready;
  assign r_done  = m_rvalid && m_rlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0; m_arvalid <= 1'b0; m_arid <= '0; m_araddr <= '0; m_arlen <= '0;
      outstanding <= '0;
    end else begin
      if (take) begin
        m_arvalid <= 1'b1;
        m_arid    <= AXI_IDW'(win);
        m_araddr  <= req[win].addr;
        m_arlen   <= 8'(req[win].len);
        rr_q      <= IDXW'((int'(win) + 1) % NREQ);
      end else if (m_arready) begin
        m_arvalid <= 1'b0;
      end
      outstanding <= outstanding + $bits(outstanding)'(ar_done) - $bits(outstanding)'(r_done);
    end
  end

  // AXI: address must stay stable while waiting for ARREADY
  assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr) && $stable(m_arlen) && $stable(m_arid))
    else $error("axi_arbiter: AR changed before ARREADY");
  assert property (@(posedge clk) disable iff (!rst_n) int'(outstanding) <= CREDIT)
    else $error("axi_arbiter: credit exceeded");
endmodule
