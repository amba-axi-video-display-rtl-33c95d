// tb_axi_arbiter: four requesters issue random single-beat and 16-beat
// bursts with their own address ranges to the behavioural memory (random
// latency, out-of-order return across IDs). Checked: every burst is issued
// once with its address and length, the beats reach the requester that
// issued them in that requester's order with the memory's data, outstanding
// bursts never exceed the credit of 8, the credit limit was reached, some
// bursts returned out of order, and ARPROT/ARSIZE/ARBURST are fixed.
//
// Credit 8 and ID routing follow the document; the traffic mix is this
// testbench's choice.
module tb_axi_arbiter;
  import vdc_pkg::*;
  import vdc_tb_pkg::*;
  localparam int CREDIT = 8;
  logic clk = 0, rst_n = 0;
  logic [3:0] req_valid = '0, req_ready, rsp_valid;
  ar_req_t [3:0] req;
  logic [63:0] rsp_data;
  logic rsp_last;
  logic m_arvalid, m_arready, m_rvalid, m_rready, m_rlast;
  logic [3:0] m_arid, m_rid, m_arcache;
  logic [31:0] m_araddr;
  logic [7:0] m_arlen;
  logic [2:0] m_arsize, m_arprot;
  logic [1:0] m_arburst;
  logic [63:0] m_rdata;
  logic [3:0] outstanding;

  axi_arbiter #(.CREDIT(CREDIT)) dut (.*, .m_rresp(2'b00));
  axi_mem_model #(.LAT_MIN(10), .LAT_MAX(200)) u_mem (.clk, .rst_n, .arvalid(m_arvalid),
    .arready(m_arready), .arid(m_arid), .araddr(m_araddr), .arlen(m_arlen),
    .rvalid(m_rvalid), .rready(m_rready), .rid(m_rid), .rdata(m_rdata), .rlast(m_rlast));

  int checks = 0, failures = 0, at_credit = 0, issued = 0;
  typedef struct { logic [31:0] addr; int len; } b_t;
  b_t sent [4][$];       // accepted by the arbiter, per requester
  int beat [4];
  logic [31:0] next_addr [4];

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (int'(outstanding) == CREDIT) at_credit++;
    if (int'(outstanding) > CREDIT) begin failures++; $display("credit exceeded"); end
    for (int i = 0; i < 4; i++) begin
      if (req_valid[i] && req_ready[i]) begin
        sent[i].push_back('{req[i].addr, int'(req[i].len) + 1});
        issued++;
      end
      if (rsp_valid[i]) begin
        checks++;
        if (sent[i].size() == 0 || rsp_data !== mem_word(sent[i][0].addr + 32'(8 * beat[i]))) begin
          failures++; $display("requester %0d: wrong beat", i);
        end else begin
          beat[i]++;
          if (beat[i] == sent[i][0].len) begin
            checks++;
            if (!rsp_last) begin failures++; $display("RLAST missing"); end
            beat[i] = 0;
            void'(sent[i].pop_front());
          end
        end
      end
    end
    if (m_arvalid) begin
      checks++;
      if (m_arsize != 3 || m_arburst != 2'b01 || m_arprot != 3'b011) begin
        failures++; $display("bad AR attributes");
      end
    end
  end

  // requesters: hold a request until ready, then make a new one
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      if (req_valid[i] && req_ready_q[i]) req_valid[i] <= 1'b0;
      else if (!req_valid[i] && issued < 2000 && ($urandom % 2)) begin
        req_valid[i] <= 1'b1;
        req[i].addr  <= next_addr[i];
        req[i].len   <= ($urandom % 2) ? 4'd15 : 4'd0;
        next_addr[i] <= next_addr[i] + 32'h80;
      end
    end
  end
  logic [3:0] req_ready_q;
  always @(posedge clk) req_ready_q <= req_ready & req_valid;

  initial begin
    for (int i = 0; i < 4; i++) begin next_addr[i] = 32'h1000_0000 * (i + 1); beat[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (issued >= 2000);
    repeat (3000) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (sent[i].size() != 0) begin failures++; $display("requester %0d: bursts lost", i); end
    end
    checks++;
    if (at_credit == 0 || u_mem.n_ooo == 0) begin
      failures++; $display("credit limit or out-of-order return never happened");
    end
    $display("bursts %0d, out of order %0d, cycles at credit limit %0d", issued, u_mem.n_ooo, at_credit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
