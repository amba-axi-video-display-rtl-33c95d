// tb_sram_arbiter: the arbiter with its two SRAM banks under random
// traffic: one write stream (as from the AXI read data) and four readers
// that hold a request until it is granted. A reference memory predicts
// every read. Checked: read data, read latency of exactly 3 cycles after
// the grant, writes never blocked by reads (a read granted to the bank the
// write uses is a failure), and that both a stalled read and a cycle with
// a write and a read on different banks occurred, and that an urgent
// read is never passed over by a normal read to the same bank.
//
// Write priority and LSB bank mapping follow the document; urgency is this
// design's choice.
module tb_sram_arbiter;
  localparam int unsigned NRD = 4, GAW = 12, WORDS = 3584;
  logic clk = 0, rst_n = 0;
  logic wr_req = 0;
  logic [GAW-1:0] wr_addr = '0;
  logic [63:0] wr_data = '0;
  logic [NRD-1:0] rd_req = '0, rd_urgent = '0, rd_gnt, rd_valid;
  logic [NRD-1:0][GAW-1:0] rd_addr = '0;
  logic [NRD-1:0][63:0] rd_data;
  logic [1:0] b_en, b_we;
  logic [1:0][GAW-2:0] b_addr;
  logic [1:0][63:0] b_wdata, b_rdata;

  logic [63:0] refm [WORDS];
  int checks = 0, failures = 0, stalls = 0, dual = 0, cyc = 0;
  typedef struct { int due; logic [63:0] d; } exp_t;
  exp_t expq [NRD][$];

  sram_arbiter #(.NRD(NRD), .GAW(GAW)) dut (.*);
  for (genvar k = 0; k < 2; k++) begin : g_b
    sram_sp #(.WORDS(WORDS / 2)) u_ram (.clk, .en(b_en[k]), .we(b_we[k]),
      .addr(b_addr[k]), .wdata(b_wdata[k]), .rdata(b_rdata[k]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read data checker
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NRD; i++) begin
      if (expq[i].size() > 0 && expq[i][0].due == cyc) begin
        checks++;
        if (!rd_valid[i] || rd_data[i] !== expq[i][0].d) begin
          failures++;
          $display("reader %0d: bad read data/timing at cycle %0d", i, cyc);
        end
        void'(expq[i].pop_front());
      end else if (rd_valid[i]) begin
        failures++;
        $display("reader %0d: unexpected rd_valid", i);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill every word
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      wr_req = 1; wr_addr = GAW'(a); wr_data = {$urandom, $urandom};
      refm[a] = wr_data;
    end
    @(negedge clk); wr_req = 0;
    repeat (3) @(negedge clk);
    // random traffic
    for (int t = 0; t < 20000; t++) begin
      wr_req = ($urandom % 2) == 0;
      wr_addr = GAW'($urandom % WORDS);
      wr_data = {$urandom, $urandom};
      for (int i = 0; i < NRD; i++)
        if (!rd_req[i] && ($urandom % 3) == 0) begin
          rd_req[i] = 1; rd_addr[i] = GAW'($urandom % WORDS);
        end
      for (int i = 0; i < NRD; i++) rd_urgent[i] = ($urandom % 4) == 0;
      #4;  // just before the rising edge: grants are settled
      // an urgent read is never passed over by a normal one on its bank
      for (int i = 0; i < NRD; i++)
        for (int m = 0; m < NRD; m++)
          if (rd_req[i] && rd_urgent[i] && !rd_gnt[i] && rd_req[m] && !rd_urgent[m] && rd_gnt[m] &&
              rd_addr[i][0] == rd_addr[m][0]) begin
            failures++; $display("urgent read passed over");
          end
      checks++;
      for (int i = 0; i < NRD; i++) begin
        if (rd_req[i] && rd_gnt[i]) begin
          checks++;
          if (wr_req && wr_addr[0] == rd_addr[i][0]) begin
            failures++; $display("read granted on the bank being written");
          end
          if (wr_req && wr_addr[0] != rd_addr[i][0]) dual++;
          expq[i].push_back('{cyc + 3, refm[rd_addr[i]]});
        end else if (rd_req[i] && wr_req && wr_addr[0] == rd_addr[i][0]) stalls++;
      end
      @(negedge clk);
      if (wr_req) refm[wr_addr] = wr_data;
      for (int i = 0; i < NRD; i++) if (rd_gnt_q[i]) rd_req[i] = 0;
    end
    wr_req = 0; rd_req = '0;
    repeat (10) @(negedge clk);
    checks++;
    if (stalls == 0 || dual == 0) begin
      failures++; $display("stalls=%0d dual=%0d: a case never happened", stalls, dual);
    end
    $display("read stalls by writes: %0d, write+read in one cycle: %0d", stalls, dual);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // grants sampled at the rising edge
  logic [NRD-1:0] rd_gnt_q;
  always @(posedge clk) rd_gnt_q <= rd_gnt & rd_req;
endmodule
