// tb_br_fifo_ctrl: FIFO control with the SRAM arbiter and two banks. The
// testbench plays address generator and bus: it issues pixel bursts only
// into free space, mixes in single-beat page-list reads, returns the beats
// in order with random gaps, and pops words at random. Checked: page-list
// beats come out as xlat_valid with the right base and never reach the
// FIFO; pixel words come out complete and in order; free space and level
// return to empty/idle at the end; the FIFO filled up at least once.
//
// Write in 2 and read in 3 cycles follow the document; the traffic is
// this testbench's choice.
module tb_br_fifo_ctrl;
  localparam int unsigned DEPTH = 64, GAW = 12, BASE = 100;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic clk = 0, rst_n = 0, flush = 0;
  logic ar_fire = 0, ar_is_bpl = 0;
  logic [3:0] ar_len = '0;
  logic [CW-1:0] free_words, level;
  logic idle, xlat_valid;
  logic [31:0] xlat_base;
  logic r_valid = 0, r_last = 0;
  logic [63:0] r_data = '0;
  logic wr_req, rd_req, rd_urgent, rd_gnt, rd_valid, word_valid, word_pop = 0;
  logic [GAW-1:0] wr_addr, rd_addr;
  logic [63:0] wr_data, rd_data, word_data;
  logic [1:0] b_en, b_we;
  logic [1:0][GAW-2:0] b_addr;
  logic [1:0][63:0] b_wdata, b_rdata;
  logic [3:0] a_rd_gnt, a_rd_valid;
  logic [3:0][63:0] a_rd_data;

  br_fifo_ctrl #(.DEPTH(DEPTH), .BASE(BASE), .GAW(GAW)) dut (.*);
  sram_arbiter #(.NRD(4), .GAW(GAW)) u_arb (.clk, .rst_n, .wr_req, .wr_addr, .wr_data,
    .rd_req({3'b000, rd_req}), .rd_urgent(4'b0000), .rd_addr({{3{GAW'(0)}}, rd_addr}), .rd_gnt(a_rd_gnt),
    .rd_valid(a_rd_valid), .rd_data(a_rd_data), .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  assign rd_gnt = a_rd_gnt[0];
  assign rd_valid = a_rd_valid[0];
  assign rd_data = a_rd_data[0];
  for (genvar k = 0; k < 2; k++) begin : g_b
    sram_sp #(.WORDS(2048)) u_ram (.clk, .en(b_en[k]), .we(b_we[k]), .addr(b_addr[k]),
      .wdata(b_wdata[k]), .rdata(b_rdata[k]));
  end

  int checks = 0, failures = 0, n_full = 0, n_xlat = 0;
  typedef struct { bit bpl; int len; int t; } burst_t;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  burst_t bq[$];
  logic [63:0] exp_words[$];
  logic [31:0] exp_base[$];
  int words_total = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue side
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int n = 0; n < 400; n++) begin
      automatic bit bpl = ($urandom % 6) == 0;
      automatic int len = bpl ? 1 : 1 + $urandom % 16;
      while (!bpl && int'(free_words) < len) @(negedge clk);
      while (bq.size() >= 8) @(negedge clk);
      if (!bpl && int'(free_words) == len) n_full++;
      ar_fire = 1; ar_is_bpl = bpl; ar_len = 4'(len - 1);
      bq.push_back('{bpl, len, cyc});
      @(negedge clk);
      ar_fire = 0;
      repeat ($urandom % 4) @(negedge clk);
    end
  end

  // bus side: beats in order, random gaps
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      r_valid = 0; r_last = 0;
      if (bq.size() > 0 && bq[0].t < cyc && ($urandom % 3) != 0) begin
        automatic burst_t b = bq[0];
        for (int k = 0; k < b.len; k++) begin
          r_valid = 1; r_data = {$urandom, $urandom}; r_last = (k == b.len - 1);
          if (b.bpl) exp_base.push_back(r_data[31:0]);
          else begin exp_words.push_back(r_data); words_total++; end
          @(negedge clk);
        end
        r_valid = 0; r_last = 0;
        void'(bq.pop_front());
      end
    end
  end

  // consumer and checks
  always @(posedge clk) if (rst_n) begin
    if (xlat_valid) begin
      checks++; n_xlat++;
      if (exp_base.size() == 0 || xlat_base !== exp_base[0]) begin failures++; $display("bad page base"); end
      else void'(exp_base.pop_front());
    end
    if (word_pop && word_valid) begin
      checks++;
      if (exp_words.size() == 0 || word_data !== exp_words[0]) begin
        failures++; $display("FIFO word mismatch");
      end else void'(exp_words.pop_front());
    end
  end
  always @(negedge clk) word_pop <= ($urandom % 4) == 0;

  initial begin
    wait (rst_n);
    repeat (30000) @(negedge clk);
    checks++;
    if (exp_words.size() != 0 || !idle || int'(free_words) != DEPTH || level != 0) begin
      failures++; $display("not drained: %0d words left, free %0d", exp_words.size(), free_words);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FIFO never filled"); end
    $display("words %0d, translations %0d, bursts filling the FIFO %0d", words_total, n_xlat, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
