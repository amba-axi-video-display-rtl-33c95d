// tb_br_pixel_unpack: two unpackers, 4-byte (RGBa) and 1-byte (Y/U/V)
// pixels, fed from a word queue with a line width that leaves padding in
// the last word of each line. Random pixel requests; every returned pixel
// (one cycle after the request) is compared with the pixel picked here from
// the word stream by line position. An empty queue must give underflow.
//
// Packing order being checked is this design's choice (the document does
// not give one).
module tb_br_pixel_unpack;
  localparam int XS = 13, ROWS = 40;
  logic clk = 0, rst_n = 0, flush = 0;
  int checks = 0, failures = 0, underflows = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] req = '0, wv, pop, uf;
  logic [1:0][31:0] pd;
  logic [1:0][63:0] wd;
  logic [63:0] wq [2][$];
  int unsigned exp_q [2][$];

  for (genvar k = 0; k < 2; k++) begin : g_u
    localparam int U = (k == 0) ? 4 : 1;
    br_pixel_unpack #(.UNIT(U)) dut (.clk, .rst_n, .flush, .xsize(16'(XS)),
      .pix_req(req[k]), .pix_data(pd[k]), .underflow(uf[k]),
      .word_valid(wv[k]), .word_data(wd[k]), .word_pop(pop[k]));
    assign wv[k] = wq[k].size() > 0;
    assign wd[k] = wv[k] ? wq[k][0] : '0;
  end

  initial begin
    // build word streams and expected pixels
    for (int k = 0; k < 2; k++) begin
      automatic int u = (k == 0) ? 4 : 1;
      for (int r = 0; r < ROWS; r++) begin
        automatic int nw = (XS * u + 7) / 8;
        automatic logic [63:0] words [] = new[nw];
        foreach (words[i]) begin
          words[i] = {$urandom, $urandom};
          wq[k].push_back(words[i]);
        end
        for (int x = 0; x < XS; x++) begin
          automatic logic [63:0] w = words[(x * u) / 8];
          exp_q[k].push_back(u == 4 ? int'(w[32 * (x % 2) +: 32]) : int'(w[8 * (x % 8) +: 8]));
        end
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (exp_q[0].size() > 0 || exp_q[1].size() > 0) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) req[k] = exp_q[k].size() > 0 && ($urandom % 2);
      @(posedge clk);
      #1;
      for (int k = 0; k < 2; k++) if (req[k]) begin
        automatic int unsigned e = exp_q[k].pop_front();
        checks++;
        if (pd[k] !== 32'(e)) begin
          failures++; $display("unpacker %0d: got %h want %h", k, pd[k], e);
        end
      end
    end
    // requests with nothing left must underflow
    @(negedge clk); req = 2'b11;
    @(posedge clk); #1;
    checks++;
    if (uf !== 2'b11) begin failures++; $display("no underflow on empty FIFO"); end
    @(negedge clk); req = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) for (int k = 0; k < 2; k++) if (pop[k]) void'(wq[k].pop_front());
endmodule
