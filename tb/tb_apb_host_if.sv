// tb_apb_host_if: writes random values to every register of both jobs and
// the global registers over APB, reads them back and checks the decoded
// configuration outputs; then exercises IRQ MODE: END_JOB set by the
// controller raises irq with NO_JOB, a host write of 0 clears it, VALID_JOB
// is set by the host and cleared by the controller, and the underflow
// status bit is sticky until written with 1.
//
// Register layout checked is this design's choice; the IRQ MODE bits
// follow the document.
module tb_apb_host_if;
  import vdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic psel, penable, pwrite, pready, pslverr;
  logic [11:0] paddr;
  logic [31:0] pwdata, prdata;
  logic enable, test_frame, valid_job, irq;
  timing_t timing;
  logic [23:0] bg_color;
  logic [15:0] prefill;
  job_cfg_t [1:0] job;
  logic set_end_job = 0, no_job_in = 0, clr_valid_job = 0, set_underflow = 0;

  apb_host_if dut (.*, .bpl_err(1'b0), .front_job(1'b1));
  apb_bfm bfm (.clk, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  initial begin
    automatic logic [31:0] v [int];
    automatic logic [31:0] d;
    automatic int addrs [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // global registers
    for (int a = 'h10; a <= 'h30; a += 4) addrs.push_back(a);
    addrs.push_back('h0C);
    for (int j = 0; j < 2; j++) begin
      addrs.push_back('h400 + 'h200 * j);
      for (int a = 'h10; a <= 'h2C; a += 4) addrs.push_back('h400 + 'h200 * j + a);
      for (int a = 'h40; a <= 'h7C; a += 4) addrs.push_back('h400 + 'h200 * j + a);
    end
    foreach (addrs[i]) begin
      automatic int a = addrs[i];
      automatic logic [31:0] w = $urandom;
      automatic logic [31:0] m;
      // field widths of this register map
      if (a == 'h0C) m = 32'h00FF_FFFF;
      else if (a >= 'h400 && (a & 'h1FF) == 0) m = 32'h3;
      else if (a >= 'h400 && (a & 'h1FF) >= 'h40 && (a & 'hF) != 8) m = 32'hFFFF_FFFF;
      else m = 32'h0000_FFFF;
      v[a] = w & m;
      bfm.write(12'(a), w);
    end
    foreach (addrs[i]) begin
      bfm.read(12'(addrs[i]), d);
      expect_eq($sformatf("reg %h", addrs[i]), d, v[addrs[i]]);
    end
    // spot checks of the decoded outputs
    expect_eq("h_sync",  32'(timing.h_sync), v['h18]);
    expect_eq("v_bp",    32'(timing.v_bp), v['h2C]);
    expect_eq("prefill", 32'(prefill), v['h30]);
    expect_eq("bg",      32'(bg_color), v['h0C]);
    expect_eq("job1 L1 x0", 32'(job[1].layer[1].x0), v['h620]);
    expect_eq("job0 L0 ysize", 32'(job[0].layer[0].ysize), v['h41C]);
    expect_eq("job0 V offset", job[0].buffer[BUF_V].offset, v['h47C]);
    expect_eq("job1 RGBa bpla", job[1].buffer[BUF_RGBA].bpla, v['h640]);
    expect_eq("job1 U stride", 32'(job[1].buffer[BUF_U].bs), v['h668]);
    expect_eq("job0 layer_en", 32'(job[0].layer_en), v['h400]);
    bfm.write(12'h000, 32'h3);
    expect_eq("ctrl", {30'd0, test_frame, enable}, 32'h3);

    // interrupt handshake
    expect_eq("irq idle", 32'(irq), 0);
    @(negedge clk); set_end_job = 1; no_job_in = 1;
    @(negedge clk); set_end_job = 0;
    expect_eq("irq set", 32'(irq), 1);
    bfm.read(12'h004, d);
    expect_eq("IRQ_MODE after END_JOB", d & 32'h3, 32'h3);
    bfm.write(12'h004, 32'h4);     // clear END_JOB, set VALID_JOB
    expect_eq("irq cleared", 32'(irq), 0);
    expect_eq("valid_job", 32'(valid_job), 1);
    @(negedge clk); clr_valid_job = 1;
    @(negedge clk); clr_valid_job = 0;
    expect_eq("valid_job cleared", 32'(valid_job), 0);
    @(negedge clk); set_underflow = 1;
    @(negedge clk); set_underflow = 0;
    bfm.read(12'h008, d);
    expect_eq("status", d, 32'h5);
    bfm.write(12'h008, 32'h1);
    bfm.read(12'h008, d);
    expect_eq("status cleared", d, 32'h4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
