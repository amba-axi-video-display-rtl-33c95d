// tb_vdc_controller: the job sequencer with modelled buffer readers (done
// a random time after start) and a modelled display (frame_end every
// FRAME cycles). The host model answers each END_JOB by setting VALID_JOB
// on some frames and not on others. Checked: END_JOB only after all four
// readers are done and carries the fetched job's number; each frame_end
// restarts the readers; the front job toggles exactly when VALID_JOB was
// set (and VALID_JOB is cleared), and stays otherwise (frame repeated);
// a frame_end that arrives before the readers finish is served later.
//
// Double-job behaviour (repeat the frame without VALID_JOB) follows the
// document; the frame and done timing is this testbench's choice.
module tb_vdc_controller;
  logic clk = 0, rst_n = 0, enable = 0, valid_job = 0, frame_end = 0;
  logic [3:0] rd_done = '0;
  logic start, front, set_end_job, no_job, clr_valid_job;

  vdc_controller dut (.*);

  int checks = 0, failures = 0, n_switch = 0, n_repeat = 0, n_late = 0, n_irq = 0;
  int done_at [4];
  int cyc = 0;
  logic exp_front = 0;
  bit   fetching = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader models
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start) begin
      for (int i = 0; i < 4; i++) done_at[i] = cyc + 2 + $urandom % 400;
      rd_done <= '0;
    end else
      for (int i = 0; i < 4; i++) if (cyc >= done_at[i]) rd_done[i] <= 1'b1;
  end

  // checks
  always @(posedge clk) if (rst_n && enable) begin
    if (set_end_job) begin
      checks++; n_irq++;
      if (rd_done != 4'hF || no_job != exp_front) begin
        failures++; $display("END_JOB early or wrong job");
      end
      // host: refill back job on some frames
      if ($urandom % 2) valid_job <= 1'b1;
    end
    if (clr_valid_job) valid_job <= 1'b0;
  end

  // display model
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1;
    for (int f = 0; f < 60; f++) begin
      automatic bit late;
      automatic logic vj;
      repeat (200 + $urandom % 300) @(negedge clk);
      late = (rd_done != 4'hF);
      vj = valid_job;
      frame_end = 1;
      @(negedge clk); frame_end = 0;
      if (late) begin
        n_late++;
        wait (rd_done == 4'hF);
        @(negedge clk);
        vj = valid_job;
      end
      // the controller decides within a few cycles
      repeat (3) @(negedge clk);
      if (vj) begin exp_front = ~exp_front; n_switch++; end
      else n_repeat++;
      checks++;
      if (front !== exp_front) begin failures++; $display("frame %0d: front %0d want %0d", f, front, exp_front); end
      checks++;
      if (vj && valid_job) begin failures++; $display("VALID_JOB not cleared"); end
    end
    checks++;
    if (n_switch == 0 || n_repeat == 0 || n_late == 0) begin
      failures++; $display("switch/repeat/late frame never happened");
    end
    $display("job switches %0d, repeated frames %0d, late fetches %0d, END_JOB %0d", n_switch, n_repeat, n_late, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
