// apb_host_if: host interface, an APB slave with the controller's
// register file.
//
// The host CPU programs display timing, a background colour and two
// complete job register sets (front and back job: layer windows, layer
// enables and the four buffer definitions), and handles the interrupt
// through the IRQ MODE register:
//   END_JOB   set by the controller when every buffer of a job has issued
//             all its addresses; drives irq; the host clears it by writing 0
//   NO_JOB    which job (0/1) the interrupt belongs to, read only
//   VALID_JOB set by the host once the back job is complete; the controller
//             clears it when it switches to that job
// The field names and meanings follow the document; the register map,
// bit positions and the status register are this design's choice:
//   0x000 CTRL      [0] enable  [1] test frame
//   0x004 IRQ_MODE  [0] END_JOB [1] NO_JOB [2] VALID_JOB
//   0x008 STATUS    [0] underflow (write 1 clears) [1] page-list range
//                   error [2] front job
//   0x00C BG_COLOR  [23:0] {B,G,R}
//   0x010..0x02C    H_ACTIVE H_FP H_SYNC H_BP V_ACTIVE V_FP V_SYNC V_BP
//   0x030 PREFILL   FIFO words wanted before the first frame starts
//   0x400 + 0x200*j job j: +0x00 LAYER_EN, +0x10*(1+L) X0 Y0 XSIZE YSIZE
//                   of layer L, +0x40+0x10*b BPLA BPLS BS OFFSET of buffer b
//                   (b = 0 RGBa, 1 Y, 2 U, 3 V)
// APB: zero wait states (PREADY high), no errors; PRDATA is decoded
// combinationally from PADDR during the access.
//
// PREADY is constant 1 and PSLVERR constant 0 (no wait states, no errors).
module apb_host_if
  import vdc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // APB slave
  input  logic           psel,
  input  logic           penable,
  input  logic           pwrite,
  input  logic [11:0]    paddr,
  input  logic [31:0]    pwdata,
  output logic [31:0]    prdata,
  output logic           pready,
  output logic           pslverr,
  // configuration
  output logic           enable,
  output logic           test_frame,
  output timing_t        timing,
  output logic [23:0]    bg_color,
  output logic [15:0]    prefill,
  output job_cfg_t [1:0] job,
  output logic           valid_job,
  // events
  input  logic           set_end_job,
  input  logic           no_job_in,
  input  logic           clr_valid_job,
  input  logic           set_underflow,
  input  logic           bpl_err,
  input  logic           front_job,
  output logic           irq
);
  logic end_job, no_job, underflow;
  logic wr;

  assign pready  = 1'b1;
  assign pslverr = 1'b0;
  assign irq     = end_job;
  assign wr      = psel && penable && pwrite;

  function automatic logic [31:0] job_rd(input job_cfg_t j, input logic [8:0] a);
    logic [31:0] d;
    d = '0;
    if (a[8:6] == 3'b000) begin
      unique case (a[5:0])
        6'h00: d = 32'(j.layer_en);
        6'h10: d = 32'(j.layer[0].x0);
        6'h14: d = 32'(j.layer[0].y0);
        6'h18: d = 32'(j.layer[0].xsize);
        6'h1C: d = 32'(j.layer[0].ysize);
        6'h20: d = 32'(j.layer[1].x0);
        6'h24: d = 32'(j.layer[1].y0);
        6'h28: d = 32'(j.layer[1].xsize);
        6'h2C: d = 32'(j.layer[1].ysize);
        default: d = '0;
      endcase
    end else if (a[8:6] == 3'b001) begin
      unique case (a[3:2])
        2'd0: d = j.buffer[a[5:4]].bpla;
        2'd1: d = j.buffer[a[5:4]].bpls;
        2'd2: d = 32'(j.buffer[a[5:4]].bs);
        2'd3: d = j.buffer[a[5:4]].offset;
      endcase
    end
    return d;
  endfunction

  always_comb begin
    prdata = '0;
    if (psel && !pwrite) begin
      if (paddr[10]) prdata = job_rd(job[paddr[9]], paddr[8:0]);
      else begin
        unique case (paddr[9:0])
          10'h000: prdata = {30'd0, test_frame, enable};
          10'h004: prdata = {29'd0, valid_job, no_job, end_job};
          10'h008: prdata = {29'd0, front_job, bpl_err, underflow};
          10'h00C: prdata = {8'd0, bg_color};
          10'h010: prdata = 32'(timing.h_active);
          10'h014: prdata = 32'(timing.h_fp);
          10'h018: prdata = 32'(timing.h_sync);
          10'h01C: prdata = 32'(timing.h_bp);
          10'h020: prdata = 32'(timing.v_active);
          10'h024: prdata = 32'(timing.v_fp);
          10'h028: prdata = 32'(timing.v_sync);
          10'h02C: prdata = 32'(timing.v_bp);
          10'h030: prdata = 32'(prefill);
          default: prdata = '0;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= 1'b0; test_frame <= 1'b0; timing <= '0; bg_color <= '0;
      prefill <= '0; job <= '0; valid_job <= 1'b0;
      end_job <= 1'b0; no_job <= 1'b0; underflow <= 1'b0;
    end else begin
      if (wr && paddr[10]) begin
        automatic logic jx = paddr[9];
        if (paddr[8:6] == 3'b000) begin
          unique case (paddr[5:0])
            6'h00: job[jx].layer_en       <= pwdata[1:0];
            6'h10: job[jx].layer[0].x0    <= pwdata[15:0];
            6'h14: job[jx].layer[0].y0    <= pwdata[15:0];
            6'h18: job[jx].layer[0].xsize <= pwdata[15:0];
            6'h1C: job[jx].layer[0].ysize <= pwdata[15:0];
            6'h20: job[jx].layer[1].x0    <= pwdata[15:0];
            6'h24: job[jx].layer[1].y0    <= pwdata[15:0];
            6'h28: job[jx].layer[1].xsize <= pwdata[15:0];
            6'h2C: job[jx].layer[1].ysize <= pwdata[15:0];
            default: ;
          endcase
        end else if (paddr[8:6] == 3'b001) begin
          unique case (paddr[3:2])
            2'd0: job[jx].buffer[paddr[5:4]].bpla   <= pwdata;
            2'd1: job[jx].buffer[paddr[5:4]].bpls   <= pwdata;
            2'd2: job[jx].buffer[paddr[5:4]].bs     <= pwdata[15:0];
            2'd3: job[jx].buffer[paddr[5:4]].offset <= pwdata;
          endcase
        end
      end else if (wr) begin
        unique case (paddr[9:0])
          10'h000: {test_frame, enable} <= pwdata[1:0];
          10'h00C: bg_color        <= pwdata[23:0];
          10'h010: timing.h_active <= pwdata[15:0];
          10'h014: timing.h_fp     <= pwdata[15:0];
          10'h018: timing.h_sync   <= pwdata[15:0];
          10'h01C: timing.h_bp     <= pwdata[15:0];
          10'h020: timing.v_active <= pwdata[15:0];
          10'h024: timing.v_fp     <= pwdata[15:0];
          10'h028: timing.v_sync   <= pwdata[15:0];
          10'h02C: timing.v_bp     <= pwdata[15:0];
          10'h030: prefill         <= pwdata[15:0];
          default: ;
        endcase
      end

      // IRQ MODE: hardware set has priority over a host clear in the same cycle
      if (set_end_job) begin
        end_job <= 1'b1;
        no_job  <= no_job_in;
      end else if (wr && !paddr[10] && paddr[9:0] == 10'h004 && !pwdata[0])
        end_job <= 1'b0;
      if (clr_valid_job)
        valid_job <= 1'b0;
      else if (wr && !paddr[10] && paddr[9:0] == 10'h004)
        valid_job <= pwdata[2];
      if (set_underflow)
        underflow <= 1'b1;
      else if (wr && !paddr[10] && paddr[9:0] == 10'h008 && pwdata[0])
        underflow <= 1'b0;
    end
  end

  // APB: PENABLE only in the second cycle of a selected transfer
  assert property (@(posedge clk) disable iff (!rst_n) penable |-> psel)
    else $error("apb_host_if: PENABLE without PSEL");
  assert property (@(posedge clk) disable iff (!rst_n) psel && !penable |=> psel && penable)
    else $error("apb_host_if: SETUP not followed by ENABLE");
endmodule
