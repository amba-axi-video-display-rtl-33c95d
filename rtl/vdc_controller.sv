// vdc_controller: sequences the double-buffered jobs.
//
// After enable it starts all buffer readers on the front job. When every
// reader reports that it has issued all addresses of the frame, it sets
// END_JOB (with NO_JOB = the job just fetched), which interrupts the host so
// that it can refill the other (back) job and then set VALID_JOB. At the
// end of the displayed frame's active area (frame_end from the display
// formatter) the controller picks the next job: the back job if VALID_JOB
// is set (it becomes the front job and VALID_JOB is cleared), otherwise the
// same job again, so a late host only repeats a frame. It then restarts the
// readers, which fill the FIFOs during vertical blanking. A frame_end that
// comes before the readers are done is remembered and served when they
// finish.
//
// The document gives the register bits and the rule "show the previous
// frame again if no new one is valid"; choosing the end of the active area
// as the switching point is this design's.
module vdc_controller #(
  parameter int unsigned NBUF = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic            valid_job,
  input  logic            frame_end,
  input  logic [NBUF-1:0] rd_done,
  output logic            start,
  output logic            front,
  output logic            set_end_job,
  output logic            no_job,
  output logic            clr_valid_job
);
  typedef enum logic [1:0] { C_IDLE, C_START, C_RUN, C_WAIT } cstate_t;
  cstate_t st;
  logic    fe_pend;

  assign no_job = front;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; front <= 1'b0; fe_pend <= 1'b0;
      start <= 1'b0; set_end_job <= 1'b0; clr_valid_job <= 1'b0;
    end else begin
      start         <= 1'b0;
      set_end_job   <= 1'b0;
      clr_valid_job <= 1'b0;
      if (frame_end) fe_pend <= 1'b1;
      if (!enable) begin
        st <= C_IDLE;
        fe_pend <= 1'b0;
      end else begin
        unique case (st)
          C_IDLE: begin
            start   <= 1'b1;
            fe_pend <= 1'b0;
            st      <= C_START;
          end
          C_START: st <= C_RUN;     // readers leave their done state
          C_RUN: if (&rd_done) begin
            set_end_job <= 1'b1;
            st          <= C_WAIT;
          end
          C_WAIT: if (fe_pend || frame_end) begin
            fe_pend <= 1'b0;
            if (valid_job) begin
              front         <= ~front;
              clr_valid_job <= 1'b1;
            end
            start <= 1'b1;
            st    <= C_START;
          end
          default: st <= C_IDLE;
        endcase
      end
    end
  end
endmodule
