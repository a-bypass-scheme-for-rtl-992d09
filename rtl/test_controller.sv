// test_controller: global test controller that runs the bypass schedule.
//
// The shortest input and output test paths of every core, and their
// as-soon-as-possible schedule with cores taken in fixed order, are worked
// out off-line. The result is the table SCHED of NSTEP steps; each step
// holds the mode and bypass edges of every core wrapper, the packet count of
// each pattern-generator port, the open signature-register inputs and the
// step length in cycles. On start the controller clears the signature
// register, restarts the pattern generator and plays the table NPAT times
// (one pass = one test pattern for every core), then raises done.
//
// Timing: cfg for step s is presented from the cycle after the previous step
// ends; tpg_load pulses in the first cycle of every step; each step lasts
// exactly SCHED[s].dur cycles, so one iteration takes the sum of the step
// lengths and the whole test NPAT times that (plus one start cycle).
// Outside a test all cores are in normal mode. Table-driven sequencing is
// this design's choice; the architecture gives only what the controller does.
module test_controller
  import bypass_pkg::*;
#(
  parameter int unsigned NSTEP = DEF_NSTEP,
  parameter int unsigned NPAT  = 270,
  parameter sched_t      SCHED = default_schedule()
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output core_cfg_t [NCORE-1:0]    cfg,
  output logic                     tpg_load,
  output logic [NTPG-1:0][3:0]     tpg_cnt,
  output logic [NMISR-1:0]         misr_en,
  output logic                     misr_clear,
  output logic                     tpg_reseed,
  output logic                     busy,
  output logic                     done,
  output logic [3:0]               step,
  output logic [15:0]              iter
);
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DONE} cstate_e;

  cstate_e     state;
  logic [7:0]  timer;
  logic        first;       // first cycle of a step
  sched_step_t cur;

  assign cur = SCHED[step];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      timer <= '0;
      first <= 1'b0;
      step  <= '0;
      iter  <= '0;
    end else begin
      first <= 1'b0;
      case (state)
        C_RUN: begin
          if (timer == cur.dur - 8'd1) begin
            timer <= '0;
            first <= 1'b1;
            if (step == 4'(NSTEP - 1)) begin
              step <= '0;
              if (iter == 16'(NPAT - 1)) begin
                state <= C_DONE;
                first <= 1'b0;
              end else begin
                iter <= iter + 16'd1;
              end
            end else begin
              step <= step + 4'd1;
            end
          end else begin
            timer <= timer + 8'd1;
          end
        end
        default: begin
          if (start) begin
            state <= C_RUN;
            timer <= '0;
            step  <= '0;
            iter  <= '0;
            first <= 1'b1;
          end
        end
      endcase
    end
  end

  always_comb begin
    busy       = (state == C_RUN);
    done       = (state == C_DONE);
    misr_clear = (state != C_RUN) && start;
    tpg_reseed = misr_clear;
    tpg_load   = busy && first;
    tpg_cnt    = cur.tpg_cnt;
    misr_en    = busy ? cur.misr_en : '0;
    for (int c = 0; c < int'(NCORE); c++) cfg[c] = busy ? cur.cfg[c] : cfg_normal();
  end

  initial assert (NSTEP >= 1 && NSTEP <= MAXSTEP) else $error("test_controller: bad NSTEP");

endmodule
