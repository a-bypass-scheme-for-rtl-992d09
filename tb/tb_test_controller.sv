// tb_test_controller: self-checking test of the schedule-playing controller.
//
// Runs the default nine-step schedule for NPAT = 3 iterations. The testbench
// keeps its own step/cycle counters from the step lengths (5, 6, 3, 4, 5, 4,
// 4, 4, 3 cycles) and checks every cycle that the controller presents that
// step's core configurations, pattern counts and signature enables, that
// tpg_load pulses exactly in the first cycle of each step, that
// misr_clear/tpg_reseed come with start, that all cores are normal outside a
// test, and that done rises after exactly 3 * 38 cycles.
module tb_test_controller;
  import bypass_pkg::*;
  localparam int NPAT = 3;
  localparam int DUR [9] = '{5, 6, 3, 4, 5, 4, 4, 4, 3};

  logic clk = 0, rst_n = 0, start = 0;
  core_cfg_t [NCORE-1:0] cfg;
  logic tpg_load, misr_clear, tpg_reseed, busy, done;
  logic [NTPG-1:0][3:0] tpg_cnt;
  logic [NMISR-1:0] misr_en;
  logic [3:0] step;
  logic [15:0] iter;

  test_controller #(.NPAT(NPAT)) dut (.*);
  always #5 clk = ~clk;

  localparam sched_t S = default_schedule();
  int checks = 0, failures = 0;
  int s = 0, t = 0, it = 0, run_cyc = 0, loads = 0;
  bit running = 0;

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (running) begin
      run_cyc++;
      if (!(busy && cfg == S[s].cfg && tpg_cnt == S[s].tpg_cnt && misr_en == S[s].misr_en
            && tpg_load == (t == 0) && int'(step) == s && int'(iter) == it)) begin
        failures++;
        $display("FAIL iteration %0d step %0d cycle %0d", it, s, t);
      end
      if (tpg_load) loads++;
      t++;
      if (t == DUR[s]) begin
        t = 0;
        s++;
        if (s == 9) begin
          s = 0;
          it++;
          if (it == NPAT) running = 0;
        end
      end
    end else begin
      if (busy || tpg_load || misr_en != '0) begin failures++; $display("FAIL idle outputs"); end
      for (int c = 0; c < int'(NCORE); c++)
        if (cfg[c].mode != MODE_NORMAL) begin failures++; $display("FAIL idle core mode"); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (done) failures++;
    start = 1;
    #1;
    checks++;
    if (!misr_clear || !tpg_reseed) begin failures++; $display("FAIL clear with start"); end
    @(negedge clk);
    start = 0;
    running = 1;
    wait (!running);
    @(negedge clk);
    checks++;
    if (!done || run_cyc != NPAT * 38 || loads != NPAT * 9) begin
      failures++;
      $display("FAIL done=%0d after %0d cycles, %0d loads", done, run_cyc, loads);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (!done) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
