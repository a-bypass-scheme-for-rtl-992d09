// bypass_pkg: types and constants shared by the bypass test architecture.
//
// Every test link in the system is a packet stream: an M-bit data bus with a
// valid/ready handshake, one packet moving on each clock edge where both are
// high. A core wrapper is configured per test step with a core_cfg_t: its
// mode (normal, bypass or test), which input->output bypass edges are on, and
// which of its response ports may send. The test controller steps through a
// table of sched_step_t entries; each entry holds the configuration of all
// cores, how many packets each test-pattern port emits, which signature
// register inputs are open, and how many cycles the step lasts.
//
// The three core modes, the valid/ready link and the table-driven controller
// are choices of this design; the bypass idea, the bit-match circuits and the
// four-core example with a pattern generator (TPGR) and signature register
// (MISR) follow the architecture it implements.
package bypass_pkg;

  // Largest number of input or output ports on one core, and widest port.
  localparam int unsigned MAXP  = 4;
  localparam int unsigned WMAX  = 8;
  // Number of cores in the example system and of schedule entries.
  localparam int unsigned NCORE    = 4;
  localparam int unsigned MAXSTEP  = 16;
  // Ports of the pattern generator and of the signature register.
  localparam int unsigned NTPG  = 2;
  localparam int unsigned NMISR = 3;

  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,   // functional: ports connect to the core logic
    MODE_BYPASS = 2'd1,   // test data routed port i -> port j around the core
    MODE_TEST   = 2'd2    // core under test: capture pattern, apply, send response
  } core_mode_e;

  typedef struct packed {
    core_mode_e                       mode;
    logic [MAXP-1:0][MAXP-1:0]        byp;   // byp[i][j]: bypass edge in i -> out j on
    logic [MAXP-1:0]                  send;  // test mode: output port j may send
  } core_cfg_t;

  typedef struct packed {
    logic [7:0]                       dur;   // cycles the step lasts
    logic [NTPG-1:0][3:0]             tpg_cnt; // packets per pattern port
    logic [NMISR-1:0]                 misr_en; // open signature inputs
    core_cfg_t [NCORE-1:0]            cfg;
  } sched_step_t;

  typedef sched_step_t [MAXSTEP-1:0] sched_t;

  // Port widths of the four example cores (index 0 = Core 1 ... 3 = Core 4).
  // Entry k is the width of port k; packed so it can be a parameter value.
  typedef logic [MAXP-1:0][7:0] width_list_t;

  function automatic width_list_t wl(input logic [7:0] w0, input logic [7:0] w1,
                                     input logic [7:0] w2, input logic [7:0] w3);
    width_list_t w;
    w[0] = w0;
    w[1] = w1;
    w[2] = w2;
    w[3] = w3;
    return w;
  endfunction

  function automatic core_cfg_t cfg_normal();
    core_cfg_t c;
    c = '0;
    c.mode = MODE_NORMAL;
    return c;
  endfunction

  function automatic core_cfg_t cfg_bypass(input logic [1:0] i, input logic [1:0] j);
    core_cfg_t c;
    c = '0;
    c.mode = MODE_BYPASS;
    c.byp[i][j] = 1'b1;
    return c;
  endfunction

  function automatic core_cfg_t cfg_bypass2(input logic [1:0] i0, input logic [1:0] j0,
                                            input logic [1:0] i1, input logic [1:0] j1);
    core_cfg_t c;
    c = cfg_bypass(i0, j0);
    c.byp[i1][j1] = 1'b1;
    return c;
  endfunction

  function automatic core_cfg_t cfg_test(input logic [MAXP-1:0] send);
    core_cfg_t c;
    c = '0;
    c.mode = MODE_TEST;
    c.send = send;
    return c;
  endfunction

  function automatic sched_step_t mk_step(input logic [7:0] dur,
                                          input logic [3:0] tpg0, input logic [3:0] tpg1,
                                          input logic [NMISR-1:0] misr_en,
                                          input core_cfg_t c1, input core_cfg_t c2,
                                          input core_cfg_t c3, input core_cfg_t c4);
    sched_step_t s;
    s.dur        = dur;
    s.tpg_cnt[0] = tpg0;
    s.tpg_cnt[1] = tpg1;
    s.misr_en    = misr_en;
    s.cfg[0]     = c1;
    s.cfg[1]     = c2;
    s.cfg[2]     = c3;
    s.cfg[3]     = c4;
    return s;
  endfunction

  // One test iteration of the example system: every core receives one
  // pattern and returns one response. Steps whose comments name two cores
  // overlap the output path of one core with the input path of the next.
  //   Core 1 in0 <- TPGR.p1 -> Core4(in2->out0) -> Core2(in1->out0, 4->8)
  //   Core 1 in1 <- TPGR.p0
  //   Core 2 in0 <- TPGR.p0 -> Core1(in1->out0)
  //   Core 2 in1 <- TPGR.p1 -> Core4(in2->out0)
  //   Core 3 in0 <- TPGR.p0 -> Core1(in1->out0)
  //   Core 4 in0 <- TPGR.p0 -> Core1(in1->out0) -> Core3(in0->out0)
  //   Core 4 in1 <- TPGR.p0 -> Core1(in1->out0) -> Core3(in0->out1)
  //   Core 4 in2 <- TPGR.p1
  //   Core 1 out0 -> Core2(in0->out1, 8->4) -> MISR.s1 ; out1 -> MISR.s0
  //   Core 2 out0 -> Core1(in0->out1) -> MISR.s0      ; out1 -> MISR.s1
  //   Core 3 out0/out1 -> Core4(in0/in1->out0, 8->4) -> MISR.s2 (one at a time)
  //   Core 4 out0 -> MISR.s2
  localparam int unsigned DEF_NSTEP = 9;

  function automatic sched_t default_schedule();
    sched_t s;
    s = '0;
    // 0: Core 1 captures its pattern
    s[0] = mk_step(5, 1, 2, 3'b000,
                   cfg_test(4'b0000), cfg_bypass(1, 0), cfg_normal(), cfg_bypass(2, 0));
    // 1: Core 1 sends its response
    s[1] = mk_step(6, 0, 0, 3'b011,
                   cfg_test(4'b0011), cfg_bypass(0, 1), cfg_normal(), cfg_normal());
    // 2: Core 2 captures its pattern
    s[2] = mk_step(3, 1, 1, 3'b000,
                   cfg_bypass(1, 0), cfg_test(4'b0000), cfg_normal(), cfg_bypass(2, 0));
    // 3: Core 2 sends its response (through Core 1) while Core 3 captures (also through Core 1)
    s[3] = mk_step(4, 1, 0, 3'b011,
                   cfg_bypass2(0, 1, 1, 0), cfg_test(4'b0011), cfg_test(4'b0000), cfg_normal());
    // 4: Core 3 sends out0 through Core 4
    s[4] = mk_step(5, 0, 0, 3'b100,
                   cfg_normal(), cfg_normal(), cfg_test(4'b0001), cfg_bypass(0, 0));
    // 5: Core 3 sends out1 through Core 4
    s[5] = mk_step(4, 0, 0, 3'b100,
                   cfg_normal(), cfg_normal(), cfg_test(4'b0010), cfg_bypass(1, 0));
    // 6: Core 4 captures in0 (through Cores 1 and 3) and in2 (direct)
    s[6] = mk_step(4, 1, 1, 3'b000,
                   cfg_bypass(1, 0), cfg_normal(), cfg_bypass(0, 0), cfg_test(4'b0000));
    // 7: Core 4 captures in1 (through Cores 1 and 3)
    s[7] = mk_step(4, 1, 0, 3'b000,
                   cfg_bypass(1, 0), cfg_normal(), cfg_bypass(0, 1), cfg_test(4'b0000));
    // 8: Core 4 sends its response
    s[8] = mk_step(3, 0, 0, 3'b100,
                   cfg_normal(), cfg_normal(), cfg_normal(), cfg_test(4'b0001));
    return s;
  endfunction

endpackage
