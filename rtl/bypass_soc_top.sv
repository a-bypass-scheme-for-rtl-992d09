// bypass_soc_top: four-core system-on-chip tested as a whole through the
// cores' bypass modes.
//
// Four core wrappers (Core 1 .. Core 4, index 0 .. 3), a test pattern
// generator (TPGR) at the global source, a signature register (MISR) at the
// global sink and the test controller. The cores' own logic is outside this
// module: each wrapper's func_in / func_en / func_out are brought out as
// ports. The links between cores are the functional wires of the system; in
// test they carry test packets, so the interconnect is exercised as well.
//
// Port widths (bits) and links, as wired here:
//   TPGR.p0 (8)  -> Core1.in1        TPGR.p1 (4)  -> Core4.in2
//   Core1.out0 (8) -> Core2.in0 and Core3.in0
//   Core1.out1 (8) -> MISR.s0        Core2.out0 (8) -> Core1.in0
//   Core2.out1 (4) -> MISR.s1        Core3.out0 (8) -> Core4.in0
//   Core3.out1 (8) -> Core4.in1      Core4.out0 (4) -> Core2.in1 and MISR.s2
// Core2.in1 is 4 bits wide. A wire that fans out to two ports takes a packet
// only when both are ready. Outside a test (busy low) the two primary inputs
// pi_* drive the wires the TPGR drives in test, and the three wires into the
// MISR are the primary outputs po_*.
// With ext_pattern high during a test, pre-defined patterns are taken from
// pi_* instead of the LFSR; the TPGR still counts the packets of each step.
// Such a source must offer a packet whenever one is due, because the steps
// have fixed lengths.
//
// Interface: start begins a test of NPAT iterations; done stays high at the
// end and sig holds the signature. Timing is set by the schedule table: one
// iteration lasts the sum of its step lengths (38 cycles for the default
// table). The link widths beyond "8-bit datapaths" and the exact wiring are
// this design's reading of the example system; they are parameters of the
// schedule and of the wrappers, not of the method.
module bypass_soc_top
  import bypass_pkg::*;
#(
  parameter int unsigned NPAT  = 270,
  parameter int unsigned NSTEP = DEF_NSTEP,
  parameter sched_t      SCHED = default_schedule()
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic                              ext_pattern,  // test patterns from pi_* instead of the LFSR
  output logic                              busy,
  output logic                              done,
  output logic [15:0]                       sig,
  output logic [15:0]                       iter,
  output logic [3:0]                        step,
  // core logic of Core 1 .. Core 4
  output logic [NCORE-1:0][MAXP-1:0][WMAX-1:0] core_func_in,
  output logic [NCORE-1:0]                     core_func_en,
  input  logic [NCORE-1:0][MAXP-1:0][WMAX-1:0] core_func_out,
  output logic [NCORE-1:0]                     core_test_apply,
  output logic [NCORE-1:0]                     core_resp_pending,
  // system primary inputs and outputs (normal mode)
  input  logic [NTPG-1:0][WMAX-1:0]         pi_data,
  input  logic [NTPG-1:0]                   pi_valid,
  output logic [NTPG-1:0]                   pi_ready,
  output logic [NMISR-1:0][WMAX-1:0]        po_data,
  output logic [NMISR-1:0]                  po_valid
);
  // Port counts and widths of Core 1 .. Core 4.
  localparam width_list_t [NCORE-1:0] WI = {wl(8, 8, 4, 0), wl(8, 0, 0, 0), wl(8, 4, 0, 0), wl(8, 8, 0, 0)};
  localparam width_list_t [NCORE-1:0] WO = {wl(4, 0, 0, 0), wl(8, 8, 0, 0), wl(8, 4, 0, 0), wl(8, 8, 0, 0)};
  localparam logic [NCORE-1:0][2:0]   NI = {3'd3, 3'd1, 3'd2, 3'd2};
  localparam logic [NCORE-1:0][2:0]   NO = {3'd1, 3'd2, 3'd2, 3'd2};

  core_cfg_t [NCORE-1:0]            cfg;
  logic [NCORE-1:0][MAXP-1:0][WMAX-1:0] i_data, o_data;
  logic [NCORE-1:0][MAXP-1:0]           i_valid, i_ready, o_valid, o_ready;

  logic                         tpg_load, tpg_reseed, misr_clear;
  logic [NTPG-1:0][3:0]         tpg_cnt;
  logic [NMISR-1:0]             misr_en;
  logic [NTPG-1:0][WMAX-1:0]    t_data, src_data;
  logic [NTPG-1:0]              t_valid, t_ready, src_valid, src_ready;
  logic [NMISR-1:0][WMAX-1:0]   m_data;
  logic [NMISR-1:0]             m_valid, m_ready;

  test_controller #(.NSTEP(NSTEP), .NPAT(NPAT), .SCHED(SCHED)) u_ctrl (
    .clk, .rst_n, .start, .cfg, .tpg_load, .tpg_cnt, .misr_en, .misr_clear,
    .tpg_reseed, .busy, .done, .step, .iter
  );

  tpgr u_tpgr (
    .clk, .rst_n, .reseed(tpg_reseed), .load(tpg_load), .cnt(tpg_cnt),
    .out_data(t_data), .out_valid(t_valid), .out_ready(t_ready)
  );

  for (genvar c = 0; c < int'(NCORE); c++) begin : g_core
    core_wrapper #(.NIN(int'(NI[c])), .NOUT(int'(NO[c])), .W_IN(WI[c]), .W_OUT(WO[c])) u_wrap (
      .clk, .rst_n, .cfg(cfg[c]),
      .in_data(i_data[c]), .in_valid(i_valid[c]), .in_ready(i_ready[c]),
      .out_data(o_data[c]), .out_valid(o_valid[c]), .out_ready(o_ready[c]),
      .func_in(core_func_in[c]), .func_en(core_func_en[c]), .func_out(core_func_out[c]),
      .test_apply(core_test_apply[c]), .resp_pending(core_resp_pending[c])
    );
  end

  misr u_misr (
    .clk, .rst_n, .clear(misr_clear), .en(misr_en),
    .in_data(m_data), .in_valid(m_valid), .in_ready(m_ready), .sig
  );

  // Global source. Outside a test the primary inputs drive the wires. In a
  // test the pattern generator does; with ext_pattern the patterns come from
  // the primary inputs instead, metered by the generator's packet counts.
  always_comb begin
    for (int p = 0; p < int'(NTPG); p++) begin
      if (!busy) begin
        src_data[p]  = pi_data[p];
        src_valid[p] = pi_valid[p];
        t_ready[p]   = 1'b0;
        pi_ready[p]  = src_ready[p];
      end else if (ext_pattern) begin
        src_data[p]  = pi_data[p];
        src_valid[p] = t_valid[p] && pi_valid[p];
        t_ready[p]   = src_ready[p] && pi_valid[p];
        pi_ready[p]  = src_ready[p] && t_valid[p];
      end else begin
        src_data[p]  = t_data[p];
        src_valid[p] = t_valid[p];
        t_ready[p]   = src_ready[p];
        pi_ready[p]  = 1'b0;
      end
    end
  end

  // The system's interconnect.
  always_comb begin
    i_data  = '0;
    i_valid = '0;
    o_ready = '0;
    // Core 1 inputs
    i_data[0][0] = o_data[1][0];  i_valid[0][0] = o_valid[1][0];
    i_data[0][1] = src_data[0];   i_valid[0][1] = src_valid[0];
    // Core 2 inputs
    i_data[1][0] = o_data[0][0];  i_valid[1][0] = o_valid[0][0] && i_ready[2][0];
    i_data[1][1] = o_data[3][0];
    // Core 3 input (shares Core 1 out0 with Core 2 in0)
    i_data[2][0] = o_data[0][0];  i_valid[2][0] = o_valid[0][0] && i_ready[1][0];
    // Core 4 inputs
    i_data[3][0] = o_data[2][0];  i_valid[3][0] = o_valid[2][0];
    i_data[3][1] = o_data[2][1];  i_valid[3][1] = o_valid[2][1];
    i_data[3][2] = src_data[1];   i_valid[3][2] = src_valid[1];
    // MISR inputs / primary outputs
    m_data[0] = o_data[0][1];     m_valid[0] = o_valid[0][1];
    m_data[1] = o_data[1][1];     m_valid[1] = o_valid[1][1];
    m_data[2] = o_data[3][0];     m_valid[2] = o_valid[3][0] && i_ready[1][1];
    // ready back to each driver (fan-out: all receivers must be ready)
    src_ready[0] = i_ready[0][1];
    src_ready[1] = i_ready[3][2];
    o_ready[0][0] = i_ready[1][0] && i_ready[2][0];
    o_ready[0][1] = m_ready[0];
    o_ready[1][0] = i_ready[0][0];
    o_ready[1][1] = m_ready[1];
    o_ready[2][0] = i_ready[3][0];
    o_ready[2][1] = i_ready[3][1];
    o_ready[3][0] = i_ready[1][1] && m_ready[2];
    i_valid[1][1] = o_valid[3][0] && m_ready[2];
  end

  assign po_data  = m_data;
  assign po_valid = m_valid;

endmodule
