// core_wrapper: test wrapper ("core control") around one embedded core.
//
// The wrapper gives every core three modes, set per test step by the test
// controller through cfg:
//   MODE_NORMAL  ports connect straight to the core logic (func_in/func_out),
//                outputs always valid, core enabled every cycle;
//   MODE_BYPASS  test data entering input port i leaves on output port j
//                through the bit-match circuit of edge (i,j), without the
//                core logic taking part (the core is held, func_en low);
//                several edges may be on at once, each output fed by one edge;
//   MODE_TEST    the core is under test: the first packet on each input port
//                is captured, once all NIN ports are captured the core is
//                enabled for one cycle (func_en) to apply the pattern, the
//                next cycle its response is latched, and response port j is
//                sent once cfg.send[j] allows it.
// There is one bit-match circuit for every input/output port pair, so all
// bypass edges of the core (a complete bipartite set) are available.
//
// Interface: MAXP input and output link ports, each WMAX bits wide with
// valid/ready; port k uses the low W_IN[k] / W_OUT[k] bits, ports beyond
// NIN / NOUT are unused (ready high, valid low). In bypass mode an input
// packet is taken only when every edge enabled from that port can take it.
// In normal and test modes input ports are always ready; a test-mode port
// that has already captured its packet discards further packets (a wire
// feeding several cores then never stalls). Leaving test mode clears the
// capture and response state; turning an edge off empties its bit-match.
//
// The bypass mode and the bit-match per edge follow the architecture it
// implements; the test-mode sequence and the handshake are this design's.
module core_wrapper
  import bypass_pkg::*;
#(
  parameter int unsigned NIN  = 2,
  parameter int unsigned NOUT = 2,
  parameter width_list_t W_IN  = wl(8, 8, 8, 8),
  parameter width_list_t W_OUT = wl(8, 8, 8, 8)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  core_cfg_t                   cfg,
  // test / functional link ports
  input  logic [MAXP-1:0][WMAX-1:0]   in_data,
  input  logic [MAXP-1:0]             in_valid,
  output logic [MAXP-1:0]             in_ready,
  output logic [MAXP-1:0][WMAX-1:0]   out_data,
  output logic [MAXP-1:0]             out_valid,
  input  logic [MAXP-1:0]             out_ready,
  // core logic side
  output logic [MAXP-1:0][WMAX-1:0]   func_in,
  output logic                        func_en,
  input  logic [MAXP-1:0][WMAX-1:0]   func_out,
  // status
  output logic                        test_apply,   // pattern applied this cycle
  output logic                        resp_pending  // response not yet fully sent
);
  typedef enum logic [1:0] {T_CAPTURE, T_APPLY, T_LATCH, T_DONE} tstate_e;

  tstate_e                   tstate;
  logic [MAXP-1:0]           cap;
  logic [MAXP-1:0][WMAX-1:0] cap_data;
  logic [MAXP-1:0]           resp_valid;
  logic [MAXP-1:0][WMAX-1:0] resp;

  logic is_byp, is_test;
  assign is_byp  = (cfg.mode == MODE_BYPASS);
  assign is_test = (cfg.mode == MODE_TEST);

  // ---------------------------------------------------------------- bypass
  logic [MAXP-1:0][MAXP-1:0]           e_on;      // edge (i,j) enabled
  logic [MAXP-1:0][MAXP-1:0]           e_in_rdy;
  logic [MAXP-1:0][MAXP-1:0]           e_out_vld;
  logic [MAXP-1:0][MAXP-1:0][WMAX-1:0] e_out_dat;
  logic [MAXP-1:0]                     byp_in_rdy;
  logic [MAXP-1:0][WMAX-1:0]           byp_out_dat;
  logic [MAXP-1:0]                     byp_out_vld;

  for (genvar i = 0; i < int'(MAXP); i++) begin : g_in
    for (genvar j = 0; j < int'(MAXP); j++) begin : g_out
      if (i < int'(NIN) && j < int'(NOUT)) begin : g_edge
        logic [W_OUT[j]-1:0] od;
        assign e_on[i][j] = is_byp && cfg.byp[i][j];
        bit_match #(.M(int'(W_IN[i])), .N(int'(W_OUT[j]))) u_bm (
          .clk      (clk),
          .rst_n    (rst_n),
          .clr      (!e_on[i][j]),
          .in_data  (in_data[i][W_IN[i]-1:0]),
          .in_valid (in_valid[i] && e_on[i][j] && byp_in_rdy[i]),
          .in_ready (e_in_rdy[i][j]),
          .out_data (od),
          .out_valid(e_out_vld[i][j]),
          .out_ready(out_ready[j] && e_on[i][j])
        );
        assign e_out_dat[i][j] = WMAX'(od);
      end else begin : g_none
        assign e_on[i][j]      = 1'b0;
        assign e_in_rdy[i][j]  = 1'b1;
        assign e_out_vld[i][j] = 1'b0;
        assign e_out_dat[i][j] = '0;
      end
    end
  end

  always_comb begin
    byp_in_rdy  = '1;
    byp_out_dat = '0;
    byp_out_vld = '0;
    for (int i = 0; i < int'(MAXP); i++)
      for (int j = 0; j < int'(MAXP); j++) begin
        if (e_on[i][j] && !e_in_rdy[i][j]) byp_in_rdy[i] = 1'b0;
        if (e_on[i][j]) begin
          byp_out_dat[j] = byp_out_dat[j] | e_out_dat[i][j];
          byp_out_vld[j] = byp_out_vld[j] | e_out_vld[i][j];
        end
      end
  end

  // Each output port may be fed by one enabled bypass edge at most.
  logic one_edge_per_out;
  always_comb begin
    one_edge_per_out = 1'b1;
    for (int j = 0; j < int'(MAXP); j++) begin
      logic seen;
      seen = 1'b0;
      for (int i = 0; i < int'(MAXP); i++)
        if (cfg.byp[i][j]) begin
          if (seen) one_edge_per_out = 1'b0;
          seen = 1'b1;
        end
    end
  end
  a_one_edge: assert property (@(posedge clk) disable iff (!rst_n) is_byp |-> one_edge_per_out)
    else $error("core_wrapper: an output port is fed by two bypass edges");

  // ------------------------------------------------------------ test mode
  logic [MAXP-1:0] need;   // ports that take part
  always_comb begin
    need = '0;
    for (int i = 0; i < int'(MAXP); i++) need[i] = (i < int'(NIN));
  end

  logic [MAXP-1:0] cap_next;
  always_comb begin
    cap_next = cap;
    for (int i = 0; i < int'(MAXP); i++)
      if (need[i] && in_valid[i]) cap_next[i] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate     <= T_CAPTURE;
      cap        <= '0;
      cap_data   <= '0;
      resp_valid <= '0;
      resp       <= '0;
    end else if (!is_test) begin
      tstate     <= T_CAPTURE;
      cap        <= '0;
      resp_valid <= '0;
    end else begin
      case (tstate)
        T_CAPTURE: begin
          for (int i = 0; i < int'(MAXP); i++)
            if (need[i] && in_valid[i] && !cap[i]) begin
              cap_data[i] <= in_data[i] & WMAX'((1 << W_IN[i]) - 1);
            end
          cap <= cap_next;
          if ((cap_next & need) == need) tstate <= T_APPLY;
        end
        T_APPLY: tstate <= T_LATCH;
        T_LATCH: begin
          for (int j = 0; j < int'(MAXP); j++) begin
            resp[j]       <= func_out[j] & WMAX'((1 << W_OUT[j]) - 1);
            resp_valid[j] <= (j < int'(NOUT));
          end
          tstate <= T_DONE;
        end
        default: begin
          for (int j = 0; j < int'(MAXP); j++)
            if (resp_valid[j] && cfg.send[j] && out_ready[j]) resp_valid[j] <= 1'b0;
        end
      endcase
    end
  end

  assign test_apply   = is_test && (tstate == T_APPLY);
  assign resp_pending = |resp_valid;

  // ----------------------------------------------------------- port muxes
  always_comb begin
    for (int p = 0; p < int'(MAXP); p++) begin
      unique case (cfg.mode)
        MODE_BYPASS: begin
          in_ready[p]  = byp_in_rdy[p];
          out_data[p]  = byp_out_dat[p];
          out_valid[p] = byp_out_vld[p];
        end
        MODE_TEST: begin
          in_ready[p]  = 1'b1;
          out_data[p]  = resp[p];
          out_valid[p] = resp_valid[p] && cfg.send[p];
        end
        default: begin
          in_ready[p]  = 1'b1;
          out_data[p]  = func_out[p] & WMAX'((1 << W_OUT[p]) - 1);
          out_valid[p] = (p < int'(NOUT));
        end
      endcase
    end
    func_in = (cfg.mode == MODE_NORMAL) ? in_data : cap_data;
    func_en = (cfg.mode == MODE_NORMAL) || test_apply;
  end

endmodule
