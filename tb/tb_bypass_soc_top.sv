// tb_bypass_soc_top: end-to-end test of the four-core system at its default
// parameters (NPAT = 270 iterations of the default schedule).
//
// The testbench plays the four cores' logic: each core registers a fixed
// function of its inputs whenever func_en is high. Independently of the
// design it
//   - models the pattern generator's LFSR and checks every pattern packet,
//   - knows which core input each pattern packet is meant for in each step
//     (the intended test paths) and checks the pattern every core applies,
//   - computes each core's expected response, splits it into the packets the
//     signature register should receive and checks every arriving packet,
//   - models the signature register and checks the final signature,
//   - checks the total test length: NPAT * 38 cycles,
// and counts how often each mechanism was used: serial-to-parallel,
// parallel-to-serial and equal-width bypass edges, tests of every core, a
// step in which a response leaves one core while another core captures, and
// fan-out wires that reach a second core in normal mode.
// The whole test runs twice: first with LFSR patterns, then with random
// pre-defined patterns offered on the primary inputs (ext_pattern high),
// which must give the same path behaviour with the new pattern values.
module tb_bypass_soc_top;
  import bypass_pkg::*;

  localparam int unsigned NPAT_TB  = 270;
  localparam int unsigned ITER_CYC = 38;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic ext_pattern = 1'b0;
  logic [NTPG-1:0][WMAX-1:0]  pi_fixed;   // primary input value outside external-pattern tests
  logic busy, done;
  logic [15:0] sig, iter;
  logic [3:0]  step;
  logic [NCORE-1:0][MAXP-1:0][WMAX-1:0] func_in, func_out;
  logic [NCORE-1:0] func_en, test_apply, resp_pending;
  logic [NTPG-1:0][WMAX-1:0]  pi_data;
  logic [NTPG-1:0]            pi_valid, pi_ready;
  logic [NMISR-1:0][WMAX-1:0] po_data;
  logic [NMISR-1:0]           po_valid;

  bypass_soc_top dut (
    .clk, .rst_n, .start, .ext_pattern, .busy, .done, .sig, .iter, .step,
    .core_func_in(func_in), .core_func_en(func_en), .core_func_out(func_out),
    .core_test_apply(test_apply), .core_resp_pending(resp_pending),
    .pi_data, .pi_valid, .pi_ready, .po_data, .po_valid
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------- core models
  function automatic logic [7:0] core_fn(input int c, input int j,
                                         input logic [MAXP-1:0][WMAX-1:0] x);
    logic [7:0] a, b, d;
    a = x[0]; b = x[1]; d = x[2];
    case (c)
      0: return (j == 0) ? a + b : a ^ {b[3:0], b[7:4]};
      1: return (j == 0) ? a * a * a + 8'd3 * a + b : {4'h0, a[3:0] ^ b[3:0]};  // cubic
      2: return (j == 0) ? a - 8'd7 : {a[0], a[7:1]} ^ 8'h5A;
      default: return {4'h0, a[3:0] + b[7:4] + d[3:0]};
    endcase
  endfunction

  always @(posedge clk)
    for (int c = 0; c < int'(NCORE); c++)
      if (func_en[c])
        for (int j = 0; j < int'(MAXP); j++) func_out[c][j] <= core_fn(c, j, func_in[c]);

  // ------------------------------------------------- intended test paths
  // Destination of a pattern packet: core, input port, nibble (4-bit packet
  // number into an 8-bit port, -1 for a whole packet).
  typedef struct { int c; int i; } dest_t;
  function automatic dest_t tpg_dest(input int s, input int p);
    dest_t d;
    d.c = -1; d.i = -1;
    case (s)
      0: if (p == 0) begin d.c = 0; d.i = 1; end else begin d.c = 0; d.i = 0; end
      2: if (p == 0) begin d.c = 1; d.i = 0; end else begin d.c = 1; d.i = 1; end
      3: if (p == 0) begin d.c = 2; d.i = 0; end
      6: if (p == 0) begin d.c = 3; d.i = 0; end else begin d.c = 3; d.i = 2; end
      7: if (p == 0) begin d.c = 3; d.i = 1; end
      default: ;
    endcase
    return d;
  endfunction

  // MISR input fed by response port j of core c, and its width.
  function automatic int resp_sink(input int c, input int j);
    case (c)
      0: return (j == 0) ? 1 : 0;
      1: return (j == 0) ? 0 : 1;
      default: return 2;
    endcase
  endfunction
  function automatic int misr_w(input int q);
    return (q == 0) ? 8 : 4;
  endfunction
  function automatic int out_w(input int c, input int j);
    if (c == 3 || (c == 1 && j == 1)) return 4;
    return 8;
  endfunction

  logic [7:0] exp_in [NCORE][MAXP];
  int         nib    [NCORE][MAXP];
  logic [7:0] q_exp  [NMISR][$];
  logic [15:0] lfsr_m, sig_m;
  int tests [NCORE];
  int n_ext = 0, n_sp = 0, n_ps = 0, n_eq = 0, n_overlap = 0, n_fanout = 0, n_misr = 0;
  int start_cyc = 0, end_cyc = 0, cyc = 0;

  function automatic logic [15:0] lstep(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  // ------------------------------------------------------------ monitors
  always @(posedge clk) begin
    cyc++;
    if (rst_n && busy) begin
      // pattern packets
      automatic bit any = 0;
      for (int p = 0; p < int'(NTPG); p++) begin
        if (dut.t_valid[p] && dut.t_ready[p]) begin
          automatic logic [7:0] v = ext_pattern ? pi_data[p] :
                                    (p == 0) ? lfsr_m[7:0] : {4'h0, lfsr_m[11:8]};
          automatic dest_t d = tpg_dest(int'(step), p);
          any = 1;
          check(dut.src_data[p] == v && (!ext_pattern || pi_ready[p]),
                $sformatf("pattern packet port %0d", p));
          if (ext_pattern) n_ext++;
          if (d.c >= 0) begin
            if (p == 1 && !(d.c == 3 || (d.c == 1 && d.i == 1))) begin
              exp_in[d.c][d.i] = (nib[d.c][d.i] == 0) ? {4'h0, v[3:0]}
                                                      : {v[3:0], exp_in[d.c][d.i][3:0]};
              nib[d.c][d.i]++;
            end else begin
              exp_in[d.c][d.i] = v;
            end
          end
        end
      end
      if (any) lfsr_m = lstep(lfsr_m);

      // pattern applied by a core under test
      for (int c = 0; c < int'(NCORE); c++) begin
        if (test_apply[c]) begin
          automatic logic [MAXP-1:0][WMAX-1:0] x = '0;
          tests[c]++;
          for (int i = 0; i < int'(MAXP); i++) begin
            if (i < int'(dut.NI[c])) begin
              check(func_in[c][i] == exp_in[c][i],
                    $sformatf("core %0d input %0d pattern %h expected %h", c + 1, i,
                              func_in[c][i], exp_in[c][i]));
              x[i] = exp_in[c][i];
            end
            nib[c][i] = 0;
          end
          for (int j = 0; j < int'(dut.NO[c]); j++) begin
            automatic logic [7:0] r = core_fn(c, j, x);
            automatic int q = resp_sink(c, j);
            if (out_w(c, j) == 4) r[7:4] = 4'h0;
            if (misr_w(q) == 4 && out_w(c, j) == 8) begin
              q_exp[q].push_back({4'h0, r[3:0]});
              q_exp[q].push_back({4'h0, r[7:4]});
            end else begin
              q_exp[q].push_back(r);
            end
          end
        end
      end

      // signature register inputs
      begin
        automatic logic [15:0] fold = '0;
        automatic bit hit = 0;
        for (int q = 0; q < int'(NMISR); q++) begin
          if (dut.misr_en[q] && dut.m_valid[q]) begin
            automatic logic [7:0] e = 8'h00;
            hit = 1;
            n_misr++;
            if (q_exp[q].size() == 0) begin
              check(0, $sformatf("unexpected packet at MISR input %0d", q));
            end else begin
              e = q_exp[q].pop_front();
              check(po_data[q] == e, $sformatf("MISR input %0d got %h expected %h", q,
                                               po_data[q], e));
            end
            fold ^= (q == 0) ? {8'h00, e} : (q == 1) ? {4'h0, e[3:0], 8'h00}
                                                      : {e[3:0], 12'h000};
          end
        end
        if (hit) sig_m = lstep(sig_m) ^ fold;
      end

      // mechanisms
      if (dut.g_core[1].u_wrap.g_in[1].g_out[0].g_edge.u_bm.out_valid &&
          dut.g_core[1].u_wrap.g_in[1].g_out[0].g_edge.u_bm.out_ready) n_sp++;
      if (dut.g_core[1].u_wrap.g_in[0].g_out[1].g_edge.u_bm.out_valid &&
          dut.g_core[1].u_wrap.g_in[0].g_out[1].g_edge.u_bm.out_ready) n_ps++;
      if (dut.g_core[3].u_wrap.g_in[0].g_out[0].g_edge.u_bm.out_valid &&
          dut.g_core[3].u_wrap.g_in[0].g_out[0].g_edge.u_bm.out_ready) n_ps++;
      if (dut.g_core[0].u_wrap.g_in[1].g_out[0].g_edge.u_bm.out_valid &&
          dut.g_core[0].u_wrap.g_in[1].g_out[0].g_edge.u_bm.out_ready) n_eq++;
      // Core 3 applies its pattern in the step in which Core 2 sends its response
      if (test_apply[2] && dut.cfg[1].mode == MODE_TEST && dut.cfg[1].send != 0) n_overlap++;
      if (dut.cfg[2].mode == MODE_NORMAL && dut.cfg[1].mode != MODE_NORMAL &&
          dut.i_valid[2][0]) n_fanout++;
    end
    if (done && end_cyc == 0) end_cyc = cyc;
  end


  // One complete test: start, wait for done, check length, signature, counts.
  task automatic run_test(input bit ext);
    for (int c = 0; c < int'(NCORE); c++) tests[c] = 0;
    n_sp = 0; n_ps = 0; n_eq = 0; n_overlap = 0; n_fanout = 0; n_misr = 0;
    @(negedge clk);
    start = 1'b1;
    start_cyc = cyc;
    @(negedge clk);
    start = 1'b0;
    wait (!done);
    end_cyc = 0;
    wait (done);
    repeat (2) @(posedge clk);
    // done is seen two monitor samples after the NPAT * 38 cycles of the test
    check(end_cyc - start_cyc == int'(NPAT_TB * ITER_CYC) + 2,
          $sformatf("test length %0d cycles, expected %0d", end_cyc - start_cyc,
                    NPAT_TB * ITER_CYC + 2));
    check(resp_pending == '0, "no response left unsent");
    check(sig == sig_m, $sformatf("signature %h expected %h", sig, sig_m));
    for (int q = 0; q < int'(NMISR); q++)
      check(q_exp[q].size() == 0, $sformatf("responses missing at MISR input %0d", q));
    for (int c = 0; c < int'(NCORE); c++)
      check(tests[c] == int'(NPAT_TB), $sformatf("core %0d tested %0d times", c + 1, tests[c]));
    check(n_sp > 0,      "serial-to-parallel bypass edge used");
    check(n_ps > 0,      "parallel-to-serial bypass edge used");
    check(n_eq > 0,      "equal-width bypass edge used");
    check(n_overlap > 0, "overlapped output and input paths");
    check(n_fanout > 0,  "fan-out wire reaching a core in normal mode");
    check(n_misr > 0,    "signature compaction");
    $display("run ext=%0d mechanisms: sp=%0d ps=%0d eq=%0d overlap=%0d fanout=%0d misr=%0d tests=%0d/%0d/%0d/%0d",
             ext, n_sp, n_ps, n_eq, n_overlap, n_fanout, n_misr, tests[0], tests[1], tests[2], tests[3]);
    $display("test length %0d cycles, signature %h", end_cyc - start_cyc, sig);
  endtask

  // primary inputs: new random pre-defined pattern packets whenever taken
  always @(posedge clk)
    for (int p = 0; p < int'(NTPG); p++)
      if (!ext_pattern)
        pi_data[p] <= pi_fixed[p];
      else if (pi_ready[p] && pi_valid[p] && busy)
        pi_data[p] <= (p == 0) ? 8'($urandom) : {4'h0, 4'($urandom)};

  // ------------------------------------------------------------- stimulus
  initial begin
    pi_fixed = '0;
    pi_valid = '0;
    func_out = '0;
    lfsr_m   = 16'hACE1;
    sig_m    = '0;
    for (int c = 0; c < int'(NCORE); c++) begin
      tests[c] = 0;
      for (int i = 0; i < int'(MAXP); i++) begin exp_in[c][i] = '0; nib[c][i] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // normal mode: primary input 0 reaches Core 1 in1 directly
    pi_fixed[0] <= 8'h3C; pi_valid[0] <= 1'b1;
    repeat (2) @(posedge clk);
    check(func_in[0][1] == 8'h3C && pi_ready[0], "normal mode primary input to Core 1");
    check(po_valid == 3'b111 && !busy, "normal mode primary outputs driven by cores");
    pi_valid <= '0;
    run_test(1'b0);
    // second test: pre-defined patterns from the primary inputs
    @(negedge clk);
    ext_pattern = 1'b1;
    pi_valid    = '1;
    lfsr_m      = 16'hACE1;
    sig_m       = '0;
    run_test(1'b1);
    check(n_ext > 0, "pre-defined patterns from the primary inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NPAT_TB * ITER_CYC + 4000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
