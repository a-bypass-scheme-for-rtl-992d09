// tb_core_wrapper: self-checking test of the core test wrapper, configured
// like Core 2 of the example system (inputs 8 and 4 bits, outputs 8 and 4
// bits). The testbench plays the core logic (a registered function of
// func_in, updated when func_en is high) and checks:
//   - normal mode: ports reach the core and back unchanged, core enabled;
//   - bypass mode: edge in1 -> out0 (4 -> 8) assembles two nibbles, edge
//     in0 -> out1 (8 -> 4) splits a byte, both at once, the core held
//     (func_en low), in the expected number of cycles;
//   - test mode: packets captured at different times, the pattern applied
//     once, the response held until send allows it, each response port sent
//     once, later packets ignored, state cleared when test mode ends;
//   - random packet streams through each of the four bypass edges under
//     random valid and out_ready, compared bit for bit with the input;
//   - 100 random test rounds with varying input order, gaps and stalls.
module tb_core_wrapper;
  import bypass_pkg::*;
  logic clk = 0, rst_n = 0;
  core_cfg_t cfg;
  logic [MAXP-1:0][WMAX-1:0] in_data, out_data, func_in, func_out;
  logic [MAXP-1:0] in_valid, in_ready, out_valid, out_ready;
  logic func_en, test_apply, resp_pending;

  core_wrapper #(.NIN(2), .NOUT(2), .W_IN(wl(8, 4, 0, 0)), .W_OUT(wl(8, 4, 0, 0))) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [MAXP-1:0][WMAX-1:0] core_fn(input logic [MAXP-1:0][WMAX-1:0] x);
    logic [MAXP-1:0][WMAX-1:0] y;
    y = '0;
    y[0] = x[0] + {4'h0, x[1][3:0]};
    y[1] = 8'hF0 | (x[0][7:4] ^ x[1][3:0]);   // upper bits must be masked
    return y;
  endfunction
  always @(posedge clk) if (func_en) func_out <= core_fn(func_in);

  int applies = 0;
  always @(posedge clk) if (test_apply) applies++;

  localparam int WI[2] = '{8, 4};
  localparam int WO[2] = '{8, 4};

  // Stream random packets through bypass edge i -> j with random valid and
  // out_ready; the output must be the same bits, least significant first,
  // cut into packets of the output width.
  task automatic stream_edge(input int i, input int j, input int npkt);
    bit bits_q[$];
    int sent = 0, got = 0, nexp, cyc = 0;
    logic [7:0] v;
    cfg = cfg_bypass(2'(i), 2'(j));
    in_valid = '0;
    @(negedge clk);
    nexp = npkt * WI[i] / WO[j];
    while (got < nexp && cyc < 2000) begin
      in_valid[i] = (sent < npkt) && ($urandom % 4 != 0);
      if (in_valid[i]) in_data[i] = WI[i] == 8 ? 8'($urandom) : {4'h0, 4'($urandom)};
      out_ready[j] = ($urandom % 3 != 0);
      #1;
      check(!(out_valid[1 - j]), "bypass: only the selected output is valid");
      if (out_valid[j] && out_ready[j]) begin
        v = '0;
        for (int b = 0; b < WO[j]; b++) v[b] = bits_q.pop_front();
        check(out_data[j] == v, $sformatf("bypass %0d->%0d packet %0d: %h expected %h",
                                          i, j, got, out_data[j], v));
        got++;
      end
      if (in_valid[i] && in_ready[i]) begin
        for (int b = 0; b < WI[i]; b++) bits_q.push_back(in_data[i][b]);
        sent++;
      end
      @(negedge clk);
      cyc++;
    end
    in_valid = '0;
    out_ready = '1;
    check(got == nexp && bits_q.size() == 0,
          $sformatf("bypass %0d->%0d: %0d of %0d packets", i, j, got, nexp));
  endtask

  // One test of the core: pattern ports filled in random order and gaps,
  // response sent under random backpressure; each port must send once.
  task automatic test_round();
    logic [MAXP-1:0][WMAX-1:0] pat, resp;
    int a0, first, n[2], cyc;
    cfg = cfg_normal();
    in_valid = '0;
    @(negedge clk);
    cfg = cfg_test(4'b0000);
    @(negedge clk);
    pat = '0;
    pat[0] = 8'($urandom);
    pat[1] = {4'h0, 4'($urandom)};
    resp = core_fn(pat);
    a0 = applies;
    first = $urandom % 2;
    for (int k = 0; k < 2; k++) begin
      automatic int p = (k == 0) ? first : 1 - first;
      in_data[p] = pat[p];
      in_valid[p] = 1'b1;
      @(negedge clk);
      in_valid[p] = 1'b0;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(applies == a0 + 1, "test round: pattern applied once");
    cfg.send = 4'b0011;
    n[0] = 0; n[1] = 0; cyc = 0;
    while (resp_pending && cyc < 30) begin
      out_ready[1:0] = 2'($urandom);
      #1;
      if (out_valid[0] && out_ready[0]) begin
        check(out_data[0] == resp[0], $sformatf("test round: port 0 %h expected %h",
                                                out_data[0], resp[0]));
        n[0]++;
      end
      if (out_valid[1] && out_ready[1]) begin
        check(out_data[1] == {4'h0, resp[1][3:0]},
              $sformatf("test round: port 1 %h expected %h", out_data[1], resp[1][3:0]));
        n[1]++;
      end
      @(negedge clk);
      cyc++;
    end
    out_ready = '1;
    repeat (2) @(negedge clk);
    check(n[0] == 1 && n[1] == 1 && out_valid[1:0] == 2'b00,
          $sformatf("test round: sent %0d and %0d responses", n[0], n[1]));
  endtask

  initial begin
    logic [7:0] got0, got1a, got1b;
    int n1;
    logic [MAXP-1:0][WMAX-1:0] resp;
    logic [MAXP-1:0][WMAX-1:0] pat;
    cfg = cfg_normal(); in_data = '0; in_valid = '0; out_ready = '1; func_out = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---------------- normal mode
    @(negedge clk);
    in_data[0] = 8'h12; in_data[1] = 8'h05; in_valid = 2'b11;
    @(posedge clk); @(negedge clk);
    check(func_en && func_in[0] == 8'h12 && func_in[1] == 8'h05, "normal: inputs reach core");
    check(out_valid[1:0] == 2'b11 && out_data[0] == 8'h17 && out_data[1] == 8'h04,
          "normal: core outputs reach ports, masked to width");
    check(in_ready[1:0] == 2'b11, "normal: inputs ready");
    // ---------------- bypass: in1 -> out0 (4 -> 8) and in0 -> out1 (8 -> 4)
    cfg = cfg_bypass2(1, 0, 0, 1);
    in_valid = '0;
    @(negedge clk);
    check(!func_en, "bypass: core held");
    in_data[1] = 8'h0A; in_data[0] = 8'hC3; in_valid = 2'b11;
    @(negedge clk);
    in_valid[0] = 1'b0;          // one byte for the 8 -> 4 edge
    in_data[1] = 8'h0B;          // second nibble for the 4 -> 8 edge
    @(negedge clk);
    in_valid[1] = 1'b0;
    got0 = '0; got1a = '0; got1b = '0; n1 = 0;
    for (int k = 0; k < 6; k++) begin
      if (out_valid[0]) got0 = out_data[0];
      if (out_valid[1]) begin
        if (n1 == 0) got1a = out_data[1];
        else         got1b = out_data[1];
        n1++;
      end
      @(negedge clk);
    end
    check(n1 == 2, $sformatf("bypass 8->4 sent %0d packets", n1));
    check(got0 == 8'hBA, $sformatf("bypass 4->8 assembled %h", got0));
    check(got1a == 8'h03 && got1b == 8'h0C, $sformatf("bypass 8->4 split %h %h", got1a, got1b));
    check(out_valid[1:0] == 2'b00, "bypass: nothing left in flight");
    // ---------------- test mode
    cfg = cfg_test(4'b0000);
    @(negedge clk);
    check(in_ready[1:0] == 2'b11 && out_valid[1:0] == 2'b00, "test: ready, nothing sent yet");
    pat = '0; pat[0] = 8'h47; pat[1] = 8'h09;
    resp = core_fn(pat);
    in_data[0] = pat[0]; in_valid = 2'b01;
    @(negedge clk);
    in_valid = 2'b00;
    repeat (3) @(negedge clk);
    check(applies == 0, "test: no apply before all inputs captured");
    in_data[1] = pat[1]; in_valid = 2'b10;
    @(negedge clk);
    in_data[1] = 8'h0F; in_data[0] = 8'hFF; in_valid = 2'b11;   // must be ignored
    repeat (4) @(negedge clk);
    in_valid = '0;
    check(applies == 1, $sformatf("test: pattern applied %0d times", applies));
    check(resp_pending && out_valid[1:0] == 2'b00, "test: response held until send");
    cfg.send = 4'b0001;
    out_ready = '0;
    @(negedge clk);
    check(out_valid[1:0] == 2'b01 && out_data[0] == resp[0],
          $sformatf("test: response port 0 %h", out_data[0]));
    out_ready = '1;
    @(negedge clk);
    check(out_valid[0] == 1'b0, "test: port 0 sent once");
    cfg.send = 4'b0011;
    #1;
    check(out_valid[1] && out_data[1] == {4'h0, resp[1][3:0]},
          $sformatf("test: response port 1 %h valid %b", out_data[1], out_valid[1]));
    @(negedge clk);
    check(!resp_pending && out_valid[1:0] == 2'b00, "test: all responses sent");
    check(applies == 1, "test: applied once");
    // leaving test mode clears the state; a new test starts from scratch
    cfg = cfg_normal();
    @(negedge clk);
    cfg = cfg_test(4'b0011);
    @(negedge clk);
    check(dut.cap == '0 && !resp_pending, "test: state cleared on re-entry");
    // ---------------- random streams through every bypass edge, with stalls
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        stream_edge(i, j, 40);
    // ---------------- random test rounds: input order, gaps and stalls vary
    for (int r = 0; r < 100; r++) test_round();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
