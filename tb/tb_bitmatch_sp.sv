// tb_bitmatch_sp: self-checking test of the serial-to-parallel bit-match.
//
// Configuration M = 4, N = 16: a 16-bit pattern through a 4-bit port in four
// packets. Phase 1 streams words with input always valid and output always
// ready and checks that a word leaves every 4 cycles, the first one cycle
// after its fourth packet. Phase 2 throttles both sides at random. Every
// word is checked against the four packets that went in (first packet in
// the least significant bits). Phase 3 checks that clr drops a partial word.
module tb_bitmatch_sp;
  localparam int M = 4, N = 16;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [M-1:0] in_data;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [N-1:0] out_data;

  bitmatch_sp #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  logic [M-1:0] sent [$];
  int out_cyc [$];
  bit throttle = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && !clr) begin
      if (in_valid && in_ready) sent.push_back(in_data);
      if (out_valid && out_ready) begin
        logic [N-1:0] e;
        e = '0;
        for (int k = 0; k < N / M; k++) e[k*M +: M] = sent.pop_front();
        checks++;
        if (out_data !== e) begin
          failures++;
          $display("FAIL word %h expected %h", out_data, e);
        end
        out_cyc.push_back(cyc);
      end
    end
  end

  always @(negedge clk) begin
    in_data   <= M'($urandom);
    in_valid  <= throttle ? ($urandom % 3 != 0) : 1'b1;
    out_ready <= throttle ? ($urandom % 2 != 0) : 1'b1;
  end

  initial begin
    in_valid = 0; out_ready = 1; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (41) @(posedge clk);
    // phase 1: one word per 4 cycles
    checks++;
    if (out_cyc.size() < 9) failures++;
    for (int k = 1; k < out_cyc.size(); k++) begin
      checks++;
      if (out_cyc[k] - out_cyc[k-1] != N / M) begin
        failures++;
        $display("FAIL word spacing %0d cycles", out_cyc[k] - out_cyc[k-1]);
      end
    end
    // phase 2: random throttling
    throttle = 1;
    repeat (2000) @(posedge clk);
    // phase 3: clr drops a partial word
    @(negedge clk); throttle = 0;
    wait (dut.cnt == 2);
    @(negedge clk); clr = 1; in_valid = 0;
    @(negedge clk); clr = 0;
    sent.delete();
    checks++;
    if (dut.cnt != 0 || out_valid) begin failures++; $display("FAIL clr"); end
    repeat (50) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
