// tb_bitmatch_ps: self-checking test of the parallel-to-serial bit-match.
//
// Configuration M = 16, N = 4: a 16-bit word leaves as four 4-bit packets,
// least significant first. Phase 1 offers words continuously with the output
// always ready and checks the timing: the first packet is handed over two
// clock edges after the first word is accepted (one edge loads the output
// registers), then packets leave on every cycle with no gap between words,
// and after the first two words (taken back to back) a new word is taken
// every four cycles. Phase 2 throttles both sides at random. Every packet is checked
// against the words that went in.
module tb_bitmatch_ps;
  localparam int M = 16, N = 4;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [M-1:0] in_data;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [N-1:0] out_data;

  bitmatch_ps #(.M(M), .N(N)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  logic [N-1:0] exp_q [$];
  int acc_cyc [$], out_cyc [$];
  bit throttle = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        for (int k = 0; k < M / N; k++) exp_q.push_back(in_data[k*N +: N]);
        acc_cyc.push_back(cyc);
      end
      if (out_valid && out_ready) begin
        logic [N-1:0] e;
        e = exp_q.pop_front();
        checks++;
        if (out_data !== e) begin
          failures++;
          $display("FAIL packet %h expected %h", out_data, e);
        end
        out_cyc.push_back(cyc);
      end
    end
  end

  always @(negedge clk) begin
    in_data   <= M'($urandom);
    in_valid  <= throttle ? ($urandom % 2 != 0) : 1'b1;
    out_ready <= throttle ? ($urandom % 3 != 0) : 1'b1;
  end

  initial begin
    in_valid = 0; out_ready = 1; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (51) @(posedge clk);
    checks++;
    if (acc_cyc.size() < 9) failures++;
    checks++;
    if (out_cyc[0] != acc_cyc[0] + 2) begin
      failures++;
      $display("FAIL first packet at %0d, word taken at %0d", out_cyc[0], acc_cyc[0]);
    end
    // words 0 and 1 are taken back to back (word and pending register)
    for (int w = 0; w + 1 < acc_cyc.size() && (w + 1) * (M / N) <= out_cyc.size(); w++) begin
      checks++;
      if (acc_cyc[w+1] - acc_cyc[w] != ((w == 0) ? 1 : M / N)) begin
        failures++;
        $display("FAIL word spacing %0d", acc_cyc[w+1] - acc_cyc[w]);
      end
      for (int k = 0; k < M / N; k++) begin
        checks++;
        if (out_cyc[w*(M/N) + k] != out_cyc[0] + w*(M/N) + k) begin
          failures++;
          $display("FAIL packet %0d of word %0d at cycle %0d, word taken at %0d",
                   k, w, out_cyc[w*(M/N) + k], acc_cyc[w]);
        end
      end
    end
    throttle = 1;
    repeat (2000) @(posedge clk);
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
