// tb_tpgr: self-checking test of the test pattern generator register.
//
// The testbench keeps its own model of the 16-bit LFSR. It loads packet
// counts, takes packets with random ready on both ports and checks that
//   - each port is valid exactly until its count is used up,
//   - every packet carries the expected slice of the model LFSR
//     (port 0: bits 7..0, port 1: bits 11..8),
//   - the LFSR steps once per cycle in which any port hands over a packet,
//   - reseed restarts the sequence.
module tb_tpgr;
  import bypass_pkg::*;
  logic clk = 0, rst_n = 0, reseed = 0, load = 0;
  logic [NTPG-1:0][3:0] cnt;
  logic [NTPG-1:0][WMAX-1:0] out_data;
  logic [NTPG-1:0] out_valid, out_ready;

  tpgr dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] m = 16'hACE1;
  int taken [NTPG];

  function automatic logic [15:0] lstep(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  always @(posedge clk) if (rst_n && !reseed && !load) begin
    automatic bit any = 0;
    for (int p = 0; p < int'(NTPG); p++)
      if (out_valid[p] && out_ready[p]) begin
        automatic logic [7:0] e = (p == 0) ? m[7:0] : {4'h0, m[11:8]};
        any = 1;
        taken[p]++;
        checks++;
        if (out_data[p] != e) begin
          failures++;
          $display("FAIL port %0d packet %h expected %h", p, out_data[p], e);
        end
      end
    if (any) m = lstep(m);
  end

  always @(negedge clk) out_ready <= {1'($urandom), 1'($urandom)};

  task automatic burst(input int c0, input int c1);
    @(negedge clk);
    cnt[0] = 4'(c0); cnt[1] = 4'(c1); load = 1;
    @(negedge clk);
    load = 0;
    taken[0] = 0; taken[1] = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (taken[0] != c0 || taken[1] != c1 || out_valid != 2'b00) begin
      failures++;
      $display("FAIL burst %0d/%0d gave %0d/%0d", c0, c1, taken[0], taken[1]);
    end
  endtask

  initial begin
    cnt = '0; out_ready = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    burst(1, 2);
    burst(5, 0);
    burst(15, 9);
    // reseed
    @(negedge clk); reseed = 1;
    @(negedge clk); reseed = 0; m = 16'hACE1;
    burst(3, 3);
    for (int k = 0; k < 20; k++) burst($urandom % 16, $urandom % 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
