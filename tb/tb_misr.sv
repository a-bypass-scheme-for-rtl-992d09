// tb_misr: self-checking test of the multiple-input signature register.
//
// Random packets with random valid and enable bits are applied to the three
// inputs (8, 4 and 4 bits wide, folded in at bits 0, 8 and 12). A model
// computed in the testbench (shift once and add the XOR of the presented
// packets in every cycle with at least one enabled valid input) must agree
// with the register every cycle; disabled inputs and bits above a port's
// width must have no effect, and clear must return it to zero.
module tb_misr;
  import bypass_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [NMISR-1:0] en, in_valid, in_ready;
  logic [NMISR-1:0][WMAX-1:0] in_data;
  logic [15:0] sig;

  misr dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, updates = 0;
  logic [15:0] m = '0;

  always @(posedge clk) if (rst_n) begin
    logic [15:0] f;
    bit any;
    f = '0; any = 0;
    if (en[0] && in_valid[0]) begin any = 1; f ^= {8'h00, in_data[0]}; end
    if (en[1] && in_valid[1]) begin any = 1; f ^= {4'h0, in_data[1][3:0], 8'h00}; end
    if (en[2] && in_valid[2]) begin any = 1; f ^= {in_data[2][3:0], 12'h000}; end
    if (clear) m = '0;
    else if (any) begin m = {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]} ^ f; updates++; end
  end

  always @(negedge clk) begin
    checks++;
    if (sig != m) begin failures++; $display("FAIL sig %h expected %h", sig, m); end
    checks++;
    if (in_ready != '1) failures++;
    in_data  <= {8'($urandom), 8'($urandom), 8'($urandom)};
    in_valid <= 3'($urandom);
    en       <= 3'($urandom);
    clear    <= ($urandom % 200 == 0);
  end

  initial begin
    in_data = '0; in_valid = '0; en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    checks++;
    if (updates < 500) failures++;
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
