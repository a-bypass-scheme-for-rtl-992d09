// tb_bit_match: self-checking test of the bypass-edge width matcher in its
// three forms: 4 -> 8 (serial-to-parallel), 8 -> 4 (parallel-to-serial) and
// 8 -> 8 (packet buffer). Each instance gets a random packet stream with
// random valid and ready; the bit stream leaving must equal the bit stream
// entering, in order. With both sides always ready the rates are checked:
// the 8 -> 8 and 8 -> 4 edges carry one packet per cycle, the 4 -> 8 edge
// one 8-bit word per two cycles, so a b-bit pattern crosses each edge in
// b / min(m, n) cycles. Two more instances use 1-bit ports (1 -> 8 and
// 8 -> 1), the worst case, in which the circuits act as scan-in and scan-out
// chains: one 8-bit word per 8 cycles.
module tb_bit_match;
  logic clk = 0, rst_n = 0;
  bit throttle = 0;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  logic [3:0] a_in;  logic a_iv, a_ir, a_ov, a_or;  logic [7:0] a_out;
  logic [7:0] b_in;  logic b_iv, b_ir, b_ov, b_or;  logic [3:0] b_out;
  logic [7:0] c_in;  logic c_iv, c_ir, c_ov, c_or;  logic [7:0] c_out;

  bit_match #(.M(4), .N(8)) u_a (.clk, .rst_n, .clr(1'b0), .in_data(a_in), .in_valid(a_iv),
    .in_ready(a_ir), .out_data(a_out), .out_valid(a_ov), .out_ready(a_or));
  bit_match #(.M(8), .N(4)) u_b (.clk, .rst_n, .clr(1'b0), .in_data(b_in), .in_valid(b_iv),
    .in_ready(b_ir), .out_data(b_out), .out_valid(b_ov), .out_ready(b_or));
  bit_match #(.M(8), .N(8)) u_c (.clk, .rst_n, .clr(1'b0), .in_data(c_in), .in_valid(c_iv),
    .in_ready(c_ir), .out_data(c_out), .out_valid(c_ov), .out_ready(c_or));

  // 1-bit ports: the worst case, equivalent to scan-in (1 -> 8) and scan-out (8 -> 1)
  logic       d_in;  logic d_iv, d_ir, d_ov, d_or;  logic [7:0] d_out;
  logic [7:0] e_in;  logic e_iv, e_ir, e_ov, e_or;  logic       e_out;
  bit_match #(.M(1), .N(8)) u_d (.clk, .rst_n, .clr(1'b0), .in_data(d_in), .in_valid(d_iv),
    .in_ready(d_ir), .out_data(d_out), .out_valid(d_ov), .out_ready(d_or));
  bit_match #(.M(8), .N(1)) u_e (.clk, .rst_n, .clr(1'b0), .in_data(e_in), .in_valid(e_iv),
    .in_ready(e_ir), .out_data(e_out), .out_valid(e_ov), .out_ready(e_or));

  bit qa [$], qb [$], qc [$], qd [$], qe [$];
  int na = 0, nb = 0, nc = 0, nd = 0, ne = 0;   // output packets seen

  always @(posedge clk) if (rst_n) begin
    if (a_iv && a_ir) for (int k = 0; k < 4; k++) qa.push_back(a_in[k]);
    if (b_iv && b_ir) for (int k = 0; k < 8; k++) qb.push_back(b_in[k]);
    if (c_iv && c_ir) for (int k = 0; k < 8; k++) qc.push_back(c_in[k]);
    if (d_iv && d_ir) qd.push_back(d_in);
    if (e_iv && e_ir) for (int k = 0; k < 8; k++) qe.push_back(e_in[k]);
    if (d_ov && d_or) begin
      nd++;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (qd.size() == 0 || d_out[k] !== qd.pop_front()) failures++;
      end
    end
    if (e_ov && e_or) begin
      ne++;
      checks++;
      if (qe.size() == 0 || e_out !== qe.pop_front()) failures++;
    end
    if (a_ov && a_or) begin
      na++;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (qa.size() == 0 || a_out[k] !== qa.pop_front()) failures++;
      end
    end
    if (b_ov && b_or) begin
      nb++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (qb.size() == 0 || b_out[k] !== qb.pop_front()) failures++;
      end
    end
    if (c_ov && c_or) begin
      nc++;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (qc.size() == 0 || c_out[k] !== qc.pop_front()) failures++;
      end
    end
  end

  always @(negedge clk) begin
    a_in <= 4'($urandom); b_in <= 8'($urandom); c_in <= 8'($urandom);
    d_in <= 1'($urandom); e_in <= 8'($urandom);
    d_iv <= throttle ? $urandom % 2 == 0 : 1'b1;
    e_iv <= throttle ? $urandom % 2 == 0 : 1'b1;
    d_or <= throttle ? $urandom % 3 != 0 : 1'b1;
    e_or <= throttle ? $urandom % 3 != 0 : 1'b1;
    a_iv <= throttle ? $urandom % 2 == 0 : 1'b1;
    b_iv <= throttle ? $urandom % 2 == 0 : 1'b1;
    c_iv <= throttle ? $urandom % 2 == 0 : 1'b1;
    a_or <= throttle ? $urandom % 3 != 0 : 1'b1;
    b_or <= throttle ? $urandom % 3 != 0 : 1'b1;
    c_or <= throttle ? $urandom % 3 != 0 : 1'b1;
  end

  initial begin
    a_iv = 0; b_iv = 0; c_iv = 0; a_or = 1; b_or = 1; c_or = 1;
    d_iv = 0; e_iv = 0; d_or = 1; e_or = 1; d_in = 0; e_in = 0;
    a_in = 0; b_in = 0; c_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    // unthrottled window of 30 cycles: 8->8 one packet per cycle, 4->8 one
    // word per two cycles, 8->4 one packet per cycle
    na = 0; nb = 0; nc = 0; nd = 0; ne = 0;
    repeat (32) @(posedge clk);
    // 1-bit ports: one 8-bit word per 8 cycles each way, like scan
    checks++;
    if (nd != 4 || ne != 32) begin failures++; $display("FAIL 1-bit edges: %0d words, %0d bits in 32 cycles", nd, ne); end
    na = 0; nb = 0; nc = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (nc != 30) begin failures++; $display("FAIL 8->8 carried %0d packets in 30 cycles", nc); end
    checks++;
    if (na != 15) begin failures++; $display("FAIL 4->8 assembled %0d words in 30 cycles", na); end
    checks++;
    if (nb != 30) begin failures++; $display("FAIL 8->4 sent %0d packets in 30 cycles", nb); end
    throttle = 1;
    repeat (3000) @(posedge clk);
    checks++;
    if (na < 100 || nb < 100 || nc < 100 || nd < 20 || ne < 100) begin failures++; $display("FAIL too little traffic"); end
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
