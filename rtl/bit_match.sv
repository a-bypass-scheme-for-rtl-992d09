// bit_match: the width-matching circuit of one bypass edge of a core, from
// an M-bit input port to an N-bit output port.
//
// It chooses its structure at elaboration time:
//   M < N : serial-to-parallel (bitmatch_sp), N/M input packets per output
//   M > N : parallel-to-serial (bitmatch_ps), M/N output packets per input
//   M = N : a two-entry packet buffer (pkt_fifo2)
// A b-bit pattern therefore crosses the edge in about ceil(b/min(M,N))
// cycles, the bypass cost used to weight the edges of the test-path graph.
// Interface and clr as in the three sub-circuits: valid/ready on both
// sides, in_ready from registered state only. An assertion checks that an
// offered output packet is held until taken. Widths must divide one
// another.
module bit_match #(
  parameter int unsigned M = 8,
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [M-1:0] in_data,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [N-1:0] out_data,
  output logic         out_valid,
  input  logic         out_ready
);
  if (M < N) begin : g_sp
    bitmatch_sp #(.M(M), .N(N)) u_sp (.*);
  end else if (M > N) begin : g_ps
    bitmatch_ps #(.M(M), .N(N)) u_ps (.*);
  end else begin : g_eq
    pkt_fifo2 #(.W(M)) u_buf (.*);
  end

  // Handshake rule: an offered output packet stays offered, unchanged,
  // until it is taken (unless the edge is cleared).
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n || clr)
    out_valid && !out_ready |=> out_valid && $stable(out_data))
    else $error("bit_match: output packet withdrawn or changed before it was taken");

  initial assert ((M % N == 0) || (N % M == 0))
    else $error("bit_match: port widths %0d and %0d do not divide", M, N);

endmodule
