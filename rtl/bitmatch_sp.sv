// bitmatch_sp: serial-to-parallel bit-match circuit.
//
// Assembles one N-bit packet from R = ceil(N/M) consecutive M-bit packets.
// The assembly part is a bank of R cascaded M-bit registers clocked together
// (a shift register M bits wide): each accepted input packet shifts in at
// the top, so the first packet ends up in the least significant M bits. With
// M = 1 it is an ordinary scan-in chain. When the last packet of a word
// arrives the word moves into an output register in the same cycle, so the
// input side keeps accepting one packet per clock while the output is free.
//
// Interface: valid/ready on both sides. in_ready depends only on registered
// state (no combinational path from out_ready), so chains of bit-match
// circuits never form combinational loops. clr empties the circuit.
// Timing: the N-bit word is valid the cycle after its last M-bit packet is
// accepted; R packets in take R cycles, as the cost model ceil(b/m) assumes.
//
// The cascaded-register structure and its stage count follow the bit-match
// circuit it implements; the handshake and the output register are this
// design's additions.
module bitmatch_sp #(
  parameter int unsigned M = 4,   // input packet width
  parameter int unsigned N = 16   // assembled word width
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
  localparam int unsigned R  = (N + M - 1) / M;
  localparam int unsigned CW = $clog2(R + 1);

  logic [R*M-1:0]      stage;   // R cascaded M-bit registers, stage k in bits [k*M +: M]
  logic [CW-1:0]       cnt;     // packets held in the stages
  logic [R*M-1:0]      word_next;
  logic                in_fire, out_free;

  assign in_ready  = (cnt < CW'(R));
  assign in_fire   = in_valid && in_ready;
  assign out_free  = !out_valid || out_ready;

  // The word as it would be after shifting in the current input packet.
  always_comb begin
    word_next = {in_data, stage[R*M-1:M]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage     <= '0;
      cnt       <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else if (clr) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_fire) begin
        stage <= word_next;
        if (cnt == CW'(R - 1) && out_free) begin
          out_data  <= word_next[N-1:0];
          out_valid <= 1'b1;
          cnt       <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else if (cnt == CW'(R) && out_free) begin
        // word completed earlier while the output was still occupied
        out_data  <= stage[N-1:0];
        out_valid <= 1'b1;
        cnt       <= '0;
      end
    end
  end

  initial assert (N % M == 0) else $error("bitmatch_sp: N must be a multiple of M");

endmodule
