// bitmatch_ps: parallel-to-serial bit-match circuit.
//
// Splits each M-bit word into K = ceil(M/N) N-bit packets, least significant
// packet first. The structure is N parallel lanes; lane l is a K-to-1
// one-bit multiplexer that picks bit (k*N + l) of the held word, followed by
// a one-bit output register. A packet counter k drives all multiplexer
// selects, so the N registers together form the N-bit output packet. With
// N = 1 it behaves as a scan-out chain.
//
// Interface: valid/ready on both sides. The word being split sits in a word
// register; one more word can wait in a pending register, so a new word is
// taken while the current one is still going out and the output runs at
// one packet per clock. in_ready ("pending register empty") depends only on
// registered state. clr empties the circuit.
// Timing: the first packet is handed on two clock edges after its word is
// accepted (one edge loads the output registers); with a continuous input a
// word leaves every K cycles, as the cost model ceil(b/n) assumes.
//
// The lane structure (multiplexers plus one-bit registers) follows the
// bit-match circuit it implements; the word and pending registers and the
// handshake are this design's additions.
module bitmatch_ps #(
  parameter int unsigned M = 16,  // input word width
  parameter int unsigned N = 4    // output packet width
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
  localparam int unsigned K  = (M + N - 1) / N;
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  logic [K*N-1:0] word;       // word being split, zero-extended to K*N bits
  logic           word_valid;
  logic [K*N-1:0] nxt;        // pending word
  logic           nxt_valid;
  logic [KW-1:0]  k;          // index of the next packet to move out
  logic [N-1:0]   lane_mux;   // outputs of the N K-to-1 multiplexers
  logic           load_out, last, in_fire;

  assign in_ready = !nxt_valid;
  assign in_fire  = in_valid && in_ready;
  assign load_out = word_valid && (!out_valid || out_ready);
  assign last     = load_out && (k == KW'(K - 1));

  always_comb begin
    for (int l = 0; l < int'(N); l++) lane_mux[l] = word[int'(k) * int'(N) + l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word       <= '0;
      word_valid <= 1'b0;
      nxt        <= '0;
      nxt_valid  <= 1'b0;
      k          <= '0;
      out_data   <= '0;
      out_valid  <= 1'b0;
    end else if (clr) begin
      word_valid <= 1'b0;
      nxt_valid  <= 1'b0;
      k          <= '0;
      out_valid  <= 1'b0;
    end else begin
      // output registers
      if (load_out) begin
        out_data  <= lane_mux;
        out_valid <= 1'b1;
        k         <= last ? '0 : k + 1'b1;
      end else if (out_valid && out_ready) begin
        out_valid <= 1'b0;
      end
      // word and pending registers
      if (last) begin
        if (nxt_valid) begin
          word      <= nxt;
          nxt_valid <= 1'b0;
        end else if (in_fire) begin
          word <= (K*N)'(in_data);
        end else begin
          word_valid <= 1'b0;
        end
      end else if (in_fire) begin
        if (!word_valid) begin
          word       <= (K*N)'(in_data);
          word_valid <= 1'b1;
        end else begin
          nxt       <= (K*N)'(in_data);
          nxt_valid <= 1'b1;
        end
      end
    end
  end

endmodule
