// misr: multiple-input signature register at the global test sink.
//
// A 16-bit LFSR (x^16 + x^14 + x^13 + x^11 + 1, same shift direction as the
// pattern generator) compacts the response packets arriving on NMISR input
// link ports. Input p is folded in at bits OFF[p] +: W_P[p]. In every cycle in
// which at least one enabled port presents a packet, the register shifts once
// and the XOR of all presented packets is added. Ports are always ready;
// a port whose en bit is low ignores its input, so fan-out wires that also
// reach other cores do not disturb the signature. clear loads zero.
//
// Timing: a packet is compacted on the clock edge where it is valid; sig is
// the registered signature. The register is named but not specified by the
// architecture; polynomial, folding and enables are this design's choices.
module misr
  import bypass_pkg::*;
#(
  parameter width_list_t W_P = wl(8, 4, 4, 0),
  parameter width_list_t OFF = wl(0, 8, 12, 0)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic [NMISR-1:0]             en,
  input  logic [NMISR-1:0][WMAX-1:0]   in_data,
  input  logic [NMISR-1:0]             in_valid,
  output logic [NMISR-1:0]             in_ready,
  output logic [15:0]                  sig
);
  logic [15:0] fold;
  logic        any;

  always_comb begin
    fold = '0;
    any  = 1'b0;
    for (int p = 0; p < int'(NMISR); p++) begin
      in_ready[p] = 1'b1;
      if (en[p] && in_valid[p]) begin
        any  = 1'b1;
        fold = fold ^ ((16'(in_data[p]) & 16'((1 << W_P[p]) - 1)) << OFF[p]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sig <= '0;
    else if (clear)  sig <= '0;
    else if (any)    sig <= {sig[14:0], sig[15] ^ sig[13] ^ sig[12] ^ sig[10]} ^ fold;
  end

endmodule
