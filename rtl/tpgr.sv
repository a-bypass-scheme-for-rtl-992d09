// tpgr: test pattern generator register at the global test source.
//
// A 16-bit Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1, shifting toward the
// most significant bit) feeds NTPG output link ports. Port p presents the
// W_P[p] LFSR bits starting at bit OFF[p]; at the start of each test step
// (load) every port is given a count of packets to send for that step, and
// it keeps valid high until that many packets have been accepted. The LFSR
// advances one step in every cycle in which at least one port hands over a
// packet, so each packet carries fresh pseudo-random bits and the pattern
// sequence does not depend on how long a path stalls.
//
// Timing: valid appears the cycle after load; one packet per port per clock.
// The generator itself is named but not specified by the architecture; the
// LFSR, its polynomial and the per-step packet counts are this design's.
module tpgr
  import bypass_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1,
  parameter width_list_t W_P  = wl(8, 4, 0, 0),
  parameter width_list_t OFF  = wl(0, 8, 0, 0)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        reseed,     // restart the sequence from SEED
  input  logic                        load,
  input  logic [NTPG-1:0][3:0]        cnt,
  output logic [NTPG-1:0][WMAX-1:0]   out_data,
  output logic [NTPG-1:0]             out_valid,
  input  logic [NTPG-1:0]             out_ready
);
  logic [15:0]           lfsr;
  logic [NTPG-1:0][3:0]  rem;
  logic                  any_fire;

  function automatic logic [15:0] lfsr_step(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  always_comb begin
    any_fire = 1'b0;
    for (int p = 0; p < int'(NTPG); p++) begin
      out_valid[p] = (rem[p] != 4'd0);
      out_data[p]  = WMAX'((lfsr >> OFF[p]) & 16'((1 << W_P[p]) - 1));
      if (out_valid[p] && out_ready[p]) any_fire = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= SEED;
      rem  <= '0;
    end else begin
      if (reseed)        lfsr <= SEED;
      else if (any_fire) lfsr <= lfsr_step(lfsr);
      for (int p = 0; p < int'(NTPG); p++) begin
        if (load)                               rem[p] <= cnt[p];
        else if (out_valid[p] && out_ready[p])  rem[p] <= rem[p] - 4'd1;
      end
    end
  end

endmodule
