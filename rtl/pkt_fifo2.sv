// pkt_fifo2: two-entry packet buffer, the bit-match of a bypass edge whose
// input and output ports have the same width.
//
// Packets pass unchanged, one per clock, with one cycle of latency. in_ready
// is "fewer than two entries held", a registered condition, so a chain of
// buffers has no combinational path from a sink's ready back to a source.
// clr empties the buffer. This buffer is this design's choice: the cost
// model of the bypass gives an equal-width edge one cycle per packet.
module pkt_fifo2 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [W-1:0] out_data,
  output logic         out_valid,
  input  logic         out_ready
);
  logic [1:0][W-1:0] mem;
  logic              rd, wr;     // read and write pointers
  logic [1:0]        count;
  logic              push, pop;

  assign in_ready  = (count != 2'd2);
  assign out_valid = (count != 2'd0);
  assign out_data  = mem[rd];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem   <= '0;
      rd    <= 1'b0;
      wr    <= 1'b0;
      count <= '0;
    end else if (clr) begin
      rd    <= 1'b0;
      wr    <= 1'b0;
      count <= '0;
    end else begin
      if (push) begin
        mem[wr] <= in_data;
        wr      <= ~wr;
      end
      if (pop) rd <= ~rd;
      count <= count + {1'b0, push} - {1'b0, pop};
    end
  end

endmodule
