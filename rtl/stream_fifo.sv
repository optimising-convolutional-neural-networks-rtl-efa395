// stream_fifo: synchronous FIFO for a valid/ready stream.
//
// Layers are chained by streams, each carried by a FIFO. This FIFO stores up
// to DEPTH words of W bits in a register array. A word is written when
// in_valid && in_ready and read when out_valid && out_ready; both may happen
// in the same cycle. in_ready is low only when the FIFO is full. `count` gives
// the occupancy so a producer pipeline can stop early enough (see the layer
// kernels, which stall while fewer free entries remain than they have words in
// flight). Depth, data width and the first-word-fall-through output are this
// design's choices; the document only says that every inter-kernel stream is
// instantiated as a FIFO.
module stream_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [W-1:0]  in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [W-1:0]  out_data,
  output logic [AW:0]   count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign in_ready  = (count < (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
