// dot_product: serialised dot product of two N-element vectors, V elements
// per cycle (dotprod_{n,v}).
//
// Each input chunk of V element pairs is multiplied in V parallel multipliers
// and reduced by a pipelined adder tree (pbrt, ceil(log2 V) stages); the tree
// output is then summed over the N/V chunks by an accumulator. A chunk counter
// marks the last chunk, so the result is presented exactly once per vector,
// M = ceil(log2 V) + N/V cycles after its first chunk entered (the latency the
// document gives). This follows the document's structure; the valid/enable
// handshake (en freezes the whole unit) is this design's choice.
//
// Interface: in_valid with en = 1 takes one chunk x/w. out_valid pulses for
// one enabled cycle with the full-precision sum in out_data.
module dot_product #(
  parameter int unsigned N   = 9,
  parameter int unsigned V   = 3,
  parameter int unsigned BW  = 8,
  parameter int unsigned LAT = $clog2(V),
  parameter int unsigned OW  = 2 * BW + $clog2(N) + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic                       in_valid,
  input  logic [V-1:0][BW-1:0]       x,
  input  logic [V-1:0][BW-1:0]       w,
  output logic                       out_valid,
  output logic signed [OW-1:0]       out_data
);
  localparam int unsigned NCH = N / V;                 // chunks per vector
  localparam int unsigned CW  = (NCH > 1) ? $clog2(NCH) : 1;

  logic signed [V-1:0][2*BW-1:0] prod;
  logic                          chunk_last_in;        // chunk entering the tree is the last
  logic [CW-1:0]                 cnt_in;
  logic                          t_valid;
  logic signed [2*BW+LAT-1:0]    t_sum;
  logic [LAT:0]                  last_pipe;            // last-chunk flag travelling with the tree
  logic signed [OW-1:0]          acc;

  always_comb
    for (int i = 0; i < V; i++) prod[i] = $signed(x[i]) * $signed(w[i]);

  assign chunk_last_in = (cnt_in == CW'(NCH - 1));

  pbrt #(.N(V), .W(2 * BW), .LAT(LAT)) u_tree (
    .clk, .rst_n, .en, .in_valid, .in_data(prod), .out_valid(t_valid), .out_data(t_sum)
  );

  // The modulo chunk counter (modcnt) on the input side, and its flag delayed
  // to match the tree.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_in    <= '0;
      last_pipe <= '0;
    end else if (en) begin
      if (in_valid) cnt_in <= chunk_last_in ? '0 : cnt_in + 1'b1;
      last_pipe <= (last_pipe << 1) | (LAT+1)'(in_valid && chunk_last_in);
    end
  end

  logic t_last;
  if (LAT == 0) begin : g_nolat
    assign t_last = in_valid && chunk_last_in;
  end else begin : g_lat
    assign t_last = last_pipe[LAT-1];
  end

  // Accumulator loop: restarts after the last chunk of each vector.
  logic first_chunk;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc         <= '0;
      out_valid   <= 1'b0;
      first_chunk <= 1'b1;
    end else if (en) begin
      out_valid <= t_valid && t_last;
      if (t_valid) begin
        acc         <= (first_chunk ? '0 : acc) + OW'(t_sum);
        first_chunk <= t_last;
      end
    end
  end
  assign out_data = acc;
endmodule
