// dot_core: one conv2d core, the dot product of a K x K window with a K x K
// kernel, computed in a single pass.
//
// Standard mode (BINARY = 0): K*K signed BW-bit multipliers feed a pipelined
// adder tree (pbrt). Binarised mode (BINARY = 1): the operands are single bits
// that encode +1 as 1 and -1 as 0, the multipliers become XNOR gates and the
// adder tree becomes a popcount, so the result is the number of matching
// positions (0..K*K). Both modes follow the core block and the binarised
// dot-product of the document (fully parallel dot product, n = v = K*K, no
// accumulator); the stall enable is this design's choice.
//
// Latency: LAT = ceil(log2(K*K)) enabled cycles from window to result.
module dot_core #(
  parameter int unsigned K      = 3,
  parameter int unsigned BW     = 8,
  parameter bit          BINARY = 1'b0,
  parameter int unsigned PW     = BINARY ? 2 : 2 * BW,        // product width
  parameter int unsigned LAT    = $clog2(K * K),
  parameter int unsigned OW     = PW + LAT
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            en,
  input  logic                            in_valid,
  input  logic [K*K-1:0][BW-1:0]          win,
  input  logic [K*K-1:0][BW-1:0]          coeff,
  output logic                            out_valid,
  output logic signed [OW-1:0]            out_data
);
  logic signed [K*K-1:0][PW-1:0] prod;

  always_comb
    for (int i = 0; i < K * K; i++)
      if (BINARY) prod[i] = {{(PW-1){1'b0}}, (win[i][0] ~^ coeff[i][0])};   // XNOR: 1 when signs agree
      else        prod[i] = PW'($signed(win[i]) * $signed(coeff[i]));

  pbrt #(.N(K * K), .W(PW), .LAT(LAT), .OW(OW)) u_tree (
    .clk, .rst_n, .en, .in_valid, .in_data(prod), .out_valid, .out_data
  );
endmodule
