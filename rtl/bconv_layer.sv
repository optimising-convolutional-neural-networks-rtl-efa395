// bconv_layer: binarised convolution layer (BinarisedConvLayerKernel).
//
// A convolution layer whose feature-map values and weights are single bits
// (+1 coded as 1, -1 coded as 0). It keeps the standard layer's parameters,
// buffers, filter-major sequence and stream interface, and swaps the
// dot-product cores: XNOR gates replace the multipliers and a popcount adder
// tree replaces the adder tree, accumulating at 1 + log2(K*K) bits per core.
// The popcount total of each output over all C channels is compared with a
// per-filter threshold thr[f] (the binarised batch normalisation): the output
// bit is 1 when the total is greater than the threshold. A popcount total m
// corresponds to the +/-1 dot product 2m - K*K*C.
//
// Defaults are the largest binarised layer the document builds:
// PF = PC = 32, PK = 2 on a 32 x 32 x 32 map with 32 filters of 3 x 3.
module bconv_layer #(
  parameter int unsigned H    = 32,
  parameter int unsigned W    = 32,
  parameter int unsigned C    = 32,
  parameter int unsigned F    = 32,
  parameter int unsigned K    = 3,
  parameter int unsigned PC   = 32,
  parameter int unsigned PF   = 32,
  parameter int unsigned PK   = 2,
  parameter int unsigned ACCW = 2 + $clog2(K * K) + $clog2(PC) + $clog2(C / PC) + 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  ifmap_valid,
  output logic                                  ifmap_ready,
  input  logic [PC-1:0][PK-1:0][0:0]            ifmap_data,
  input  logic                                  coeff_valid,
  output logic                                  coeff_ready,
  input  logic [PF-1:0][PC-1:0][K*K-1:0][0:0]   coeff_data,
  input  logic [F-1:0][ACCW-1:0]                thr,
  output logic                                  ofmap_valid,
  input  logic                                  ofmap_ready,
  output logic [PF-1:0][PK-1:0][0:0]            ofmap_data
);
  conv_layer #(.H(H), .W(W), .C(C), .F(F), .K(K), .PC(PC), .PF(PF), .PK(PK),
               .BW(1), .FRAC(0), .RELU(1'b0), .BINARY(1'b1), .ACCW(ACCW)) u_conv (
    .clk, .rst_n,
    .ifmap_valid, .ifmap_ready, .ifmap_data,
    .coeff_valid, .coeff_ready, .coeff_data,
    .thr,
    .ofmap_valid, .ofmap_ready, .ofmap_data
  );
endmodule
