// dsc_layer: depthwise separable convolution layer
// (DepthwiseSeparableConvLayerKernel).
//
// Same outer interface as the standard convolution layer (ifmap stream of
// PC x PK values per beat, ofmap stream of PF x PK values per beat, F output
// channels of (H-K+1) x (W-K+1)), but computed in two steps:
//   1. dw_conv: line buffers first, then a spatial array of PC x PK K x K
//      cores applies one kernel per channel (dw coefficient stream, PC x K*K
//      values per channel group);
//   2. a pointwise 1 x 1 convolution, a conv_layer with K = 1 in the
//      filter-major sequence (the only sequence the document supports here).
//      Its ifmap buffer holds the whole depthwise result, OH*OW*C values, and
//      its ofmap buffer OH*OW*PF values, the two buffers of the document's
//      memory estimate. Its coefficient stream carries PF x PC values per beat.
// Processing one map takes about H*W*C/(PC*PK) cycles for step 1 and
// OH*OW*C*F/(PC*PF*PK) for step 2.
module dsc_layer #(
  parameter int unsigned H    = 32,
  parameter int unsigned W    = 32,
  parameter int unsigned C    = 32,
  parameter int unsigned F    = 32,
  parameter int unsigned K    = 3,
  parameter int unsigned PC   = 16,
  parameter int unsigned PF   = 16,
  parameter int unsigned PK   = 2,
  parameter int unsigned BW   = 16,
  parameter int unsigned FRAC = 0,
  parameter bit          RELU = 1'b1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              ifmap_valid,
  output logic                              ifmap_ready,
  input  logic [PC-1:0][PK-1:0][BW-1:0]     ifmap_data,
  input  logic                              dw_coeff_valid,
  output logic                              dw_coeff_ready,
  input  logic [PC-1:0][K*K-1:0][BW-1:0]    dw_coeff_data,
  input  logic                              pw_coeff_valid,
  output logic                              pw_coeff_ready,
  input  logic [PF-1:0][PC-1:0][0:0][BW-1:0] pw_coeff_data,
  output logic                              ofmap_valid,
  input  logic                              ofmap_ready,
  output logic [PF-1:0][PK-1:0][BW-1:0]     ofmap_data
);
  localparam int unsigned HO = H - K + 1;
  localparam int unsigned WO = W - K + 1;

  logic                          mid_valid, mid_ready;
  logic [PC-1:0][PK-1:0][BW-1:0] mid_data;

  dw_conv #(.H(H), .W(W), .C(C), .K(K), .PC(PC), .PK(PK), .BW(BW), .FRAC(FRAC)) u_dw (
    .clk, .rst_n,
    .in_valid(ifmap_valid), .in_ready(ifmap_ready), .in_data(ifmap_data),
    .coeff_valid(dw_coeff_valid), .coeff_ready(dw_coeff_ready), .coeff_data(dw_coeff_data),
    .out_valid(mid_valid), .out_ready(mid_ready), .out_data(mid_data)
  );

  conv_layer #(.H(HO), .W(WO), .C(C), .F(F), .K(1), .PC(PC), .PF(PF), .PK(PK),
               .BW(BW), .FRAC(FRAC), .RELU(RELU), .BINARY(1'b0)) u_pw (
    .clk, .rst_n,
    .ifmap_valid(mid_valid), .ifmap_ready(mid_ready), .ifmap_data(mid_data),
    .coeff_valid(pw_coeff_valid), .coeff_ready(pw_coeff_ready), .coeff_data(pw_coeff_data),
    .thr('0),
    .ofmap_valid, .ofmap_ready, .ofmap_data
  );
endmodule
