// maxdeep_top: the CNN accelerator library in one top level.
//
// Four independent units stand side by side, each with its own streams:
//   net_*  LeNet-5 network (lenet5): standard 8-bit convolution layers with
//          max pooling, two fully-connected layers, all chained on chip.
//   bcv_*  binarised convolution layer (bconv_layer) at its default size
//          (32x32x32 input, 32 filters of 3x3, PF = PC = 32, PK = 2).
//   dws_*  depthwise separable convolution layer (dsc_layer), 16-bit,
//          PF = PC = 16, PK = 2 on a 32x32x32 input with 32 filters.
//   bn_*   batch-normalisation unit (batchnorm) with its table write port.
// All streams are valid/ready; their beat formats are described in the
// respective modules. The host and the off-chip memory that would feed these
// streams are outside this design.
module maxdeep_top #(
  parameter int unsigned BW      = 8,
  parameter int unsigned DWS_BW  = 16,
  parameter int unsigned BN_C    = 32,
  parameter int unsigned BN_P    = 8,
  parameter int unsigned BN_PK   = 2,
  parameter int unsigned BCV_TW  = 2 + $clog2(9) + $clog2(32) + 1 + 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // LeNet-5
  input  logic                                  net_img_valid,
  output logic                                  net_img_ready,
  input  logic [0:0][1:0][BW-1:0]               net_img_data,
  input  logic                                  net_c0_valid,
  output logic                                  net_c0_ready,
  input  logic [3:0][0:0][24:0][BW-1:0]         net_c0_data,
  input  logic                                  net_c1_valid,
  output logic                                  net_c1_ready,
  input  logic [0:0][3:0][24:0][BW-1:0]         net_c1_data,
  input  logic                                  net_w0_valid,
  output logic                                  net_w0_ready,
  input  logic [3:0][0:0][BW-1:0]               net_w0_data,
  input  logic                                  net_w1_valid,
  output logic                                  net_w1_ready,
  input  logic [1:0][3:0][BW-1:0]               net_w1_data,
  output logic                                  net_y_valid,
  input  logic                                  net_y_ready,
  output logic [1:0][BW-1:0]                    net_y_data,
  // binarised convolution layer
  input  logic                                  bcv_ifmap_valid,
  output logic                                  bcv_ifmap_ready,
  input  logic [31:0][1:0][0:0]                 bcv_ifmap_data,
  input  logic                                  bcv_coeff_valid,
  output logic                                  bcv_coeff_ready,
  input  logic [31:0][31:0][8:0][0:0]           bcv_coeff_data,
  input  logic [31:0][BCV_TW-1:0]               bcv_thr,
  output logic                                  bcv_ofmap_valid,
  input  logic                                  bcv_ofmap_ready,
  output logic [31:0][1:0][0:0]                 bcv_ofmap_data,
  // depthwise separable convolution layer
  input  logic                                  dws_ifmap_valid,
  output logic                                  dws_ifmap_ready,
  input  logic [15:0][1:0][DWS_BW-1:0]          dws_ifmap_data,
  input  logic                                  dws_dwc_valid,
  output logic                                  dws_dwc_ready,
  input  logic [15:0][8:0][DWS_BW-1:0]          dws_dwc_data,
  input  logic                                  dws_pwc_valid,
  output logic                                  dws_pwc_ready,
  input  logic [15:0][15:0][0:0][DWS_BW-1:0]    dws_pwc_data,
  output logic                                  dws_ofmap_valid,
  input  logic                                  dws_ofmap_ready,
  output logic [15:0][1:0][DWS_BW-1:0]          dws_ofmap_data,
  // batch normalisation
  input  logic                                  bn_cfg_we,
  input  logic [$clog2(BN_C)-1:0]               bn_cfg_addr,
  input  logic [BW-1:0]                         bn_cfg_mean,
  input  logic [BW-1:0]                         bn_cfg_scale,
  input  logic                                  bn_in_valid,
  output logic                                  bn_in_ready,
  input  logic [BN_P-1:0][BN_PK-1:0][BW-1:0]    bn_in_data,
  output logic                                  bn_out_valid,
  input  logic                                  bn_out_ready,
  output logic [BN_P-1:0][BN_PK-1:0][BW-1:0]    bn_out_data
);
  lenet5 #(.BW(BW), .PP0(4), .PP1(4), .PP2(2)) u_lenet5 (
    .clk, .rst_n,
    .img_valid(net_img_valid), .img_ready(net_img_ready), .img_data(net_img_data),
    .c0_valid(net_c0_valid), .c0_ready(net_c0_ready), .c0_data(net_c0_data),
    .c1_valid(net_c1_valid), .c1_ready(net_c1_ready), .c1_data(net_c1_data),
    .w0_valid(net_w0_valid), .w0_ready(net_w0_ready), .w0_data(net_w0_data),
    .w1_valid(net_w1_valid), .w1_ready(net_w1_ready), .w1_data(net_w1_data),
    .y_valid(net_y_valid), .y_ready(net_y_ready), .y_data(net_y_data)
  );

  bconv_layer #(.ACCW(BCV_TW)) u_bcv (
    .clk, .rst_n,
    .ifmap_valid(bcv_ifmap_valid), .ifmap_ready(bcv_ifmap_ready), .ifmap_data(bcv_ifmap_data),
    .coeff_valid(bcv_coeff_valid), .coeff_ready(bcv_coeff_ready), .coeff_data(bcv_coeff_data),
    .thr(bcv_thr),
    .ofmap_valid(bcv_ofmap_valid), .ofmap_ready(bcv_ofmap_ready), .ofmap_data(bcv_ofmap_data)
  );

  dsc_layer #(.BW(DWS_BW)) u_dws (
    .clk, .rst_n,
    .ifmap_valid(dws_ifmap_valid), .ifmap_ready(dws_ifmap_ready), .ifmap_data(dws_ifmap_data),
    .dw_coeff_valid(dws_dwc_valid), .dw_coeff_ready(dws_dwc_ready), .dw_coeff_data(dws_dwc_data),
    .pw_coeff_valid(dws_pwc_valid), .pw_coeff_ready(dws_pwc_ready), .pw_coeff_data(dws_pwc_data),
    .ofmap_valid(dws_ofmap_valid), .ofmap_ready(dws_ofmap_ready), .ofmap_data(dws_ofmap_data)
  );

  batchnorm #(.C(BN_C), .P(BN_P), .PK(BN_PK), .BW(BW)) u_bn (
    .clk, .rst_n,
    .cfg_we(bn_cfg_we), .cfg_addr(bn_cfg_addr), .cfg_mean(bn_cfg_mean), .cfg_scale(bn_cfg_scale),
    .in_valid(bn_in_valid), .in_ready(bn_in_ready), .in_data(bn_in_data),
    .out_valid(bn_out_valid), .out_ready(bn_out_ready), .out_data(bn_out_data)
  );
endmodule
