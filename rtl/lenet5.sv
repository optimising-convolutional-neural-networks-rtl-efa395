// lenet5: LeNet-5 for 28 x 28 single-channel images, built from the layer
// kernels and connected by inter-kernel stream FIFOs.
//
//   image 28x28x1 --conv0 5x5, 32 filters, ReLU--> 24x24x32 --pool--> 12x12x32
//     --conv1 5x5, 64 filters, ReLU--> 8x8x64 --pool--> 4x4x64 (1024 values)
//     --fc0 1024->1024, ReLU--> --fc1 1024->10--> class scores
//
// Parallelism is chosen so that each layer consumes its producer's stream as
// it is produced:
//   conv0: PC = 1, PK = 2, PF = PP0;  pool0 halves PK to 1;
//   conv1: PC = PP0 (= PF of conv0), PF = 1, PK = 1;
//   fc0:   PC = 1 (the stream into a fully-connected layer carries one value
//          per beat), PR = PP1;
//   fc1:   PC = PP1 (= PR of fc0), PR = PP2.
// conv0 emits its output filter group by filter group (filter-major), which
// is exactly the channel-group order conv1 reads; conv1 with PF = 1 emits
// whole channels one after another, which flattens the 4x4x64 map in
// channel, row, column order for fc0.
//
// The layer shapes and the PK, PC and PF settings follow the document's
// LeNet-5 parameter list. The three free parallelism values PP0, PP1, PP2 and
// the fixed-point format (BW bits, FRAC fraction bits, the same in every
// layer) are this design's choices; the 8-bit width is that of the quantised
// network the document found best.
//
// Streams: image beats carry 2 pixels; conv coefficient beats PF x PC x 25
// values per (filter group, channel group) in filter-group-major order;
// fc weight beats PR x PC values, row group by row group. The output stream
// carries PP2 class scores per beat, 10/PP2 beats per image.
module lenet5 #(
  parameter int unsigned BW   = 8,
  parameter int unsigned FRAC = 6,
  parameter int unsigned PP0  = 4,
  parameter int unsigned PP1  = 4,
  parameter int unsigned PP2  = 2
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  img_valid,
  output logic                                  img_ready,
  input  logic [0:0][1:0][BW-1:0]               img_data,
  input  logic                                  c0_valid,
  output logic                                  c0_ready,
  input  logic [PP0-1:0][0:0][24:0][BW-1:0]     c0_data,
  input  logic                                  c1_valid,
  output logic                                  c1_ready,
  input  logic [0:0][PP0-1:0][24:0][BW-1:0]     c1_data,
  input  logic                                  w0_valid,
  output logic                                  w0_ready,
  input  logic [PP1-1:0][0:0][BW-1:0]           w0_data,
  input  logic                                  w1_valid,
  output logic                                  w1_ready,
  input  logic [PP2-1:0][PP1-1:0][BW-1:0]       w1_data,
  output logic                                  y_valid,
  input  logic                                  y_ready,
  output logic [PP2-1:0][BW-1:0]                y_data
);
  // conv0 -> pool0
  logic                          a_valid, a_ready;
  logic [PP0-1:0][1:0][BW-1:0]   a_data;
  // pool0 -> fifo -> conv1
  logic                          b_valid, b_ready, bq_valid, bq_ready;
  logic [PP0-1:0][0:0][BW-1:0]   b_data, bq_data;
  // conv1 -> pool1
  logic                          c_valid, c_ready;
  logic [0:0][0:0][BW-1:0]       c_data;
  // pool1 -> fifo -> fc0
  logic                          d_valid, d_ready, dq_valid, dq_ready;
  logic [0:0][0:0][BW-1:0]       d_data, dq_data;
  // fc0 -> fifo -> fc1
  logic                          e_valid, e_ready, eq_valid, eq_ready;
  logic [PP1-1:0][BW-1:0]        e_data, eq_data;

  conv_layer #(.H(28), .W(28), .C(1), .F(32), .K(5), .PC(1), .PF(PP0), .PK(2),
               .BW(BW), .FRAC(FRAC), .RELU(1'b1)) u_conv0 (
    .clk, .rst_n,
    .ifmap_valid(img_valid), .ifmap_ready(img_ready), .ifmap_data(img_data),
    .coeff_valid(c0_valid), .coeff_ready(c0_ready), .coeff_data(c0_data),
    .thr('0),
    .ofmap_valid(a_valid), .ofmap_ready(a_ready), .ofmap_data(a_data)
  );

  maxpool #(.H(24), .W(24), .P(PP0), .PK(2), .BW(BW)) u_pool0 (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data)
  );

  stream_fifo #(.W(PP0 * BW), .DEPTH(16)) u_q0 (
    .clk, .rst_n, .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
    .out_valid(bq_valid), .out_ready(bq_ready), .out_data(bq_data), .count()
  );

  conv_layer #(.H(12), .W(12), .C(32), .F(64), .K(5), .PC(PP0), .PF(1), .PK(1),
               .BW(BW), .FRAC(FRAC), .RELU(1'b1)) u_conv1 (
    .clk, .rst_n,
    .ifmap_valid(bq_valid), .ifmap_ready(bq_ready), .ifmap_data(bq_data),
    .coeff_valid(c1_valid), .coeff_ready(c1_ready), .coeff_data(c1_data),
    .thr('0),
    .ofmap_valid(c_valid), .ofmap_ready(c_ready), .ofmap_data(c_data)
  );

  maxpool #(.H(8), .W(8), .P(1), .PK(1), .BW(BW)) u_pool1 (
    .clk, .rst_n, .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(d_valid), .out_ready(d_ready), .out_data(d_data)
  );

  stream_fifo #(.W(BW), .DEPTH(16)) u_q1 (
    .clk, .rst_n, .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data),
    .out_valid(dq_valid), .out_ready(dq_ready), .out_data(dq_data), .count()
  );

  fc_layer #(.NIN(1024), .NOUT(1024), .PC(1), .PR(PP1), .BW(BW), .FRAC(FRAC), .RELU(1'b1)) u_fc0 (
    .clk, .rst_n,
    .x_valid(dq_valid), .x_ready(dq_ready), .x_data(dq_data),
    .w_valid(w0_valid), .w_ready(w0_ready), .w_data(w0_data),
    .y_valid(e_valid), .y_ready(e_ready), .y_data(e_data)
  );

  stream_fifo #(.W(PP1 * BW), .DEPTH(16)) u_q2 (
    .clk, .rst_n, .in_valid(e_valid), .in_ready(e_ready), .in_data(e_data),
    .out_valid(eq_valid), .out_ready(eq_ready), .out_data(eq_data), .count()
  );

  fc_layer #(.NIN(1024), .NOUT(10), .PC(PP1), .PR(PP2), .BW(BW), .FRAC(FRAC), .RELU(1'b0)) u_fc1 (
    .clk, .rst_n,
    .x_valid(eq_valid), .x_ready(eq_ready), .x_data(eq_data),
    .w_valid(w1_valid), .w_ready(w1_ready), .w_data(w1_data),
    .y_valid, .y_ready, .y_data
  );
endmodule
