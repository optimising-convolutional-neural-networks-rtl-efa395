// tb_lenet5: runs two 28x28 images back to back through the LeNet-5 network
// at its default parallelism and checks the ten class scores of each against
// a reference model of the same fixed-point arithmetic. It also checks that
// back-pressure, coefficient waits, waits on the queue between the convolution layers, pooling, ReLU
// clipping and saturation all occurred. Stimulus: tb/lenet5_stim.svh.
`define NET dut
module tb_lenet5;
  localparam int NIMG = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic img_valid, img_ready, c0_valid, c0_ready, c1_valid, c1_ready;
  logic w0_valid, w0_ready, w1_valid, w1_ready, y_valid, y_ready;
  logic [0:0][1:0][7:0] img_data;
  logic [3:0][0:0][24:0][7:0] c0_data;
  logic [0:0][3:0][24:0][7:0] c1_data;
  logic [3:0][0:0][7:0] w0_data;
  logic [1:0][3:0][7:0] w1_data;
  logic [1:0][7:0] y_data;

  lenet5 dut (.clk, .rst_n, .img_valid, .img_ready, .img_data, .c0_valid, .c0_ready, .c0_data,
    .c1_valid, .c1_ready, .c1_data, .w0_valid, .w0_ready, .w0_data, .w1_valid, .w1_ready, .w1_data,
    .y_valid, .y_ready, .y_data);

`include "lenet5_stim.svh"

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (l_done);
    l_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
