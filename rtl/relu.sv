// relu: rectified linear unit on N parallel signed BW-bit lanes.
//
// Each lane compares its value with zero and a multiplexer passes the value
// when it is positive and 0 otherwise (the compare-and-select form the
// document gives). Purely combinational: no latency, no registers. The
// document attaches ReLU to other kernels rather than making it a kernel of
// its own; here the convolution and fully-connected layers instantiate it on
// their outputs.
module relu #(
  parameter int unsigned N  = 4,
  parameter int unsigned BW = 8
) (
  input  logic [N-1:0][BW-1:0] in_data,
  output logic [N-1:0][BW-1:0] out_data
);
  always_comb
    for (int i = 0; i < N; i++)
      out_data[i] = ($signed(in_data[i]) > 0) ? in_data[i] : '0;
endmodule
