// tb_relu: every 8-bit input value on 4 lanes must come out unchanged when
// positive and as 0 otherwise.
module tb_relu;
  localparam int N = 4, BW = 8;
  logic [N-1:0][BW-1:0] a, y;
  int checks = 0, failures = 0;
  relu #(.N(N), .BW(BW)) dut (.in_data(a), .out_data(y));
  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int i = 0; i < N; i++) a[i] = BW'(v + 37 * i);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (y[i] !== (($signed(a[i]) > 0) ? a[i] : 8'd0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
