// tb_stream_fifo: random pushes and pops on a depth-4 FIFO; the output order
// must match a reference queue, and the FIFO must be seen both full
// (in_ready low) and empty.
module tb_stream_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv = 0, ir, ov, orr = 0;
  logic [W-1:0] id = '0, od;
  logic [$clog2(D):0] cnt;
  stream_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(orr), .out_data(od), .count(cnt));
  int checks = 0, failures = 0, nfull = 0, nempty = 0, npop = 0;
  logic [W-1:0] q[$];
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      iv = ($urandom_range(0, 1) == 1); id = W'($urandom);
      orr = ($urandom_range(0, 2) == 0) || (t > 1000 && t < 1200);
      #1;
      if (!ir) nfull++;
      if (!ov) nempty++;
      checks++; if (cnt != q.size()) failures++;
      if (ov && orr) begin checks++; npop++; if (od !== q.pop_front()) failures++; end
      if (iv && ir) q.push_back(id);
    end
    checks += 3; if (npop < 200) failures++; if (nfull == 0) failures++; if (nempty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
