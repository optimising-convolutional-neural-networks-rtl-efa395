// tb_pbrt: checks the pipelined adder tree against a direct sum.
// Two trees (N = 9 and N = 5) get a new random operand set every cycle,
// with random stall cycles; each result must equal the sum of the operands
// that entered ceil(log2 N) enabled cycles earlier.
module tb_pbrt;
  localparam int W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, vin;
  logic signed [8:0][W-1:0] d9;
  logic signed [4:0][W-1:0] d5;
  logic v9, v5;
  logic signed [W+3:0] s9;
  logic signed [W+2:0] s5;

  pbrt #(.N(9), .W(W)) u9 (.clk, .rst_n, .en, .in_valid(vin), .in_data(d9), .out_valid(v9), .out_data(s9));
  pbrt #(.N(5), .W(W)) u5 (.clk, .rst_n, .en, .in_valid(vin), .in_data(d5), .out_valid(v5), .out_data(s5));

  int checks = 0, failures = 0;
  longint q9[$], q5[$];
  int lat9 [$], lat5[$];
  int n_en = 0, n_stall = 0;

  initial begin
    en = 0; vin = 0; d9 = '0; d5 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // check outputs produced by the previous edge
      if (en_prev && v9) begin
        checks++; begin longint e; e = q9.pop_front(); if (s9 !== e) begin failures++; if (failures < 5) $display("t %0d s9 %0d exp %0d", t, s9, e); end end
        checks++; if (lat9.pop_front() != 4) failures++;
      end
      if (en_prev && v5) begin
        checks++; if (s5 !== q5.pop_front()) failures++;
        checks++; if (lat5.pop_front() != 3) failures++;
      end
      en  = ($urandom_range(0, 4) != 0);
      vin = ($urandom_range(0, 3) != 0);
      begin
        longint a, b;
        a = 0; b = 0;
        for (int i = 0; i < 9; i++) begin d9[i] = W'($urandom); a += longint'($signed(d9[i])); end
        for (int i = 0; i < 5; i++) begin d5[i] = W'($urandom); b += longint'($signed(d5[i])); end
        if (en && vin) begin q9.push_back(a); q5.push_back(b); lat9.push_back(0); lat5.push_back(0); end
      end
      if (en) begin
        n_en++;
        foreach (lat9[i]) lat9[i]++;
        foreach (lat5[i]) lat5[i]++;
      end else n_stall++;
    end
    checks++; if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results appear after the edge at which the operand has passed LAT enabled edges
  logic en_prev = 0;
  always @(posedge clk) en_prev <= en;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
