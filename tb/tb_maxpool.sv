// tb_maxpool: two pooling units, one fed 2 pixels per beat (PK = 2) and one
// fed 1 pixel per beat (PK = 1), each with 3 channels and 6x8 frames. Two
// frames go through each; every output is checked against the maximum of its
// 2x2 input window, with random gaps at the input and random back-pressure
// at the output.
module tb_maxpool;
  localparam int H = 6, W = 8, P = 3, BW = 8, NF = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [BW-1:0] fr [NF][P][H][W];
  int checks = 0, failures = 0, nbp = 0;

  // PK = 2 unit
  logic a_iv = 0, a_ir, a_ov, a_or = 0;
  logic [P-1:0][1:0][BW-1:0] a_id = '0;
  logic [P-1:0][0:0][BW-1:0] a_od;
  maxpool #(.H(H), .W(W), .P(P), .PK(2), .BW(BW)) u_a (.clk, .rst_n, .in_valid(a_iv), .in_ready(a_ir), .in_data(a_id),
    .out_valid(a_ov), .out_ready(a_or), .out_data(a_od));
  // PK = 1 unit
  logic b_iv = 0, b_ir, b_ov, b_or = 0;
  logic [P-1:0][0:0][BW-1:0] b_id = '0;
  logic [P-1:0][0:0][BW-1:0] b_od;
  maxpool #(.H(H), .W(W), .P(P), .PK(1), .BW(BW)) u_b (.clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id),
    .out_valid(b_ov), .out_ready(b_or), .out_data(b_od));

  function automatic logic [BW-1:0] pmax(int f, int c, int y, int x);
    logic signed [BW-1:0] m;
    m = fr[f][c][2*y][2*x];
    if ($signed(fr[f][c][2*y][2*x+1]) > m)   m = fr[f][c][2*y][2*x+1];
    if ($signed(fr[f][c][2*y+1][2*x]) > m)   m = fr[f][c][2*y+1][2*x];
    if ($signed(fr[f][c][2*y+1][2*x+1]) > m) m = fr[f][c][2*y+1][2*x+1];
    return m;
  endfunction

  initial begin
    for (int f = 0; f < NF; f++) for (int c = 0; c < P; c++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      fr[f][c][y][x] = BW'($urandom);
  end

  // drivers
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int f = 0; f < NF; f++) for (int y = 0; y < H; y++) for (int b = 0; b < W / 2; b++) begin
      for (int c = 0; c < P; c++) begin a_id[c][0] = fr[f][c][y][2*b]; a_id[c][1] = fr[f][c][y][2*b+1]; end
      a_iv = 1; #1; while (!a_ir) begin @(negedge clk); #1; end
      @(negedge clk); a_iv = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  end
  initial begin
    repeat (3) @(negedge clk); @(negedge clk);
    for (int f = 0; f < NF; f++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      for (int c = 0; c < P; c++) b_id[c][0] = fr[f][c][y][x];
      b_iv = 1; #1; while (!b_ir) begin @(negedge clk); #1; end
      @(negedge clk); b_iv = 0;
    end
  end

  // checkers
  int done_a = 0, done_b = 0;
  initial begin
    repeat (4) @(negedge clk);
    for (int f = 0; f < NF; f++) for (int y = 0; y < H / 2; y++) for (int x = 0; x < W / 2; x++) begin
      a_or = ($urandom_range(0, 2) != 0);
      #1; while (!(a_ov && a_or)) begin if (a_ov) nbp++; @(negedge clk); a_or = ($urandom_range(0, 2) != 0); #1; end
      for (int c = 0; c < P; c++) begin checks++; if (a_od[c][0] !== pmax(f, c, y, x)) failures++; end
      @(negedge clk);
    end
    done_a = 1;
  end
  initial begin
    repeat (4) @(negedge clk);
    b_or = 1;
    for (int f = 0; f < NF; f++) for (int y = 0; y < H / 2; y++) for (int x = 0; x < W / 2; x++) begin
      #1; while (!b_ov) begin @(negedge clk); #1; end
      for (int c = 0; c < P; c++) begin checks++; if (b_od[c][0] !== pmax(f, c, y, x)) failures++; end
      @(negedge clk);
    end
    done_b = 1;
  end

  initial begin
    wait (done_a && done_b);
    checks++; if (nbp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
