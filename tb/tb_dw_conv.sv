// tb_dw_conv: depthwise 3x3 convolution of a 6x6, 4-channel map (PC = 2,
// PK = 2), two maps in a row. Each output is checked against the per-channel
// window sum, shifted and saturated; output back-pressure is random.
module tb_dw_conv;
  import cnn_pkg::*;
  localparam int H = 6, W = 6, C = 4, K = 3, PC = 2, PK = 2, BW = 8, FRAC = 3, NM = 2;
  localparam int HO = H - K + 1, WO = W - K + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv = 0, ir, cv = 0, cr, ov, orr = 1;
  logic [PC-1:0][PK-1:0][BW-1:0] id = '0, od;
  logic [PC-1:0][K*K-1:0][BW-1:0] cd = '0;
  dw_conv #(.H(H), .W(W), .C(C), .K(K), .PC(PC), .PK(PK), .BW(BW), .FRAC(FRAC)) dut (
    .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id), .coeff_valid(cv), .coeff_ready(cr), .coeff_data(cd),
    .out_valid(ov), .out_ready(orr), .out_data(od));
  logic signed [BW-1:0] img [NM][C][H][W];
  logic signed [BW-1:0] ker [NM][C][K][K];
  int checks = 0, failures = 0, nstall = 0;
  initial begin
    for (int m = 0; m < NM; m++) for (int c = 0; c < C; c++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[m][c][y][x] = BW'(int'($urandom_range(0, 31)) - 16);
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) ker[m][c][i][j] = BW'(int'($urandom_range(0, 31)) - 16);
    end
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int m = 0; m < NM; m++) for (int g = 0; g < C / PC; g++) for (int y = 0; y < H; y++) for (int b = 0; b < W / PK; b++) begin
      for (int p = 0; p < PC; p++) for (int k = 0; k < PK; k++) id[p][k] = img[m][g*PC+p][y][b*PK+k];
      iv = 1; #1; while (!ir) begin @(negedge clk); #1; end
      @(negedge clk); iv = 0;
    end
  end
  initial begin
    repeat (3) @(negedge clk); @(negedge clk);
    for (int m = 0; m < NM; m++) for (int g = 0; g < C / PC; g++) begin
      for (int p = 0; p < PC; p++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) cd[p][i*K+j] = ker[m][g*PC+p][i][j];
      cv = 1; #1; while (!cr) begin @(negedge clk); #1; end
      @(negedge clk); cv = 0;
    end
  end
  initial begin
    repeat (4) @(negedge clk);
    for (int m = 0; m < NM; m++) for (int g = 0; g < C / PC; g++) for (int y = 0; y < HO; y++) for (int b = 0; b < WO / PK; b++) begin
      orr = ($urandom_range(0, 2) != 0);
      #1; while (!(ov && orr)) begin if (ov) nstall++; @(negedge clk); orr = ($urandom_range(0, 2) != 0); #1; end
      for (int p = 0; p < PC; p++) for (int k = 0; k < PK; k++) begin
        longint s;
        s = 0;
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
          s += longint'(img[m][g*PC+p][y+i][b*PK+k+j]) * longint'(ker[m][g*PC+p][i][j]);
        s = shift_sat(64'(s), FRAC, BW);
        checks++;
        if (od[p][k] !== BW'(s)) failures++;
      end
      @(negedge clk);
    end
    checks++; if (nstall == 0) failures++;
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
