// tb_dsc_layer: depthwise separable convolution of a 6x6, 4-channel map
// into 4 filters (3x3 depthwise, then 1x1 pointwise; PC = PF = PK = 2), two
// maps in a row. The expected output applies the same fixed-point rule after
// each step (shift by FRAC and saturate; ReLU at the end) and is compared in
// the filter-major output order.
module tb_dsc_layer;
  import cnn_pkg::*;
  localparam int H = 6, W = 6, C = 4, F = 4, K = 3, PC = 2, PF = 2, PK = 2, BW = 8, FRAC = 3, NM = 2;
  localparam int HO = H - K + 1, WO = W - K + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv = 0, ir, dv = 0, dr, pv = 0, pr, ov, orr = 1;
  logic [PC-1:0][PK-1:0][BW-1:0] id = '0;
  logic [PC-1:0][K*K-1:0][BW-1:0] dd = '0;
  logic [PF-1:0][PC-1:0][0:0][BW-1:0] pd = '0;
  logic [PF-1:0][PK-1:0][BW-1:0] od;
  dsc_layer #(.H(H), .W(W), .C(C), .F(F), .K(K), .PC(PC), .PF(PF), .PK(PK), .BW(BW), .FRAC(FRAC), .RELU(1'b1)) dut (
    .clk, .rst_n, .ifmap_valid(iv), .ifmap_ready(ir), .ifmap_data(id),
    .dw_coeff_valid(dv), .dw_coeff_ready(dr), .dw_coeff_data(dd),
    .pw_coeff_valid(pv), .pw_coeff_ready(pr), .pw_coeff_data(pd),
    .ofmap_valid(ov), .ofmap_ready(orr), .ofmap_data(od));
  logic signed [BW-1:0] img [NM][C][H][W];
  logic signed [BW-1:0] ker [NM][C][K][K];
  logic signed [BW-1:0] pw  [NM][F][C];
  logic signed [BW-1:0] mid [NM][C][HO][WO];
  logic signed [BW-1:0] eo  [NM][F][HO][WO];
  int checks = 0, failures = 0, nstall = 0;
  initial begin
    for (int m = 0; m < NM; m++) begin
      for (int c = 0; c < C; c++) begin
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[m][c][y][x] = BW'(int'($urandom_range(0, 31)) - 16);
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) ker[m][c][i][j] = BW'(int'($urandom_range(0, 15)) - 8);
      end
      for (int f = 0; f < F; f++) for (int c = 0; c < C; c++) pw[m][f][c] = BW'(int'($urandom_range(0, 31)) - 16);
      for (int c = 0; c < C; c++) for (int y = 0; y < HO; y++) for (int x = 0; x < WO; x++) begin
        longint s;
        s = 0;
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) s += longint'(img[m][c][y+i][x+j]) * longint'(ker[m][c][i][j]);
        mid[m][c][y][x] = BW'(shift_sat(64'(s), FRAC, BW));
      end
      for (int f = 0; f < F; f++) for (int y = 0; y < HO; y++) for (int x = 0; x < WO; x++) begin
        longint s;
        s = 0;
        for (int c = 0; c < C; c++) s += longint'(mid[m][c][y][x]) * longint'(pw[m][f][c]);
        s = shift_sat(64'(s), FRAC, BW);
        eo[m][f][y][x] = (s < 0) ? '0 : BW'(s);
      end
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
    repeat (4) @(negedge clk);
    for (int m = 0; m < NM; m++) for (int g = 0; g < C / PC; g++) begin
      for (int p = 0; p < PC; p++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) dd[p][i*K+j] = ker[m][g*PC+p][i][j];
      dv = 1; #1; while (!dr) begin @(negedge clk); #1; end
      @(negedge clk); dv = 0;
    end
  end
  initial begin
    repeat (4) @(negedge clk);
    for (int m = 0; m < NM; m++) for (int fg = 0; fg < F / PF; fg++) for (int g = 0; g < C / PC; g++) begin
      for (int q = 0; q < PF; q++) for (int p = 0; p < PC; p++) pd[q][p][0] = pw[m][fg*PF+q][g*PC+p];
      pv = 1; #1; while (!pr) begin @(negedge clk); #1; end
      @(negedge clk); pv = 0;
    end
  end
  initial begin
    repeat (4) @(negedge clk);
    for (int m = 0; m < NM; m++) for (int fg = 0; fg < F / PF; fg++) for (int y = 0; y < HO; y++) for (int b = 0; b < WO / PK; b++) begin
      orr = ($urandom_range(0, 2) != 0);
      #1; while (!(ov && orr)) begin if (ov) nstall++; @(negedge clk); orr = ($urandom_range(0, 2) != 0); #1; end
      for (int q = 0; q < PF; q++) for (int k = 0; k < PK; k++) begin
        checks++;
        if (od[q][k] !== eo[m][fg*PF+q][y][b*PK+k]) failures++;
      end
      @(negedge clk);
    end
    checks++; if (nstall == 0) failures++;
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
