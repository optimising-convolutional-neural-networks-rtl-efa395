// tb_bconv_layer: binarised 3x3 convolution of a 6x6, 4-channel bit map into
// 4 filters (PC = PF = PK = 2), two maps in a row. For every output the
// number of positions where input and weight bits agree, over all channels,
// is compared with the filter threshold; the output bit must be 1 exactly
// when the count exceeds it.
module tb_bconv_layer;
  localparam int H = 6, W = 6, C = 4, F = 4, K = 3, PC = 2, PF = 2, PK = 2, NM = 2;
  localparam int HO = H - K + 1, WO = W - K + 1;
  localparam int TW = 2 + $clog2(K * K) + $clog2(PC) + $clog2(C / PC) + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv = 0, ir, cv = 0, cr, ov, orr = 1;
  logic [PC-1:0][PK-1:0][0:0] id = '0;
  logic [PF-1:0][PC-1:0][K*K-1:0][0:0] cd = '0;
  logic [F-1:0][TW-1:0] thr;
  logic [PF-1:0][PK-1:0][0:0] od;
  bconv_layer #(.H(H), .W(W), .C(C), .F(F), .K(K), .PC(PC), .PF(PF), .PK(PK)) dut (
    .clk, .rst_n, .ifmap_valid(iv), .ifmap_ready(ir), .ifmap_data(id), .coeff_valid(cv), .coeff_ready(cr), .coeff_data(cd),
    .thr, .ofmap_valid(ov), .ofmap_ready(orr), .ofmap_data(od));
  logic img [NM][C][H][W];
  logic wt  [NM][F][C][K][K];
  int checks = 0, failures = 0, nstall = 0, ones = 0;
  initial begin
    for (int f = 0; f < F; f++) thr[f] = TW'($urandom_range(14, 22));
    for (int m = 0; m < NM; m++) begin
      for (int c = 0; c < C; c++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[m][c][y][x] = 1'($urandom);
      for (int f = 0; f < F; f++) for (int c = 0; c < C; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        wt[m][f][c][i][j] = 1'($urandom);
    end
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int m = 0; m < NM; m++) begin
      for (int g = 0; g < C / PC; g++) for (int y = 0; y < H; y++) for (int b = 0; b < W / PK; b++) begin
        for (int p = 0; p < PC; p++) for (int k = 0; k < PK; k++) id[p][k] = img[m][g*PC+p][y][b*PK+k];
        iv = 1; #1; while (!ir) begin @(negedge clk); #1; end
        @(negedge clk); iv = 0;
      end
    end
  end
  initial begin
    repeat (4) @(negedge clk);
    for (int m = 0; m < NM; m++) for (int fg = 0; fg < F / PF; fg++) for (int g = 0; g < C / PC; g++) begin
      for (int q = 0; q < PF; q++) for (int p = 0; p < PC; p++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        cd[q][p][i*K+j] = wt[m][fg*PF+q][g*PC+p][i][j];
      cv = 1; #1; while (!cr) begin @(negedge clk); #1; end
      @(negedge clk); cv = 0;
    end
  end
  initial begin
    repeat (4) @(negedge clk);
    for (int m = 0; m < NM; m++) for (int fg = 0; fg < F / PF; fg++) for (int y = 0; y < HO; y++) for (int b = 0; b < WO / PK; b++) begin
      orr = ($urandom_range(0, 2) != 0);
      #1; while (!(ov && orr)) begin if (ov) nstall++; @(negedge clk); orr = ($urandom_range(0, 2) != 0); #1; end
      for (int q = 0; q < PF; q++) for (int k = 0; k < PK; k++) begin
        int cnt;
        logic e;
        cnt = 0;
        for (int c = 0; c < C; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
          cnt += (img[m][c][y+i][b*PK+k+j] == wt[m][fg*PF+q][c][i][j]) ? 1 : 0;
        e = (cnt > int'(thr[fg*PF+q]));
        ones += int'(e);
        checks++;
        if (od[q][k] !== e) failures++;
      end
      @(negedge clk);
    end
    checks += 2; if (nstall == 0) failures++; if (ones == 0 || ones == NM * F * HO * WO) failures++;
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
