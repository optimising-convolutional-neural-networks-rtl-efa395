// tb_conv_layer: self-checking test of the standard convolution layer.
//
// A small layer (6x6 input, 4 channels, 4 filters, 3x3 kernels, PC = PF =
// PK = 2) processes three random input maps. The expected output maps are
// computed here directly from the convolution sum, the shift/saturate rule
// and ReLU, and compared beat by beat in the filter-major output order.
// The first map runs with every stream always ready and its compute time is
// checked against F*C*H*W/(PF*PC*PK) cycles; the later maps use random gaps
// on the coefficient stream and random back-pressure on the output.
module tb_conv_layer;
  import cnn_pkg::*;
  localparam int H = 6, W = 6, C = 4, F = 4, K = 3, PC = 2, PF = 2, PK = 2, BW = 8, FRAC = 3;
  localparam int HO = H - K + 1, WO = W - K + 1;
  localparam int NMAP = 3;
  localparam int TP = F * C * H * W / (PF * PC * PK);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic                                   ifmap_valid, ifmap_ready;
  logic [PC-1:0][PK-1:0][BW-1:0]          ifmap_data;
  logic                                   coeff_valid, coeff_ready;
  logic [PF-1:0][PC-1:0][K*K-1:0][BW-1:0] coeff_data;
  logic                                   ofmap_valid, ofmap_ready;
  logic [PF-1:0][PK-1:0][BW-1:0]          ofmap_data;

  conv_layer #(.H(H), .W(W), .C(C), .F(F), .K(K), .PC(PC), .PF(PF), .PK(PK),
               .BW(BW), .FRAC(FRAC), .RELU(1'b1)) dut (
    .clk, .rst_n, .ifmap_valid, .ifmap_ready, .ifmap_data,
    .coeff_valid, .coeff_ready, .coeff_data, .thr('0),
    .ofmap_valid, .ofmap_ready, .ofmap_data
  );

  int checks = 0, failures = 0;
  logic signed [BW-1:0] img [NMAP][C][H][W];
  logic signed [BW-1:0] wt  [NMAP][F][C][K][K];
  logic signed [BW-1:0] exp_o [NMAP][F][HO][WO];
  int map_done = 0;
  bit stress = 0;
  int t_loaded, t_last_out;

  initial begin
    for (int m = 0; m < NMAP; m++) begin
      for (int c = 0; c < C; c++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        img[m][c][y][x] = BW'(int'($urandom_range(0, 15)) - 8);
      for (int f = 0; f < F; f++) for (int c = 0; c < C; c++)
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
          wt[m][f][c][i][j] = BW'(int'($urandom_range(0, 15)) - 8);
      for (int f = 0; f < F; f++) for (int y = 0; y < HO; y++) for (int x = 0; x < WO; x++) begin
        longint s;
        s = 0;
        for (int c = 0; c < C; c++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
          s += longint'(img[m][c][y+i][x+j]) * longint'(wt[m][f][c][i][j]);
        s = shift_sat(64'(s), FRAC, BW);
        exp_o[m][f][y][x] = (s < 0) ? '0 : BW'(s);
      end
    end
  end

  // input map driver
  initial begin
    ifmap_valid = 0; ifmap_data = '0;
    wait (rst_n); @(negedge clk);
    for (int m = 0; m < NMAP; m++) begin
      for (int cg = 0; cg < C / PC; cg++) for (int y = 0; y < H; y++) for (int xb = 0; xb < W / PK; xb++) begin
        for (int p = 0; p < PC; p++) for (int k = 0; k < PK; k++)
          ifmap_data[p][k] = img[m][cg*PC+p][y][xb*PK+k];
        ifmap_valid = 1;
        #1; while (!ifmap_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      ifmap_valid = 0;
      if (m == 0) t_loaded = cyc;
      wait (map_done > m);
    end
  end

  // coefficient driver
  initial begin
    coeff_valid = 0; coeff_data = '0;
    wait (rst_n); @(negedge clk);
    for (int m = 0; m < NMAP; m++)
      for (int fg = 0; fg < F / PF; fg++) for (int cg = 0; cg < C / PC; cg++) begin
        for (int p = 0; p < PF; p++) for (int q = 0; q < PC; q++)
          for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
            coeff_data[p][q][i*K+j] = wt[m][fg*PF+p][cg*PC+q][i][j];
        if (stress) repeat ($urandom_range(0, 3)) @(negedge clk);
        coeff_valid = 1;
        #1; while (!coeff_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        coeff_valid = 0;
      end
  end

  // output checker
  int nstall = 0;
  logic signed [BW-1:0] got;
  initial begin
    ofmap_ready = 1;
    wait (rst_n); @(negedge clk);
    for (int m = 0; m < NMAP; m++) begin
      stress = (m > 0);
      for (int fg = 0; fg < F / PF; fg++) for (int y = 0; y < HO; y++) for (int xb = 0; xb < WO / PK; xb++) begin
        if (stress) begin
          ofmap_ready = 0;
          while ($urandom_range(0, 2) != 0) begin @(negedge clk); nstall++; end
          ofmap_ready = 1;
        end
        #1; while (!ofmap_valid) begin @(negedge clk); #1; end
        for (int p = 0; p < PF; p++) for (int k = 0; k < PK; k++) begin
          checks++;
          got = ofmap_data[p][k];
          if (got !== exp_o[m][fg*PF+p][y][xb*PK+k]) begin
            failures++;
            if (failures < 10) $display("map %0d f %0d y %0d x %0d: got %0d exp %0d", m, fg*PF+p, y, xb*PK+k,
                                        got, exp_o[m][fg*PF+p][y][xb*PK+k]);
          end
        end
        @(negedge clk);
      end
      if (m == 0) begin
        t_last_out = cyc;
        // compute phase: TP cycles, plus one cycle per coeff beat and the pipeline latency
        checks++;
        if (t_last_out - t_loaded < TP || t_last_out - t_loaded > TP + (F/PF)*(C/PC)*2 + 12) begin
          failures++;
          $display("map 0 took %0d cycles after loading, expected about %0d", t_last_out - t_loaded, TP);
        end
      end
      map_done = m + 1;
    end
    checks++;
    if (nstall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
