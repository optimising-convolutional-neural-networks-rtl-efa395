// tb_line_buffer: streams two 6x8 frames (2 channels, 2 pixels per beat)
// through a 3x3 line buffer and checks every window element against the
// frame it came from, that windows appear exactly for the valid output
// positions, their output index, and the end-of-frame flag.
module tb_line_buffer;
  localparam int H = 6, W = 8, K = 3, PC = 2, PK = 2, BW = 8;
  localparam int WB = W / PK, HO = H - K + 1, WO = W - K + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic vin = 0, vout, last;
  logic [PC-1:0][PK-1:0][BW-1:0] din;
  logic [$clog2(HO*WO/PK+1)-1:0] idx;
  logic [PC-1:0][PK-1:0][K*K-1:0][BW-1:0] win;

  line_buffer #(.H(H), .W(W), .K(K), .PC(PC), .PK(PK), .BW(BW)) dut (
    .clk, .rst_n, .en(1'b1), .in_valid(vin), .in_data(din), .out_valid(vout), .out_last(last), .out_idx(idx), .win);

  int checks = 0, failures = 0, nwin = 0;
  logic [BW-1:0] fr [2][PC][H][W];

  initial begin
    din = '0;
    for (int f = 0; f < 2; f++) for (int c = 0; c < PC; c++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      fr[f][c][y][x] = BW'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++) for (int b = 0; b < WB; b++) begin
        for (int c = 0; c < PC; c++) for (int j = 0; j < PK; j++) din[c][j] = fr[f][c][y][b*PK+j];
        vin = 1;
        #1;
        checks++;
        if (vout != (y >= K - 1 && b * PK >= K - 1)) failures++;
        if (vout) begin
          int oy, ox;
          oy = y - (K - 1); ox = b * PK - (K - 1);
          checks += 2;
          if (idx != oy * (WO / PK) + ox / PK) failures++;
          if (last != (y == H - 1 && b == WB - 1)) failures++;
          for (int c = 0; c < PC; c++) for (int j = 0; j < PK; j++)
            for (int i = 0; i < K; i++) for (int q = 0; q < K; q++) begin
              checks++;
              if (win[c][j][i*K+q] !== fr[f][c][oy+i][ox+j+q]) failures++;
            end
          nwin++;
        end
        @(negedge clk);
      end
    checks++; if (nwin != 2 * HO * WO / PK) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
