// tb_maxdeep_top: full-size end-to-end test of the accelerator top level with
// its default parameters. All four units run at the same time:
//   - LeNet-5: one 28x28 image through the whole network (stimulus and
//     reference in tb/lenet5_stim.svh), ten class scores checked;
//   - binarised layer: one 32x32x32 bit map, 32 filters of 3x3, every output
//     bit checked against the agreement count and its threshold;
//   - depthwise separable layer: one 32x32x32 16-bit map, 32 filters, every
//     output checked against the two-step fixed-point reference;
//   - batch normalisation: one 32-channel 32x32 map after the table is loaded.
// Random back-pressure is applied to every output stream. At the end the test
// counts how often each mechanism occurred (stalls, coefficient waits, pooling,
// ReLU clipping, saturation, binary ones and zeros, table use) and fails if
// any of them never did.
`define NET dut.u_lenet5
module tb_maxdeep_top;
  import cnn_pkg::*;
  localparam int NIMG = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // LeNet-5 streams (names used by lenet5_stim.svh)
  logic img_valid, img_ready, c0_valid, c0_ready, c1_valid, c1_ready;
  logic w0_valid, w0_ready, w1_valid, w1_ready, y_valid, y_ready;
  logic [0:0][1:0][7:0] img_data;
  logic [3:0][0:0][24:0][7:0] c0_data;
  logic [0:0][3:0][24:0][7:0] c1_data;
  logic [3:0][0:0][7:0] w0_data;
  logic [1:0][3:0][7:0] w1_data;
  logic [1:0][7:0] y_data;

  // binarised layer
  localparam int BTW = 2 + 4 + 5 + 1 + 1;
  logic bi_v = 0, bi_r, bc_v = 0, bc_r, bo_v, bo_r = 1;
  logic [31:0][1:0][0:0] bi_d = '0;
  logic [31:0][31:0][8:0][0:0] bc_d = '0;
  logic [31:0][BTW-1:0] bthr;
  logic [31:0][1:0][0:0] bo_d;

  // depthwise separable layer
  logic di_v = 0, di_r, dd_v = 0, dd_r, dp_v = 0, dp_r, do_v, do_r = 1;
  logic [15:0][1:0][15:0] di_d = '0;
  logic [15:0][8:0][15:0] dd_d = '0;
  logic [15:0][15:0][0:0][15:0] dp_d = '0;
  logic [15:0][1:0][15:0] do_d;

  // batch normalisation
  logic nw = 0, ni_v = 0, ni_r, no_v, no_r = 1;
  logic [4:0] na = '0;
  logic [7:0] nm = '0, ns = '0;
  logic [7:0][1:0][7:0] ni_d = '0;
  logic [7:0][1:0][7:0] no_d;

  maxdeep_top dut (
    .clk, .rst_n,
    .net_img_valid(img_valid), .net_img_ready(img_ready), .net_img_data(img_data),
    .net_c0_valid(c0_valid), .net_c0_ready(c0_ready), .net_c0_data(c0_data),
    .net_c1_valid(c1_valid), .net_c1_ready(c1_ready), .net_c1_data(c1_data),
    .net_w0_valid(w0_valid), .net_w0_ready(w0_ready), .net_w0_data(w0_data),
    .net_w1_valid(w1_valid), .net_w1_ready(w1_ready), .net_w1_data(w1_data),
    .net_y_valid(y_valid), .net_y_ready(y_ready), .net_y_data(y_data),
    .bcv_ifmap_valid(bi_v), .bcv_ifmap_ready(bi_r), .bcv_ifmap_data(bi_d),
    .bcv_coeff_valid(bc_v), .bcv_coeff_ready(bc_r), .bcv_coeff_data(bc_d), .bcv_thr(bthr),
    .bcv_ofmap_valid(bo_v), .bcv_ofmap_ready(bo_r), .bcv_ofmap_data(bo_d),
    .dws_ifmap_valid(di_v), .dws_ifmap_ready(di_r), .dws_ifmap_data(di_d),
    .dws_dwc_valid(dd_v), .dws_dwc_ready(dd_r), .dws_dwc_data(dd_d),
    .dws_pwc_valid(dp_v), .dws_pwc_ready(dp_r), .dws_pwc_data(dp_d),
    .dws_ofmap_valid(do_v), .dws_ofmap_ready(do_r), .dws_ofmap_data(do_d),
    .bn_cfg_we(nw), .bn_cfg_addr(na), .bn_cfg_mean(nm), .bn_cfg_scale(ns),
    .bn_in_valid(ni_v), .bn_in_ready(ni_r), .bn_in_data(ni_d),
    .bn_out_valid(no_v), .bn_out_ready(no_r), .bn_out_data(no_d)
  );

`include "lenet5_stim.svh"

  // ---------------- binarised layer ----------------
  logic bimg [32][32][32];
  logic bwt  [32][32][3][3];
  int   b_done = 0, b_ones = 0, b_zeros = 0, b_stall = 0;
  initial begin
    for (int f = 0; f < 32; f++) bthr[f] = BTW'($urandom_range(136, 152));
    for (int c = 0; c < 32; c++) for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) bimg[c][y][x] = 1'($urandom);
    for (int f = 0; f < 32; f++) for (int c = 0; c < 32; c++) for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      bwt[f][c][i][j] = 1'($urandom);
  end
  initial begin
    wait (rst_n); @(negedge clk);
    for (int y = 0; y < 32; y++) for (int b = 0; b < 16; b++) begin
      for (int p = 0; p < 32; p++) for (int k = 0; k < 2; k++) bi_d[p][k] = bimg[p][y][2*b+k];
      bi_v = 1; #1; while (!bi_r) begin @(negedge clk); #1; end
      @(negedge clk); bi_v = 0;
    end
  end
  initial begin
    wait (rst_n); @(negedge clk);
    for (int q = 0; q < 32; q++) for (int p = 0; p < 32; p++) for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      bc_d[q][p][i*3+j] = bwt[q][p][i][j];
    while (!bc_r) @(negedge clk);
    repeat (5) @(negedge clk);
    bc_v = 1; #1; while (!bc_r) begin @(negedge clk); #1; end
    @(negedge clk); bc_v = 0;
  end
  initial begin
    wait (rst_n); @(negedge clk);
    for (int y = 0; y < 30; y++) for (int b = 0; b < 15; b++) begin
      bo_r = ($urandom_range(0, 2) != 0);
      #1; while (!(bo_v && bo_r)) begin if (bo_v) b_stall++; @(negedge clk); bo_r = ($urandom_range(0, 2) != 0); #1; end
      for (int q = 0; q < 32; q++) for (int k = 0; k < 2; k++) begin
        int cnt;
        logic e;
        cnt = 0;
        for (int c = 0; c < 32; c++) for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
          cnt += (bimg[c][y+i][2*b+k+j] == bwt[q][c][i][j]) ? 1 : 0;
        e = (cnt > int'(bthr[q]));
        if (e) b_ones++; else b_zeros++;
        checks++;
        if (bo_d[q][k] !== e) failures++;
      end
      @(negedge clk);
    end
    bo_r = 1;
    b_done = 1;
  end

  // ---------------- depthwise separable layer ----------------
  typedef logic signed [15:0] sw_t;
  sw_t dimg [32][32][32];
  sw_t dker [32][3][3];
  sw_t dpw  [32][32];
  sw_t dexp [32][30][30];
  int  d_done = 0, d_stall = 0, d_relu = 0, d_sat = 0, d_wait = 0;
  initial begin
    sw_t mid [32][30][30];
    for (int c = 0; c < 32; c++) begin
      for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) dimg[c][y][x] = sw_t'(int'($urandom_range(0, 31)) - 16);
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) dker[c][i][j] = sw_t'(int'($urandom_range(0, 15)) - 8);
    end
    for (int f = 0; f < 32; f++) for (int c = 0; c < 32; c++) dpw[f][c] = sw_t'(int'($urandom_range(0, 200)) - 100);
    for (int c = 0; c < 32; c++) for (int y = 0; y < 30; y++) for (int x = 0; x < 30; x++) begin
      longint s;
      s = 0;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) s += longint'(dimg[c][y+i][x+j]) * longint'(dker[c][i][j]);
      mid[c][y][x] = sw_t'(shift_sat(64'(s), 0, 16));
    end
    for (int f = 0; f < 32; f++) for (int y = 0; y < 30; y++) for (int x = 0; x < 30; x++) begin
      longint s;
      s = 0;
      for (int c = 0; c < 32; c++) s += longint'(mid[c][y][x]) * longint'(dpw[f][c]);
      s = shift_sat(64'(s), 0, 16);
      dexp[f][y][x] = (s < 0) ? '0 : sw_t'(s);
    end
  end
  initial begin
    wait (rst_n); @(negedge clk);
    for (int g = 0; g < 2; g++) for (int y = 0; y < 32; y++) for (int b = 0; b < 16; b++) begin
      for (int p = 0; p < 16; p++) for (int k = 0; k < 2; k++) di_d[p][k] = dimg[g*16+p][y][2*b+k];
      di_v = 1; #1; while (!di_r) begin @(negedge clk); #1; end
      @(negedge clk); di_v = 0;
    end
  end
  initial begin
    wait (rst_n); @(negedge clk);
    for (int g = 0; g < 2; g++) begin
      for (int p = 0; p < 16; p++) for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) dd_d[p][i*3+j] = dker[g*16+p][i][j];
      dd_v = 1; #1; while (!dd_r) begin @(negedge clk); #1; end
      @(negedge clk); dd_v = 0;
    end
  end
  initial begin
    wait (rst_n); @(negedge clk);
    for (int fg = 0; fg < 2; fg++) for (int g = 0; g < 2; g++) begin
      for (int q = 0; q < 16; q++) for (int p = 0; p < 16; p++) dp_d[q][p][0] = dpw[fg*16+q][g*16+p];
      while (!dp_r) @(negedge clk);
      repeat (4) @(negedge clk);
      dp_v = 1; #1; while (!dp_r) begin @(negedge clk); #1; end
      @(negedge clk); dp_v = 0;
    end
  end
  always @(posedge clk) if (dp_r && !dp_v) d_wait++;
  initial begin
    wait (rst_n); @(negedge clk);
    for (int fg = 0; fg < 2; fg++) for (int y = 0; y < 30; y++) for (int b = 0; b < 15; b++) begin
      do_r = ($urandom_range(0, 2) != 0);
      #1; while (!(do_v && do_r)) begin if (do_v) d_stall++; @(negedge clk); do_r = ($urandom_range(0, 2) != 0); #1; end
      for (int q = 0; q < 16; q++) for (int k = 0; k < 2; k++) begin
        sw_t e;
        e = dexp[fg*16+q][y][2*b+k];
        if (e == 0) d_relu++;
        if (e == 16'sd32767) d_sat++;
        checks++;
        if (do_d[q][k] !== e) failures++;
      end
      @(negedge clk);
    end
    do_r = 1;
    d_done = 1;
  end

  // ---------------- batch normalisation ----------------
  logic signed [7:0] nmean [32], nscale [32];
  logic signed [7:0] nx [4][512][8][2];
  int   n_done = 0, n_sat = 0, n_stall = 0;
  initial begin
    for (int c = 0; c < 32; c++) begin nmean[c] = 8'(int'($urandom_range(0, 40)) - 20); nscale[c] = 8'($urandom_range(16, 127)); end
    for (int g = 0; g < 4; g++) for (int b = 0; b < 512; b++) for (int p = 0; p < 8; p++) for (int k = 0; k < 2; k++)
      nx[g][b][p][k] = 8'($urandom);
  end
  initial begin
    wait (rst_n); @(negedge clk);
    for (int c = 0; c < 32; c++) begin nw = 1; na = 5'(c); nm = nmean[c]; ns = nscale[c]; @(negedge clk); end
    nw = 0;
    for (int g = 0; g < 4; g++) for (int b = 0; b < 512; b++) begin
      for (int p = 0; p < 8; p++) for (int k = 0; k < 2; k++) ni_d[p][k] = nx[g][b][p][k];
      ni_v = 1; #1; while (!ni_r) begin @(negedge clk); #1; end
      @(negedge clk); ni_v = 0;
    end
  end
  initial begin
    wait (rst_n); @(negedge clk);
    for (int g = 0; g < 4; g++) for (int b = 0; b < 512; b++) begin
      no_r = ($urandom_range(0, 3) != 0);
      #1; while (!(no_v && no_r)) begin if (no_v) n_stall++; @(negedge clk); no_r = ($urandom_range(0, 3) != 0); #1; end
      for (int p = 0; p < 8; p++) for (int k = 0; k < 2; k++) begin
        longint e;
        e = shift_sat(64'((longint'(nx[g][b][p][k]) - longint'(nmean[g*8+p])) * longint'(nscale[g*8+p])), 6, 8);
        if (e == 127 || e == -128) n_sat++;
        checks++;
        if ($signed(no_d[p][k]) != e) failures++;
      end
      @(negedge clk);
    end
    no_r = 1;
    n_done = 1;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (l_done && b_done && d_done && n_done);
    l_report();
    $display("bcv: ones %0d zeros %0d stalls %0d | dws: relu zeros %0d saturations %0d stalls %0d coeff waits %0d | bn: saturations %0d stalls %0d",
             b_ones, b_zeros, b_stall, d_relu, d_sat, d_stall, d_wait, n_sat, n_stall);
    checks += 9;
    if (b_ones == 0) failures++;
    if (b_zeros == 0) failures++;
    if (b_stall == 0) failures++;
    if (d_relu == 0) failures++;
    if (d_sat == 0) failures++;
    if (d_stall == 0) failures++;
    if (d_wait == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
