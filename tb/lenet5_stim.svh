// lenet5_stim.svh: stimulus and reference model for the LeNet-5 network,
// shared by tb_lenet5 and tb_maxdeep_top. The including module declares the
// network's stream signals (img_*, c0_*, c1_*, w0_*, w1_*, y_*), clk, rst_n,
// checks and failures, and defines NET as the hierarchical path of the
// lenet5 instance. NIMG images are processed back to back with random gaps on
// the coefficient streams and random back-pressure on the result stream.
// The reference computes every layer with the same fixed-point rule
// (product sums shifted right by FRAC and saturated to 8 bits, ReLU after
// conv0, conv1 and fc0, 2x2 max pooling after the convolutions).

  localparam int L_BW = 8, L_FRAC = 6, L_PP0 = 4, L_PP1 = 4, L_PP2 = 2;

  typedef logic signed [L_BW-1:0] sb_t;

  sb_t l_img [NIMG][28][28];
  sb_t l_w0  [32][5][5];
  sb_t l_w1  [64][32][5][5];
  sb_t l_f0  [1024][1024];
  sb_t l_f1  [10][1024];
  sb_t l_exp [NIMG][10];
  int  l_done = 0;
  int  n_y_stall = 0, n_coeff_wait = 0, n_q_stall = 0, n_relu0 = 0, n_sat0 = 0, n_pool = 0;

  function automatic sb_t l_q(input longint s, input bit r);
    longint v;
    v = s >>> L_FRAC;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    if (r && v < 0) v = 0;
    return sb_t'(v);
  endfunction

  task automatic l_reference();
    sb_t a0 [32][24][24];
    sb_t p0 [32][12][12];
    sb_t a1 [64][8][8];
    sb_t v   [1024];
    sb_t h   [1024];
    for (int n = 0; n < NIMG; n++) begin
      for (int f = 0; f < 32; f++) for (int y = 0; y < 24; y++) for (int x = 0; x < 24; x++) begin
        longint s;
        s = 0;
        for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) s += longint'(l_img[n][y+i][x+j]) * longint'(l_w0[f][i][j]);
        a0[f][y][x] = l_q(s, 1);
      end
      for (int f = 0; f < 32; f++) for (int y = 0; y < 12; y++) for (int x = 0; x < 12; x++) begin
        sb_t m;
        m = a0[f][2*y][2*x];
        if (a0[f][2*y][2*x+1] > m) m = a0[f][2*y][2*x+1];
        if (a0[f][2*y+1][2*x] > m) m = a0[f][2*y+1][2*x];
        if (a0[f][2*y+1][2*x+1] > m) m = a0[f][2*y+1][2*x+1];
        p0[f][y][x] = m;
      end
      for (int f = 0; f < 64; f++) for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
        longint s;
        s = 0;
        for (int c = 0; c < 32; c++) for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++)
          s += longint'(p0[c][y+i][x+j]) * longint'(l_w1[f][c][i][j]);
        a1[f][y][x] = l_q(s, 1);
      end
      for (int f = 0; f < 64; f++) for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
        sb_t m;
        m = a1[f][2*y][2*x];
        if (a1[f][2*y][2*x+1] > m) m = a1[f][2*y][2*x+1];
        if (a1[f][2*y+1][2*x] > m) m = a1[f][2*y+1][2*x];
        if (a1[f][2*y+1][2*x+1] > m) m = a1[f][2*y+1][2*x+1];
        v[f*16 + y*4 + x] = m;
      end
      for (int r = 0; r < 1024; r++) begin
        longint s;
        s = 0;
        for (int i = 0; i < 1024; i++) s += longint'(v[i]) * longint'(l_f0[r][i]);
        h[r] = l_q(s, 1);
      end
      for (int r = 0; r < 10; r++) begin
        longint s;
        s = 0;
        for (int i = 0; i < 1024; i++) s += longint'(h[i]) * longint'(l_f1[r][i]);
        l_exp[n][r] = l_q(s, 0);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < NIMG; n++) for (int y = 0; y < 28; y++) for (int x = 0; x < 28; x++)
      l_img[n][y][x] = sb_t'(int'($urandom_range(0, 127)) - 40);
    for (int f = 0; f < 32; f++) for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++)
      l_w0[f][i][j] = sb_t'(int'($urandom_range(0, 40)) - 20);
    for (int f = 0; f < 64; f++) for (int c = 0; c < 32; c++) for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++)
      l_w1[f][c][i][j] = sb_t'(int'($urandom_range(0, 8)) - 4);
    for (int r = 0; r < 1024; r++) for (int i = 0; i < 1024; i++) l_f0[r][i] = sb_t'(int'($urandom_range(0, 6)) - 3);
    for (int r = 0; r < 10; r++) for (int i = 0; i < 1024; i++) l_f1[r][i] = sb_t'(int'($urandom_range(0, 6)) - 3);
    l_reference();
  end

  // image stream
  initial begin
    img_valid = 0; img_data = '0;
    wait (rst_n); @(negedge clk);
    for (int n = 0; n < NIMG; n++) for (int y = 0; y < 28; y++) for (int b = 0; b < 14; b++) begin
      img_data[0][0] = l_img[n][y][2*b]; img_data[0][1] = l_img[n][y][2*b+1];
      img_valid = 1; #1; while (!img_ready) begin @(negedge clk); #1; end
      @(negedge clk); img_valid = 0;
    end
  end

  // conv0 coefficients: 8 filter groups of PP0 filters, one channel group
  initial begin
    c0_valid = 0; c0_data = '0;
    wait (rst_n); @(negedge clk);
    for (int n = 0; n < NIMG; n++) for (int fg = 0; fg < 32 / L_PP0; fg++) begin
      for (int p = 0; p < L_PP0; p++) for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) c0_data[p][0][i*5+j] = l_w0[fg*L_PP0+p][i][j];
      if ($urandom_range(0, 1) == 0) begin while (!c0_ready) @(negedge clk); repeat (3) @(negedge clk); end
      c0_valid = 1; #1; while (!c0_ready) begin @(negedge clk); #1; end
      @(negedge clk); c0_valid = 0;
    end
  end

  // conv1 coefficients: 64 filters x 8 channel groups of PP0 channels
  initial begin
    c1_valid = 0; c1_data = '0;
    wait (rst_n); @(negedge clk);
    for (int n = 0; n < NIMG; n++) for (int f = 0; f < 64; f++) for (int cg = 0; cg < 32 / L_PP0; cg++) begin
      for (int p = 0; p < L_PP0; p++) for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) c1_data[0][p][i*5+j] = l_w1[f][cg*L_PP0+p][i][j];
      if ($urandom_range(0, 7) == 0) begin while (!c1_ready) @(negedge clk); repeat (2) @(negedge clk); end
      c1_valid = 1; #1; while (!c1_ready) begin @(negedge clk); #1; end
      @(negedge clk); c1_valid = 0;
    end
  end

  // fc0 weights: PP1 rows x 1 input per beat
  initial begin
    w0_valid = 0; w0_data = '0;
    wait (rst_n); @(negedge clk);
    for (int n = 0; n < NIMG; n++) for (int g = 0; g < 1024 / L_PP1; g++) for (int i = 0; i < 1024; i++) begin
      for (int r = 0; r < L_PP1; r++) w0_data[r][0] = l_f0[g*L_PP1+r][i];
      w0_valid = 1; #1; while (!w0_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    w0_valid = 0;
  end

  // fc1 weights: PP2 rows x PP1 inputs per beat
  initial begin
    w1_valid = 0; w1_data = '0;
    wait (rst_n); @(negedge clk);
    for (int n = 0; n < NIMG; n++) for (int g = 0; g < 10 / L_PP2; g++) for (int c = 0; c < 1024 / L_PP1; c++) begin
      for (int r = 0; r < L_PP2; r++) for (int j = 0; j < L_PP1; j++) w1_data[r][j] = l_f1[g*L_PP2+r][c*L_PP1+j];
      w1_valid = 1; #1; while (!w1_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    w1_valid = 0;
  end

  // class scores
  initial begin
    y_ready = 1;
    wait (rst_n); @(negedge clk);
    for (int n = 0; n < NIMG; n++) for (int g = 0; g < 10 / L_PP2; g++) begin
      y_ready = 0;
      repeat ($urandom_range(1, 3)) begin @(negedge clk); n_y_stall++; end
      y_ready = 1;
      #1; while (!y_valid) begin @(negedge clk); #1; end
      for (int r = 0; r < L_PP2; r++) begin
        checks++;
        if (y_data[r] !== l_exp[n][g*L_PP2+r]) begin
          failures++;
          $display("image %0d class %0d: got %0d expected %0d", n, g*L_PP2+r, $signed(y_data[r]), l_exp[n][g*L_PP2+r]);
        end
      end
      @(negedge clk);
    end
    l_done = 1;
  end

  // mechanism counters, from the network's internal streams
  always @(posedge clk) if (rst_n) begin
    if (c0_ready && !c0_valid) n_coeff_wait++;
    if (c1_ready && !c1_valid) n_coeff_wait++;
    if (`NET.bq_valid != `NET.bq_ready) n_q_stall++;
    if (`NET.b_valid && `NET.b_ready) n_pool++;
    if (`NET.a_valid && `NET.a_ready)
      for (int p = 0; p < L_PP0; p++) for (int k = 0; k < 2; k++) begin
        if (`NET.a_data[p][k] == '0) n_relu0++;
        if (`NET.a_data[p][k] == 8'd127) n_sat0++;
      end
  end

  task automatic l_report();
    $display("lenet5: y stalls %0d, coeff waits %0d, conv0-conv1 queue waits %0d, pool outputs %0d, relu zeros %0d, saturations %0d",
             n_y_stall, n_coeff_wait, n_q_stall, n_pool, n_relu0, n_sat0);
    checks += 6;
    if (n_y_stall == 0) failures++;
    if (n_coeff_wait == 0) failures++;
    if (n_q_stall == 0) failures++;
    if (n_pool != NIMG * 32 * 12 * 12 / L_PP0) failures++;
    if (n_relu0 == 0) failures++;
    if (n_sat0 == 0) failures++;
  endtask
