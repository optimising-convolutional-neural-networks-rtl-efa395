// tb_conv_array: checks the PF x PC x PK core array (PF = 2, PC = 3, PK = 2,
// 3x3 kernels) against direct sums over channels and kernel positions, and
// its latency of ceil(log2 9) + ceil(log2 3) = 6 cycles.
module tb_conv_array;
  localparam int K = 3, PC = 3, PF = 2, PK = 2, BW = 8, LAT = 6;
  localparam int OW = 2 * BW + $clog2(K * K) + $clog2(PC);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic vin = 0, vout;
  logic [PC-1:0][PK-1:0][K*K-1:0][BW-1:0] win;
  logic [PF-1:0][PC-1:0][K*K-1:0][BW-1:0] cf;
  logic signed [PF-1:0][PK-1:0][OW-1:0] z;

  conv_array #(.K(K), .PC(PC), .PF(PF), .PK(PK), .BW(BW)) dut (
    .clk, .rst_n, .en(1'b1), .in_valid(vin), .win, .coeff(cf), .out_valid(vout), .out_data(z));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  typedef logic [PC-1:0][PK-1:0][K*K-1:0][BW-1:0] win_t;
  typedef logic [PF-1:0][PC-1:0][K*K-1:0][BW-1:0] cf_t;
  win_t qw[$];
  cf_t  qc[$];
  int tq[$];

  initial begin
    win = '0; cf = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      for (int c = 0; c < PC; c++) for (int k = 0; k < PK; k++) for (int i = 0; i < K*K; i++) win[c][k][i] = BW'($urandom);
      for (int f = 0; f < PF; f++) for (int c = 0; c < PC; c++) for (int i = 0; i < K*K; i++) cf[f][c][i] = BW'($urandom);
      vin = ($urandom_range(0, 2) != 0);
      if (vin) begin qw.push_back(win); qc.push_back(cf); tq.push_back(cyc); end
      @(negedge clk);
    end
    vin = 0;
    repeat (10) @(negedge clk);
    checks++; if (qw.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && vout) begin
    win_t w0;
    cf_t  c0;
    longint e [PF][PK];
    int t0;
    w0 = qw.pop_front(); c0 = qc.pop_front(); t0 = tq.pop_front();
    for (int f = 0; f < PF; f++) for (int k = 0; k < PK; k++) begin
      e[f][k] = 0;
      for (int c = 0; c < PC; c++) for (int i = 0; i < K*K; i++)
        e[f][k] += longint'($signed(w0[c][k][i])) * longint'($signed(c0[f][c][i]));
    end
    checks++; if (cyc - t0 != LAT) failures++;
    for (int f = 0; f < PF; f++) for (int k = 0; k < PK; k++) begin
      checks++;
      if (longint'($signed(z[f][k])) != e[f][k]) begin failures++; if (failures < 6) $display("f%0d k%0d got %0d exp %0d lat %0d", f, k, $signed(z[f][k]), e[f][k], cyc-t0); end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
