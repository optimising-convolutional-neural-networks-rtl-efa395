// tb_dot_core: checks the conv2d core in both modes against direct sums.
// Standard: 3x3 window times 3x3 kernel of signed 8-bit values.
// Binarised: XNOR/popcount of 3x3 bit patterns, i.e. the number of equal
// positions. Both results must appear ceil(log2 9) = 4 cycles later.
module tb_dot_core;
  localparam int K = 3, BW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic vin = 0;
  logic [K*K-1:0][BW-1:0] win, cf;
  logic [K*K-1:0][0:0]    bwin, bcf;
  logic vs, vb;
  logic signed [2*BW+3:0] zs;
  logic signed [5:0]      zb;

  dot_core #(.K(K), .BW(BW), .BINARY(1'b0)) u_s (.clk, .rst_n, .en(1'b1), .in_valid(vin), .win, .coeff(cf), .out_valid(vs), .out_data(zs));
  dot_core #(.K(K), .BW(1),  .BINARY(1'b1)) u_b (.clk, .rst_n, .en(1'b1), .in_valid(vin), .win(bwin), .coeff(bcf), .out_valid(vb), .out_data(zb));

  int checks = 0, failures = 0;
  longint qs[$], qb[$];
  int cyc = 0, tq[$];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    win = '0; cf = '0; bwin = '0; bcf = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      longint s, b;
      s = 0; b = 0;
      for (int i = 0; i < K * K; i++) begin
        win[i] = BW'($urandom); cf[i] = BW'($urandom);
        bwin[i] = 1'($urandom); bcf[i] = 1'($urandom);
        s += longint'($signed(win[i])) * longint'($signed(cf[i]));
        b += (bwin[i] == bcf[i]) ? 1 : 0;
      end
      vin = ($urandom_range(0, 3) != 0);
      if (vin) begin qs.push_back(s); qb.push_back(b); tq.push_back(cyc); end
      @(negedge clk);
    end
    vin = 0;
    repeat (8) @(negedge clk);
    checks++; if (qs.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && vs) begin
    longint e, f;
    int t0;
    e = qs.pop_front(); f = qb.pop_front(); t0 = tq.pop_front();
    checks += 3;
    if (zs !== e) failures++;
    if (!vb || zb !== f) failures++;
    if (cyc - t0 != 4) failures++;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
