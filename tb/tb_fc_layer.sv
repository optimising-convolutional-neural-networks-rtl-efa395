// tb_fc_layer: a 12-input, 6-output fully-connected layer with PC = 3 and
// PR = 2 processes three random vectors. Outputs are checked against the
// direct matrix-vector product (shift by FRAC, saturate, ReLU). The first
// vector runs without stalls and its weight phase must take
// NOUT*NIN/(PR*PC) = 12 cycles; later vectors see random weight gaps and
// output back-pressure.
module tb_fc_layer;
  import cnn_pkg::*;
  localparam int NIN = 12, NOUT = 6, PC = 3, PR = 2, BW = 8, FRAC = 3, NV = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic xv = 0, xr, wv = 0, wr, yv, yr = 1;
  logic [PC-1:0][BW-1:0] xd = '0;
  logic [PR-1:0][PC-1:0][BW-1:0] wd = '0;
  logic [PR-1:0][BW-1:0] yd;

  fc_layer #(.NIN(NIN), .NOUT(NOUT), .PC(PC), .PR(PR), .BW(BW), .FRAC(FRAC), .RELU(1'b1)) dut (
    .clk, .rst_n, .x_valid(xv), .x_ready(xr), .x_data(xd), .w_valid(wv), .w_ready(wr), .w_data(wd),
    .y_valid(yv), .y_ready(yr), .y_data(yd));

  logic signed [BW-1:0] x [NV][NIN];
  logic signed [BW-1:0] w [NV][NOUT][NIN];
  logic signed [BW-1:0] ey [NV][NOUT];
  int checks = 0, failures = 0, nstall = 0, w_first = -1, w_last = -1;
  bit stress = 0;

  initial begin
    for (int v = 0; v < NV; v++) begin
      for (int i = 0; i < NIN; i++) x[v][i] = BW'(int'($urandom_range(0, 31)) - 16);
      for (int r = 0; r < NOUT; r++) for (int i = 0; i < NIN; i++) w[v][r][i] = BW'(int'($urandom_range(0, 31)) - 16);
      for (int r = 0; r < NOUT; r++) begin
        longint s;
        s = 0;
        for (int i = 0; i < NIN; i++) s += longint'(x[v][i]) * longint'(w[v][r][i]);
        s = shift_sat(64'(s), FRAC, BW);
        ey[v][r] = (s < 0) ? '0 : BW'(s);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int v = 0; v < NV; v++)
      for (int c = 0; c < NIN / PC; c++) begin
        for (int j = 0; j < PC; j++) xd[j] = x[v][c*PC+j];
        xv = 1; #1; while (!xr) begin @(negedge clk); #1; end
        @(negedge clk); xv = 0;
      end
  end

  initial begin
    repeat (4) @(negedge clk);
    for (int v = 0; v < NV; v++)
      for (int g = 0; g < NOUT / PR; g++) for (int c = 0; c < NIN / PC; c++) begin
        for (int r = 0; r < PR; r++) for (int j = 0; j < PC; j++) wd[r][j] = w[v][g*PR+r][c*PC+j];
        if (stress && $urandom_range(0, 2) == 0) @(negedge clk);
        wv = 1; #1; while (!wr) begin @(negedge clk); #1; end
        if (v == 0 && g == 0 && c == 0) w_first = cyc;
        if (v == 0 && g == NOUT / PR - 1 && c == NIN / PC - 1) w_last = cyc;
        @(negedge clk); wv = 0;
      end
  end

  initial begin
    repeat (4) @(negedge clk);
    for (int v = 0; v < NV; v++) begin
      stress = (v > 0);
      for (int g = 0; g < NOUT / PR; g++) begin
        if (stress) begin yr = 0; repeat ($urandom_range(0, 4)) begin @(negedge clk); nstall++; end yr = 1; end
        #1; while (!yv) begin @(negedge clk); #1; end
        for (int r = 0; r < PR; r++) begin checks++; if (yd[r] !== ey[v][g*PR+r]) failures++; end
        @(negedge clk);
      end
    end
    checks += 2;
    if (w_last - w_first != NOUT * NIN / (PR * PC) - 1) begin failures++; $display("weight phase %0d", w_last - w_first); end
    if (nstall == 0) failures++;
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
