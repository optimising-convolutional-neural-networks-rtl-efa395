// tb_batchnorm: loads a mean/scale table for 4 channels, then streams two
// channel groups (2 channels x 2 pixels per beat, 6 beats per frame) and
// checks each value against ((x - mean) * scale) >>> FRAC, saturated.
module tb_batchnorm;
  import cnn_pkg::*;
  localparam int C = 4, P = 2, PK = 2, FRAME = 6, BW = 8, FRAC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [1:0] addr = '0;
  logic [BW-1:0] mean = '0, scale = '0;
  logic iv = 0, ir, ov, orr = 1;
  logic [P-1:0][PK-1:0][BW-1:0] id = '0, od;
  batchnorm #(.C(C), .P(P), .PK(PK), .FRAME(FRAME), .BW(BW), .FRAC(FRAC)) dut (
    .clk, .rst_n, .cfg_we(we), .cfg_addr(addr), .cfg_mean(mean), .cfg_scale(scale),
    .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov), .out_ready(orr), .out_data(od));
  logic signed [BW-1:0] mt [C], st [C];
  logic signed [BW-1:0] xs [C/P][FRAME][P][PK];
  int checks = 0, failures = 0;
  initial begin
    for (int c = 0; c < C; c++) begin mt[c] = BW'($urandom_range(0, 40)) - 8'sd20; st[c] = BW'($urandom_range(1, 60)); end
    for (int g = 0; g < C/P; g++) for (int b = 0; b < FRAME; b++) for (int p = 0; p < P; p++) for (int k = 0; k < PK; k++)
      xs[g][b][p][k] = BW'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < C; c++) begin we = 1; addr = 2'(c); mean = mt[c]; scale = st[c]; @(negedge clk); end
    we = 0;
    for (int g = 0; g < C/P; g++) for (int b = 0; b < FRAME; b++) begin
      for (int p = 0; p < P; p++) for (int k = 0; k < PK; k++) id[p][k] = xs[g][b][p][k];
      iv = 1; #1; while (!ir) begin @(negedge clk); #1; end
      @(negedge clk); iv = 0;
      #1;
      for (int p = 0; p < P; p++) for (int k = 0; k < PK; k++) begin
        longint e;
        e = shift_sat(64'((longint'(xs[g][b][p][k]) - longint'(mt[g*P+p])) * longint'(st[g*P+p])), FRAC, BW);
        checks++;
        if (!ov || od[p][k] !== BW'(e)) failures++;
      end
    end
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
