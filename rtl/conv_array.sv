// conv_array: the array block of the convolution kernel (Conv2DKernel).
//
// PF x PC x PK conv2d cores (dot_core) are arranged in three dimensions:
// PK cores share a kernel and work on PK horizontally adjacent windows of one
// channel, PC such rows handle PC input channels, and PF copies compute PF
// filters. For every filter and pixel lane an adder tree (pbrt over PC) sums
// the PC channel results, so the array outputs PF x PK partial sums per beat.
// The array takes PC x PK windows (PC x K x (K+PK-1) distinct pixels) and
// PF x PC x K*K coefficients, as the document describes.
//
// Latency: ceil(log2(K*K)) + ceil(log2(PC)) enabled cycles.
module conv_array #(
  parameter int unsigned K      = 3,
  parameter int unsigned PC     = 8,
  parameter int unsigned PF     = 8,
  parameter int unsigned PK     = 2,
  parameter int unsigned BW     = 8,
  parameter bit          BINARY = 1'b0,
  parameter int unsigned CW     = (BINARY ? 2 : 2 * BW) + $clog2(K * K),   // core output width
  parameter int unsigned OW     = CW + $clog2(PC)
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic                                      en,
  input  logic                                      in_valid,
  input  logic [PC-1:0][PK-1:0][K*K-1:0][BW-1:0]    win,
  input  logic [PF-1:0][PC-1:0][K*K-1:0][BW-1:0]    coeff,
  output logic                                      out_valid,
  output logic signed [PF-1:0][PK-1:0][OW-1:0]      out_data
);
  logic signed [CW-1:0] core_out [PF][PK][PC];
  logic                 core_v   [PF][PK][PC];
  logic                 sum_v    [PF][PK];

  for (genvar f = 0; f < PF; f++) begin : g_f
    for (genvar k = 0; k < PK; k++) begin : g_k
      logic signed [PC-1:0][CW-1:0] csum_in;
      for (genvar c = 0; c < PC; c++) begin : g_c
        dot_core #(.K(K), .BW(BW), .BINARY(BINARY), .OW(CW)) u_core (
          .clk, .rst_n, .en, .in_valid,
          .win(win[c][k]), .coeff(coeff[f][c]),
          .out_valid(core_v[f][k][c]), .out_data(core_out[f][k][c])
        );
        assign csum_in[c] = core_out[f][k][c];
      end
      pbrt #(.N(PC), .W(CW), .OW(OW)) u_chsum (
        .clk, .rst_n, .en, .in_valid(core_v[f][k][0]), .in_data(csum_in),
        .out_valid(sum_v[f][k]), .out_data(out_data[f][k])
      );
    end
  end

  assign out_valid = sum_v[0][0];
endmodule
