// batchnorm: batch normalisation layer for a feature-map stream.
//
// Each value is normalised with the statistics of its channel:
//   y = sat_BW( ((x - mean[c]) * scale[c]) >>> FRAC )
// where scale[c] holds 1/sqrt(var[c] + eps) (times the learned gain) as a
// fixed-point number with FRAC fraction bits. The per-channel mean and scale
// come from the trained model and are kept in a small table (the document's
// ROM), written once through the cfg port before use. The channel of a beat
// is found by counting: the stream carries C/P frames of FRAME beats, frame g
// holding channels g*P .. g*P+P-1 (the order the convolution layers produce).
// Folding the learned offset into the mean, and loading the table through a
// port, are this design's choices; the document only says mean and variance
// are read from a ROM.
//
// Interface: valid/ready, one registered output stage.
module batchnorm
  import cnn_pkg::*;
#(
  parameter int unsigned C     = 32,
  parameter int unsigned P     = 8,
  parameter int unsigned PK    = 2,
  parameter int unsigned FRAME = 32 * 32 / 2,
  parameter int unsigned BW    = 8,
  parameter int unsigned FRAC  = 6,
  parameter int unsigned CAW   = $clog2(C)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // table write port
  input  logic                          cfg_we,
  input  logic [CAW-1:0]                cfg_addr,
  input  logic [BW-1:0]                 cfg_mean,
  input  logic [BW-1:0]                 cfg_scale,
  // data stream
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [P-1:0][PK-1:0][BW-1:0]  in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [P-1:0][PK-1:0][BW-1:0]  out_data
);
  localparam int unsigned G  = C / P;
  localparam int unsigned GW = $clog2(G + 1);
  localparam int unsigned FW = $clog2(FRAME + 1);

  logic [BW-1:0]  mean_rom  [C];
  logic [BW-1:0]  scale_rom [C];
  logic [GW-1:0]  grp;
  logic [FW-1:0]  beat;
  logic           take;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk)
    if (cfg_we) begin
      mean_rom[cfg_addr]  <= cfg_mean;
      scale_rom[cfg_addr] <= cfg_scale;
    end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grp       <= '0;
      beat      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        for (int p = 0; p < P; p++)
          for (int k = 0; k < PK; k++) begin
            automatic int unsigned ch = int'(grp) * P + p;
            automatic logic signed [2*BW+1:0] d =
              (2*BW+2)'($signed(in_data[p][k])) - (2*BW+2)'($signed(mean_rom[ch]));
            automatic logic signed [3*BW+2:0] prod = d * $signed(scale_rom[ch]);
            out_data[p][k] <= BW'(shift_sat(64'(prod), FRAC, BW));
          end
        if (beat == FW'(FRAME - 1)) begin
          beat <= '0;
          grp  <= (grp == GW'(G - 1)) ? '0 : grp + 1'b1;
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end
endmodule
