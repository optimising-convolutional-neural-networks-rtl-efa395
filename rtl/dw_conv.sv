// dw_conv: depthwise part of the depthwise separable convolution.
//
// Every input channel is convolved with its own K x K kernel (no sum across
// channels). The input stream arrives channel group by channel group (PC
// channels x PK pixels per beat, each group a row-major H x W frame), passes
// directly through a line buffer -- in the depthwise separable layer the line
// buffers come first -- and a spatial array of PC x PK conv2d cores
// (dot_core). Before each channel group one coefficient beat of PC x K*K
// values is taken. Results are shifted right by FRAC, saturated to BW bits
// and leave as PC x PK values per beat, (H-K+1)(W-K+1)/PK beats per group.
//
// Streams: valid/ready. The input is accepted one beat per cycle while the
// group's kernel is loaded and the output FIFO has room for the results in
// flight (latency 1 + ceil(log2(K*K)) cycles). The document shows the block
// arrangement; the handshakes and output rule are this design's choices.
module dw_conv
  import cnn_pkg::*;
#(
  parameter int unsigned H    = 32,
  parameter int unsigned W    = 32,
  parameter int unsigned C    = 32,
  parameter int unsigned K    = 3,
  parameter int unsigned PC   = 16,
  parameter int unsigned PK   = 2,
  parameter int unsigned BW   = 16,
  parameter int unsigned FRAC = 0
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [PC-1:0][PK-1:0][BW-1:0]   in_data,
  input  logic                            coeff_valid,
  output logic                            coeff_ready,
  input  logic [PC-1:0][K*K-1:0][BW-1:0]  coeff_data,
  output logic                            out_valid,
  input  logic                            out_ready,
  output logic [PC-1:0][PK-1:0][BW-1:0]   out_data
);
  localparam int unsigned FRAME = H * W / PK;
  localparam int unsigned LC    = $clog2(K * K);
  localparam int unsigned CW    = 2 * BW + LC;
  localparam int unsigned FIFOD = 1 << $clog2(LC + 8);
  localparam int unsigned PXW   = $clog2(FRAME + 1);
  localparam int unsigned OIW   = $clog2((H - K + 1) * (W - K + 1) / PK + 1);

  logic                                    en, take, loaded;
  logic [PXW-1:0]                          pix;
  logic [PC-1:0][K*K-1:0][BW-1:0]          kreg;

  assign coeff_ready = !loaded;
  assign in_ready    = loaded && en;
  assign take        = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loaded <= 1'b0;
      pix    <= '0;
      kreg   <= '0;
    end else begin
      if (coeff_valid && coeff_ready) begin
        kreg   <= coeff_data;
        loaded <= 1'b1;
      end
      if (take) begin
        if (pix == PXW'(FRAME - 1)) begin
          pix    <= '0;
          loaded <= 1'b0;
        end else begin
          pix <= pix + 1'b1;
        end
      end
    end
  end

  logic                                       lb_valid, lb_last;
  logic [OIW-1:0]                             lb_idx;
  logic [PC-1:0][PK-1:0][K*K-1:0][BW-1:0]     lb_win;

  line_buffer #(.H(H), .W(W), .K(K), .PC(PC), .PK(PK), .BW(BW), .OIW(OIW)) u_lbuf (
    .clk, .rst_n, .en, .in_valid(take), .in_data(in_data),
    .out_valid(lb_valid), .out_last(lb_last), .out_idx(lb_idx), .win(lb_win)
  );

  // Register window and kernel so the kernel may be replaced right after the
  // group's last beat.
  logic                                       s1_valid;
  logic [PC-1:0][PK-1:0][K*K-1:0][BW-1:0]     s1_win;
  logic [PC-1:0][K*K-1:0][BW-1:0]             s1_k;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_win   <= '0;
      s1_k     <= '0;
    end else if (en) begin
      s1_valid <= lb_valid;
      s1_win   <= lb_win;
      s1_k     <= kreg;
    end
  end

  logic                          core_v [PC][PK];
  logic signed [CW-1:0]          core_o [PC][PK];
  logic [PC-1:0][PK-1:0][BW-1:0] res;

  for (genvar c = 0; c < PC; c++) begin : g_c
    for (genvar k = 0; k < PK; k++) begin : g_k
      dot_core #(.K(K), .BW(BW), .BINARY(1'b0), .OW(CW)) u_core (
        .clk, .rst_n, .en, .in_valid(s1_valid), .win(s1_win[c][k]), .coeff(s1_k[c]),
        .out_valid(core_v[c][k]), .out_data(core_o[c][k])
      );
      assign res[c][k] = BW'(shift_sat(64'(core_o[c][k]), FRAC, BW));
    end
  end

  logic [$clog2(FIFOD):0] cnt;
  logic                   fifo_in_ready;

  stream_fifo #(.W(PC * PK * BW), .DEPTH(FIFOD)) u_ofifo (
    .clk, .rst_n,
    .in_valid(en && core_v[0][0]), .in_ready(fifo_in_ready), .in_data(res),
    .out_valid, .out_ready, .out_data, .count(cnt)
  );

  assign en = (cnt <= ($clog2(FIFOD)+1)'(FIFOD - LC - 3));

  push_fits: assert property (@(posedge clk) disable iff (!rst_n) (en && core_v[0][0]) |-> fifo_in_ready);
endmodule
