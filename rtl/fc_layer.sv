// fc_layer: fully-connected layer kernel.
//
// Computes NOUT outputs y[r] = sum_i w[r][i] * x[i] over an NIN-element
// input vector. PR rows are computed in parallel, each by a dot_product unit
// that takes PC input elements per cycle, so a row group needs NIN/PC cycles
// and the whole layer NOUT*NIN/(PR*PC) cycles, as for the document's fc
// relation (PR row-parallel dot products of PC-wide chunks).
//
// Sequence: the input vector is first written into an x buffer (NIN/PC words
// of PC values); then, for every row group, the buffer is read chunk by chunk
// while the weight stream supplies PR x PC weights per beat. Each dot product
// presents its sum ceil(log2 PC) + 1 cycles after the group's last chunk; the
// sums are shifted right by FRAC, saturated to BW bits, optionally passed
// through a ReLU, and leave as one beat of PR values. The x buffer, the
// weight stream and the fixed-point output rule are this design's choices;
// the text gives the layer's parallelism and its dot-product structure.
//
// Streams: valid/ready. The pipeline stalls when the output FIFO lacks room
// for the sums in flight.
module fc_layer
  import cnn_pkg::*;
#(
  parameter int unsigned NIN  = 1024,
  parameter int unsigned NOUT = 1024,
  parameter int unsigned PC   = 1,
  parameter int unsigned PR   = 4,
  parameter int unsigned BW   = 8,
  parameter int unsigned FRAC = 0,
  parameter bit          RELU = 1'b1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         x_valid,
  output logic                         x_ready,
  input  logic [PC-1:0][BW-1:0]        x_data,
  input  logic                         w_valid,
  output logic                         w_ready,
  input  logic [PR-1:0][PC-1:0][BW-1:0] w_data,
  output logic                         y_valid,
  input  logic                         y_ready,
  output logic [PR-1:0][BW-1:0]        y_data
);
  localparam int unsigned NCH   = NIN / PC;
  localparam int unsigned NRG   = NOUT / PR;
  localparam int unsigned LAT   = $clog2(PC) + 1;
  localparam int unsigned DW    = 2 * BW + $clog2(NIN) + 1;
  localparam int unsigned FIFOD = 1 << $clog2(LAT + 8);
  localparam int unsigned CHW   = $clog2(NCH + 1);
  localparam int unsigned RGW   = $clog2(NRG + 1);

  typedef enum logic { S_LOAD, S_RUN } state_t;

  state_t                  state;
  logic [PC-1:0][BW-1:0]   xbuf [NCH];
  logic [CHW-1:0]          ch;
  logic [RGW-1:0]          rg;
  logic                    en, issue;

  assign x_ready = (state == S_LOAD);
  assign w_ready = (state == S_RUN) && en;
  assign issue   = w_valid && w_ready;

  always_ff @(posedge clk)
    if (x_valid && x_ready) xbuf[ch] <= x_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOAD;
      ch    <= '0;
      rg    <= '0;
    end else if (x_valid && x_ready) begin
      if (ch == CHW'(NCH - 1)) begin
        ch    <= '0;
        state <= S_RUN;
      end else begin
        ch <= ch + 1'b1;
      end
    end else if (issue) begin
      if (ch == CHW'(NCH - 1)) begin
        ch <= '0;
        if (rg == RGW'(NRG - 1)) begin
          rg    <= '0;
          state <= S_LOAD;
        end else begin
          rg <= rg + 1'b1;
        end
      end else begin
        ch <= ch + 1'b1;
      end
    end
  end

  logic [PR-1:0]                 dp_valid;
  logic signed [PR-1:0][DW-1:0]  dp_sum;
  logic [PR-1:0][BW-1:0]         sat, yv;

  for (genvar r = 0; r < PR; r++) begin : g_row
    dot_product #(.N(NIN), .V(PC), .BW(BW), .OW(DW)) u_dp (
      .clk, .rst_n, .en, .in_valid(issue), .x(xbuf[ch]), .w(w_data[r]),
      .out_valid(dp_valid[r]), .out_data(dp_sum[r])
    );
    assign sat[r] = BW'(shift_sat(64'($signed(dp_sum[r])), FRAC, BW));
  end

  if (RELU) begin : g_relu
    relu #(.N(PR), .BW(BW)) u_relu (.in_data(sat), .out_data(yv));
  end else begin : g_norelu
    assign yv = sat;
  end

  logic [$clog2(FIFOD):0] cnt;
  logic                   fifo_in_ready;

  stream_fifo #(.W(PR * BW), .DEPTH(FIFOD)) u_ofifo (
    .clk, .rst_n,
    .in_valid(en && dp_valid[0]), .in_ready(fifo_in_ready), .in_data(yv),
    .out_valid(y_valid), .out_ready(y_ready), .out_data(y_data), .count(cnt)
  );

  assign en = (cnt <= ($clog2(FIFOD)+1)'(FIFOD - LAT - 3));

  push_fits: assert property (@(posedge clk) disable iff (!rst_n) (en && dp_valid[0]) |-> fifo_in_ready);
endmodule
