// conv_layer: convolution layer kernel (ConvLayerKernel), filter-major
// computation sequence.
//
// The layer computes F output channels of a (H-K+1) x (W-K+1) feature map
// from a C-channel H x W input with K x K kernels (stride 1, no padding). It
// has three levels of parallelism: PC input channels, PF filters and PK
// adjacent output pixels are processed per cycle by a conv_array of
// PF x PC x PK cores.
//
// Sequence (filter-major, the sequence of the document's reference layer):
//   1. LOAD: the whole input map is written into the ifmap buffer, beat by
//      beat, channel group (PC channels) by channel group, each group in
//      row-major order with PK pixels per beat. Depth C*H*W/(PC*PK).
//   2. For each filter group fg (PF filters) and each channel group cg: take
//      one coeff beat (PF x PC x K*K values) into the coeff buffer (a
//      register), then stream that channel group out of the ifmap buffer
//      through the line buffer into the array, one beat per cycle.
//   3. The ofmap buffer, (H-K+1)(W-K+1)/PK words of PF x PK accumulators,
//      sums the partial results over the channel groups. On the last channel
//      group the finished values go to the ofmap stream instead.
// The compute phase therefore takes F*C*H*W/(PF*PC*PK) cycles (plus one
// cycle per coeff beat when the coeff stream is ready), and the first output
// appears after C*H*W/(PC*PK) cycles of it, the rates the document gives.
//
// Output: the accumulator is shifted right by FRAC, saturated to BW bits and
// passed through a ReLU when RELU = 1. With BINARY = 1 the layer is the
// binarised convolution: 1-bit operands, XNOR/popcount cores, and each output
// is 1 when the popcount total over all channels exceeds the filter's
// threshold thr[f] (the binarised batch normalisation).
//
// Streams use valid/ready. ofmap beats come out filter group by filter group,
// each group in row-major order, PF x PK values per beat. The whole pipeline
// stalls while the ofmap FIFO lacks room for the results in flight. The
// buffer organisation follows the document's filter-major column of its
// buffer table; the handshakes, the fixed-point output rule and the
// load-then-compute order of the ifmap buffer are this design's choices.
module conv_layer
  import cnn_pkg::*;
#(
  parameter int unsigned H      = 32,
  parameter int unsigned W      = 32,
  parameter int unsigned C      = 32,
  parameter int unsigned F      = 32,
  parameter int unsigned K      = 3,
  parameter int unsigned PC     = 8,
  parameter int unsigned PF     = 8,
  parameter int unsigned PK     = 2,
  parameter int unsigned BW     = 8,
  parameter int unsigned FRAC   = 0,
  parameter bit          RELU   = 1'b1,
  parameter bit          BINARY = 1'b0,
  parameter int unsigned OBW    = BINARY ? 1 : BW,
  parameter int unsigned CW     = (BINARY ? 2 : 2 * BW) + $clog2(K * K),
  parameter int unsigned AOW    = CW + $clog2(PC),
  parameter int unsigned ACCW   = AOW + $clog2(C / PC) + 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // input feature map stream
  input  logic                                   ifmap_valid,
  output logic                                   ifmap_ready,
  input  logic [PC-1:0][PK-1:0][BW-1:0]          ifmap_data,
  // coefficient stream, one beat per (filter group, channel group)
  input  logic                                   coeff_valid,
  output logic                                   coeff_ready,
  input  logic [PF-1:0][PC-1:0][K*K-1:0][BW-1:0] coeff_data,
  // per-filter thresholds, used only when BINARY = 1
  input  logic [F-1:0][ACCW-1:0]                 thr,
  // output feature map stream
  output logic                                   ofmap_valid,
  input  logic                                   ofmap_ready,
  output logic [PF-1:0][PK-1:0][OBW-1:0]         ofmap_data
);
  localparam int unsigned HO    = H - K + 1;
  localparam int unsigned WO    = W - K + 1;
  localparam int unsigned FRAME = H * W / PK;          // beats per channel group
  localparam int unsigned CG    = C / PC;
  localparam int unsigned FG    = F / PF;
  localparam int unsigned IFD   = CG * FRAME;          // ifmap buffer depth
  localparam int unsigned OFD   = HO * WO / PK;        // ofmap buffer depth
  localparam int unsigned LA    = $clog2(K * K) + $clog2(PC);
  localparam int unsigned FIFOD = 1 << $clog2(LA + 8);
  localparam int unsigned IAW   = $clog2(IFD + 1);
  localparam int unsigned OIW   = $clog2(OFD + 1);
  localparam int unsigned CGW   = $clog2(CG + 1);
  localparam int unsigned FGW   = $clog2(FG + 1);
  localparam int unsigned PXW   = $clog2(FRAME + 1);

  typedef logic [PC-1:0][PK-1:0][BW-1:0]          ibeat_t;
  typedef logic [PF-1:0][PC-1:0][K*K-1:0][BW-1:0] cbeat_t;
  typedef logic signed [PF-1:0][PK-1:0][ACCW-1:0] abeat_t;
  typedef logic [PF-1:0][PK-1:0][OBW-1:0]         obeat_t;

  typedef enum logic { S_LOAD, S_RUN } state_t;

  // Side information that travels with a window through the array.
  typedef struct packed {
    logic            first;   // first channel group: start a new sum
    logic            last;    // last channel group: emit the result
    logic [FGW-1:0]  fg;
    logic [OIW-1:0]  idx;
  } meta_t;

  state_t          state;
  ibeat_t          ifbuf [IFD];
  abeat_t          ofbuf [OFD];
  logic [IAW-1:0]  wr_addr;
  logic [CGW-1:0]  cg;
  logic [FGW-1:0]  fg;
  logic [PXW-1:0]  pix;
  cbeat_t          coeff_reg;
  logic            coeff_loaded;
  logic            en, issue, pass_end;

  // ---------------- load phase ----------------
  assign ifmap_ready = (state == S_LOAD);

  always_ff @(posedge clk)
    if (ifmap_valid && ifmap_ready) ifbuf[wr_addr] <= ifmap_data;

  // ---------------- control ----------------
  assign coeff_ready = (state == S_RUN) && !coeff_loaded;
  assign issue       = (state == S_RUN) && coeff_loaded && en;
  assign pass_end    = issue && (pix == PXW'(FRAME - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_LOAD;
      wr_addr      <= '0;
      cg           <= '0;
      fg           <= '0;
      pix          <= '0;
      coeff_loaded <= 1'b0;
      coeff_reg    <= '0;
    end else begin
      if (ifmap_valid && ifmap_ready) begin
        if (wr_addr == IAW'(IFD - 1)) begin
          wr_addr <= '0;
          state   <= S_RUN;
        end else begin
          wr_addr <= wr_addr + 1'b1;
        end
      end
      if (coeff_valid && coeff_ready) begin
        coeff_reg    <= coeff_data;
        coeff_loaded <= 1'b1;
      end
      if (issue) pix <= pass_end ? '0 : pix + 1'b1;
      if (pass_end) begin
        coeff_loaded <= 1'b0;
        if (cg == CGW'(CG - 1)) begin
          cg <= '0;
          if (fg == FGW'(FG - 1)) begin
            fg    <= '0;
            state <= S_LOAD;
          end else begin
            fg <= fg + 1'b1;
          end
        end else begin
          cg <= cg + 1'b1;
        end
      end
    end
  end

  // ---------------- line buffer ----------------
  ibeat_t                                   rd_beat;
  logic                                     lb_valid, lb_last;
  logic [OIW-1:0]                           lb_idx;
  logic [PC-1:0][PK-1:0][K*K-1:0][BW-1:0]   lb_win;

  assign rd_beat = ifbuf[IAW'(cg) * IAW'(FRAME) + IAW'(pix)];

  line_buffer #(.H(H), .W(W), .K(K), .PC(PC), .PK(PK), .BW(BW), .OIW(OIW)) u_lbuf (
    .clk, .rst_n, .en, .in_valid(issue), .in_data(rd_beat),
    .out_valid(lb_valid), .out_last(lb_last), .out_idx(lb_idx), .win(lb_win)
  );

  // ---------------- stage 1: window + coeff register ----------------
  logic                                   s1_valid;
  logic [PC-1:0][PK-1:0][K*K-1:0][BW-1:0] s1_win;
  cbeat_t                                 s1_coeff;
  meta_t                                  s1_meta;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_win   <= '0;
      s1_coeff <= '0;
      s1_meta  <= '0;
    end else if (en) begin
      s1_valid <= lb_valid;
      s1_win   <= lb_win;
      s1_coeff <= coeff_reg;
      s1_meta  <= '{first: (cg == '0), last: (cg == CGW'(CG - 1)), fg: fg, idx: lb_idx};
    end
  end

  // ---------------- array ----------------
  logic                                  ar_valid;
  logic signed [PF-1:0][PK-1:0][AOW-1:0] ar_data;
  meta_t                                 meta_pipe [LA+1];

  conv_array #(.K(K), .PC(PC), .PF(PF), .PK(PK), .BW(BW), .BINARY(BINARY), .CW(CW), .OW(AOW)) u_array (
    .clk, .rst_n, .en, .in_valid(s1_valid), .win(s1_win), .coeff(s1_coeff),
    .out_valid(ar_valid), .out_data(ar_data)
  );

  always_comb meta_pipe[0] = s1_meta;
  for (genvar i = 0; i < LA; i++) begin : g_meta
    always_ff @(posedge clk)
      if (!rst_n)  meta_pipe[i+1] <= '0;
      else if (en) meta_pipe[i+1] <= meta_pipe[i];
  end

  // ---------------- ofmap buffer: accumulate / emit ----------------
  meta_t  m;
  abeat_t acc_old, acc_new;
  obeat_t out_beat, sat_beat;
  logic   push;

  assign m = meta_pipe[LA];

  always_comb begin
    acc_old = m.first ? '0 : ofbuf[m.idx];
    for (int f = 0; f < PF; f++)
      for (int k = 0; k < PK; k++) begin
        acc_new[f][k] = acc_old[f][k] + ACCW'($signed(ar_data[f][k]));
        if (BINARY)
          sat_beat[f][k] = OBW'($signed(acc_new[f][k]) > $signed(thr[int'(m.fg) * PF + f]));
        else
          sat_beat[f][k] = OBW'(shift_sat(64'($signed(acc_new[f][k])), FRAC, BW));
      end
  end

  if (RELU && !BINARY) begin : g_relu
    relu #(.N(PF * PK), .BW(OBW)) u_relu (.in_data(sat_beat), .out_data(out_beat));
  end else begin : g_norelu
    assign out_beat = sat_beat;
  end

  assign push = en && ar_valid && m.last;

  always_ff @(posedge clk)
    if (en && ar_valid && !m.last) ofbuf[m.idx] <= acc_new;

  // ---------------- ofmap FIFO ----------------
  logic [$clog2(FIFOD):0] fifo_cnt;
  logic                   fifo_in_ready;

  stream_fifo #(.W(PF * PK * OBW), .DEPTH(FIFOD)) u_ofifo (
    .clk, .rst_n,
    .in_valid(push), .in_ready(fifo_in_ready), .in_data(out_beat),
    .out_valid(ofmap_valid), .out_ready(ofmap_ready), .out_data(ofmap_data),
    .count(fifo_cnt)
  );

  // Stall while the FIFO could not absorb everything already in the pipeline.
  assign en = (fifo_cnt <= ($clog2(FIFOD)+1)'(FIFOD - LA - 3));

  push_fits: assert property (@(posedge clk) disable iff (!rst_n) push |-> fifo_in_ready);
endmodule
