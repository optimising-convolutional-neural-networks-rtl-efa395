// maxpool: 2 x 2 max pooling with stride 2 on a feature-map stream.
//
// Input beats carry P channels x PK adjacent pixels of H x W frames in
// row-major order (frames follow one another, e.g. one per channel group).
// A horizontal stage takes the maximum of each pixel pair: within a beat
// when PK >= 2, or of two consecutive beats when PK = 1. A vertical stage
// stores the pair maxima of every even row in a row buffer of W/2 values per
// channel and, on the odd row, outputs the maximum of the stored and the new
// pair maxima. The output beat therefore carries P channels x PKO pixels,
// PKO = PK/2 (or 1 when PK = 1): pooling halves PK, as the document states.
// Only the 2 x 2, stride-2 case is supported, as in the document.
//
// Interface: valid/ready in and out; one registered output stage.
// in_ready = !out_valid || out_ready. H and W must be even.
module maxpool #(
  parameter int unsigned H   = 24,
  parameter int unsigned W   = 24,
  parameter int unsigned P   = 4,
  parameter int unsigned PK  = 2,
  parameter int unsigned BW  = 8,
  parameter int unsigned PKO = (PK >= 2) ? PK / 2 : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [P-1:0][PK-1:0][BW-1:0]   in_data,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [P-1:0][PKO-1:0][BW-1:0]  out_data
);
  localparam int unsigned WB = W / PK;         // input beats per row
  localparam int unsigned HB = (W / 2) / PKO;  // pair-max beats per row

  typedef logic [P-1:0][PKO-1:0][BW-1:0] hbeat_t;

  function automatic logic [BW-1:0] smax(input logic [BW-1:0] a, input logic [BW-1:0] b);
    return ($signed(a) > $signed(b)) ? a : b;
  endfunction

  logic                       take;
  logic [$clog2(WB+1)-1:0]    col;
  logic [$clog2(H+1)-1:0]     row;
  logic [$clog2(HB+1)-1:0]    hcol;
  logic [P-1:0][BW-1:0]       prev;      // left pixel of a pair when PK = 1
  hbeat_t                     hval;
  logic                       hvalid;
  hbeat_t                     rowbuf [HB];

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  // Horizontal pair maxima of the current beat.
  always_comb begin
    hval   = '0;
    hvalid = 1'b0;
    if (PK == 1) begin
      for (int c = 0; c < P; c++) hval[c][0] = smax(prev[c], in_data[c][0]);
      hvalid = take && col[0];
    end else begin
      for (int c = 0; c < P; c++)
        for (int j = 0; j < PKO; j++)
          hval[c][j] = smax(in_data[c][2*j], in_data[c][2*j+1]);
      hvalid = take;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      hcol      <= '0;
      prev      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        for (int c = 0; c < P; c++) prev[c] <= in_data[c][0];
        if (col == ($clog2(WB+1))'(WB - 1)) begin
          col <= '0;
          row <= (row == ($clog2(H+1))'(H - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
      if (hvalid) begin
        hcol <= (hcol == ($clog2(HB+1))'(HB - 1)) ? '0 : hcol + 1'b1;
        if (row[0]) begin
          for (int c = 0; c < P; c++)
            for (int j = 0; j < PKO; j++)
              out_data[c][j] <= smax(rowbuf[hcol][c][j], hval[c][j]);
          out_valid <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (hvalid && !row[0]) rowbuf[hcol] <= hval;
endmodule
