// line_buffer: turns a row-major feature-map stream into convolution windows.
//
// Each input beat carries PC channels x PK horizontally adjacent pixels of an
// H x W frame (W/PK beats per row). The buffer is a shift register of the last
// (K-1)*W/PK + (K-1)/PK + 1 beats, i.e. K-1 full rows plus the few beats to the
// left of the current one, so every pixel of the K x (K+PK-1) patch that ends
// at the current beat can be tapped at a fixed delay -- the delay-line
// definition of the line buffer in the document, where window element (i,j)
// is the input delayed by (K-1-i)*W + (K-1-j) pixels.
//
// For beat b of row r the module outputs PK windows, lane j covering output
// column b*PK + j - (K-1) of output row r - (K-1). This needs (K-1) to be a
// multiple of PK (true for every odd K with PK = 1 or 2, which is what the
// document uses) so that each output beat is one whole aligned group of PK
// output pixels. Windows are valid when r >= K-1 and b*PK >= K-1; out_idx is
// the index of the output beat within the (H-K+1) x (W-K+1)/PK output frame.
//
// Timing: combinational from the current input beat (the shift happens on the
// clock edge that accepts it). in_valid is qualified by en.
module line_buffer #(
  parameter int unsigned H  = 32,
  parameter int unsigned W  = 32,
  parameter int unsigned K  = 3,
  parameter int unsigned PC = 8,
  parameter int unsigned PK = 2,
  parameter int unsigned BW = 8,
  parameter int unsigned WB  = W / PK,                       // beats per input row
  parameter int unsigned OWB = (W - K + 1) / PK,             // beats per output row
  parameter int unsigned OIW = $clog2((H - K + 1) * OWB + 1)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  en,
  input  logic                                  in_valid,
  input  logic [PC-1:0][PK-1:0][BW-1:0]         in_data,
  output logic                                  out_valid,
  output logic                                  out_last,    // last window of the frame
  output logic [OIW-1:0]                        out_idx,
  output logic [PC-1:0][PK-1:0][K*K-1:0][BW-1:0] win        // [ch][lane][row*K+col]
);
  localparam int unsigned BB    = (K - 1) / PK;              // beats left of current needed
  localparam int unsigned DEPTH = (K - 1) * WB + BB;         // stored beats
  localparam int unsigned DS    = (DEPTH > 0) ? DEPTH : 1;

  typedef logic [PC-1:0][PK-1:0][BW-1:0] beat_t;

  beat_t                 sr [DS];                            // sr[0] = previous beat
  logic [$clog2(H+1)-1:0]  row;
  logic [$clog2(WB+1)-1:0] col;
  logic [OIW-1:0]          oidx;

  // Beat at delay d (0 = current input).
  function automatic beat_t tap(input int unsigned d, input beat_t cur, input beat_t s [DS]);
    return (d == 0) ? cur : s[d-1];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row  <= '0;
      col  <= '0;
      oidx <= '0;
      for (int i = 0; i < DS; i++) sr[i] <= '0;
    end else if (en && in_valid) begin
      sr[0] <= in_data;
      for (int i = 1; i < DS; i++) sr[i] <= sr[i-1];
      if (out_valid) oidx <= out_last ? '0 : oidx + 1'b1;
      if (col == ($clog2(WB+1))'(WB - 1)) begin
        col <= '0;
        row <= (row == ($clog2(H+1))'(H - 1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  assign out_valid = in_valid && (row >= ($clog2(H+1))'(K - 1)) && (col >= ($clog2(WB+1))'(BB));
  assign out_last  = out_valid && (row == ($clog2(H+1))'(H - 1)) && (col == ($clog2(WB+1))'(WB - 1));
  assign out_idx   = oidx;

  // Window element (i, q) of lane j is the pixel at row r-(K-1)+i, column
  // b*PK + j - (K-1) + q: (K-1-i) rows plus bback beats back in the stream,
  // in lane `lane` of that beat.
  always_comb begin
    for (int c = 0; c < PC; c++)
      for (int j = 0; j < PK; j++)
        for (int i = 0; i < K; i++)
          for (int q = 0; q < K; q++) begin
            // column offset relative to the first lane of the current beat
            automatic int colrel = j - int'(K - 1) + q;           // in [-(K-1), PK-1]
            automatic int bback  = (colrel >= 0) ? 0 : ((-colrel + int'(PK) - 1) / int'(PK));
            automatic int lane   = colrel + bback * int'(PK);
            automatic int d      = (int'(K) - 1 - i) * int'(WB) + bback;
            beat_t b;
            b = tap(d, in_data, sr);
            win[c][j][i*K+q] = b[c][lane];
          end
  end
endmodule
