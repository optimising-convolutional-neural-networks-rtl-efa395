// pbrt: pipelined binary reduction tree (adder tree).
//
// Sums N signed W-bit values with a binary tree of adders. Every tree level is
// followed by a register, so the sum appears ceil(log2 N) cycles after the
// operands (0 cycles, i.e. combinational, for N = 1). The tree holds N-1
// adders. The operand list is padded with zeros up to a power of two; the
// padded adders reduce to wires in synthesis. This structure and its latency
// follow the reduction tree of the document; the shared advance enable `en`
// (a stall freezes every level) is this design's choice so the tree can sit in
// a stallable stream pipeline.
//
// Interface: in_valid/in_data enter when en = 1; out_valid/out_data are the
// registered result of the operands that entered LAT enabled cycles earlier.
module pbrt #(
  parameter int unsigned N  = 9,
  parameter int unsigned W  = 16,
  parameter int unsigned LAT = $clog2(N),
  parameter int unsigned OW = W + LAT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic                        in_valid,
  input  logic signed [N-1:0][W-1:0]  in_data,
  output logic                        out_valid,
  output logic signed [OW-1:0]        out_data
);
  localparam int unsigned NP = 1 << LAT;   // padded leaf count

  // leaf[i]: sign-extended operands. lvl[l][i]: registered node i of level l
  // (l = 1..LAT, only the first NP>>l used); lvl[0] is unused.
  logic signed [OW-1:0] leaf [NP];
  logic signed [OW-1:0] lvl  [LAT+1][NP];
  logic                 vld  [LAT+1];

  always_comb
    for (int i = 0; i < NP; i++)
      leaf[i] = (i < N) ? OW'($signed(in_data[i])) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l <= LAT; l++) begin
        vld[l] <= 1'b0;
        for (int i = 0; i < NP; i++) lvl[l][i] <= '0;
      end
    end else if (en) begin
      for (int l = 0; l < LAT; l++) begin
        vld[l+1] <= (l == 0) ? in_valid : vld[l];
        for (int i = 0; i < NP; i++)
          if (i < (NP >> (l + 1)))
            lvl[l+1][i] <= (l == 0) ? leaf[2*i] + leaf[2*i+1] : lvl[l][2*i] + lvl[l][2*i+1];
          else
            lvl[l+1][i] <= '0;
      end
    end
  end

  if (LAT == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = leaf[0];
  end else begin : g_tree
    assign out_valid = vld[LAT];
    assign out_data  = lvl[LAT][0];
  end
endmodule
