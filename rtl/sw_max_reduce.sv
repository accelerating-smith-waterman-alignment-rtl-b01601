// sw_max_reduce: signed maximum of N scores, as a balanced binary tree.
//
// The cells of a block each keep the running maximum of their own column;
// at the end of a block this tree folds those N values into the block's best
// score, which the kernel then compares with the global best score.
//
// The inputs are padded with the most negative W-bit value up to the next
// power of two, then compared pairwise in ceil(log2 N) levels of 2-input
// signed maximum. Purely combinational: `max_o` follows `vals_i` in the same
// cycle. The tree shape is this design's choice; the document only says that
// the best score is the maximum of H.
module sw_max_reduce #(
  parameter int unsigned N = 256,
  parameter int unsigned W = 32
) (
  input  logic signed [W-1:0] vals_i [N],
  output logic signed [W-1:0] max_o
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned P      = 1 << LEVELS;

  // node[1] is the root, node[k] has children node[2k] and node[2k+1],
  // leaves are node[P .. 2P-1].
  logic signed [W-1:0] node [2*P];

  always_comb begin
    node[0] = '0;
    for (int unsigned k = 0; k < P; k++) begin
      node[P+k] = (k < N) ? vals_i[k] : {1'b1, {(W-1){1'b0}}};
    end
    for (int unsigned k = P - 1; k >= 1; k--) begin
      node[k] = (node[2*k] > node[2*k+1]) ? node[2*k] : node[2*k+1];
    end
  end

  assign max_o = node[1];

endmodule
