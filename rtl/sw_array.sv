// sw_array: the fully unrolled inner loop of the block kernel, BW cells wide.
//
// A vertical block of the alignment matrix is BW columns wide. The block's BW
// residues of S2 are loaded once into registers (s2_we/s2_idx/s2_res), one
// per cell. Then one row token per clock enters cell 0: the row's residue of
// S1 and the H and E values of the same row in the last column of the
// previous block. Each cell computes its cell of the row and passes H, E and
// the S1 residue to its right neighbour, so the row is a wavefront that moves
// one column per clock and the array works on BW different rows at once:
// BW cell updates per clock in steady state. The last cell's H and E leave on
// out_h/out_e; they are the last column of this block, needed by the next one.
//
// Each cell holds its column's H and F of the previous row, so together the
// cells form the one-row H and F buffers of the kernel. `clear` starts a new
// block (row 0: H = E = F = 0). block_max is the maximum H over every cell
// processed since the last `clear` (combinational from the cells' maxima).
//
// Timing: a row token accepted in cycle t (in_valid & en) appears on
// out_valid/out_h/out_e after BW enabled clocks. `en` low freezes the whole
// array (used when the result stores cannot take a value).
//
// The unrolled row, the H/F row buffers and S2 in private registers follow
// the document. Skewing the row into a wavefront (one register per cell) is
// how this design reaches one row per clock in hardware.
module sw_array
  import sw_pkg::*;
#(
  parameter int unsigned BW = 256,
  parameter int unsigned W  = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  clear,
  input  logic signed [W-1:0]   match_sc,
  input  logic signed [W-1:0]   mismatch_sc,
  input  logic signed [W-1:0]   goe,
  input  logic signed [W-1:0]   ge,
  // S2 block load
  input  logic                  s2_we,
  input  logic [$clog2(BW)-1:0] s2_idx,
  input  residue_t              s2_res,
  // row tokens in (left boundary of the block)
  input  logic                  in_valid,
  input  residue_t              in_s1,
  input  logic signed [W-1:0]   in_h,
  input  logic signed [W-1:0]   in_e,
  // row results out (last column of the block)
  output logic                  out_valid,
  output logic signed [W-1:0]   out_h,
  output logic signed [W-1:0]   out_e,
  output logic signed [W-1:0]   block_max
);

  residue_t            s2_q  [BW];
  logic                v_c   [BW+1];
  residue_t            s1_c  [BW+1];
  logic signed [W-1:0] h_c   [BW+1];
  logic signed [W-1:0] e_c   [BW+1];
  logic signed [W-1:0] max_c [BW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < BW; k++) s2_q[k] <= RES_DUMMY;
    end else if (s2_we) begin
      s2_q[s2_idx] <= s2_res;
    end
  end

  assign v_c[0]  = in_valid;
  assign s1_c[0] = in_s1;
  assign h_c[0]  = in_h;
  assign e_c[0]  = in_e;

  for (genvar j = 0; j < BW; j++) begin : g_cell
    sw_pe #(.W(W)) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (en),
      .clear      (clear),
      .s2         (s2_q[j]),
      .match_sc   (match_sc),
      .mismatch_sc(mismatch_sc),
      .goe        (goe),
      .ge         (ge),
      .in_valid   (v_c[j]),
      .in_s1      (s1_c[j]),
      .in_h       (h_c[j]),
      .in_e       (e_c[j]),
      .out_valid  (v_c[j+1]),
      .out_s1     (s1_c[j+1]),
      .out_h      (h_c[j+1]),
      .out_e      (e_c[j+1]),
      .max_h      (max_c[j])
    );
  end

  assign out_valid = v_c[BW];
  assign out_h     = h_c[BW];
  assign out_e     = e_c[BW];

  sw_max_reduce #(.N(BW), .W(W)) u_max (
    .vals_i(max_c),
    .max_o (block_max)
  );

endmodule
