// sw_pe: one cell of the Smith-Waterman block row (one column j of a block).
//
// For every row token that enters from the left it computes, with affine gap
// penalties,
//   E(i,j) = max(H(i,j-1) - Goe, E(i,j-1) - Ge)      gap along the row
//   F(i,j) = max(H(i-1,j) - Goe, F(i-1,j) - Ge)      gap along the column
//   H(i,j) = max(0, H(i-1,j-1) + SM(S1[i],S2[j]), E(i,j), F(i,j))
// where Goe is the gap open plus extension penalty and Ge the extension
// penalty, both given as positive numbers and subtracted. SM is +match_sc
// for equal bases and mismatch_sc (normally negative) otherwise.
//
// The cell keeps its column's H and F of the row above (h_up, f_up: this
// column's share of the one-row H and F buffers) and the H that arrived from
// the left with the previous row (h_diag, the diagonal neighbour). It also
// keeps the running maximum of the H values it produced. `clear` zeroes all
// of these, which is the H = E = F = 0 initialisation of row 0 of a block.
//
// Timing: one register stage. A token presented with in_valid while `en` is
// high leaves on out_* on the next clock edge; while `en` is low the cell
// holds everything (global stall). Arithmetic is W-bit two's complement and
// wraps like the C integer types of the kernel; choose W so the best score
// fits.
//
// The recurrences and the zero initialisation follow the document; the
// token/stall handshake and the one-register pipeline step are this design's
// own choices for turning the unrolled loop into hardware.
module sw_pe
  import sw_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clear,
  input  residue_t            s2,
  input  logic signed [W-1:0] match_sc,
  input  logic signed [W-1:0] mismatch_sc,
  input  logic signed [W-1:0] goe,
  input  logic signed [W-1:0] ge,
  input  logic                in_valid,
  input  residue_t            in_s1,
  input  logic signed [W-1:0] in_h,
  input  logic signed [W-1:0] in_e,
  output logic                out_valid,
  output residue_t            out_s1,
  output logic signed [W-1:0] out_h,
  output logic signed [W-1:0] out_e,
  output logic signed [W-1:0] max_h
);

  logic signed [W-1:0] h_up, f_up, h_diag;
  logic signed [W-1:0] e_new, f_new, d_new, h_new;
  logic signed [W-1:0] e_open, e_ext, f_open, f_ext;

  always_comb begin
    e_open = in_h - goe;
    e_ext  = in_e - ge;
    e_new  = (e_open > e_ext) ? e_open : e_ext;
    f_open = h_up - goe;
    f_ext  = f_up - ge;
    f_new  = (f_open > f_ext) ? f_open : f_ext;
    d_new  = h_diag + (res_match(in_s1, s2) ? match_sc : mismatch_sc);
    h_new  = '0;
    if (d_new > h_new) h_new = d_new;
    if (e_new > h_new) h_new = e_new;
    if (f_new > h_new) h_new = f_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_s1    <= RES_DUMMY;
      out_h     <= '0;
      out_e     <= '0;
      h_up      <= '0;
      f_up      <= '0;
      h_diag    <= '0;
      max_h     <= '0;
    end else if (clear) begin
      out_valid <= 1'b0;
      h_up      <= '0;
      f_up      <= '0;
      h_diag    <= '0;
      max_h     <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_s1 <= in_s1;
        out_h  <= h_new;
        out_e  <= e_new;
        h_up   <= h_new;
        f_up   <= f_new;
        h_diag <= in_h;
        if (h_new > max_h) max_h <= h_new;
      end
    end
  end

endmodule
