// tb_sw_pe: self-checking test of one Smith-Waterman cell.
//
// Feeds one column's worth of row tokens (random residues, random left H/E
// values) through a single cell and compares H, E and the running maximum
// with a model of the recurrences computed here, including the diagonal
// term taken from the previous token, the zero start after `clear`, the
// padding residue that never matches, and a stall cycle (en low) between
// tokens that must change nothing.
module tb_sw_pe;
  import sw_pkg::*;

  localparam int W = 32;

  logic clk = 1'b0;
  logic rst_n;
  logic en, clear, in_valid, out_valid;
  residue_t s2, in_s1, out_s1;
  logic signed [W-1:0] in_h, in_e, out_h, out_e, max_h;
  logic signed [W-1:0] match_sc, mismatch_sc, goe, ge;

  int checks = 0, failures = 0;

  sw_pe #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int r_hup, r_fup, r_diag, r_max;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

  initial begin
    int eh, ee, ef, ed, ehh, sc;
    rst_n = 1'b0; en = 1'b1; clear = 1'b0; in_valid = 1'b0;
    in_s1 = RES_A; in_h = 0; in_e = 0; s2 = RES_A;
    match_sc = 1; mismatch_sc = -3; goe = 7; ge = 2;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 6; blk++) begin
      @(negedge clk);
      clear = 1'b1;
      s2 = residue_t'(blk == 5 ? RES_DUMMY : $urandom_range(0, 3));
      if (blk == 3) begin match_sc = 2; mismatch_sc = -1; goe = 3; ge = 1; end
      @(negedge clk);
      clear = 1'b0;
      r_hup = 0; r_fup = 0; r_diag = 0; r_max = 0;
      for (int i = 0; i < 200; i++) begin
        in_valid = 1'b1;
        in_s1 = residue_t'($urandom_range(0, 4));
        if (blk == 5) in_s1 = RES_DUMMY;
        in_h  = $urandom_range(0, 40);
        in_e  = int'($urandom_range(0, 40)) - 20;
        // model
        ee  = imax(in_h - goe, in_e - ge);
        ef  = imax(r_hup - goe, r_fup - ge);
        sc  = ((in_s1 == s2) && (s2 != RES_DUMMY)) ? match_sc : mismatch_sc;
        ed  = r_diag + sc;
        ehh = imax(imax(0, ed), imax(ee, ef));
        @(posedge clk);
        #1;
        check("valid", out_valid, 1);
        check("H", out_h, ehh);
        check("E", out_e, ee);
        r_max = imax(r_max, ehh);
        check("max", max_h, r_max);
        check("s1", out_s1, in_s1);
        r_hup = ehh; r_fup = ef; r_diag = in_h;
        // a stall: inputs change, cell must hold
        if (i % 7 == 3) begin
          @(negedge clk);
          en = 1'b0; in_h = 999; in_e = 999;
          @(posedge clk); #1;
          check("stall H", out_h, ehh);
          check("stall max", max_h, r_max);
          en = 1'b1;
        end
        // a bubble: no token, nothing may change but out_valid
        if (i % 11 == 5) begin
          @(negedge clk);
          in_valid = 1'b0; in_h = 555;
          @(posedge clk); #1;
          check("bubble valid", out_valid, 0);
          check("bubble max", max_h, r_max);
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
