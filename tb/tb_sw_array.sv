// tb_sw_array: self-checking test of the BW-cell block array.
//
// For several blocks it loads random S2 residues (some padding), then
// streams M row tokens carrying random S1 residues and a random "previous
// block" last column (H >= 0, E any value). Row tokens are sometimes held
// back (bubbles) and the array is sometimes frozen (en low). The last-column
// H/E that come out, in order, and the block maximum are compared with a
// direct evaluation of the recurrences over the M x BW block. In the first
// block, with no bubbles or stalls, the latency of BW clocks per row is
// checked as well.
module tb_sw_array;
  import sw_pkg::*;

  localparam int BW = 8;
  localparam int W  = 16;
  localparam int M  = 60;

  logic clk = 1'b0;
  logic rst_n, en, clear, s2_we, in_valid, out_valid;
  logic [$clog2(BW)-1:0] s2_idx;
  residue_t s2_res, in_s1;
  logic signed [W-1:0] match_sc, mismatch_sc, goe, ge, in_h, in_e, out_h, out_e, block_max;

  sw_array #(.BW(BW), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  residue_t s1v [M];
  residue_t s2v [BW];
  int ph [M], pe [M];
  int H [M+1][BW+1], E [M+1][BW+1], F [M+1][BW+1];
  int exp_max;
  int sent_cycle [M];

  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

  task automatic model();
    for (int j = 0; j <= BW; j++) begin H[0][j] = 0; E[0][j] = 0; F[0][j] = 0; end
    for (int i = 1; i <= M; i++) begin
      H[i][0] = ph[i-1]; E[i][0] = pe[i-1]; F[i][0] = 0;
    end
    exp_max = 0;
    for (int i = 1; i <= M; i++)
      for (int j = 1; j <= BW; j++) begin
        int sc;
        sc = ((s1v[i-1] == s2v[j-1]) && (s1v[i-1] < RES_DUMMY)) ? int'(match_sc) : int'(mismatch_sc);
        E[i][j] = imax(H[i][j-1] - goe, E[i][j-1] - ge);
        F[i][j] = imax(H[i-1][j] - goe, F[i-1][j] - ge);
        H[i][j] = imax(imax(0, H[i-1][j-1] + sc), imax(E[i][j], F[i][j]));
        exp_max = imax(exp_max, H[i][j]);
      end
  endtask

  int got_rows;
  bit quiet;

  // output checker
  always @(posedge clk) begin
    if (rst_n && en && out_valid && got_rows < M) begin
      checks += 2;
      if (out_h != H[got_rows+1][BW] || out_e != E[got_rows+1][BW]) begin
        failures++;
        $display("FAIL row %0d: H %0d/%0d E %0d/%0d", got_rows, out_h, H[got_rows+1][BW],
                 out_e, E[got_rows+1][BW]);
      end
      if (quiet) begin
        checks++;
        if (cycle - sent_cycle[got_rows] != BW) begin
          failures++;
          $display("FAIL latency row %0d: %0d", got_rows, cycle - sent_cycle[got_rows]);
        end
      end
      got_rows++;
    end
  end

  initial begin
    rst_n = 0; en = 1; clear = 0; s2_we = 0; s2_idx = '0; s2_res = RES_A;
    in_valid = 0; in_s1 = RES_A; in_h = 0; in_e = 0;
    match_sc = 1; mismatch_sc = -3; goe = 7; ge = 2;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int blk = 0; blk < 4; blk++) begin
      quiet = (blk == 0);
      if (blk == 2) begin match_sc = 2; mismatch_sc = -2; goe = 4; ge = 1; end
      for (int j = 0; j < BW; j++) s2v[j] = residue_t'($urandom_range(0, 3));
      if (blk == 1) s2v[BW-1] = RES_DUMMY;
      for (int i = 0; i < M; i++) begin
        s1v[i] = residue_t'($urandom_range(0, 3));
        ph[i] = (blk == 0) ? 0 : $urandom_range(0, 12);
        pe[i] = (blk == 0) ? 0 : int'($urandom_range(0, 12)) - 9;
      end
      // related sequences give long runs of matches
      if (blk == 3) for (int i = 0; i < BW; i++) s1v[i+10] = s2v[i];
      model();
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int j = 0; j < BW; j++) begin
        s2_we = 1; s2_idx = j[$clog2(BW)-1:0]; s2_res = s2v[j];
        @(negedge clk);
      end
      s2_we = 0;
      got_rows = 0;
      for (int i = 0; i < M; i++) begin
        if (!quiet) begin
          while ($urandom_range(0, 3) == 0) begin
            in_valid = 0;
            en = ($urandom_range(0, 2) != 0);
            @(negedge clk);
          end
        end
        in_valid = 1; in_s1 = s1v[i]; in_h = W'(ph[i]); in_e = W'(pe[i]);
        en = quiet ? 1'b1 : ($urandom_range(0, 3) != 0);
        while (!en) begin
          @(negedge clk);
          en = ($urandom_range(0, 3) != 0);
        end
        sent_cycle[i] = cycle + 1;
        @(negedge clk);
      end
      in_valid = 0; en = 1;
      while (got_rows < M) @(negedge clk);
      checks++;
      if (block_max != exp_max) begin
        failures++;
        $display("FAIL block %0d max %0d expected %0d", blk, block_max, exp_max);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
