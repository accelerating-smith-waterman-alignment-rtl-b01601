// tb_sw_host: host program, global memory and checker for the block kernel.
//
// This module plays the parts that are not FPGA logic: the host CPU that
// cuts the alignment into vertical blocks and starts the kernel once per
// block, and the board's global memory. It connects to every port of a
// sw_kernel instance that the enclosing testbench creates.
//
// Host: for each test alignment it generates S1 (m residues) and S2 (n
// residues, partly a mutated copy of S1 so that real alignments exist), pads
// S2 with the padding code to a multiple of BW, zeroes the two last-column
// buffers and the best-score word, then runs NB = ceil(n / BW) kernel
// invocations, swapping the "previous" and "current" last-column buffers
// after each. At the end it compares the best score with a plain
// row-by-row Smith-Waterman evaluation done here, and after every block but
// the last also compares the last-column H and E written by the kernel.
//
// Memory: one model per kernel port. Read ports answer accepted requests,
// in order, after LAT clocks. In "random" mode every port's ready is
// withdrawn at random, which makes the kernel's loads run dry (row bubbles)
// and its stores back up (array stalls). In "clean" mode the memory never
// pushes back and the run time of each block is checked against
// m + 2*BW + a small constant (BW cells per clock while rows stream).
//
// Mechanisms counted (each must occur at least once): multi-block
// alignments with last-column hand-off and buffer swap, padded S2 columns,
// best-score updates and best-score keeps, array stalls, load back-pressure.
// The enclosing testbench supplies the watchdog.
module tb_sw_host
  import sw_pkg::*;
#(
  parameter int unsigned BW     = 16,
  parameter int unsigned W      = 32,
  parameter int unsigned ADDR_W = 32,
  parameter int          NTESTS = 6,
  parameter int          MAX_M  = 300,
  parameter int          MAX_N  = 300,
  parameter int          FIXED  = 0       // 1: run exactly one MAX_M x MAX_N alignment
) (
  output logic                        clk,
  output logic                        rst_n,
  output logic                        start,
  output logic [ADDR_W-1:0]           m,
  output logic [ADDR_W-1:0]           b,
  output logic signed [W-1:0]         match_sc,
  output logic signed [W-1:0]         mismatch_sc,
  output logic signed [W-1:0]         goe,
  output logic signed [W-1:0]         ge,
  output logic [ADDR_W-1:0]           s1_base,
  output logic [ADDR_W-1:0]           s2_base,
  output logic [ADDR_W-1:0]           prev_h_base,
  output logic [ADDR_W-1:0]           prev_e_base,
  output logic [ADDR_W-1:0]           cur_h_base,
  output logic [ADDR_W-1:0]           cur_e_base,
  output logic [ADDR_W-1:0]           max_base,
  input  logic                        busy,
  input  logic                        done,
  input  logic [1:0]                  rr_req_valid,
  input  logic [1:0][ADDR_W-1:0]      rr_req_addr,
  output logic [1:0]                  rr_req_ready,
  output logic [1:0]                  rr_rsp_valid,
  output logic [1:0][RES_MEM_W-1:0]   rr_rsp_data,
  input  logic [2:0]                  sr_req_valid,
  input  logic [2:0][ADDR_W-1:0]      sr_req_addr,
  output logic [2:0]                  sr_req_ready,
  output logic [2:0]                  sr_rsp_valid,
  output logic [2:0][W-1:0]           sr_rsp_data,
  input  logic [2:0]                  sw_wr_valid,
  input  logic [2:0][ADDR_W-1:0]      sw_wr_addr,
  input  logic [2:0][W-1:0]           sw_wr_data,
  output logic [2:0]                  sw_wr_ready,
  input  logic                        stall     // the kernel's cell array is frozen this cycle
);

  localparam int LAT = 3;
  // memory map (element addresses)
  localparam int NPAD   = ((MAX_N + BW - 1) / BW) * BW;
  localparam int S1_AT  = 0;
  localparam int S2_AT  = MAX_M + 16;
  localparam int RMEM   = S2_AT + NPAD + 16;
  localparam int HA_AT  = 0;
  localparam int EA_AT  = MAX_M + 8;
  localparam int HB_AT  = 2 * (MAX_M + 8);
  localparam int EB_AT  = 3 * (MAX_M + 8);
  localparam int MX_AT  = 4 * (MAX_M + 8);
  localparam int SMEM   = MX_AT + 8;

  logic [RES_MEM_W-1:0] rmem [RMEM];
  logic signed [W-1:0]  smem [SMEM];

  int checks = 0, failures = 0;
  int cycle = 0;
  bit rnd_mem = 0;

  // mechanism counters
  int n_multiblock = 0, n_swaps = 0, n_padded = 0, n_upd = 0, n_keep = 0;
  int n_stall = 0, n_rd_backpressure = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // ------------------------------------------------------------ memory
  logic [1:0]                pv_r [LAT];
  logic [1:0][RES_MEM_W-1:0] pd_r [LAT];
  logic [2:0]                pv_s [LAT];
  logic [2:0][W-1:0]         pd_s [LAT];

  always @(posedge clk) begin
    for (int k = LAT - 1; k > 0; k--) begin
      pv_r[k] <= pv_r[k-1]; pd_r[k] <= pd_r[k-1];
      pv_s[k] <= pv_s[k-1]; pd_s[k] <= pd_s[k-1];
    end
    for (int p = 0; p < 2; p++) begin
      pv_r[0][p] <= rst_n && rr_req_valid[p] && rr_req_ready[p];
      pd_r[0][p] <= (rr_req_addr[p] < RMEM) ? rmem[rr_req_addr[p]] : 8'hEE;
      if (rst_n && rr_req_valid[p] && !rr_req_ready[p]) n_rd_backpressure++;
    end
    for (int p = 0; p < 3; p++) begin
      pv_s[0][p] <= rst_n && sr_req_valid[p] && sr_req_ready[p];
      pd_s[0][p] <= (sr_req_addr[p] < SMEM) ? smem[sr_req_addr[p]] : W'(32'hDEAD);
      if (rst_n && sw_wr_valid[p] && sw_wr_ready[p]) begin
        if (sw_wr_addr[p] < SMEM) smem[sw_wr_addr[p]] <= sw_wr_data[p];
        else begin failures++; $display("FAIL write outside memory: %0d", sw_wr_addr[p]); end
      end
    end
    if (rst_n && stall) n_stall++;
  end
  assign rr_rsp_valid = pv_r[LAT-1];
  assign rr_rsp_data  = pd_r[LAT-1];
  assign sr_rsp_valid = pv_s[LAT-1];
  assign sr_rsp_data  = pd_s[LAT-1];

  always @(negedge clk) begin
    for (int p = 0; p < 2; p++) rr_req_ready[p] <= rnd_mem ? ($urandom_range(0, 3) != 0) : 1'b1;
    for (int p = 0; p < 3; p++) sr_req_ready[p] <= rnd_mem ? ($urandom_range(0, 3) != 0) : 1'b1;
    for (int p = 0; p < 3; p++) sw_wr_ready[p]  <= rnd_mem ? ($urandom_range(0, 4) != 0) : 1'b1;
  end

  // --------------------------------------------------------- reference
  function automatic int imax(int x, int y);
    return (x > y) ? x : y;
  endfunction

  int ref_h_col [];   // H at the last column of each block, [blk * MAX_M + i]
  int ref_e_col [];

  function automatic int sw_ref(int mm, int nn, int ma, int mi, int go, int gx);
    int hrow [], frow [];
    int best, hdiag, hleft, eleft, e, f, h, sc, hup_old;
    hrow = new[nn + 1];
    frow = new[nn + 1];
    for (int j = 0; j <= nn; j++) begin hrow[j] = 0; frow[j] = 0; end
    best = 0;
    for (int i = 1; i <= mm; i++) begin
      hdiag = 0; hleft = 0; eleft = 0;
      for (int j = 1; j <= nn; j++) begin
        sc = (rmem[S1_AT + i - 1] == rmem[S2_AT + j - 1]) ? ma : mi;
        e = imax(hleft - go, eleft - gx);
        f = imax(hrow[j] - go, frow[j] - gx);
        h = imax(imax(0, hdiag + sc), imax(e, f));
        hdiag = hrow[j];
        hrow[j] = h; frow[j] = f;
        hleft = h; eleft = e;
        best = imax(best, h);
        if (j % BW == 0) begin
          ref_h_col[(j / BW - 1) * MAX_M + i - 1] = h;
          ref_e_col[(j / BW - 1) * MAX_M + i - 1] = e;
        end
      end
    end
    return best;
  endfunction

  // -------------------------------------------------------------- host
  task automatic run_alignment(int mm, int nn, int ma, int mi, int go, int gx, bit clean);
    int nb, exp_best, t0, hcur, ecur, hprev, eprev, tmp, prev_best;
    nb = (nn + BW - 1) / BW;
    rnd_mem = !clean;
    // sequences: S1 random, S2 a mutated copy of part of S1 plus random
    for (int i = 0; i < mm; i++) rmem[S1_AT + i] = RES_MEM_W'($urandom_range(0, 3));
    for (int j = 0; j < nn; j++) begin
      if (j >= nn / 4 && j < nn / 4 + mm / 2 && $urandom_range(0, 9) != 0)
        rmem[S2_AT + j] = rmem[S1_AT + (j - nn / 4 + mm / 5) % mm];
      else
        rmem[S2_AT + j] = RES_MEM_W'($urandom_range(0, 3));
    end
    for (int j = nn; j < nb * BW; j++) rmem[S2_AT + j] = RES_MEM_W'(RES_DUMMY);
    for (int k = 0; k < SMEM; k++) smem[k] = '0;
    exp_best = sw_ref(mm, nn, ma, mi, go, gx);
    if (nb > 1) n_multiblock++;
    if (nn % BW != 0) n_padded++;
    hprev = HA_AT; eprev = EA_AT; hcur = HB_AT; ecur = EB_AT;
    for (int blk = 0; blk < nb; blk++) begin
      prev_best = smem[MX_AT];
      @(negedge clk);
      m = mm; b = blk;
      match_sc = ma; mismatch_sc = mi; goe = go; ge = gx;
      s1_base = S1_AT; s2_base = S2_AT;
      prev_h_base = hprev; prev_e_base = eprev;
      cur_h_base = hcur; cur_e_base = ecur; max_base = MX_AT;
      start = 1'b1;
      t0 = cycle;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      if (clean) begin
        checks++;
        if (cycle - t0 > mm + 2 * BW + 30) begin
          failures++;
          $display("FAIL block %0d took %0d cycles for %0d rows", blk, cycle - t0, mm);
        end
      end
      if (smem[MX_AT] > prev_best) n_upd++; else n_keep++;
      if (blk < nb - 1 || nn % BW == 0) begin
        for (int i = 0; i < mm; i++) begin
          checks++;
          if (smem[hcur + i] != ref_h_col[blk * MAX_M + i] ||
              smem[ecur + i] != ref_e_col[blk * MAX_M + i]) begin
            failures++;
            if (failures < 10)
              $display("FAIL block %0d row %0d: H %0d/%0d E %0d/%0d", blk, i,
                       smem[hcur + i], ref_h_col[blk * MAX_M + i],
                       smem[ecur + i], ref_e_col[blk * MAX_M + i]);
          end
        end
      end
      // swap last-column buffers, as the host does between invocations
      tmp = hprev; hprev = hcur; hcur = tmp;
      tmp = eprev; eprev = ecur; ecur = tmp;
      if (blk < nb - 1) n_swaps++;
    end
    checks++;
    if (smem[MX_AT] != exp_best) begin
      failures++;
      $display("FAIL %0dx%0d: score %0d expected %0d", mm, nn, smem[MX_AT], exp_best);
    end else begin
      $display("alignment %0d x %0d (%0d blocks of %0d): score %0d", mm, nn, nb, BW, exp_best);
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    ref_h_col = new[MAX_M * ((MAX_N + BW - 1) / BW)];
    ref_e_col = new[MAX_M * ((MAX_N + BW - 1) / BW)];
    rst_n = 1'b0; start = 1'b0; m = '0; b = '0;
    match_sc = 1; mismatch_sc = -3; goe = 7; ge = 2;
    s1_base = '0; s2_base = '0; prev_h_base = '0; prev_e_base = '0;
    cur_h_base = '0; cur_e_base = '0; max_base = '0;
    for (int k = 0; k < LAT; k++) begin pv_r[k] = '0; pv_s[k] = '0; pd_r[k] = '0; pd_s[k] = '0; end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    if (FIXED != 0) begin
      // the document's scoring: +1 match, -3 mismatch, gap open 5 + extension 2
      run_alignment(MAX_M, MAX_N, 1, -3, 7, 2, 1'b1);
    end else begin
      run_alignment(MAX_M, MAX_N, 1, -3, 7, 2, 1'b1);
      for (int t = 1; t < NTESTS; t++) begin
        int mm, nn;
        mm = $urandom_range(MAX_M / 4, MAX_M);
        nn = $urandom_range(BW / 2, MAX_N);
        if (t == 1) nn = 2 * BW + 3;
        if (t % 2 == 0) run_alignment(mm, nn, 2, -1, 3, 1, 1'b0);
        else            run_alignment(mm, nn, 1, -3, 7, 2, t == 1);
      end
    end
    $display("mechanisms:");
    if (FIXED == 0) begin
      expect_seen("multi-block alignments", n_multiblock);
      expect_seen("last-column buffer swaps", n_swaps);
      expect_seen("padded S2 blocks", n_padded);
      expect_seen("best-score updates", n_upd);
      expect_seen("best-score kept", n_keep);
      expect_seen("array stall cycles", n_stall);
      expect_seen("load back-pressure cycles", n_rd_backpressure);
    end else begin
      expect_seen("multi-block alignments", n_multiblock);
      expect_seen("last-column buffer swaps", n_swaps);
      expect_seen("best-score updates", n_upd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
