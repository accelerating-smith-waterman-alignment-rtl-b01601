// tb_sw_workload_10k: the smallest sequence pair size of the evaluation,
// 10K x 10K residues, through the kernel at its default configuration
// (BW = 256, 32-bit scores): 40 kernel invocations, the last with 240 padding
// columns, with the +1/-3/-5/-2 scoring. The sequences are synthetic (S1
// random, S2 partly a mutated copy of S1); the score is checked against a
// direct evaluation and every block's run time against m + 2*BW + 30 clocks,
// i.e. BW cell updates per clock while rows stream.
module tb_sw_workload_10k;
  import sw_pkg::*;

  localparam int unsigned W  = 32;
  localparam int unsigned AW = 32;

  logic clk, rst_n, start, busy, done;
  logic [AW-1:0] m, b, s1_base, s2_base, prev_h_base, prev_e_base, cur_h_base, cur_e_base, max_base;
  logic signed [W-1:0] match_sc, mismatch_sc, goe, ge;
  logic [1:0] rr_req_valid, rr_req_ready, rr_rsp_valid;
  logic [1:0][AW-1:0] rr_req_addr;
  logic [1:0][RES_MEM_W-1:0] rr_rsp_data;
  logic [2:0] sr_req_valid, sr_req_ready, sr_rsp_valid;
  logic [2:0][AW-1:0] sr_req_addr;
  logic [2:0][W-1:0] sr_rsp_data;
  logic [2:0] sw_wr_valid, sw_wr_ready;
  logic [2:0][AW-1:0] sw_wr_addr;
  logic [2:0][W-1:0] sw_wr_data;
  logic stall;

  sw_kernel dut (.*);

  assign stall = !dut.arr_en;

  tb_sw_host #(.BW(256), .W(W), .ADDR_W(AW), .MAX_M(10000), .MAX_N(10000), .FIXED(1)) host (.*);

  // watchdog: give up after a fixed number of clocks
  initial begin
    repeat (20000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", host.checks, host.failures + 1);
    $finish;
  end

endmodule
