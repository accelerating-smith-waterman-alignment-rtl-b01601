// tb_sw_kernel_char768: the char_bw768 configuration of the evaluation (8-bit scores,
// BW = 768 cells). Several alignments of up to 90 x 1700 residues, small enough
// that every score fits in 8 bits, run block by block under clean and
// back-pressured memory and are checked against a direct evaluation (see
// tb_sw_host).
module tb_sw_kernel_char768;
  import sw_pkg::*;

  localparam int unsigned BW = 768;
  localparam int unsigned W  = 8;
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

  sw_kernel #(.BW(BW), .W(W), .ADDR_W(AW)) dut (.*);

  assign stall = !dut.arr_en;

  tb_sw_host #(.BW(BW), .W(W), .ADDR_W(AW), .NTESTS(4), .MAX_M(90), .MAX_N(1700)) host (.*);

  // watchdog: give up after a fixed number of clocks
  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", host.checks, host.failures + 1);
    $finish;
  end

endmodule
