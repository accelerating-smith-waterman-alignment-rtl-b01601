// sw_kernel: one invocation of the Smith-Waterman block kernel (top level).
//
// The alignment matrix of S1 (m rows) and S2 (n columns, padded to a multiple
// of BW) is cut into vertical blocks BW columns wide. The host starts this
// kernel once per block b. The kernel
//   1. loads the block's BW residues S2[b*BW .. b*BW+BW-1] into the cell array,
//   2. streams, for every row i = 0..m-1, the residue S1[i] and the H and E of
//      row i in the last column of the previous block (prev_h/prev_e buffers)
//      into the array, one row per clock,
//   3. writes the H and E of row i in the last column of this block to the
//      cur_h/cur_e buffers, for the next block,
//   4. folds the cells' maxima into the block's best score and, if it beats
//      the value held at max_base, writes it there.
// The host swaps prev/cur buffers between blocks; for block 0 it fills the
// prev buffers with zeros (the j = 0 boundary). After the last block the word
// at max_base is the optimal local alignment score.
//
// Interfaces. Kernel arguments are sampled on the `start` pulse (while not
// busy); `done` pulses when every store has been accepted by memory. Global
// memory is reached through separate ports, one per array, as independent
// load/store units: residue read ports [RD_S1], [RD_S2] (8-bit elements),
// score read ports [RS_PREV_H], [RS_PREV_E], [RS_MAX] and score write ports
// [WS_CUR_H], [WS_CUR_E], [WS_MAX] (W-bit elements). Addresses count
// elements. Read responses come back in request order and cannot be stalled;
// writes are posted. Residues use the codes of sw_pkg (0..3 bases, 4 and up
// padding that never matches).
//
// Timing: with memory answering at full rate, a block takes about
// BW (S2 load) + m (rows) + BW (array drain) + a few cycles, i.e. BW cell
// updates per clock while rows stream. If a store cannot take a result, the
// whole array stalls for that clock.
//
// The block decomposition, the per-row traffic, the last-column buffers, the
// private S2 copy and the conditional maxScore update follow the document.
// Port structure, handshakes, prefetching the row streams while S2 loads, and
// the wavefront array are this design's own choices.
module sw_kernel
  import sw_pkg::*;
#(
  parameter int unsigned BW     = 256,
  parameter int unsigned W      = 32,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DEPTH  = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // kernel arguments and launch
  input  logic                        start,
  input  logic [ADDR_W-1:0]           m,
  input  logic [ADDR_W-1:0]           b,
  input  logic signed [W-1:0]         match_sc,
  input  logic signed [W-1:0]         mismatch_sc,
  input  logic signed [W-1:0]         goe,
  input  logic signed [W-1:0]         ge,
  input  logic [ADDR_W-1:0]           s1_base,
  input  logic [ADDR_W-1:0]           s2_base,
  input  logic [ADDR_W-1:0]           prev_h_base,
  input  logic [ADDR_W-1:0]           prev_e_base,
  input  logic [ADDR_W-1:0]           cur_h_base,
  input  logic [ADDR_W-1:0]           cur_e_base,
  input  logic [ADDR_W-1:0]           max_base,
  output logic                        busy,
  output logic                        done,
  // residue read ports: 0 = S1, 1 = S2
  output logic [1:0]                  rr_req_valid,
  output logic [1:0][ADDR_W-1:0]      rr_req_addr,
  input  logic [1:0]                  rr_req_ready,
  input  logic [1:0]                  rr_rsp_valid,
  input  logic [1:0][RES_MEM_W-1:0]   rr_rsp_data,
  // score read ports: 0 = prev H, 1 = prev E, 2 = maxScore
  output logic [2:0]                  sr_req_valid,
  output logic [2:0][ADDR_W-1:0]      sr_req_addr,
  input  logic [2:0]                  sr_req_ready,
  input  logic [2:0]                  sr_rsp_valid,
  input  logic [2:0][W-1:0]           sr_rsp_data,
  // score write ports: 0 = cur H, 1 = cur E, 2 = maxScore
  output logic [2:0]                  sw_wr_valid,
  output logic [2:0][ADDR_W-1:0]      sw_wr_addr,
  output logic [2:0][W-1:0]           sw_wr_data,
  input  logic [2:0]                  sw_wr_ready
);

  localparam int RD_S1 = 0, RD_S2 = 1;
  localparam int RS_PREV_H = 0, RS_PREV_E = 1, RS_MAX = 2;
  localparam int WS_CUR_H = 0, WS_CUR_E = 1, WS_MAX = 2;
  localparam int unsigned IW = $clog2(BW);

  kstate_e state;

  // latched arguments
  logic [ADDR_W-1:0]   m_q, max_base_q;
  logic signed [W-1:0] match_q, mismatch_q, goe_q, ge_q;

  // stream handshakes
  logic [1:0]                rr_out_valid, rr_out_ready, rr_done;
  logic [1:0][RES_MEM_W-1:0] rr_out_data;
  logic [2:0]                sr_out_valid, sr_out_ready;
  logic [2:0][W-1:0]         sr_out_data;
  logic [2:0]                ws_in_valid, ws_in_ready, ws_busy, ws_start;
  logic [2:0][W-1:0]         ws_in_data;
  logic [2:0][ADDR_W-1:0]    ws_base, ws_count;

  logic launch;
  assign launch = start && (state == K_IDLE);

  // ---------------------------------------------------------------- loads
  logic [1:0][ADDR_W-1:0] rr_base, rr_count;
  assign rr_base[RD_S1]  = s1_base;
  assign rr_count[RD_S1] = m;
  assign rr_base[RD_S2]  = s2_base + b * ADDR_W'(BW);
  assign rr_count[RD_S2] = ADDR_W'(BW);

  for (genvar k = 0; k < 2; k++) begin : g_rr
    sw_rd_stream #(.DW(RES_MEM_W), .ADDR_W(ADDR_W), .DEPTH(DEPTH)) u_rd (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (launch),
      .base     (rr_base[k]),
      .count    (rr_count[k]),
      .busy     (),
      .done     (rr_done[k]),
      .req_valid(rr_req_valid[k]),
      .req_addr (rr_req_addr[k]),
      .req_ready(rr_req_ready[k]),
      .rsp_valid(rr_rsp_valid[k]),
      .rsp_data (rr_rsp_data[k]),
      .out_valid(rr_out_valid[k]),
      .out_data (rr_out_data[k]),
      .out_ready(rr_out_ready[k])
    );
  end

  logic [2:0][ADDR_W-1:0] sr_base, sr_count;
  assign sr_base[RS_PREV_H]  = prev_h_base;
  assign sr_count[RS_PREV_H] = m;
  assign sr_base[RS_PREV_E]  = prev_e_base;
  assign sr_count[RS_PREV_E] = m;
  assign sr_base[RS_MAX]     = max_base;
  assign sr_count[RS_MAX]    = ADDR_W'(1);

  for (genvar k = 0; k < 3; k++) begin : g_sr
    sw_rd_stream #(.DW(W), .ADDR_W(ADDR_W), .DEPTH(DEPTH)) u_rd (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (launch),
      .base     (sr_base[k]),
      .count    (sr_count[k]),
      .busy     (),
      .done     (),
      .req_valid(sr_req_valid[k]),
      .req_addr (sr_req_addr[k]),
      .req_ready(sr_req_ready[k]),
      .rsp_valid(sr_rsp_valid[k]),
      .rsp_data (sr_rsp_data[k]),
      .out_valid(sr_out_valid[k]),
      .out_data (sr_out_data[k]),
      .out_ready(sr_out_ready[k])
    );
  end

  // --------------------------------------------------------------- stores
  assign ws_base[WS_CUR_H]  = cur_h_base;
  assign ws_count[WS_CUR_H] = m;
  assign ws_base[WS_CUR_E]  = cur_e_base;
  assign ws_count[WS_CUR_E] = m;
  assign ws_base[WS_MAX]    = max_base_q;
  assign ws_count[WS_MAX]   = ADDR_W'(1);

  for (genvar k = 0; k < 3; k++) begin : g_ws
    sw_wr_stream #(.DW(W), .ADDR_W(ADDR_W)) u_wr (
      .clk     (clk),
      .rst_n   (rst_n),
      .start   (ws_start[k]),
      .base    (ws_base[k]),
      .count   (ws_count[k]),
      .busy    (ws_busy[k]),
      .done    (),
      .in_valid(ws_in_valid[k]),
      .in_data (ws_in_data[k]),
      .in_ready(ws_in_ready[k]),
      .wr_valid(sw_wr_valid[k]),
      .wr_addr (sw_wr_addr[k]),
      .wr_data (sw_wr_data[k]),
      .wr_ready(sw_wr_ready[k])
    );
  end

  // ----------------------------------------------------------- cell array
  logic                arr_en, arr_clear, arr_in_valid, arr_out_valid;
  logic                s2_we;
  logic [IW-1:0]       s2_idx;
  residue_t            s2_res, s1_res;
  logic signed [W-1:0] arr_out_h, arr_out_e, block_max;
  logic [ADDR_W-1:0]   rows_in, rows_out;
  logic                row_ready, out_accept;

  function automatic residue_t to_residue(logic [RES_MEM_W-1:0] d);
    return (d < RES_MEM_W'(RES_DUMMY)) ? residue_t'(d) : RES_DUMMY;
  endfunction

  assign s2_we  = (state == K_LOAD_S2) && rr_out_valid[RD_S2];
  assign s2_res = to_residue(rr_out_data[RD_S2]);
  assign s1_res = to_residue(rr_out_data[RD_S1]);
  assign rr_out_ready[RD_S2] = (state == K_LOAD_S2);

  // The array advances unless its last cell holds a result the two column
  // stores cannot both take this cycle.
  assign out_accept = ws_in_ready[WS_CUR_H] && ws_in_ready[WS_CUR_E];
  assign arr_en     = !arr_out_valid || out_accept;

  assign row_ready    = rr_out_valid[RD_S1] && sr_out_valid[RS_PREV_H] && sr_out_valid[RS_PREV_E];
  assign arr_in_valid = (state == K_ROWS) && (rows_in != m_q) && row_ready;
  assign rr_out_ready[RD_S1]     = arr_in_valid && arr_en;
  assign sr_out_ready[RS_PREV_H] = arr_in_valid && arr_en;
  assign sr_out_ready[RS_PREV_E] = arr_in_valid && arr_en;
  assign sr_out_ready[RS_MAX]    = (state == K_MAX);

  assign ws_in_valid[WS_CUR_H] = arr_out_valid && ws_in_ready[WS_CUR_E];
  assign ws_in_valid[WS_CUR_E] = arr_out_valid && ws_in_ready[WS_CUR_H];
  assign ws_in_data[WS_CUR_H]  = arr_out_h;
  assign ws_in_data[WS_CUR_E]  = arr_out_e;
  assign ws_in_valid[WS_MAX]   = (state == K_MAX_WR);
  assign ws_in_data[WS_MAX]    = block_max;

  assign ws_start[WS_CUR_H] = launch;
  assign ws_start[WS_CUR_E] = launch;
  assign ws_start[WS_MAX]   = (state == K_MAX) && sr_out_valid[RS_MAX] &&
                              (block_max > signed'(sr_out_data[RS_MAX]));
  assign arr_clear = launch;

  sw_array #(.BW(BW), .W(W)) u_arr (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (arr_en),
    .clear      (arr_clear),
    .match_sc   (match_q),
    .mismatch_sc(mismatch_q),
    .goe        (goe_q),
    .ge         (ge_q),
    .s2_we      (s2_we),
    .s2_idx     (s2_idx),
    .s2_res     (s2_res),
    .in_valid   (arr_in_valid),
    .in_s1      (s1_res),
    .in_h       (signed'(sr_out_data[RS_PREV_H])),
    .in_e       (signed'(sr_out_data[RS_PREV_E])),
    .out_valid  (arr_out_valid),
    .out_h      (arr_out_h),
    .out_e      (arr_out_e),
    .block_max  (block_max)
  );

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= K_IDLE;
      m_q        <= '0;
      max_base_q <= '0;
      match_q    <= '0;
      mismatch_q <= '0;
      goe_q      <= '0;
      ge_q       <= '0;
      s2_idx     <= '0;
      rows_in    <= '0;
      rows_out   <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (arr_in_valid && arr_en) rows_in <= rows_in + 1'b1;
      if (arr_out_valid && out_accept) rows_out <= rows_out + 1'b1;
      unique case (state)
        K_IDLE: if (start) begin
          m_q        <= m;
          max_base_q <= max_base;
          match_q    <= match_sc;
          mismatch_q <= mismatch_sc;
          goe_q      <= goe;
          ge_q       <= ge;
          s2_idx     <= '0;
          rows_in    <= '0;
          rows_out   <= '0;
          state      <= K_LOAD_S2;
        end
        K_LOAD_S2: begin
          if (s2_we) s2_idx <= s2_idx + 1'b1;
          if (rr_done[RD_S2]) state <= K_ROWS;
        end
        K_ROWS: if (rows_out == m_q) state <= K_MAX;
        K_MAX: if (sr_out_valid[RS_MAX]) state <= ws_start[WS_MAX] ? K_MAX_WR : K_FINISH;
        K_MAX_WR: if (ws_in_ready[WS_MAX]) state <= K_FINISH;
        K_FINISH: if (ws_busy == '0) begin
          done  <= 1'b1;
          state <= K_IDLE;
        end
        default: state <= K_IDLE;
      endcase
    end
  end

  assign busy = (state != K_IDLE);

  a_rows_in_order: assert property (@(posedge clk) disable iff (!rst_n)
                                    rows_out <= rows_in);

endmodule
