// sw_rd_stream: global-memory load unit. Reads `count` consecutive elements
// starting at element address `base` and delivers them, in order, as a
// valid/ready stream.
//
// Memory side: a request channel (req_valid/req_addr, accepted when
// req_ready) and an in-order response channel (rsp_valid/rsp_data) that
// cannot be stalled. To never lose a response, the unit only issues a request
// while (requests in flight + words buffered) < DEPTH, and responses land in
// a DEPTH-entry FIFO that feeds out_valid/out_data. Any memory latency is
// tolerated; full throughput (one word per clock) needs DEPTH above the
// round-trip latency.
//
// A `start` pulse (while idle) latches base and count; `done` is high for one
// cycle when the last word has been taken from the stream, and `busy` is high
// from start until then. A count of zero finishes at once.
//
// The document only says the kernel reads these arrays from global memory;
// the request/response handshake and the credit scheme are this design's.
module sw_rd_stream #(
  parameter int unsigned DW     = 32,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DEPTH  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [ADDR_W-1:0] count,
  output logic              busy,
  output logic              done,
  // memory read port
  output logic              req_valid,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              req_ready,
  input  logic              rsp_valid,
  input  logic [DW-1:0]     rsp_data,
  // stream out
  output logic              out_valid,
  output logic [DW-1:0]     out_data,
  input  logic              out_ready
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [ADDR_W-1:0] to_issue, to_deliver;
  logic [CW-1:0]     inflight, fifo_cnt;
  logic              fifo_empty;
  logic              issue, deliver;
  logic [ADDR_W-1:0] base_q, issued;

  assign req_addr  = base_q + issued;
  assign req_valid = busy && (to_issue != 0) && ((inflight + fifo_cnt) < CW'(DEPTH));
  assign issue     = req_valid && req_ready;
  assign out_valid = !fifo_empty;
  assign deliver   = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      base_q     <= '0;
      issued     <= '0;
      to_issue   <= '0;
      to_deliver <= '0;
      inflight   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          base_q     <= base;
          issued     <= '0;
          to_issue   <= count;
          to_deliver <= count;
          inflight   <= '0;
          if (count == 0) done <= 1'b1;
          else            busy <= 1'b1;
        end
      end else begin
        if (issue) begin
          issued   <= issued + 1'b1;
          to_issue <= to_issue - 1'b1;
        end
        inflight <= inflight + CW'(issue) - CW'(rsp_valid);
        if (deliver) begin
          to_deliver <= to_deliver - 1'b1;
          if (to_deliver == 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  sw_fifo #(.DW(DW), .DEPTH(DEPTH)) u_fifo (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (start && !busy),
    .push (rsp_valid),
    .wdata(rsp_data),
    .pop  (deliver),
    .rdata(out_data),
    .empty(fifo_empty),
    .full (),
    .count(fifo_cnt)
  );

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   rsp_valid |-> (inflight != 0));

endmodule
