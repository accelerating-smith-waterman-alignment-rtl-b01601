// sw_wr_stream: global-memory store unit. Takes a valid/ready stream and
// writes its first `count` elements to consecutive element addresses from
// `base`.
//
// Memory side: a write channel (wr_valid/wr_addr/wr_data, accepted when
// wr_ready). Writes are posted: a write counts as done when the memory has
// accepted it. The unit holds one write in an output register, so in_ready
// does not depend combinationally on wr_ready from a full register only;
// it sustains one write per clock while the memory accepts.
//
// A `start` pulse (while idle) latches base and count; `done` is high for one
// cycle once the memory has accepted the last write, `busy` from start until
// then. A count of zero finishes at once.
//
// The document only says the kernel writes these arrays to global memory;
// the handshake is this design's own.
module sw_wr_stream #(
  parameter int unsigned DW     = 32,
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [ADDR_W-1:0] count,
  output logic              busy,
  output logic              done,
  // stream in
  input  logic              in_valid,
  input  logic [DW-1:0]     in_data,
  output logic              in_ready,
  // memory write port
  output logic              wr_valid,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DW-1:0]     wr_data,
  input  logic              wr_ready
);

  logic [ADDR_W-1:0] next_addr, to_take, to_write;
  logic              take, wr_fire;

  assign wr_fire  = wr_valid && wr_ready;
  assign in_ready = busy && (to_take != 0) && (!wr_valid || wr_ready);
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      next_addr <= '0;
      to_take   <= '0;
      to_write  <= '0;
      wr_valid  <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          next_addr <= base;
          to_take   <= count;
          to_write  <= count;
          if (count == 0) done <= 1'b1;
          else            busy <= 1'b1;
        end
      end else begin
        if (wr_fire) begin
          wr_valid <= 1'b0;
          to_write <= to_write - 1'b1;
          if (to_write == 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
        if (take) begin
          wr_valid  <= 1'b1;
          wr_addr   <= next_addr;
          wr_data   <= in_data;
          next_addr <= next_addr + 1'b1;
          to_take   <= to_take - 1'b1;
        end
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr) && $stable(wr_data));

endmodule
