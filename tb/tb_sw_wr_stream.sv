// tb_sw_wr_stream: self-checking test of the global-memory store unit.
//
// Random-length runs of words (data = run * 1000 + index) are offered with
// random gaps while the memory accepts with random back-pressure. Every
// accepted write must carry the next address from the base and the next
// word, exactly `count` writes must happen, and done must follow the last
// accepted write. With no gaps and no back-pressure the unit must store one
// word per clock. Words offered beyond `count` must not be taken.
module tb_sw_wr_stream;
  localparam int DW = 32, AW = 32;

  logic clk = 1'b0;
  logic rst_n, start, busy, done;
  logic [AW-1:0] base, count, wr_addr;
  logic in_valid, in_ready, wr_valid, wr_ready;
  logic [DW-1:0] in_data, wr_data;

  sw_wr_stream #(.DW(DW), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit rnd;
  int run_id, written, offered;
  logic [AW-1:0] cur_base;
  bit done_seen;

  always @(negedge clk) wr_ready <= rnd ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready) begin
      checks++;
      if (wr_addr != cur_base + written || wr_data != run_id * 1000 + written) begin
        failures++;
        $display("FAIL write %0d: addr %0d data %0d", written, wr_addr, wr_data);
      end
      written++;
    end
    if (rst_n && done) done_seen = 1;
  end

  initial begin
    int n, t0;
    rst_n = 0; start = 0; base = 0; count = 0; in_valid = 0; in_data = 0; rnd = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 30; run++) begin
      rnd = (run % 3 != 0);
      run_id = run;
      n = (run == 4) ? 0 : $urandom_range(1, 80);
      cur_base = $urandom_range(0, 50000);
      base = cur_base; count = n; start = 1; written = 0; offered = 0; done_seen = 0;
      t0 = cycle;
      @(negedge clk) start = 0;
      // offer n + 3 words; the unit must take only n
      while (!done_seen) begin
        in_valid = (offered < n + 3) && (rnd ? ($urandom_range(0, 3) != 0) : 1'b1);
        in_data  = run * 1000 + offered;
        @(posedge clk);
        if (in_valid && in_ready) offered++;
        @(negedge clk);
      end
      in_valid = 0;
      checks += 2;
      if (written != n || offered != n) begin
        failures++;
        $display("FAIL run %0d: wrote %0d took %0d of %0d", run, written, offered, n);
      end
      if (busy) begin failures++; $display("FAIL busy after done"); end
      if (!rnd && n > 0) begin
        checks++;
        if (cycle - t0 > n + 3) begin
          failures++;
          $display("FAIL rate: %0d words took %0d cycles", n, cycle - t0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
