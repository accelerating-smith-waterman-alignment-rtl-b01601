// tb_sw_rd_stream: self-checking test of the global-memory load unit.
//
// A memory model answers each accepted request after a fixed latency, in
// order, with a word derived from its address (data = addr * 7 + 3). The
// test reads runs of random length from random bases with random
// back-pressure on both the request channel and the output stream, and
// checks every delivered word, the word count, the done pulse, and that the
// unit never has more responses in flight than it can buffer. A run with no
// back-pressure must deliver one word per clock after the memory latency.
module tb_sw_rd_stream;
  localparam int DW = 32, AW = 32, DEPTH = 8, LAT = 4;

  logic clk = 1'b0;
  logic rst_n, start, busy, done;
  logic [AW-1:0] base, count;
  logic req_valid, req_ready, rsp_valid, out_valid, out_ready;
  logic [AW-1:0] req_addr;
  logic [DW-1:0] rsp_data, out_data;

  sw_rd_stream #(.DW(DW), .ADDR_W(AW), .DEPTH(DEPTH)) dut (.*);

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

  // memory: LAT-stage response pipeline
  logic          pv [LAT];
  logic [DW-1:0] pd [LAT];
  bit            mem_random;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LAT; k++) begin pv[k] <= 1'b0; pd[k] <= '0; end
    end else begin
      pv[0] <= req_valid && req_ready;
      pd[0] <= req_addr * 7 + 3;
      for (int k = 1; k < LAT; k++) begin pv[k] <= pv[k-1]; pd[k] <= pd[k-1]; end
    end
  end
  assign rsp_valid = pv[LAT-1];
  assign rsp_data  = pd[LAT-1];

  always @(negedge clk) begin
    req_ready <= mem_random ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  int got;
  bit done_seen;
  logic [AW-1:0] cur_base;
  bit out_random;

  always @(negedge clk) out_ready <= out_random ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_data != (cur_base + got) * 7 + 3) begin
        failures++;
        $display("FAIL word %0d: %0h", got, out_data);
      end
      got++;
    end
    if (rst_n && done) done_seen = 1;
  end

  initial begin
    int n, t0;
    rst_n = 0; start = 0; base = 0; count = 0; mem_random = 0; out_random = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 30; run++) begin
      mem_random = (run % 3 != 0);
      out_random = (run % 2 == 1);
      n = (run == 5) ? 0 : $urandom_range(1, 100);
      @(negedge clk);
      cur_base = $urandom_range(0, 100000);
      base = cur_base; count = n; start = 1; got = 0; done_seen = 0;
      t0 = cycle;
      @(negedge clk) start = 0;
      while (!done_seen) @(negedge clk);
      checks += 2;
      if (got != n) begin failures++; $display("FAIL run %0d got %0d of %0d", run, got, n); end
      if (busy) begin failures++; $display("FAIL busy after done"); end
      if (run % 6 == 0 && n > 0) begin
        checks++;
        if (cycle - t0 > n + LAT + 4) begin
          failures++;
          $display("FAIL rate: %0d words took %0d cycles", n, cycle - t0);
        end
      end
      repeat (LAT + 2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
