// tb_sw_max_reduce: checks the maximum tree against a linear scan, for a
// power-of-two and a non-power-of-two input count, with random signed
// values, all-equal values, and the maximum placed at each end.
module tb_sw_max_reduce;
  localparam int W = 16;
  localparam int N1 = 8;
  localparam int N2 = 13;

  logic signed [W-1:0] v1 [N1];
  logic signed [W-1:0] v2 [N2];
  logic signed [W-1:0] m1, m2;
  int checks = 0, failures = 0;

  sw_max_reduce #(.N(N1), .W(W)) dut1 (.vals_i(v1), .max_o(m1));
  sw_max_reduce #(.N(N2), .W(W)) dut2 (.vals_i(v2), .max_o(m2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e1, e2;
    for (int t = 0; t < 400; t++) begin
      e1 = -32768; e2 = -32768;
      for (int k = 0; k < N1; k++) begin
        v1[k] = W'($urandom);
        if (t % 4 == 1) v1[k] = W'(int'($urandom_range(0, 20)) - 10);
        if (t == 2) v1[k] = 16'sd5;
      end
      for (int k = 0; k < N2; k++) begin
        v2[k] = W'($urandom);
        if (t % 4 == 1) v2[k] = -16'sd100;
      end
      if (t % 4 == 2) v2[N2-1] = 16'sd32767;
      if (t % 4 == 3) v2[0] = 16'sd32767;
      for (int k = 0; k < N1; k++) if (v1[k] > e1) e1 = v1[k];
      for (int k = 0; k < N2; k++) if (v2[k] > e2) e2 = v2[k];
      #1;
      checks += 2;
      if (m1 != e1) begin failures++; $display("FAIL N1 got %0d exp %0d", m1, e1); end
      if (m2 != e2) begin failures++; $display("FAIL N2 got %0d exp %0d", m2, e2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
