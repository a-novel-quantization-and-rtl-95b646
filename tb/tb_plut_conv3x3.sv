// tb_plut_conv3x3: random codes and a table of level products; checks each
// 3x3 result against a sum of signed products computed from the levels,
// the two-cycle latency, and that a low enable freezes the pipeline.
module tb_plut_conv3x3;
  import plut_pkg::*;
  import plut_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 1, vin = 0;
  lut_entry_t lut [LUT_N];
  code_t w [KK], a [KK];
  acc_t  sum;
  logic  vout;
  int checks = 0, failures = 0;

  plut_conv3x3 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_sum();
    longint s = 0;
    for (int t = 0; t < 9; t++) s += cprod(w[t], a[t]);
    return s;
  endfunction

  initial begin
    longint exp_q [$];
    int k = 0;
    for (int i = 0; i < 8; i++)
      for (int j = i; j < 8; j++) lut[k++] = lut_entry_t'(lprod(i, j));
    for (int t = 0; t < 9; t++) begin w[t] = '0; a[t] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      // check result of inputs applied two cycles earlier
      for (int t = 0; t < 9; t++) begin
        w[t] = code_t'(rand_code(30));
        a[t] = code_t'(rand_code(20));
      end
      if (n == 0) for (int t = 0; t < 9; t++) begin w[t] = 4'b0111; a[t] = 4'b1111; end
      vin = 1;
      exp_q.push_back(ref_sum());
      @(posedge clk);
      #1;
      if (n >= 1) begin
        // after this edge the result of inputs from n-1 is visible
        checks++;
        if (!vout || sum != acc_t'(exp_q[0])) begin
          failures++;
          $display("FAIL n=%0d got %0d exp %0d", n, sum, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
    // stall: hold en low, outputs must not move
    @(negedge clk);
    en = 0;
    begin
      acc_t held;
      held = sum;
      repeat (5) @(negedge clk);
      checks++;
      if (sum != held) begin failures++; $display("FAIL stall"); end
    end
    en = 1;
    @(negedge clk);
    checks++;
    if (sum != acc_t'(exp_q[0])) begin failures++; $display("FAIL after stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
