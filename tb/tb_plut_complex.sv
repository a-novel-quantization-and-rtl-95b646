// tb_plut_complex: random weight tiles and windows; checks all eight
// output-channel sums against a direct sum over 8 input channels x 9 taps
// of level products, and the three-cycle latency at one window per cycle.
module tb_plut_complex;
  import plut_pkg::*;
  import plut_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 1, vin = 0;
  lut_entry_t lut [LUT_N];
  code_t w [OUT_CH][IN_CH][KK];
  code_t win [IN_CH][KK];
  acc_t  psum [OUT_CH];
  logic  vout;
  int checks = 0, failures = 0;

  plut_complex dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef longint res_t [OUT_CH];

  function automatic res_t ref_res();
    res_t r;
    for (int oc = 0; oc < 8; oc++) begin
      r[oc] = 0;
      for (int ic = 0; ic < 8; ic++)
        for (int t = 0; t < 9; t++) r[oc] += cprod(w[oc][ic][t], win[ic][t]);
    end
    return r;
  endfunction

  initial begin
    res_t exp_q [$];
    int k = 0, first_v = -1;
    for (int i = 0; i < 8; i++)
      for (int j = i; j < 8; j++) lut[k++] = lut_entry_t'(lprod(i, j));
    for (int oc = 0; oc < 8; oc++)
      for (int ic = 0; ic < 8; ic++)
        for (int t = 0; t < 9; t++) w[oc][ic][t] = code_t'(rand_code(30));
    for (int ic = 0; ic < 8; ic++) for (int t = 0; t < 9; t++) win[ic][t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      if (n % 20 == 10)
        for (int oc = 0; oc < 8; oc++)
          for (int ic = 0; ic < 8; ic++)
            for (int t = 0; t < 9; t++) w[oc][ic][t] = code_t'(rand_code(30));
      for (int ic = 0; ic < 8; ic++) for (int t = 0; t < 9; t++) win[ic][t] = code_t'(rand_code(20));
      vin = 1;
      exp_q.push_back(ref_res());
      @(posedge clk);
      #1;
      if (vout && first_v < 0) first_v = n;
      if (n >= 2) begin
        for (int oc = 0; oc < 8; oc++) begin
          checks++;
          if (psum[oc] != acc_t'(exp_q[0][oc])) begin
            failures++;
            $display("FAIL n=%0d oc=%0d got %0d exp %0d", n, oc, psum[oc], exp_q[0][oc]);
          end
        end
        void'(exp_q.pop_front());
      end
    end
    // the first window applied at n=0 appears after the third edge (n=2)
    checks++;
    if (first_v != 2) begin failures++; $display("FAIL latency %0d", first_v); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
