// tb_out_stage: drives pixels of eight partial sums in quantized and raw
// mode under random output backpressure; checks the packed codes against a
// reference quantizer, the raw words and their order, m_last on the final
// word, the pipeline-enable throughput (1 pixel/cycle quantized, 1 per 8
// cycles raw) and the clip counter.
module tb_out_stage;
  import plut_pkg::*;
  import plut_tb_pkg::*;

  logic clk = 0, rst_n = 0, raw = 0, vin = 0, last_in = 0, o_ready = 1;
  logic signed [5:0] shift = 0;
  lut_entry_t levels [NLEV];
  acc_t psum [OUT_CH];
  logic can_accept, o_valid, o_last;
  logic [31:0] o_data, clip_cnt;
  int checks = 0, failures = 0;

  out_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] qref(input longint v);
    longint m = (v < 0) ? -v : v;
    longint bd = m;
    int b = 0;
    for (int i = 1; i < 8; i++) begin
      longint d = (m > level(i)) ? m - level(i) : level(i) - m;
      if (d <= bd) begin b = i; bd = d; end
    end
    return {(v < 0) && (b != 0), 3'(b)};
  endfunction

  logic [31:0] dq [$];
  bit          lq [$];
  int nrecv, nclip_exp;

  always @(posedge clk) if (rst_n && o_valid && o_ready) begin
    logic [31:0] d; bit l;
    d = dq.pop_front(); l = lq.pop_front();
    checks++;
    if (o_data != d || o_last != l) begin
      failures++; $display("FAIL word %0d: %h/%0b exp %h/%0b", nrecv, o_data, o_last, d, l);
    end
    nrecv++;
  end

  task automatic run(input bit r, input int npix, input bit bp, output int cycles);
    int sent = 0;
    raw = r;
    cycles = 0;
    while (sent < npix) begin
      @(negedge clk);
      o_ready = bp ? ($urandom_range(2, 0) != 0) : 1'b1;
      vin = 1;
      last_in = (sent == npix - 1);
      for (int oc = 0; oc < 8; oc++) psum[oc] = acc_t'($urandom) >>> $urandom_range(10, 4);
      @(posedge clk);
      cycles++;
      if (can_accept) begin
        logic [31:0] pk;
        for (int oc = 0; oc < 8; oc++) begin
          pk[oc*4 +: 4] = qref(longint'(psum[oc]));
          if (!r && ((psum[oc] < 0 ? -longint'(psum[oc]) : longint'(psum[oc])) > level(7))) nclip_exp++;
        end
        if (r) for (int oc = 0; oc < 8; oc++) begin dq.push_back(psum[oc]); lq.push_back(last_in && oc == 7); end
        else begin dq.push_back(pk); lq.push_back(last_in); end
        sent++;
      end
    end
    @(negedge clk);
    vin = 0;
    o_ready = 1;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    int c;
    for (int i = 0; i < 8; i++) levels[i] = lut_entry_t'(level(i));
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 50, 0, c);
    checks++;
    if (c != 50) begin failures++; $display("FAIL quantized rate: %0d cycles", c); end
    run(1, 10, 0, c);
    checks++;
    if (c < 72 || c > 81) begin failures++; $display("FAIL raw rate: %0d cycles", c); end
    run(0, 40, 1, c);
    run(1, 6, 1, c);
    checks++;
    if (nrecv != 50 + 80 + 40 + 48) begin failures++; $display("FAIL words %0d", nrecv); end
    checks++;
    if (clip_cnt != 32'(nclip_exp)) begin failures++; $display("FAIL clip %0d exp %0d", clip_cnt, nclip_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
