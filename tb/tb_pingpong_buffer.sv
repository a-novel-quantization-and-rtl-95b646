// tb_pingpong_buffer: random word stream with s_last at random points and
// random backpressure on both sides; checks order, data, m_last, that a
// bank is only released when full or closed by s_last, and bank swaps.
module tb_pingpong_buffer;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic [31:0] s_data = 0, m_data;
  logic s_valid = 0, s_last = 0, s_ready, m_valid, m_last, m_ready = 0, swap;
  int checks = 0, failures = 0;

  pingpong_buffer #(.DW(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] dq [$];
  bit          lq [$];
  int nsent, nrecv, nswap, early;

  always @(posedge clk) if (rst_n) begin
    if (swap) nswap++;
    if (m_valid && m_ready) begin
      logic [31:0] d; bit l;
      d = dq.pop_front(); l = lq.pop_front();
      checks++;
      if (m_data != d || m_last != l) begin
        failures++; $display("FAIL word %0d: %h/%0b exp %h/%0b", nrecv, m_data, m_last, d, l);
      end
      nrecv++;
    end
  end

  initial begin
    int total = 400;
    int since_last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // a bank must not be visible before it is closed
    @(negedge clk);
    s_valid = 1; s_data = 32'h1234; s_last = 0;
    @(negedge clk);
    s_valid = 0;
    dq.push_back(32'h1234); lq.push_back(0); nsent = 1; since_last = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (m_valid) begin failures++; $display("FAIL partial bank released"); end
    while (nsent < total) begin
      s_valid = ($urandom_range(3, 0) != 0);
      s_data  = $urandom;
      s_last  = ($urandom_range(12, 0) == 0) || (nsent == total - 1);
      m_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (s_valid && s_ready) begin
        dq.push_back(s_data); lq.push_back(s_last);
        nsent++;
      end
      @(negedge clk);
    end
    s_valid = 0;
    m_ready = 1;
    repeat (40) @(negedge clk);
    checks++;
    if (nrecv != total) begin failures++; $display("FAIL received %0d of %0d", nrecv, total); end
    checks++;
    if (nswap < total / DEPTH) begin failures++; $display("FAIL only %0d swaps", nswap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
