// tb_plut_table: writes random products into the shared P-LUT and checks
// that every (i, j) pair, in either order, reads the entry written for the
// unordered pair, that out-of-range writes are ignored and that reset
// clears the table.
module tb_plut_table;
  import plut_pkg::*;

  logic       clk = 0, rst_n = 0, we = 0;
  logic [5:0] waddr = 0;
  lut_entry_t wdata = 0;
  lut_entry_t lut_q [LUT_N];
  int checks = 0, failures = 0;
  lut_entry_t mat [8][8];

  plut_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int k;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(LUT_N); i++) chk(lut_q[i] == 0, "reset value");
    // enumerate the upper triangle row by row
    k = 0;
    for (int i = 0; i < 8; i++)
      for (int j = i; j < 8; j++) begin
        automatic lut_entry_t v = $urandom;
        mat[i][j] = v;
        mat[j][i] = v;
        @(negedge clk);
        we = 1; waddr = 6'(k); wdata = v;
        k++;
      end
    @(negedge clk);
    we = 1; waddr = 6'd40; wdata = 32'hDEAD_BEEF;   // out of range
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        chk(lut_q[tri_addr(3'(i), 3'(j))] == mat[i][j], $sformatf("entry %0d,%0d", i, j));
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    chk(lut_q[35] == 0, "cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
