// tb_weight_buffer: fills the shadow bank with one tile, checks that the
// active tile does not change until swap and equals the written tile
// afterwards, then fills the other bank while the first stays visible.
module tb_weight_buffer;
  import plut_pkg::*;

  logic       clk = 0, rst_n = 0, we = 0, swap = 0;
  logic [9:0] waddr = 0;
  code_t      wcode = 0;
  code_t      w_tile [OUT_CH][IN_CH][KK];
  logic       active_bank;
  int checks = 0, failures = 0;
  logic [3:0] t0 [TILE_W], t1 [TILE_W];

  weight_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [3:0] t [TILE_W]);
    for (int i = 0; i < int'(TILE_W); i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wcode = code_t'(t[i]);
    end
    @(negedge clk);
    we = 0;
  endtask

  task automatic compare(input logic [3:0] t [TILE_W], input string what);
    int bad = 0;
    for (int oc = 0; oc < 8; oc++)
      for (int ic = 0; ic < 8; ic++)
        for (int k = 0; k < 9; k++)
          if (w_tile[oc][ic][k] != code_t'(t[(oc * 8 + ic) * 9 + k])) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d mismatches", what, bad); end
  endtask

  initial begin
    logic [3:0] zero [TILE_W];
    for (int i = 0; i < int'(TILE_W); i++) begin
      t0[i] = 4'($urandom); t1[i] = 4'($urandom); zero[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(t0);
    compare(zero, "active bank before swap");
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    compare(t0, "tile 0 after swap");
    checks++; if (active_bank != 1) begin failures++; $display("FAIL bank"); end
    load(t1);
    compare(t0, "tile 0 while loading tile 1");
    @(negedge clk); swap = 1; @(negedge clk); swap = 0;
    compare(t1, "tile 1 after swap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
