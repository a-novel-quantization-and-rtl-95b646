// tb_line_buffer: streams random images (8 channels per pixel) with random
// enable stalls and input gaps, and checks every 3x3 window against the
// image, in raster order, for stride 1 and stride 2, and the window count.
module tb_line_buffer;
  import plut_pkg::*;

  localparam int unsigned W_MAX = 16;
  logic clk = 0, rst_n = 0, clear = 0, stride2 = 0, en = 1, pix_valid = 0;
  logic [$clog2(W_MAX):0] width = 0;
  logic [31:0] pix_data = 0;
  logic pix_ready, win_valid;
  code_t win [IN_CH][KK];
  int checks = 0, failures = 0;

  line_buffer #(.W_MAX(W_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] img [16][16];
  int exp_x [$], exp_y [$];
  int nwin;

  always @(posedge clk) if (rst_n && en && win_valid) begin
    int x0, y0, bad;
    x0 = exp_x.pop_front(); y0 = exp_y.pop_front();
    bad = 0;
    for (int ic = 0; ic < 8; ic++)
      for (int ky = 0; ky < 3; ky++)
        for (int kx = 0; kx < 3; kx++)
          if (win[ic][ky*3+kx] != code_t'(img[y0+ky][x0+kx][ic*4 +: 4])) bad++;
    checks++;
    nwin++;
    if (bad != 0) begin failures++; $display("FAIL window (%0d,%0d) %0d bad", x0, y0, bad); end
  end

  task automatic run(input int w, input int h, input bit s2);
    int expected;
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) img[y][x] = $urandom;
    exp_x.delete(); exp_y.delete();
    for (int y = 0; y + 2 < h; y += (s2 ? 2 : 1))
      for (int x = 0; x + 2 < w; x += (s2 ? 2 : 1)) begin exp_x.push_back(x); exp_y.push_back(y); end
    expected = exp_x.size();
    nwin = 0;
    @(negedge clk);
    width = 5'(w); stride2 = s2; clear = 1;
    @(negedge clk);
    clear = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        pix_data = img[y][x];
        pix_valid = ($urandom_range(4, 0) != 0);
        en = ($urandom_range(4, 0) != 0);
        @(posedge clk);
        while (!(pix_valid && en)) begin
          @(negedge clk);
          pix_valid = ($urandom_range(4, 0) != 0);
          en = ($urandom_range(4, 0) != 0);
          @(posedge clk);
        end
        @(negedge clk);
      end
    pix_valid = 0;
    en = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (nwin != expected) begin failures++; $display("FAIL %0d windows, expected %0d", nwin, expected); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(7, 6, 0);
    run(16, 5, 0);
    run(9, 9, 1);
    run(3, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
