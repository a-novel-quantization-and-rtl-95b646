// tb_axil_regs: AXI4-Lite writes and reads with delayed ready signals;
// checks the configuration outputs, read-back of every register, the
// forwarding of P-LUT writes, the one-cycle start pulse (ignored while
// busy) with its new-tile bit, the load pulse (accepted while busy), the
// sticky done bit and the weight-load status bits.
module tb_axil_regs;
  import plut_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [11:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic start, new_tile, load, raw, stride2, lut_we;
  logic [15:0] width, height, wwords;
  logic signed [5:0] shift;
  logic [2:0] hcount [1:HLMAX];
  logic [IDX_W-1:0] hsym [HLMAX];
  lut_entry_t levels [NLEV];
  logic [5:0] lut_waddr;
  lut_entry_t lut_wdata;
  lut_entry_t lut_q [LUT_N];
  logic busy = 0, done_pulse = 0, loading = 0, pending = 0;
  logic [31:0] out_count = 32'd1234;
  int checks = 0, failures = 0;
  int nstart = 0, nload = 0;

  axil_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the P-LUT storage behind the port
  always @(posedge clk) if (lut_we) lut_q[lut_waddr] <= lut_wdata;
  always @(posedge clk) if (rst_n && start) nstart++;
  always @(posedge clk) if (rst_n && load) nload++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1;
    @(posedge clk);
    while (!(awready && wready)) @(posedge clk);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    repeat ($urandom_range(2, 0)) @(negedge clk);
    bready = 1;
    @(posedge clk);
    while (!bvalid) @(posedge clk);
    chk(bresp == 2'b00, "bresp");
    @(negedge clk);
    bready = 0;
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    @(posedge clk);
    while (!arready) @(posedge clk);
    @(negedge clk);
    arvalid = 0;
    repeat ($urandom_range(2, 0)) @(negedge clk);
    rready = 1;
    @(posedge clk);
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    lut_entry_t lv [36];
    foreach (lut_q[i]) lut_q[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(REG_WIDTH, 32'd28);
    wr(REG_HEIGHT, 32'd30);
    wr(REG_STRIDE, 32'd2);
    wr(REG_SHIFT, 32'hFFFF_FFFD);   // -3
    wr(REG_WWORDS, 32'd777);
    wr(REG_HCOUNT, 32'h0012_3456);
    wr(REG_HSYM, 32'h001A_BCDE);
    for (int i = 0; i < 8; i++) wr(REG_LEVEL0 + 12'(4 * i), 32'h100 * (i + 1));
    for (int i = 0; i < 36; i++) begin lv[i] = $urandom; wr(REG_LUT0 + 12'(4 * i), lv[i]); end
    chk(width == 28 && height == 30 && stride2 && shift == -3 && wwords == 777, "geometry outputs");
    chk(hcount[1] == 3'(32'h0012_3456) && hcount[7] == 3'(32'h0012_3456 >> 18), "hcount fields");
    chk(hsym[0] == 3'(32'h001A_BCDE) && hsym[6] == 3'(32'h001A_BCDE >> 18), "hsym fields");
    for (int i = 0; i < 8; i++) chk(levels[i] == 32'h100 * (i + 1), "level output");
    rd(REG_WIDTH, d);   chk(d == 28, "read width");
    rd(REG_HEIGHT, d);  chk(d == 30, "read height");
    rd(REG_STRIDE, d);  chk(d == 2, "read stride");
    rd(REG_SHIFT, d);   chk(d == 32'hFFFF_FFFD, "read shift");
    rd(REG_WWORDS, d);  chk(d == 777, "read wwords");
    rd(REG_HCOUNT, d);  chk(d == 32'h0012_3456, "read hcount");
    rd(REG_HSYM, d);    chk(d == 32'h001A_BCDE, "read hsym");
    rd(REG_OUTCNT, d);  chk(d == 1234, "read outcnt");
    for (int i = 0; i < 8; i++) begin rd(REG_LEVEL0 + 12'(4 * i), d); chk(d == 32'h100 * (i + 1), "read level"); end
    for (int i = 0; i < 36; i++) begin rd(REG_LUT0 + 12'(4 * i), d); chk(d == lv[i], "read lut"); end
    // start, raw mode
    wr(REG_CTRL, 32'h3);
    chk(raw == 1, "raw bit");
    chk(nstart == 1, "one start pulse");
    rd(REG_STATUS, d); chk(d[1] == 0, "done clear after start");
    busy = 1;
    wr(REG_CTRL, 32'h1);
    chk(nstart == 1, "start ignored while busy");
    rd(REG_STATUS, d); chk(d[0] == 1, "busy visible");
    @(negedge clk); done_pulse = 1; busy = 0; @(negedge clk); done_pulse = 0;
    rd(REG_STATUS, d); chk(d == 32'h2, "sticky done");
    rd(REG_STATUS, d); chk(d == 32'h2, "done stays");
    wr(REG_CTRL, 32'h1);
    rd(REG_STATUS, d); chk(d == 32'h0, "done cleared by start");
    chk(nstart == 2, "second start");
    chk(new_tile == 0, "new_tile clear");
    // weight loads and the new-tile bit
    wr(REG_CTRL, 32'hD);
    chk(nstart == 3 && nload == 1 && new_tile == 1, "start with load and new tile");
    rd(REG_CTRL, d); chk(d == 32'h8, "CTRL read-back");
    busy = 1;
    wr(REG_CTRL, 32'h4);
    chk(nload == 2 && nstart == 3, "load accepted while busy");
    wr(REG_CTRL, 32'h1);
    chk(new_tile == 1, "new_tile kept when start is ignored");
    loading = 1; pending = 0;
    rd(REG_STATUS, d); chk(d == 32'h5, "status loading");
    loading = 0; pending = 1;
    rd(REG_STATUS, d); chk(d == 32'h9, "status pending");
    busy = 0; pending = 0;
    wr(REG_CTRL, 32'h1);
    chk(nstart == 4 && new_tile == 0 && nload == 2, "start without new tile");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
