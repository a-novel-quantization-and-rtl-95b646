// tb_resnet_conv3: runs a channel slice of two consecutive 3x3 layers of
// the 128-channel stage of ResNet18 on ImageNet through the accelerator at
// its default sizes, with the host side (tiling, padding, partial-sum
// accumulation, re-quantization) modelled in the testbench.
//
//   layer A: 56x56 input, stride 2, 16 -> 16 channels, 28x28 output (the
//            stage's first, down-sampling convolution)
//   layer B: 28x28 input, stride 1, 16 -> 16 channels, 28x28 output
//
// The real layers have 64/128 input and 128 output channels; 16 of each
// keep the simulation short but already need 2 x 2 passes per layer (8
// input x 8 output channels per pass), so partial sums over input-channel
// groups are collected in raw mode and added by the host, as for the full
// layer. Images are sent with their one-pixel zero border (58x58 and
// 30x30). Tiles are scheduled the intended way: the tile of pass k+1 is
// loaded on the weight stream while pass k runs, so after the first pass
// no decode time is added. Every raw word is compared with a reference
// convolution over that pass's input-channel group, the host's summed
// layer outputs with a direct 16-channel reference, and the cycle count of
// every pass after the first with the rates of the two streams (8 cycles
// per raw output pixel, 1 per other input pixel), i.e. with no decode time.
module tb_resnet_conv3;
  import plut_pkg::*;
  import plut_tb_pkg::*;

  localparam int C = 16;            // channels of the slice

  logic clk = 0, rst_n = 0;
  logic [11:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0] wdata = 0, rdata;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] s_data = 0, m_data, s_wt_data = 0;
  logic s_valid = 0, s_last = 0, s_ready, m_valid, m_last, m_ready = 1, irq;
  logic s_wt_valid = 0, s_wt_ready;
  int checks = 0, failures = 0;

  plut_accel dut (
    .clk, .rst_n,
    .s_axil_awaddr (awaddr), .s_axil_awvalid (awvalid), .s_axil_awready (awready),
    .s_axil_wdata (wdata), .s_axil_wvalid (wvalid), .s_axil_wready (wready),
    .s_axil_bresp (bresp), .s_axil_bvalid (bvalid), .s_axil_bready (bready),
    .s_axil_araddr (araddr), .s_axil_arvalid (arvalid), .s_axil_arready (arready),
    .s_axil_rdata (rdata), .s_axil_rresp (rresp), .s_axil_rvalid (rvalid),
    .s_axil_rready (rready),
    .s_wt_data, .s_wt_valid, .s_wt_ready,
    .s_data, .s_valid, .s_last, .s_ready,
    .m_data, .m_valid, .m_last, .m_ready, .irq
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
  endtask

  // ---- streams ------------------------------------------------------------
  logic [31:0] in_q [$];
  logic [31:0] wq [$];
  logic [31:0] out_q [$];
  int cc, n_overlap, n_irq;

  always @(negedge clk) begin
    s_valid   = in_q.size() > 0;
    s_data    = s_valid ? in_q[0] : 32'd0;
    s_last    = in_q.size() == 1;
    s_wt_valid = wq.size() > 0;
    s_wt_data  = s_wt_valid ? wq[0] : 32'd0;
  end

  always @(posedge clk) if (rst_n) begin
    cc++;
    if (s_valid && s_ready) void'(in_q.pop_front());
    if (s_wt_valid && s_wt_ready) void'(wq.pop_front());
    if (m_valid && m_ready) out_q.push_back(m_data);
    if (dut.w_valid && dut.to_lb) n_overlap++;
    if (irq) n_irq++;
  end

  // ---- layer data -----------------------------------------------------------
  logic [3:0] wA [C][C][9], wB [C][C][9];   // [oc][ic][tap]
  logic [3:0] xA [58][58][C];               // padded input of layer A
  logic [3:0] xB [30][30][C];               // padded input of layer B (host-built)
  longint     accA [28][28][C], accB [28][28][C];   // host partial-sum accumulators
  logic [3:0] yB [28][28][C];

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

  function automatic longint scale(input longint v, input int sh);
    return (sh >= 0) ? v * (longint'(1) << sh) : v >>> (-sh);
  endfunction

  // queue the tile (output group og, input group ig) of layer B (lb = 1) or A
  task automatic send_tile(input bit lb, input int og, input int ig);
    logic [31:0] words [];
    logic [31:0] st;
    logic [3:0]  wv [];
    htab_t hb;
    do rd(REG_STATUS, st); while (st[2]);
    hb = rand_htab();
    wv = new[TILE_W];
    for (int o = 0; o < 8; o++)
      for (int c = 0; c < 8; c++)
        for (int t = 0; t < 9; t++)
          wv[(o * 8 + c) * 9 + t] = lb ? wB[og * 8 + o][ig * 8 + c][t]
                                       : wA[og * 8 + o][ig * 8 + c][t];
    encode(hb, wv, words);
    wr(REG_HCOUNT, 32'(hcount_word(hb)));
    wr(REG_HSYM, 32'(hsym_word(hb)));
    wr(REG_WWORDS, words.size());
    foreach (words[i]) wq.push_back(words[i]);
  endtask

  // One layer = 4 passes (og, ig). The first pass of the first layer loads
  // its own tile; every pass loads the next pass's tile while it runs.
  task automatic run_layer(input bit lb, input bit first);
    int w = lb ? 30 : 58;
    int s = lb ? 1 : 2;
    int ow = 28, oh = 28;
    for (int p = 0; p < 4; p++) begin
      int og = p / 2, ig = p % 2, c0, cyc;
      if (p == 0 && first) send_tile(lb, og, ig);
      wr(REG_WIDTH, w);
      wr(REG_HEIGHT, w);
      wr(REG_STRIDE, s);
      for (int y = 0; y < w; y++)
        for (int x = 0; x < w; x++) begin
          logic [31:0] px;
          for (int c = 0; c < 8; c++)
            px[c*4 +: 4] = lb ? xB[y][x][ig * 8 + c] : xA[y][x][ig * 8 + c];
          in_q.push_back(px);
        end
      // start, raw, use the next tile, and load it too on the very first pass
      wr(REG_CTRL, (p == 0 && first) ? 32'hF : 32'hB);
      c0 = cc;
      if (p < 3 || !lb) begin
        // next tile: the next pass of this layer, or the first of layer B
        if (p < 3) send_tile(lb, (p + 1) / 2, (p + 1) % 2);
        else       send_tile(1, 0, 0);
        wr(REG_CTRL, 32'h6);                 // raw, load
      end
      while (out_q.size() < ow * oh * 8 && cc - c0 < 100000) @(negedge clk);
      cyc = cc - c0;
      chk(out_q.size() == ow * oh * 8, "raw words of a pass");
      // compare the partial sums of this input-channel group, accumulate
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++)
          for (int o = 0; o < 8; o++) begin
            longint ref_ps = 0;
            logic [31:0] got = out_q.pop_front();
            for (int c = 0; c < 8; c++)
              for (int ky = 0; ky < 3; ky++)
                for (int kx = 0; kx < 3; kx++) begin
                  logic [3:0] a = lb ? xB[oy * s + ky][ox * s + kx][ig * 8 + c]
                                     : xA[oy * s + ky][ox * s + kx][ig * 8 + c];
                  logic [3:0] wk = lb ? wB[og * 8 + o][ig * 8 + c][ky * 3 + kx]
                                      : wA[og * 8 + o][ig * 8 + c][ky * 3 + kx];
                  ref_ps += cprod(wk, a);
                end
            chk(got == 32'(ref_ps), $sformatf("layer %s pass %0d (%0d,%0d,%0d): %h exp %h",
                                                lb ? "B" : "A", p, oy, ox, o, got, 32'(ref_ps)));
            if (lb) accB[oy][ox][og * 8 + o] += longint'(signed'(got));
            else    accA[oy][ox][og * 8 + o] += longint'(signed'(got));
          end
      // raw output: each output pixel takes eight cycles (eight words), each
      // input pixel that completes no window one cycle; the tile was
      // decoded in the background except on the very first pass
      $display("layer %s pass %0d: %0d cycles", lb ? "B" : "A", p, cyc);
      if (!(p == 0 && first))
        chk(cyc >= 8 * ow * oh && cyc < 8 * ow * oh + (w * w - ow * oh) + 200,
            "pass time set by the streams, decode hidden");
      repeat (4) @(negedge clk);
    end
  endtask

  initial begin
    int shA = -2, shB = -2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    begin
      int k = 0;
      for (int i = 0; i < 8; i++)
        for (int j = i; j < 8; j++) wr(REG_LUT0 + 12'(4 * k++), 32'(lprod(i, j)));
    end
    for (int i = 0; i < 8; i++) wr(REG_LEVEL0 + 12'(4 * i), 32'(level(i)));
    foreach (wA[o, c, t]) wA[o][c][t] = rand_code(30);
    foreach (wB[o, c, t]) wB[o][c][t] = rand_code(30);
    foreach (xA[y, x, c]) xA[y][x][c] = (y == 0 || x == 0 || y == 57 || x == 57) ? 4'd0 : rand_code(25);
    foreach (accA[y, x, c]) begin accA[y][x][c] = 0; accB[y][x][c] = 0; end

    run_layer(0, 1);
    // host: re-quantize layer A, check it against a direct 16-channel
    // reference, and build layer B's padded input
    foreach (xB[y, x, c]) xB[y][x][c] = 4'd0;
    for (int oy = 0; oy < 28; oy++)
      for (int ox = 0; ox < 28; ox++)
        for (int o = 0; o < C; o++) begin
          longint r;
          r = 0;
          for (int c = 0; c < C; c++)
            for (int t = 0; t < 9; t++)
              r += cprod(wA[o][c][t], xA[oy * 2 + t / 3][ox * 2 + t % 3][c]);
          chk(accA[oy][ox][o] == r, "layer A 16-channel sum");
          xB[oy + 1][ox + 1][o] = qref(scale(r, shA));
        end
    run_layer(1, 0);
    for (int oy = 0; oy < 28; oy++)
      for (int ox = 0; ox < 28; ox++)
        for (int o = 0; o < C; o++) begin
          longint r;
          r = 0;
          for (int c = 0; c < C; c++)
            for (int t = 0; t < 9; t++)
              r += cprod(wB[o][c][t], xB[oy + t / 3][ox + t % 3][c]);
          chk(accB[oy][ox][o] == r, "layer B 16-channel sum");
          yB[oy][ox][o] = qref(scale(r, shB));
        end
    begin
      int nz = 0;
      foreach (yB[y, x, c]) if (yB[y][x][c][2:0] != 0) nz++;
      $display("layer B outputs: %0d of %0d non-zero", nz, 28 * 28 * C);
      chk(nz > 0, "non-trivial layer output");
    end
    $display("passes=8 irq=%0d overlap=%0d", n_irq, n_overlap);
    chk(n_irq == 8, "one interrupt per pass");
    chk(n_overlap > 0, "weights decoded during passes");
    chk(dut.u_wbuf.active_bank == 1'b0, "eight bank swaps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
