// tb_plut_accel: end-to-end test of the accelerator at its default sizes.
//
// Programs the P-LUT, the activation levels and the Huffman tables over
// AXI4-Lite, then runs several passes, each streaming an image of 8-channel
// pixels, with random gaps on the inputs and random backpressure on the
// output. Weight tiles are S-Huff encoded by a reference encoder and sent
// on the weight stream, either with the pass that uses them (the pass
// waits for the decode) or during the previous pass (background decode,
// overlapping computation). Every output word is compared with a
// reference convolution computed from the level products. The passes
// cover weight loads and bank swaps, weight reuse, background decoding,
// stride 1 and 2, quantized and raw output (the raw mode stalls the
// pipeline), clipping in the quantizer, and one full 58x58 image (a 56x56
// layer with its border), the largest row length of the line buffer. Each
// of these mechanisms is counted and a failure is counted for one that
// never happened. The full-size pass uses a tile decoded in the background
// and must run at one pixel per cycle, with no decode time added.
module tb_plut_accel;
  import plut_pkg::*;
  import plut_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [11:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0] wdata = 0, rdata;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] s_data = 0, m_data, s_wt_data = 0;
  logic s_wt_valid = 0, s_wt_ready;
  logic s_valid = 0, s_last = 0, s_ready, m_valid, m_last, m_ready = 1, irq;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- AXI4-Lite master ---------------------------------------------------
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

  // ---- mechanism counters ------------------------------------------------
  int n_wswap, n_zero_w, n_stall, n_raw_words, n_ibuf_swap, n_obuf_swap;
  int n_backpressure, n_in_gap, n_irq, n_reuse, n_stride2, n_clip;
  int n_overlap, n_wait, cc;
  always @(posedge clk) if (rst_n) begin
    cc++;
    if (dut.w_valid && dut.to_lb) n_overlap++;
    if (dut.u_ctrl.state_q == 2'd1 && dut.loading) n_wait++;
    if (dut.wb_swap) n_wswap++;
    if (dut.w_valid && dut.w_code.idx == 0) n_zero_w++;
    if (dut.busy && !dut.pipe_en) n_stall++;
    if (dut.u_ibuf.swap) n_ibuf_swap++;
    if (dut.out_swap) n_obuf_swap++;
    if (m_valid && !m_ready) n_backpressure++;
    if (irq) n_irq++;
  end

  // ---- stream driver / monitor --------------------------------------------
  logic [31:0] in_q [$];
  logic [31:0] wq [$];
  logic [31:0] exp_q [$];
  bit          exp_last [$];
  bit          gaps, bp;
  int          nout, nin;

  always @(negedge clk) begin
    if (in_q.size() > 0) begin
      s_valid = !gaps || ($urandom_range(4, 0) != 0);
      s_data  = in_q[0];
      s_last  = (in_q.size() == 1);
      if (!s_valid) n_in_gap++;
    end else begin
      s_valid = 0; s_last = 0;
    end
    m_ready = !bp || ($urandom_range(3, 0) != 0);
    if (wq.size() > 0) begin
      s_wt_valid = !gaps || ($urandom_range(3, 0) != 0);
      s_wt_data  = wq[0];
    end else begin
      s_wt_valid = 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin void'(in_q.pop_front()); nin++; end
    if (s_wt_valid && s_wt_ready) void'(wq.pop_front());
    if (m_valid && m_ready) begin
      logic [31:0] e; bit l;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output word %h", m_data);
      end else begin
        e = exp_q.pop_front(); l = exp_last.pop_front();
        checks++;
        if (m_data != e || m_last != l) begin
          failures++;
          if (failures < 20) $display("FAIL out %0d: %h/%0b exp %h/%0b", nout, m_data, m_last, e, l);
        end
      end
      nout++;
    end
  end

  // ---- reference ----------------------------------------------------------
  logic [3:0] wt [TILE_W];          // tile used by the pass, in stream order
  logic [3:0] wt_next [TILE_W];     // last tile sent on the weight stream
  logic [31:0] img [58][58];
  logic signed [5:0] cur_shift;


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

  // Waits until the decoder is free, makes a random tile, programs its
  // Huffman table and word count and queues its words on the weight stream.
  task automatic send_tile(input int pz);
    logic [31:0] words [];
    logic [31:0] st;
    logic [3:0]  wv [];
    htab_t hb;
    do rd(REG_STATUS, st); while (st[2]);
    hb = rand_htab();
    foreach (wt_next[i]) wt_next[i] = rand_code(pz);
    wv = new[TILE_W];
    foreach (wv[i]) wv[i] = wt_next[i];
    encode(hb, wv, words);
    wr(REG_HCOUNT, 32'(hcount_word(hb)));
    wr(REG_HSYM, 32'(hsym_word(hb)));
    wr(REG_WWORDS, words.size());
    foreach (words[i]) wq.push_back(words[i]);
  endtask

  // mode: 0 reuse the current tile, 1 send a tile and use it, 2 use the
  // tile sent during the previous pass; pf: send the next tile during this
  // pass
  task automatic run_pass(input int w, input int h, input bit s2, input bit raw,
                          input int mode, input bit pf, input int pz, input int sh,
                          input bit with_gaps, input bit with_bp, output int cycles);
    int s, ow, oh, c0;
    s = s2 ? 2 : 1;
    ow = (w - 3) / s + 1;
    oh = (h - 3) / s + 1;
    gaps = with_gaps; bp = with_bp;
    if (mode == 1) send_tile(pz);
    if (mode == 0) n_reuse++;
    else wt = wt_next;
    if (s2) n_stride2++;
    cur_shift = 6'(sh);
    wr(REG_WIDTH, w);
    wr(REG_HEIGHT, h);
    wr(REG_STRIDE, s);
    wr(REG_SHIFT, 32'(sh));
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        for (int ic = 0; ic < 8; ic++) img[y][x][ic*4 +: 4] = rand_code(25);
    // expected output
    for (int oy = 0; oy < oh; oy++)
      for (int ox = 0; ox < ow; ox++) begin
        longint ps [8];
        logic [31:0] pk;
        for (int oc = 0; oc < 8; oc++) begin
          ps[oc] = 0;
          for (int ic = 0; ic < 8; ic++)
            for (int ky = 0; ky < 3; ky++)
              for (int kx = 0; kx < 3; kx++)
                ps[oc] += cprod(wt[(oc * 8 + ic) * 9 + ky * 3 + kx],
                                img[oy * s + ky][ox * s + kx][ic*4 +: 4]);
        end
        for (int oc = 0; oc < 8; oc++) begin
          longint v = (sh >= 0) ? ps[oc] * (longint'(1) << sh) : ps[oc] >>> (-sh);
          pk[oc*4 +: 4] = qref(v);
          if (!raw && ((v < 0 ? -v : v) > level(7))) n_clip++;
        end
        if (raw) begin
          for (int oc = 0; oc < 8; oc++) begin
            exp_q.push_back(32'(ps[oc]));
            exp_last.push_back(oy == oh - 1 && ox == ow - 1 && oc == 7);
          end
          n_raw_words += 8;
        end else begin
          exp_q.push_back(pk);
          exp_last.push_back(oy == oh - 1 && ox == ow - 1);
        end
      end
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) in_q.push_back(img[y][x]);
    // CTRL: [0] start, [1] raw, [2] load a tile, [3] use the next tile
    wr(REG_CTRL, 32'(1 + (raw ? 2 : 0) + (mode == 1 ? 4 : 0) + (mode != 0 ? 8 : 0)));
    c0 = cc;
    if (pf) begin
      send_tile(50);
      wr(REG_CTRL, raw ? 32'h6 : 32'h4);
    end
    while (!(exp_q.size() == 0 && in_q.size() == 0) && cc - c0 < 150000) @(negedge clk);
    cycles = cc - c0;
    chk(exp_q.size() == 0, $sformatf("pass %0dx%0d: %0d words missing", w, h, exp_q.size()));
    repeat (5) @(negedge clk);
    begin
      logic [31:0] st, oc;
      rd(REG_STATUS, st);
      chk(st[1:0] == 2'b10, $sformatf("status after pass %h", st));
      rd(REG_OUTCNT, oc);
      chk(oc == 32'(ow * oh), "output pixel count");
    end
  endtask

  initial begin
    int cyc;
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // shared tables
    begin
      int k = 0;
      for (int i = 0; i < 8; i++)
        for (int j = i; j < 8; j++) wr(REG_LUT0 + 12'(4 * k++), 32'(lprod(i, j)));
    end
    for (int i = 0; i < 8; i++) wr(REG_LEVEL0 + 12'(4 * i), 32'(level(i)));
    rd(REG_LUT0 + 12'(4 * 35), d);
    chk(d == 32'(lprod(7, 7)), "P-LUT read back");
    //         w   h  s2 raw md pf pz  sh gaps bp
    run_pass(10,  8, 0, 0, 1, 0, 40,  1, 1, 1, cyc);  // load and use; clipping
    chk(cyc > int'(TILE_W), "first pass includes the decode");
    run_pass( 9,  9, 1, 1, 0, 1,  0,  0, 1, 1, cyc);  // reuse, stride 2, raw; prefetch
    run_pass( 7,  5, 0, 1, 2, 0,  0,  0, 0, 0, cyc);  // prefetched tile, raw
    run_pass(30, 30, 1, 0, 0, 1,  0, -1, 0, 1, cyc);  // reuse, stride 2; prefetch
    run_pass(58, 58, 0, 0, 2, 0,  0, -3, 0, 0, cyc);  // prefetched tile, full row length
    $display("full-size pass: %0d cycles for %0d pixels", cyc, 58 * 58);
    // the tile was decoded during the previous pass: one pixel per cycle
    // plus the latency of the two double buffers and the pipeline
    chk(cyc >= 58 * 58 && cyc < 58 * 58 + 2 * 64 + 50,
        "one pixel per cycle on the full-size pass, decode hidden");
    // mechanism coverage
    $display("swaps=%0d zero_w=%0d stalls=%0d raw_words=%0d ibuf_swaps=%0d obuf_swaps=%0d",
             n_wswap, n_zero_w, n_stall, n_raw_words, n_ibuf_swap, n_obuf_swap);
    $display("backpressure=%0d in_gaps=%0d irq=%0d reuse=%0d stride2=%0d clip=%0d",
             n_backpressure, n_in_gap, n_irq, n_reuse, n_stride2, n_clip);
    chk(n_wswap == 3, "weight bank swaps");
    chk(n_zero_w > 0, "zero weights decoded");
    chk(n_stall > 0, "pipeline stalls");
    chk(n_raw_words > 0, "raw output mode");
    chk(n_ibuf_swap > 2, "input double-buffer swaps");
    chk(n_obuf_swap > 2, "output double-buffer swaps");
    chk(n_backpressure > 0, "output backpressure");
    chk(n_in_gap > 0, "input gaps");
    chk(n_irq == 5, "one interrupt per pass");
    chk(n_reuse > 0, "weight reuse");
    $display("overlap=%0d wait=%0d", n_overlap, n_wait);
    chk(n_overlap > 0, "weight decoding during a pass");
    chk(n_wait > 0, "pass waiting for its tile");
    chk(n_stride2 > 0, "stride 2");
    chk(n_clip > 0 && dut.clip_cnt == 32'(n_clip), "clipping in the quantizer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
