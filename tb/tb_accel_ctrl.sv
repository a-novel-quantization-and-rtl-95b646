// tb_accel_ctrl: drives the controller with a model of its environment
// (decoder done a random time after dec_start, pixels taken with gaps,
// results returned at the pace of the pixels) and checks the output-pixel
// count for stride 1 and 2, the res_last flag on the final result, pixel
// routing, done, and the weight-load rules: a load requested with the pass
// is waited for and swapped in; a load requested during a pass that reuses
// its weights runs in the background (overlap) and is swapped in by the
// next pass that asks for a new tile, without waiting; a second request
// waits while a decoded tile is pending; a pass that asks for a new tile
// when none is coming keeps the current one.
module tb_accel_ctrl;
  logic clk = 0, rst_n = 0, start = 0, stride2 = 0, new_tile = 0, load = 0;
  logic [15:0] width = 0, height = 0;
  logic dec_start, dec_done = 0, swap, lb_clear, to_lb, res_last, busy, done;
  logic loading, pending;
  logic pix_take = 0, res_take = 0, out_last_sent = 0;
  logic [31:0] out_count;
  int checks = 0, failures = 0;

  accel_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decoder model: done 20..80 cycles after dec_start; counts starts and
  // cycles in which it decodes while a pass streams pixels
  int n_dec = 0, n_overlap = 0, n_wait = 0;   // n_wait: LOAD cycles of the last pass
  bit dec_busy = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (dec_start) begin
        int d = int'($urandom_range(80, 20));
        chk(!dec_busy, "dec_start while decoding");
        n_dec++;
        dec_busy = 1;
        repeat (d) begin
          @(posedge clk);
          if (to_lb) n_overlap++;
        end
        @(negedge clk); dec_done = 1;
        @(negedge clk); dec_done = 0; dec_busy = 0;
      end
    end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // pass: nt = ask for a new tile; ld = request a load with the start;
  // ld_mid = request a load in the middle of the pass; exp_swap = 1 if a
  // bank swap is expected
  task automatic pass(input int w, input int h, input bit s2, input bit nt,
                      input bit ld, input bit ld_mid, input bit exp_swap);
    int nres, nswap, ndec, lastpos, ndone, exp_res, taken, cyc;
    bit sent_last = 0;
    exp_res = s2 ? ((w - 3) / 2 + 1) * ((h - 3) / 2 + 1) : (w - 2) * (h - 2);
    nres = 0; nswap = 0; ndec = 0; lastpos = -1; ndone = 0; taken = 0; cyc = 0;
    @(negedge clk);
    width = 16'(w); height = 16'(h); stride2 = s2; new_tile = nt;
    start = 1; load = ld;
    @(negedge clk);
    start = 0; load = 0;
    n_wait = 0;
    while (!done && cyc < 20000) begin
      if (dut.state_q == 2'd1) n_wait++;
      // environment
      load = ld_mid && (taken >= w * h / 2);
      if (load) ld_mid = 0;
      pix_take = to_lb && ($urandom_range(3, 0) != 0);
      res_take = busy && (dut.state_q != 2'd1) && (nres < exp_res) && ($urandom_range(2, 0) == 0) && ((taken + (s2 ? w : 0)) * exp_res >= (nres + 1) * w * h);
      out_last_sent = (lastpos >= 0) && (nres == exp_res) && !res_take && !sent_last;
      @(posedge clk);
      if (dec_start) ndec++;
      if (swap) nswap++;
      if (pix_take) taken++;
      if (res_take) begin
        if (res_last) begin chk(lastpos < 0, "res_last once"); lastpos = nres; end
        nres++;
      end
      if (done) ndone++;
      if (out_last_sent) sent_last = 1;
      @(negedge clk);
      cyc++;
    end
    load = 0; pix_take = 0; res_take = 0; out_last_sent = 0;
    @(negedge clk);
    chk(nres == exp_res, $sformatf("results %0d exp %0d", nres, exp_res));
    chk(lastpos == exp_res - 1, $sformatf("res_last at %0d", lastpos));
    chk(taken == w * h, $sformatf("pixels %0d exp %0d", taken, w * h));
    chk(nswap == int'(exp_swap), $sformatf("swaps %0d exp %0d", nswap, exp_swap));
    chk(!busy, "idle after done");
    chk(out_count == 32'(exp_res), "out_count");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    //    w   h  s2 new ld mid swap
    pass( 7,  6, 0, 1, 1, 0, 1);   // load and use: waits for the decode
    chk(n_wait > 10, "pass waited for its tile");
    pass( 9,  9, 1, 0, 0, 1, 0);   // reuse, load next tile in the background
    chk(n_overlap > 0, "decode overlapped a pass");
    repeat (100) @(negedge clk);
    chk(pending && !loading, "decoded tile pending");
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    repeat (100) @(negedge clk);
    chk(n_dec == 2 && loading, "second load waits while a tile is pending");
    pass(10,  4, 0, 1, 0, 0, 1);   // uses the pending tile without waiting
    chk(n_wait == 1, $sformatf("no wait for a pending tile (%0d)", n_wait));
    repeat (100) @(negedge clk);
    chk(n_dec == 3 && pending, "waiting load started after the swap");
    pass(28, 28, 1, 1, 0, 0, 1);   // uses it
    pass( 8,  8, 0, 1, 0, 0, 0);   // new tile asked, none coming: keep
    pass(12,  7, 1, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
