// tb_shuff_decoder: encodes random weight tiles (many zeros) with random
// canonical Huffman tables in a reference encoder, feeds the words with
// random gaps, and checks every decoded weight and address, the done pulse,
// that exactly the given number of words is consumed, and the rate (at most
// about one weight or one word per cycle).
module tb_shuff_decoder;
  import plut_pkg::*;
  import plut_tb_pkg::*;

  logic             clk = 0, rst_n = 0, start = 0;
  logic [15:0]      nwords = 0;
  logic [2:0]       hcount [1:HLMAX];
  logic [IDX_W-1:0] hsym   [HLMAX];
  logic [31:0]      s_data = 0;
  logic             s_valid = 0, s_ready;
  logic             w_valid, done, busy;
  logic [9:0]       w_addr;
  code_t            w_code;
  int checks = 0, failures = 0;

  shuff_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0]  wref [];
  logic [31:0] words [];
  int got, wi, cyc, donecnt;
  bit gaps;

  // decoded weights
  always @(posedge clk) if (rst_n && w_valid) begin
    checks++;
    if (w_addr != 10'(got) || w_code != ((wref[got][2:0] == 0) ? code_t'(0) : code_t'(wref[got]))) begin
      failures++;
      $display("FAIL weight %0d: addr %0d code %h exp %h", got, w_addr, w_code, wref[got]);
    end
    got++;
  end
  always @(posedge clk) if (rst_n && done) donecnt++;

  // stream driver
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) wi++;
  end
  always @(negedge clk) begin
    s_valid = (wi < words.size()) && (!gaps || ($urandom_range(3, 0) != 0));
    s_data  = (wi < words.size()) ? words[wi] : 32'h0;
  end

  task automatic run_tile(input int pz, input bit with_gaps);
    htab_t h = rand_htab();
    wref = new[TILE_W];
    foreach (wref[i]) wref[i] = rand_code(pz);
    encode(h, wref, words);
    for (int l = 1; l <= 7; l++) hcount[l] = 3'(h.cnt[l]);
    for (int s = 0; s < 7; s++) hsym[s] = 3'(h.sym[s]);
    got = 0; wi = 0; donecnt = 0; gaps = with_gaps;
    @(negedge clk);
    nwords = 16'(words.size());
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (busy && cyc < 5000) begin @(negedge clk); cyc++; end
    repeat (2) @(negedge clk);
    checks++;
    if (got != int'(TILE_W)) begin failures++; $display("FAIL decoded %0d", got); end
    checks++;
    if (wi != words.size()) begin failures++; $display("FAIL consumed %0d of %0d", wi, words.size()); end
    checks++;
    if (donecnt != 1) begin failures++; $display("FAIL done pulses %0d", donecnt); end
    if (!with_gaps) begin
      checks++;
      if (cyc > int'(TILE_W) + words.size() / 4 + 8) begin
        failures++; $display("FAIL slow: %0d cycles for %0d words", cyc, words.size());
      end
    end
    $display("tile: %0d words, %0d cycles", words.size(), cyc);
  endtask

  initial begin
    words = new[0];
    for (int l = 1; l <= 7; l++) hcount[l] = 0;
    for (int s = 0; s < 7; s++) hsym[s] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_tile(40, 0);
    run_tile(10, 1);
    run_tile(90, 0);
    run_tile(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
