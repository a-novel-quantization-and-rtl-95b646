// tb_act_quantizer: random sums and shifts; checks the code against a
// reference that scales by the power of two and picks the level at the
// smallest distance (ties to the larger level), plus the clip flag and
// the positive sign of zero.
module tb_act_quantizer;
  import plut_pkg::*;
  import plut_tb_pkg::*;

  acc_t              psum;
  logic signed [5:0] shift;
  lut_entry_t        levels [NLEV];
  code_t             code;
  logic              clip;
  int checks = 0, failures = 0;

  act_quantizer dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input acc_t p, input int sh);
    longint v, m, best_d;
    int best;
    bit neg, exp_clip;
    psum = p; shift = 6'(sh);
    #1;
    v = longint'(p);
    if (sh >= 0) v = v * (longint'(1) << sh);
    else         v = v >>> (-sh);
    neg = (v < 0);
    m = neg ? -v : v;
    best = 0; best_d = m;
    for (int i = 1; i < 8; i++) begin
      longint d = (m > level(i)) ? m - level(i) : level(i) - m;
      if (d <= best_d) begin best = i; best_d = d; end
    end
    exp_clip = (m > level(7));
    checks++;
    if (code.idx != 3'(best) || code.sign != (neg && best != 0) || clip != exp_clip) begin
      failures++;
      $display("FAIL p=%0d sh=%0d: got %0d/%0b/%0b exp %0d/%0b/%0b", p, sh,
               code.idx, code.sign, clip, best, neg && best != 0, exp_clip);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) levels[i] = lut_entry_t'(level(i));
    // exact levels, midpoints and neighbours
    for (int i = 0; i < 8; i++) begin
      one(acc_t'(level(i)), 0);
      one(-acc_t'(level(i)), 0);
      if (i < 7) begin
        automatic longint mid = (level(i) + level(i+1) + 1) / 2;
        one(acc_t'(mid), 0);
        one(acc_t'(mid - 1), 0);
        one(-acc_t'(mid), 0);
      end
    end
    one(acc_t'(32'h7fff_ffff), 0);
    one(acc_t'(32'h8000_0000), 0);
    for (int n = 0; n < 3000; n++) begin
      automatic acc_t p = acc_t'($urandom) >>> $urandom_range(24, 4);
      one(p, int'($urandom_range(10, 0)) - 6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
