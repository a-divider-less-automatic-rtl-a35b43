// afc_decoder_tb: self-checking test of the pattern decoder and the coarse
// tuning register.
//
// Expected patterns are computed here from the oscillator waveform itself,
// -sin(2*pi*m*k/P) sampled at the P-1 auxiliary points (+sin for a PLL that
// locks to the rising edge), through a window comparator model, and not
// from the decoder's own table. Three instances are tested:
//   u64  the 56 GHz / 875 MHz configuration (N = 64, 15 points), one code
//        step per test: every harmonic 57..71 in both polarities, random
//        order, tuning saturation at both ends, random invalid patterns.
//   u64f same, with an unlimited step (code moves by the whole offset).
//   u8   the N = 8, 7-point example with 1 GHz reference: the printed
//        patterns HHH0LLL (7 GHz) and L0H0L0H (10 GHz) are decoded.
module afc_decoder_tb;
  localparam int unsigned TB = 4;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, rising = 1'b0;
  logic [14:0] hi = '0, lo = '0;
  logic [6:0]  hi8 = '0, lo8 = '0;
  logic [TB-1:0] tune, tune_f, tune8;
  logic valid, valid_f, valid8, tl, tl_f, tl8, done, done_f, done8;
  logic signed [3:0] off, off_f;
  logic signed [2:0] off8;
  int checks = 0, failures = 0;

  afc_decoder u64 (
    .clk, .rst_n, .en, .rising, .hi, .lo, .tune, .valid, .offset(off),
    .true_lock(tl), .done
  );
  afc_decoder #(.MAX_STEP(8)) u64f (
    .clk, .rst_n, .en, .rising, .hi, .lo, .tune(tune_f), .valid(valid_f),
    .offset(off_f), .true_lock(tl_f), .done(done_f)
  );
  afc_decoder #(.N_RATIO(8), .N_AUX(7), .I_MAX(2)) u8 (
    .clk, .rst_n, .en, .rising, .hi(hi8), .lo(lo8), .tune(tune8),
    .valid(valid8), .offset(off8), .true_lock(tl8), .done(done8)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // window comparator model on the ideal waveform; p sampling points
  function automatic void wave_pattern(input int m, input int p, input logic rise,
                                       output logic [14:0] h, output logic [14:0] l);
    real v;
    h = '0;
    l = '0;
    for (int k = 1; k < p; k++) begin
      v = $sin(2.0 * PI * real'(m) * real'(k) / real'(p));
      if (!rise) v = -v;
      h[k-1] = (v > 0.15);
      l[k-1] = (v < -0.15);
    end
  endfunction

  // pattern from a printed string, first character = first point
  function automatic void str_pattern(input string s, output logic [6:0] h,
                                      output logic [6:0] l);
    for (int c = 0; c < 7; c++) begin
      h[c] = (s[c] == "H");
      l[c] = (s[c] == "L");
    end
  endfunction

  int m_tune = 7, m_tune_f = 7;

  task automatic pulse();
    @(negedge clk) en = 1'b1;
    @(negedge clk) en = 1'b0;
  endtask

  task automatic apply64(input int m, input logic rise);
    logic [14:0] h, l;
    int i, s;
    wave_pattern(m, 16, rise, h, l);
    hi = h; lo = l; rising = rise;
    pulse();
    i = m - 64;
    check("done", done && done_f);
    check("valid", valid && valid_f);
    check("offset", off == 4'(i) && off_f == 4'(i));
    check("true lock flag", tl == (i == 0) && tl_f == (i == 0));
    s = (i > 0) ? -1 : (i < 0) ? 1 : 0;
    m_tune   = (m_tune + s > 15) ? 15 : (m_tune + s < 0) ? 0 : m_tune + s;
    m_tune_f = (m_tune_f - i > 15) ? 15 : (m_tune_f - i < 0) ? 0 : m_tune_f - i;
    check("tune step", tune == TB'(m_tune));
    check("tune full step", tune_f == TB'(m_tune_f));
    @(negedge clk);
    check("done is a pulse", !done);
  endtask

  initial begin
    logic [14:0] h, l;
    logic [6:0] h8, l8;
    int m;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("reset tune", tune == 4'b0111 && !valid);
    // every harmonic, both polarities
    for (int r = 0; r < 2; r++)
      for (int mm = 57; mm <= 71; mm++) apply64(mm, 1'(r));
    // drive to the top end and saturate, then to the bottom end
    repeat (20) apply64(57, 1'b0);
    check("saturate high", tune == 4'd15 && tune_f == 4'd15);
    repeat (20) apply64(71, 1'b1);
    check("saturate low", tune == 4'd0 && tune_f == 4'd0);
    // random harmonics
    for (int n = 0; n < 300; n++) apply64($urandom_range(57, 71), 1'($urandom_range(0, 1)));
    // invalid patterns: random words that match no harmonic
    for (int n = 0; n < 200; n++) begin
      int old_tune, old_tune_f;
      logic any;
      hi = 15'($urandom);
      lo = 15'($urandom) & ~hi;
      rising = 1'($urandom_range(0, 1));
      any = 1'b0;
      for (int mm = 57; mm <= 71; mm++) begin
        wave_pattern(mm, 16, rising, h, l);
        if (h == hi && l == lo) any = 1'b1;
      end
      old_tune = int'(tune);
      old_tune_f = int'(tune_f);
      pulse();
      check("invalid pattern flagged", valid == any);
      if (!any) check("invalid pattern keeps tune", int'(tune) == old_tune && int'(tune_f) == old_tune_f);
    end
    // a pattern from the polarity it was not made for is not a lock state
    wave_pattern(63, 16, 1'b0, h, l);
    hi = h; lo = l; rising = 1'b1;
    pulse();
    check("opposite polarity decodes mirrored", valid && off == 4'sd1);

    // N = 8 example with seven auxiliary samples
    rising = 1'b0;
    str_pattern("HHH0LLL", h8, l8);
    hi8 = h8; lo8 = l8;
    pulse();
    check("7 GHz pattern", valid8 && off8 == -3'sd1);
    check("7 GHz raises tune", tune8 == 4'd8);
    str_pattern("L0H0L0H", h8, l8);
    hi8 = h8; lo8 = l8;
    pulse();
    check("10 GHz pattern", valid8 && off8 == 3'sd2);
    check("10 GHz lowers tune", tune8 == 4'd7);
    hi8 = '0; lo8 = '0;
    pulse();
    check("8 GHz true lock", valid8 && tl8 && off8 == 0 && tune8 == 4'd7);
    for (m = 6; m <= 10; m++) begin
      wave_pattern(m, 8, 1'b1, h, l);
      hi8 = h[6:0]; lo8 = l[6:0]; rising = 1'b1;
      pulse();
      check("N=8 rising edge", valid8 && off8 == 3'(m - 8));
    end
    // mirrored example: rising-edge PLL at 7 GHz reads LLL0HHH
    str_pattern("LLL0HHH", h8, l8);
    hi8 = h8; lo8 = l8; rising = 1'b1;
    pulse();
    check("7 GHz mirrored", valid8 && off8 == -3'sd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
