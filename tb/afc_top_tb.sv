// afc_top_tb: end-to-end test of the AFC with a behavioural model of the
// analog parts around it, at the design's default parameters.
//
// Model (all in this testbench):
//  - DLL: 32 phases of the reference, built from a 36 ps time step, so one
//    reference period is 1152 ps (about 868 MHz, close to 875 MHz).
//  - PLL: coarse code c puts the oscillator near harmonic
//    m = clamp(c + BASE, 57, 71) of the reference; 64 is the wanted one
//    (56 GHz). After every change of the code the PLL spends a random
//    100..200 reference cycles acquiring, with the held phase-detector
//    voltage swinging as a slow beat, then locks to m and holds a near-
//    constant voltage.
//  - Lock-detector front end: two storage capacitors written through
//    ld_store1 / ld_store2, compared with a 20 mV window.
//  - Auxiliary sampler and window comparator: while samp_en is high, at
//    each rising edge of sclk the oscillator, amplitude 600 mV, is
//    evaluated at the true time of that edge within the period, plus
//    noise, and compared against +-150 mV. Disabled, it reads zero.
// Scenario A (falling-edge PLL, BASE 54) starts at code 0111, three false
// locks below the target (61, 62, 63) and ends in true lock at code 1010.
// Scenario B (rising-edge PLL, BASE 62) starts above the target and walks
// the code down. Every decoded test is checked against the harmonic the
// model is locked to: the pattern (worked out from the waveform), the
// offset, the code step and the test length. Mechanisms counted, each must
// occur: false lock corrected upwards and downwards, true lock found,
// periodic re-test in true lock, test abandoned on lock loss, lock-counter
// runs cut short by a difference, capacitor swaps, both PLL polarities.
module afc_top_tb;
  import afc_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_AUX = 15, DLL_TAPS = 32, SC = 2;
  localparam int STEP_T = 36;
  localparam real PI = 3.14159265358979;

  logic rst_n = 1'b0, rising = 1'b0;
  logic [DLL_TAPS-1:0] dll_phase;
  logic clk;
  logic sclk, samp_en, cmp_hi = 1'b0, cmp_lo = 1'b0;
  logic ld_equal = 1'b0, ld_store = 1'b1, ld_store1, ld_store2;
  logic [3:0] tune;
  logic lock, ld_select, dec_valid, true_lock, dec_done, test_aborted;
  logic [5:0] lock_count;
  afc_state_e state;
  logic [3:0] point;
  logic [4:0] tap;
  logic [14:0] pat_hi, pat_lo;
  logic signed [3:0] dec_offset;
  int checks = 0, failures = 0;

  assign clk = dll_phase[0];

  afc_top dut (.*);

  // ---------------- DLL: delayed copies of the reference ----------------
  int tick = 0;
  initial begin
    forever begin
      for (int j = 0; j < DLL_TAPS; j++)
        dll_phase[j] = (((tick - j) % DLL_TAPS + DLL_TAPS) % DLL_TAPS) < DLL_TAPS / 2;
      #STEP_T;
      tick = (tick + 1) % DLL_TAPS;
    end
  end

  initial begin : watchdog
    repeat (120000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: tune=%0d m=%0d offset=%0d", what, $time, tune, m_cur,
               dec_offset);
    end
  endtask

  // ---------------- PLL model ----------------
  int base = 54;
  int m_cur = 61;          // harmonic the model sits on
  logic pll_locked = 1'b0;
  int acq_left = 150;
  int beat = 20, nbeat = 0;
  int vhold = 0;           // held SSPD voltage, mV
  logic [3:0] tune_seen = 4'd7;
  logic glitch_req = 1'b0;

  function automatic int harmonic(input logic [3:0] c);
    int m;
    m = int'(c) + base;
    if (m < 57) m = 57;
    if (m > 71) m = 71;
    return m;
  endfunction

  // one step of the model per reference cycle, between the edges
  int cap1 = 0, cap2 = 0;
  always @(negedge clk) begin
    if (!rst_n) begin
      tune_seen  = tune;
      m_cur      = harmonic(tune);
      pll_locked = 1'b0;
      acq_left   = 150;
      cap1 = 0;
      cap2 = 0;
    end else begin
      if (tune != tune_seen) begin
        tune_seen  = tune;
        m_cur      = harmonic(tune);
        pll_locked = 1'b0;
        acq_left   = $urandom_range(100, 200);
        beat       = $urandom_range(14, 40);
      end
      if (!pll_locked) begin
        acq_left--;
        if (acq_left <= 0) pll_locked = 1'b1;
      end
      nbeat++;
      if (pll_locked) vhold = 10 + $urandom_range(0, 6);
      else vhold = int'(300.0 * $sin(2.0 * PI * real'(nbeat) / real'(beat)));
      if (glitch_req) begin
        vhold += 200;
        glitch_req = 1'b0;
      end
    end
    if (ld_store1) cap1 = vhold;
    if (ld_store2) cap2 = vhold;
    ld_equal = ((cap1 > cap2) ? cap1 - cap2 : cap2 - cap1) < 20;
  end

  // ---------------- auxiliary sampler + window comparator ----------------
  function automatic real osc(input int m, input int t32, input logic rise);
    real v;
    v = 600.0 * $sin(2.0 * PI * real'(m) * real'(t32) / 32.0);
    return rise ? v : -v;
  endfunction

  always @(posedge sclk) begin
    real v;
    if (!samp_en) v = 0.0;
    else if (pll_locked) v = osc(m_cur, tick, rising) + real'($urandom_range(0, 60)) - 30.0;
    else v = real'($urandom_range(0, 1200)) - 600.0;
    cmp_hi <= (v > 150.0);
    cmp_lo <= (v < -150.0);
  end

  // ---------------- checking ----------------
  int n_up = 0, n_down = 0, n_true = 0, n_retest = 0, n_abort = 0;
  int n_ld_cut = 0, n_swap = 0, n_modes = 0, n_meas = 0;
  int up_seq[$];
  logic sel_q = 1'b0;
  logic [5:0] cnt_q = '0;
  logic want_glitch = 1'b0;
  int m_dec = 0, tune_dec = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (ld_select != sel_q) n_swap++;
      if (cnt_q >= 6'd3 && lock_count == 0 && !lock) n_ld_cut++;
      if (test_aborted) n_abort++;
      if (state == ST_MEASURE) begin
        n_meas++;
        if (want_glitch && n_meas == 10) begin
          glitch_req  = 1'b1;
          want_glitch = 1'b0;
        end
      end
      // the decoder is enabled in DECODE: the pattern must be complete
      if (state == ST_DECODE) begin
        logic [14:0] eh, el;
        for (int k = 1; k <= int'(N_AUX); k++) begin
          real v;
          v = osc(m_cur, 2 * k, rising);
          eh[k-1] = v > 150.0;
          el[k-1] = v < -150.0;
        end
        m_dec    = m_cur;
        tune_dec = int'(tune);
        check("test length", n_meas == int'(N_AUX * SC));
        check("pattern high", pat_hi == eh);
        check("pattern low", pat_lo == el);
      end
      if (dec_done) begin
        int i;
        i = m_dec - 64;
        check("decoded", dec_valid && dec_offset == 4'(i));
        check("true lock flag", true_lock == (i == 0));
        check("code step", int'(tune) == tune_dec - ((i > 0) ? 1 : (i < 0) ? -1 : 0));
        if (i < 0) begin n_up++; up_seq.push_back(int'(tune)); end
        if (i > 0) n_down++;
        if (i == 0) begin
          if (n_true > 0) n_retest++;
          n_true++;
        end
      end
      if (state != ST_MEASURE) n_meas = 0;
    end
    sel_q <= ld_select;
    cnt_q <= lock_count;
  end

  task automatic run_until_true_lock(input int max_cycles);
    int c;
    c = 0;
    while (!(true_lock && lock) && c < max_cycles) begin
      @(posedge clk);
      c++;
    end
  endtask

  initial begin
    int true_before;
    // ---- scenario A: falling-edge PLL, three false locks below target ----
    base = 54;
    rising = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    n_modes++;
    check("initial code", tune == 4'b0111);
    // abandon the second test by a disturbance of the held voltage
    wait (n_up == 1);
    want_glitch = 1'b1;
    run_until_true_lock(20000);
    check("A reaches true lock", true_lock && lock);
    check("A final code 1010", tune == 4'b1010);
    check("A three false locks", up_seq.size() == 3);
    if (up_seq.size() == 3)
      check("A code sequence 1000, 1001, 1010",
            up_seq[0] == 8 && up_seq[1] == 9 && up_seq[2] == 10);
    // stay in true lock: periodic re-tests keep the code
    true_before = n_true;
    repeat (2 * 4096 + 200) @(posedge clk);
    check("A re-tested", n_true >= true_before + 2);
    check("A code kept", tune == 4'b1010 && lock);

    // ---- scenario B: rising-edge PLL, starts above target ----
    #1 rst_n = 1'b0;
    base = 62;
    rising = 1'b1;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    n_modes++;
    run_until_true_lock(30000);
    check("B reaches true lock", true_lock && lock);
    check("B final code", tune == 4'd2);
    repeat (300) @(posedge clk);
    check("B stays locked", lock && tune == 4'd2);

    $display("mechanisms: up=%0d down=%0d true=%0d retest=%0d abort=%0d ld_cut=%0d swap=%0d modes=%0d",
             n_up, n_down, n_true, n_retest, n_abort, n_ld_cut, n_swap, n_modes);
    check("false lock corrected upwards", n_up > 0);
    check("false lock corrected downwards", n_down > 0);
    check("true lock found", n_true > 0);
    check("periodic re-test", n_retest > 0);
    check("test abandoned on lock loss", n_abort > 0);
    check("lock counter run cut short", n_ld_cut > 0);
    check("capacitor swap", n_swap > 0);
    check("both polarities", n_modes == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
