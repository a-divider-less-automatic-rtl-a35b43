// afc_state_machine_tb: self-checking test of the AFC controller.
//
// Checks, cycle by cycle, a complete frequency test: the selector step out
// of IDLE, one shift every SAMPLE_CYCLES cycles with a selector step in the
// same cycle, exactly N_AUX shifts, the decoder enable N_AUX*SAMPLE_CYCLES+1
// cycles after the test starts, the HOLD state ending after RETEST_CYCLES
// while lock lasts (periodic re-test) or at once when lock is lost, and a
// test abandoned when lock drops halfway (abort pulse, selector reset, no
// decoder enable).
module afc_state_machine_tb;
  import afc_pkg::*;
  localparam int unsigned N_AUX = 15, SC = 2, RT = 40;

  logic clk = 1'b0, rst_n = 1'b0, lock = 1'b0;
  logic sel_load, sel_step, clear, shift, dec_en, samp_en, aborted;
  afc_state_e state;
  int checks = 0, failures = 0;

  afc_state_machine #(.N_AUX(N_AUX), .SAMPLE_CYCLES(SC), .RETEST_CYCLES(RT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%s shift=%0b step=%0b dec=%0b", what, $time,
               state.name(), shift, sel_step, dec_en);
    end
  endtask

  // one complete test from IDLE with lock held high; outputs are looked at
  // just before each rising edge
  task automatic full_test();
    int shifts = 0;
    check("starts in IDLE", state == ST_IDLE && clear && !sel_load && !samp_en);
    check("step out of IDLE", sel_step && !shift && !dec_en);
    @(negedge clk);
    for (int c = 1; c <= int'(N_AUX * SC); c++) begin
      check("measuring", state == ST_MEASURE && !dec_en && !clear && !sel_load);
      check("shift timing", shift == (c % SC == 0));
      check("step with shift", sel_step == shift);
      check("sampler enabled", samp_en);
      if (shift) shifts++;
      @(negedge clk);
    end
    check("N_AUX shifts", shifts == int'(N_AUX));
    check("decoder enable latency", dec_en && state == ST_DECODE && !shift);
    @(negedge clk);
    check("hold", state == ST_HOLD && !dec_en && !samp_en);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("reset", state == ST_IDLE && !shift && !dec_en && !sel_step);
    repeat (3) @(negedge clk);
    check("idle without lock", state == ST_IDLE && !sel_step);
    // a test, then the periodic re-test while lock lasts
    lock = 1'b1;
    #1 full_test();
    for (int c = 1; c < int'(RT); c++) begin
      check("hold while locked", state == ST_HOLD);
      @(negedge clk);
    end
    check("hold ends after RETEST_CYCLES", state == ST_HOLD);
    @(negedge clk);
    full_test();
    // lock lost in HOLD: back to IDLE, stays there
    @(negedge clk);
    lock = 1'b0;
    @(negedge clk);
    check("lock loss leaves HOLD", state == ST_IDLE);
    repeat (4) @(negedge clk);
    check("waits for lock", state == ST_IDLE && !sel_step);
    // abort halfway
    lock = 1'b1;
    @(negedge clk);
    repeat (11) @(negedge clk);
    lock = 1'b0;
    #1 check("abort loads selector", sel_load && state == ST_MEASURE && !shift);
    @(negedge clk);
    check("abort pulse", aborted && state == ST_IDLE);
    for (int c = 0; c < 40; c++) begin
      check("no decode after abort", !dec_en);
      @(negedge clk);
    end
    check("abort pulse is short", !aborted);
    lock = 1'b1;
    #1 full_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
