// afc_top: divider-less automatic frequency calibration (AFC) for a
// millimetre-wave sub-sampling PLL, digital part.
//
// A sub-sampling phase detector cannot tell the wanted harmonic of the
// reference from its neighbours, so the PLL can lock falsely. Instead of a
// frequency divider and a second PLL, this AFC samples the oscillator at
// N_AUX extra points spread evenly over one reference period. In true lock
// every point sits on a zero crossing; in a false lock the samples show a
// pattern that is unique to the harmonic. The test is serialized: one
// sampler and one window comparator, clocked by a DLL phase the edge
// selector picks, deliver one high/low decision per point into two shift
// registers. The decoder matches the pattern against the table of all
// reachable harmonics and moves the 4-bit coarse tuning word of the
// oscillator. A sample-based lock detector starts each test.
//
// Analog parts stay outside and connect through ports: the DLL phases
// (dll_phase), the auxiliary sampler clocked by sclk and enabled by samp_en, its window
// comparator (cmp_hi/cmp_lo), the lock detector's storage capacitors and
// comparator (ld_store1/ld_store2 out, ld_equal in) and its store pulse
// (ld_store). All logic runs on clk, the reference clock; rst_n is an
// asynchronous active-low reset. rising tells the decoder whether the PLL
// locks to the rising (1) or falling (0) zero crossing.
// Default numbers are those of the published 56 GHz / 875 MHz design
// (N = 64, 15 auxiliary points, 32-tap DLL, 4-bit tuning word); the lock
// threshold, settling time and re-test interval are this design's choices.
module afc_top
  import afc_pkg::*;
#(
  parameter int unsigned N_RATIO       = 64,
  parameter int unsigned N_AUX         = 15,
  parameter int unsigned I_MAX         = 7,
  parameter int unsigned DLL_TAPS      = 32,
  parameter int unsigned TUNE_BITS     = 4,
  parameter int unsigned TUNE_INIT     = 7,
  parameter int unsigned MAX_STEP      = 1,
  parameter int unsigned LOCK_COUNT    = 63,
  parameter int unsigned SAMPLE_CYCLES = 2,
  parameter int unsigned RETEST_CYCLES = 4096,
  localparam int unsigned PW = $clog2(N_AUX + 1),
  localparam int unsigned TW = $clog2(DLL_TAPS),
  localparam int unsigned OW = $clog2(I_MAX + 1) + 1,
  localparam int unsigned LW = $clog2(LOCK_COUNT + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rising,
  // DLL and auxiliary sampler / window comparator
  input  logic [DLL_TAPS-1:0]  dll_phase,
  output logic                 sclk,
  output logic                 samp_en,
  input  logic                 cmp_hi,
  input  logic                 cmp_lo,
  // lock detector front end
  input  logic                 ld_equal,
  input  logic                 ld_store,
  output logic                 ld_store1,
  output logic                 ld_store2,
  // oscillator coarse tuning
  output logic [TUNE_BITS-1:0] tune,
  // status
  output logic                 lock,
  output logic [LW-1:0]        lock_count,
  output logic                 ld_select,
  output afc_state_e           state,
  output logic [PW-1:0]        point,
  output logic [TW-1:0]        tap,
  output logic [N_AUX-1:0]     pat_hi,
  output logic [N_AUX-1:0]     pat_lo,
  output logic                 dec_valid,
  output logic signed [OW-1:0] dec_offset,
  output logic                 true_lock,
  output logic                 dec_done,
  output logic                 test_aborted
);

  logic sel_load, sel_step, sr_clear, sr_shift, dec_en;

  lock_detector #(.LOCK_COUNT(LOCK_COUNT)) u_lock (
    .clk, .rst_n,
    .equal  (ld_equal),
    .store  (ld_store),
    .store1 (ld_store1),
    .store2 (ld_store2),
    .select (ld_select),
    .count  (lock_count),
    .lock
  );

  afc_state_machine #(
    .N_AUX(N_AUX), .SAMPLE_CYCLES(SAMPLE_CYCLES), .RETEST_CYCLES(RETEST_CYCLES)
  ) u_fsm (
    .clk, .rst_n, .lock,
    .sel_load, .sel_step,
    .clear   (sr_clear),
    .shift   (sr_shift),
    .dec_en,
    .samp_en,
    .aborted (test_aborted),
    .state
  );

  edge_selector #(.N_AUX(N_AUX), .DLL_TAPS(DLL_TAPS)) u_sel (
    .clk, .rst_n,
    .load  (sel_load),
    .step  (sel_step),
    .phase (dll_phase),
    .point, .tap, .sclk
  );

  afc_shift_reg #(.N_AUX(N_AUX)) u_sr_hi (
    .clk, .rst_n, .clear(sr_clear), .shift(sr_shift), .d(cmp_hi), .q(pat_hi)
  );

  afc_shift_reg #(.N_AUX(N_AUX)) u_sr_lo (
    .clk, .rst_n, .clear(sr_clear), .shift(sr_shift), .d(cmp_lo), .q(pat_lo)
  );

  afc_decoder #(
    .N_RATIO(N_RATIO), .N_AUX(N_AUX), .I_MAX(I_MAX), .TUNE_BITS(TUNE_BITS),
    .TUNE_INIT(TUNE_INIT), .MAX_STEP(MAX_STEP)
  ) u_dec (
    .clk, .rst_n,
    .en        (dec_en),
    .rising,
    .hi        (pat_hi),
    .lo        (pat_lo),
    .tune,
    .valid     (dec_valid),
    .offset    (dec_offset),
    .true_lock,
    .done      (dec_done)
  );

endmodule
