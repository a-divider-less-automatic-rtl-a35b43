// afc_decoder: turns the pattern of one frequency test into a frequency
// state and corrects the coarse tuning word of the oscillator.
//
// hi[k-1] / lo[k-1] hold the high / low decision of the window comparator at
// sampling point k (k = 1..N_AUX); neither set means "zero". For every
// harmonic m = N_RATIO+i the oscillator can lock to (|i| <= I_MAX) the
// expected pattern is a constant (afc_pkg::exp_sample), so the comparison
// below is a look-up table holding every possible state. i = 0, all samples
// zero, is the true lock. A pattern that matches no entry (noise, a test cut
// short) leaves the tuning alone. Elaboration stops with an error if the
// parameters break the sampler-count rule (see config_ok).
//
// Correction: the oscillator runs too low for i < 0 and too high for
// i > 0, and a higher tuning code gives a higher frequency. The code moves
// by -i, limited to MAX_STEP codes per test, and saturates at the ends of
// its range. With MAX_STEP = 1 each false lock moves the code by one step,
// after which the PLL relocks and the test repeats.
//
// Interface and timing: en (one clk cycle) decodes hi/lo, updates tune and
// registers valid/offset/true_lock on the same rising edge of clk; done
// pulses for one cycle after it. rising = 1 selects a PLL that locks to the
// rising zero crossing (high and low swap). rst_n (asynchronous, active
// low) loads tune with TUNE_INIT.
// The pattern rule, the look-up table and the four-bit tuning word follow
// the published design. The correction step, the reset code and the
// behaviour on an unknown pattern are this design's choices, the first two
// read from the published calibration run (one code step per false lock,
// starting from code 0111).
module afc_decoder
  import afc_pkg::*;
#(
  parameter int unsigned N_RATIO   = 64,
  parameter int unsigned N_AUX     = 15,
  parameter int unsigned I_MAX     = 7,
  parameter int unsigned TUNE_BITS = 4,
  parameter int unsigned TUNE_INIT = 7,
  parameter int unsigned MAX_STEP  = 1,
  localparam int unsigned OW = $clog2(I_MAX + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 rising,
  input  logic [N_AUX-1:0]     hi,
  input  logic [N_AUX-1:0]     lo,
  output logic [TUNE_BITS-1:0] tune,
  output logic                 valid,
  output logic signed [OW-1:0] offset,
  output logic                 true_lock,
  output logic                 done
);

  localparam int unsigned P        = N_AUX + 1;
  localparam int          TUNE_MAX = (1 << TUNE_BITS) - 1;

  // Sampler-count rule: with P points the true lock must read all zeros
  // (P divides 2N) and no false lock may (P does not divide 2(N+i)), and no
  // two reachable harmonics may share a residue mod P (same pattern).
  function automatic bit config_ok();
    for (int i = -int'(I_MAX); i <= int'(I_MAX); i++) begin
      if ((i == 0) != ((2 * (int'(N_RATIO) + i)) % int'(P) == 0)) return 1'b0;
      for (int j = -int'(I_MAX); j < i; j++)
        if ((int'(N_RATIO) + i) % int'(P) == (int'(N_RATIO) + j) % int'(P)) return 1'b0;
    end
    return 1'b1;
  endfunction

  if (I_MAX >= N_RATIO || !config_ok()) begin : gen_param_check
    $error("afc_decoder: N_AUX+1 points cannot tell N_RATIO+-I_MAX apart");
  end

  // Look-up: which harmonic does the measured pattern belong to?
  logic           hit;
  int             hit_i;
  always_comb begin
    logic match;
    samp_e e;
    hit   = 1'b0;
    hit_i = 0;
    for (int i = -int'(I_MAX); i <= int'(I_MAX); i++) begin
      match = 1'b1;
      for (int k = 1; k <= int'(N_AUX); k++) begin
        e = exp_sample(int'(N_RATIO) + i, k, P, rising);
        if (hi[k-1] != (e == SAMP_HIGH) || lo[k-1] != (e == SAMP_LOW))
          match = 1'b0;
      end
      if (match && !hit) begin
        hit   = 1'b1;
        hit_i = i;
      end
    end
  end

  // Correction of the coarse tuning word.
  int step_c;
  int tune_n;
  always_comb begin
    step_c = -hit_i;
    if (step_c > int'(MAX_STEP))  step_c = int'(MAX_STEP);
    if (step_c < -int'(MAX_STEP)) step_c = -int'(MAX_STEP);
    tune_n = int'(tune) + step_c;
    if (tune_n > TUNE_MAX) tune_n = TUNE_MAX;
    if (tune_n < 0)        tune_n = 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tune      <= TUNE_BITS'(TUNE_INIT);
      valid     <= 1'b0;
      offset    <= '0;
      true_lock <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= en;
      if (en) begin
        valid     <= hit;
        offset    <= OW'(hit_i);
        true_lock <= hit && (hit_i == 0);
        if (hit) tune <= TUNE_BITS'(tune_n);
      end
    end
  end

endmodule
