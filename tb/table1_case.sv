// table1_case: one configuration of the sampler-count table, driven
// through an afc_decoder instance.
//
// For a PLL ratio N with NAUX auxiliary points and harmonics N-IMAX ..
// N+IMAX reachable, it feeds the decoder the pattern of every harmonic, for
// both phase-detector polarities, and checks that the decoder names the
// right offset, i.e. that NAUX points are enough to tell all of them apart
// and the true lock from every false one. Patterns are worked out from the
// sine waveform, not from the decoder's table: amplitude 1, window +-0.01
// (with 128 points the smallest non-zero sample is sin(pi/64), under 5 %
// of the amplitude, so the window must be narrow).
// Runs on its own after reset; done rises when it has finished, and
// checks/failures hold the counts.
module table1_case #(
  parameter int N    = 64,
  parameter int NAUX = 15,
  parameter int IMAX = 7
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int OW = $clog2(IMAX + 1) + 1;
  localparam real PI = 3.14159265358979;

  logic en = 1'b0, rising = 1'b0;
  logic [NAUX-1:0] hi = '0, lo = '0;
  logic [3:0] tune;
  logic valid, tl, dn;
  logic signed [OW-1:0] off;

  afc_decoder #(.N_RATIO(N), .N_AUX(NAUX), .I_MAX(IMAX)) u_dec (
    .clk, .rst_n, .en, .rising, .hi, .lo, .tune, .valid, .offset(off),
    .true_lock(tl), .done(dn)
  );

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    wait (rst_n);
    for (int pol = 0; pol < 2; pol++) begin
      for (int i = -IMAX; i <= IMAX; i++) begin
        real v;
        for (int k = 1; k <= NAUX; k++) begin
          v = $sin(2.0 * PI * real'(N + i) * real'(k) / real'(NAUX + 1));
          if (pol == 0) v = -v;
          hi[k-1] = v > 0.01;
          lo[k-1] = v < -0.01;
        end
        rising = 1'(pol);
        @(negedge clk) en = 1'b1;
        @(negedge clk) en = 1'b0;
        checks++;
        if (!(valid && off == OW'(i) && tl == (i == 0))) begin
          failures++;
          $display("FAIL N=%0d NAUX=%0d harmonic %0d polarity %0d: valid=%0b offset=%0d",
                   N, NAUX, N + i, pol, valid, off);
        end
      end
    end
    done = 1'b1;
  end
endmodule
