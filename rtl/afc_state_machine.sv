// afc_state_machine: controller of the serialized frequency test.
//
// The AFC may only judge the frequency while the PLL is locked, truly or
// falsely. Between tests the edge selector rests on point 0 and the two
// shift registers are kept clear. When lock rises the controller steps the
// selector to point N_AUX and walks it backwards through the sampling
// points. Each point is held for SAMPLE_CYCLES reference cycles so that the
// sampler and window comparator have settled; in the last of them the
// comparator decision is shifted in and the selector steps on. After N_AUX
// shifts the selector is back on point 0 and the decoder is enabled for one
// cycle. The
// controller then holds until lock is lost (the new tuning word pulls the
// PLL out of its false lock) or, in a lasting lock, until RETEST_CYCLES
// have passed, when it tests again. Losing lock during a test aborts it.
//
// States (afc_pkg::afc_state_e): IDLE -> MEASURE -> DECODE -> HOLD -> IDLE.
// Outputs are decoded from the state and a cycle counter:
//   sel_step  IDLE with lock (to point N_AUX), and with every shift
//   sel_load  MEASURE without lock: test abandoned, selector to point 0
//   clear     IDLE: empty the shift registers
//   shift     MEASURE, last cycle of a point: shift registers take a bit
//   dec_en    DECODE: decoder updates the tuning word
//   samp_en   MEASURE: enables the auxiliary sampler and its comparator,
//             which can be powered down between tests
// A test takes N_AUX*SAMPLE_CYCLES+1 cycles from the first MEASURE cycle to
// the update of the tuning word. clk is the reference clock; rst_n is an
// asynchronous active-low reset to IDLE.
// Waiting for lock, the serial walk through the points and enabling the
// decoder follow the published design; the settling time, the abort, the
// re-test interval, the state encoding and the timing of the sampler
// enable are this design's choices.
module afc_state_machine
  import afc_pkg::*;
#(
  parameter int unsigned N_AUX         = 15,
  parameter int unsigned SAMPLE_CYCLES = 2,
  parameter int unsigned RETEST_CYCLES = 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       lock,
  output logic       sel_load,
  output logic       sel_step,
  output logic       clear,
  output logic       shift,
  output logic       dec_en,
  output logic       samp_en,
  output logic       aborted,
  output afc_state_e state
);

  localparam int unsigned CW = $clog2(RETEST_CYCLES + SAMPLE_CYCLES + 1);
  localparam int unsigned PW = $clog2(N_AUX + 1);

  logic [CW-1:0] cnt;      // cycles within a point, or within HOLD
  logic [PW-1:0] pts;      // points already shifted in

  logic last_cyc;
  assign last_cyc = (cnt == CW'(SAMPLE_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      cnt     <= '0;
      pts     <= '0;
      aborted <= 1'b0;
    end else begin
      aborted <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          cnt <= '0;
          pts <= '0;
          if (lock) state <= ST_MEASURE;
        end
        ST_MEASURE: begin
          if (!lock) begin
            state   <= ST_IDLE;
            aborted <= 1'b1;
          end else if (last_cyc) begin
            cnt <= '0;
            pts <= pts + 1'b1;
            if (pts == PW'(N_AUX - 1)) state <= ST_DECODE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_DECODE: begin
          cnt   <= '0;
          state <= ST_HOLD;
        end
        ST_HOLD: begin
          if (!lock || cnt == CW'(RETEST_CYCLES - 1)) state <= ST_IDLE;
          else cnt <= cnt + 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign sel_load = (state == ST_MEASURE) && !lock;
  assign clear    = (state == ST_IDLE);
  assign shift    = (state == ST_MEASURE) && lock && last_cyc;
  assign sel_step = ((state == ST_IDLE) && lock) || shift;
  assign dec_en   = (state == ST_DECODE);
  assign samp_en  = (state == ST_MEASURE);

  // A bit is only taken while measuring, never together with the decode,
  // and the selector is never told to load and step at once.
  always_comb begin
    a_shift_in_measure: assert final (!shift || state == ST_MEASURE);
    a_shift_not_decode: assert final (!(shift && dec_en));
    a_load_or_step:     assert final (!(sel_load && sel_step));
  end

endmodule
