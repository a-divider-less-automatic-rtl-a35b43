// edge_selector: picks the delayed reference edge that clocks the single
// auxiliary sampler of the serialized frequency test.
//
// A delay-locked loop spreads DLL_TAPS phases of the reference clock over
// one reference period (phase[j] lags the reference by j/DLL_TAPS of a
// period). The sampling points k = 0..N_AUX lie at k/(N_AUX+1) of a period,
// i.e. on tap k*DLL_TAPS/(N_AUX+1); point 0 is the reference edge itself,
// where the main sampler of the phase detector already looks. A counter
// holds the current point and steps backwards through all of them,
// N_AUX, N_AUX-1, ..., 1, 0, N_AUX, ... At the reference edge, where the
// choice changes, every tap that is later in the period has already shown
// its rising edge of the previous period or shows none before its own
// time, so moving one point earlier, or from point 0 (which has just
// risen) to the last point, never adds a rising edge: the sampler sees
// exactly one edge per period. Stepping forwards would not have this
// property. The decoder undoes the reversed order.
//
// Interface and timing: clk is the reference clock; load (back to point 0,
// used when a test is abandoned) and step are taken at its rising edge,
// load first. point is the current sampling point, tap the DLL tap in use,
// sclk the selected phase (a combinational multiplexer, no register in the
// clock path). rst_n is an asynchronous active-low reset to point 0.
// The backward cycling through all phases and the use of the DLL follow the
// published design; the counter and its load/step controls are this
// design's choice.
module edge_selector #(
  parameter int unsigned N_AUX    = 15,
  parameter int unsigned DLL_TAPS = 32,
  localparam int unsigned PW = $clog2(N_AUX + 1),
  localparam int unsigned TW = $clog2(DLL_TAPS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                step,
  input  logic [DLL_TAPS-1:0] phase,
  output logic [PW-1:0]       point,
  output logic [TW-1:0]       tap,
  output logic                sclk
);

  localparam int unsigned P    = N_AUX + 1;
  localparam int unsigned TPP  = DLL_TAPS / P;   // taps per sampling point

  if (DLL_TAPS % P != 0 || TPP == 0)
  begin : gen_param_check
    $error("edge_selector: DLL_TAPS must be a multiple of N_AUX+1");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   point <= '0;
    else if (load)                point <= '0;
    else if (step && point == '0) point <= PW'(N_AUX);
    else if (step)                point <= point - 1'b1;
  end

  assign tap  = TW'(point * TPP);
  assign sclk = phase[tap];

endmodule
