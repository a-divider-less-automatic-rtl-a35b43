// afc_shift_reg: serial-in, parallel-out store for one bit of the window
// comparator (the AFC has two of them, one for "high" and one for "low").
//
// The frequency test is serialized: one auxiliary sampler and one window
// comparator take the samples one after another, and each decision is
// shifted in here. After N_AUX shifts, q holds the whole pattern. The
// newest bit enters at q[0] and older bits move up, so the first sample of
// a test ends in q[N_AUX-1].
//
// Interface and timing: on a rising edge of clk with shift high, d is
// shifted in. clear (synchronous) empties the register and wins over
// shift. rst_n is an asynchronous active-low reset.
// Storing the decisions in two shift registers follows the published
// design; the shift enable in place of a gated shift clock, the clear
// input and the reset are this design's choices.
module afc_shift_reg #(
  parameter int unsigned N_AUX = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift,
  input  logic             d,
  output logic [N_AUX-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (shift) q <= {q[N_AUX-2:0], d};
  end

endmodule
