// lock_detector: digital part of the divider-less, sample-based lock
// detector of the sub-sampling PLL.
//
// In lock the voltage held after the sub-sampling phase detector is
// constant. The analog front end keeps two samples of it on two storage
// capacitors, "previous" and "current", and a window comparator reports
// whether they are equal. This block closes that loop once per reference
// cycle:
//   equal     -> the counter counts up (it saturates at LOCK_COUNT); the
//                previous sample stays, the next one overwrites "current".
//   not equal -> the counter is cleared and the select flip-flop toggles,
//                which swaps the roles of the two capacitors, so the sample
//                just taken becomes the new "previous".
// lock is high while the counter is full.
//
// Interface and timing: clk is the reference clock. equal is the
// comparator decision for the sample stored in this cycle and is taken at
// the rising edge of clk; count, select and lock change on that edge.
// store is the store pulse of the front end; store1 = store & select and
// store2 = store & ~select steer it to capacitor 1 or 2. rst_n is an
// asynchronous active-low reset that clears the counter and select.
//
// The counter/toggle/steering structure follows the published lock
// detector. The threshold is this design's choice: the published
// waveforms use a small demonstration value and state only that the real
// one is higher. Running on the edge of clk instead of a separate compare
// pulse is also a choice of this design.
module lock_detector #(
  parameter int unsigned LOCK_COUNT = 63,
  localparam int unsigned CW = $clog2(LOCK_COUNT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          equal,
  input  logic          store,
  output logic          store1,
  output logic          store2,
  output logic          select,
  output logic [CW-1:0] count,
  output logic          lock
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      select <= 1'b0;
    end else if (!equal) begin
      count  <= '0;
      select <= ~select;
    end else if (count != CW'(LOCK_COUNT)) begin
      count  <= count + 1'b1;
    end
  end

  assign lock   = (count == CW'(LOCK_COUNT));
  assign store1 = store & select;
  assign store2 = store & ~select;

  // The store pulse never reaches both capacitors.
  always_comb a_one_capacitor: assert final (!rst_n || !(store1 && store2));

endmodule
