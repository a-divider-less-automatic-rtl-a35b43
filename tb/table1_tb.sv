// table1_tb: checks the decoder in every configuration of the sampler-count
// table for PLL ratios 8 and 64 (tuning range 5 %, 10 %, 25 %, 50 % of the
// centre frequency):
//   N = 8:  3, 3, 7, 15 auxiliary points, reachable harmonics +-1, 1, 2, 4
//   N = 64: 15, 15, 63, 127 points, reachable harmonics +-4, 7, 16, 32
// (reachable harmonics: ceil(range * N), as f_ref = f0 / N). Every
// reachable harmonic must decode to its own offset in both polarities.
module table1_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  localparam int NC = 8;
  logic done [NC];
  int   c_checks [NC];
  int   c_fail [NC];

  table1_case #(.N(8),  .NAUX(3),   .IMAX(1))  c0 (.clk, .rst_n, .done(done[0]), .checks(c_checks[0]), .failures(c_fail[0]));
  table1_case #(.N(8),  .NAUX(3),   .IMAX(1))  c1 (.clk, .rst_n, .done(done[1]), .checks(c_checks[1]), .failures(c_fail[1]));
  table1_case #(.N(8),  .NAUX(7),   .IMAX(2))  c2 (.clk, .rst_n, .done(done[2]), .checks(c_checks[2]), .failures(c_fail[2]));
  table1_case #(.N(8),  .NAUX(15),  .IMAX(4))  c3 (.clk, .rst_n, .done(done[3]), .checks(c_checks[3]), .failures(c_fail[3]));
  table1_case #(.N(64), .NAUX(15),  .IMAX(4))  c4 (.clk, .rst_n, .done(done[4]), .checks(c_checks[4]), .failures(c_fail[4]));
  table1_case #(.N(64), .NAUX(15),  .IMAX(7))  c5 (.clk, .rst_n, .done(done[5]), .checks(c_checks[5]), .failures(c_fail[5]));
  table1_case #(.N(64), .NAUX(63),  .IMAX(16)) c6 (.clk, .rst_n, .done(done[6]), .checks(c_checks[6]), .failures(c_fail[6]));
  table1_case #(.N(64), .NAUX(127), .IMAX(32)) c7 (.clk, .rst_n, .done(done[7]), .checks(c_checks[7]), .failures(c_fail[7]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic all_done();
    for (int c = 0; c < NC; c++) if (!done[c]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      checks   += c_checks[c];
      failures += c_fail[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
