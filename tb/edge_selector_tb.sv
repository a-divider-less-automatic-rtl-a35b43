// edge_selector_tb: self-checking test of the sampling-edge selector.
//
// The testbench builds the 32 delayed reference phases of a DLL from a
// time-step counter (32 steps of 10 time units per reference period), so
// the selected clock has real edges. It checks the point sequence after
// load and under steps (N_AUX down to 0, then wrap), the tap arithmetic,
// and, while the selection moves backwards every cycle, that the selected
// clock rises exactly once per period inside the period, tap/32 of a
// period after the reference edge, and otherwise only on the reference edge
// itself (the instant of point 0): no edge at a time that was not chosen.
module edge_selector_tb;
  localparam int unsigned N_AUX = 15, DLL_TAPS = 32;
  localparam int unsigned PW = $clog2(N_AUX + 1), TW = $clog2(DLL_TAPS);
  localparam int STEP_T = 10;

  logic rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [DLL_TAPS-1:0] phase;
  logic clk;
  logic [PW-1:0] point;
  logic [TW-1:0] tap;
  logic sclk;
  int checks = 0, failures = 0;

  assign clk = phase[0];

  edge_selector #(.N_AUX(N_AUX), .DLL_TAPS(DLL_TAPS)) dut (.*);

  // DLL model: phase j is the reference delayed by j/32 of a period
  int tick = 0;
  initial begin
    forever begin
      for (int j = 0; j < DLL_TAPS; j++)
        phase[j] = (((tick - j) % DLL_TAPS + DLL_TAPS) % DLL_TAPS) < DLL_TAPS / 2;
      #STEP_T;
      tick = (tick + 1) % DLL_TAPS;
    end
  end

  initial begin : watchdog
    #(STEP_T * DLL_TAPS * 400);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: point=%0d tap=%0d", what, $time, point, tap);
    end
  endtask

  // edges of the selected clock within the current reference period
  localparam time TREF = STEP_T * DLL_TAPS;
  int sedges = 0, stray = 0;
  time tref = 0, tsedge = 0;
  always @(posedge sclk) begin
    if ($time % TREF != 0) begin
      sedges++;
      tsedge = $time;
      if ($time % TREF != time'(STEP_T) * tap) stray++;
    end
  end

  initial begin
    int exp_point;
    #1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset point", point == 0);
    step = 1'b1;
    repeat (5) @(posedge clk);
    #1 load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    check("load wins over step", point == 0);
    exp_point = 0;
    // step every cycle for three full rounds
    #(STEP_T * DLL_TAPS - 3);
    sedges = 0;
    for (int c = 0; c < 3 * int'(N_AUX + 1); c++) begin
      @(posedge clk);
      tref = $time;
      #1;
      exp_point = (exp_point == 0) ? N_AUX : exp_point - 1;
      check("step", point == PW'(exp_point));
      check("tap", tap == TW'(exp_point * 2));
      #(STEP_T * DLL_TAPS - 2);
      check("one sampling edge per period", sedges == (exp_point != 0));
      check("no stray edge", stray == 0);
      if (exp_point != 0)
        check("edge position", tsedge - tref == time'(STEP_T * 2 * exp_point));
      sedges = 0;
    end
    step = 1'b0;
    // hold without step: point stays
    repeat (5) @(posedge clk);
    #1 check("hold", point == PW'(exp_point));
    // combinational mux at random times and points
    for (int c = 0; c < 200; c++) begin
      step = 1'($urandom_range(0, 1));
      @(posedge clk);
      #($urandom_range(1, STEP_T * DLL_TAPS - 2));
      check("mux", sclk == phase[tap]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
