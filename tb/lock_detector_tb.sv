// lock_detector_tb: self-checking test of the lock detector core.
//
// Drives the comparator decision "equal" with runs of random length, some
// long enough to reach the lock threshold, and compares count, select, lock
// and the two store enables with a reference model kept in the testbench.
// Also checks that lock comes exactly LOCK_COUNT cycles after a run of
// equal decisions starts, and that a single difference drops it.
module lock_detector_tb;
  localparam int unsigned LOCK_COUNT = 63;
  localparam int unsigned CW = $clog2(LOCK_COUNT + 1);

  logic clk = 1'b0, rst_n = 1'b0, equal = 1'b0, store = 1'b0;
  logic store1, store2, select, lock;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;

  lock_detector #(.LOCK_COUNT(LOCK_COUNT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_count = 0;
  logic m_sel = 1'b0;
  int locks_seen = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: count=%0d/%0d sel=%0b/%0b lock=%0b", what, $time,
               count, m_count, select, m_sel, lock);
    end
  endtask

  task automatic cycle(input logic eq);
    equal = eq;
    store = 1'($urandom_range(0, 1));
    #1;
    check("store1", store1 == (store & m_sel));
    check("store2", store2 == (store & ~m_sel));
    @(posedge clk);
    if (!eq) begin
      m_count = 0;
      m_sel   = ~m_sel;
    end else if (m_count != LOCK_COUNT) m_count++;
    #1;
    check("count", count == CW'(m_count));
    check("select", select == m_sel);
    check("lock", lock == (m_count == LOCK_COUNT));
    if (lock) locks_seen++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset count", count == 0 && !select && !lock);
    // exact latency: LOCK_COUNT equal decisions after a difference
    cycle(1'b0);
    for (int i = 1; i <= int'(LOCK_COUNT); i++) begin
      cycle(1'b1);
      check("lock latency", lock == (i == int'(LOCK_COUNT)));
    end
    cycle(1'b1);
    check("lock holds", lock);
    cycle(1'b0);
    check("lock drops", !lock && count == 0);
    // random runs
    for (int r = 0; r < 120; r++) begin
      int len;
      len = (r % 5 == 0) ? $urandom_range(60, 90) : $urandom_range(0, 12);
      for (int i = 0; i < len; i++) cycle(1'b1);
      cycle(1'b0);
    end
    check("lock reached in random runs", locks_seen > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
