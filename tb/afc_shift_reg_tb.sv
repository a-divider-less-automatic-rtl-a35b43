// afc_shift_reg_tb: self-checking test of the serial-in parallel-out
// pattern register. Random shift, clear and data; the register contents
// are compared every cycle with a model, and a 15-bit serial word is
// checked to land with its first bit in the top position.
module afc_shift_reg_tb;
  localparam int unsigned N_AUX = 15;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, shift = 1'b0, d = 1'b0;
  logic [N_AUX-1:0] q, m;
  int checks = 0, failures = 0;

  afc_shift_reg #(.N_AUX(N_AUX)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what);
    checks++;
    if (q !== m) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, m);
    end
  endtask

  initial begin
    logic [N_AUX-1:0] word;
    m = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk("reset");
    // one full word, first bit first
    word = N_AUX'($urandom);
    for (int i = N_AUX - 1; i >= 0; i--) begin
      shift = 1'b1; d = word[i];
      @(posedge clk); #1;
    end
    shift = 1'b0;
    m = word;
    chk("word order");
    for (int i = 0; i < 2000; i++) begin
      clear = ($urandom_range(0, 19) == 0);
      shift = 1'($urandom_range(0, 1));
      d     = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (clear)      m = '0;
      else if (shift) m = {m[N_AUX-2:0], d};
      #1 chk("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
