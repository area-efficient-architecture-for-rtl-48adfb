// tcam_clk_gate_tb: checks that the gated clock pulses exactly on the clock
// edges where the enable was high before the edge, and that an enable change
// during the high phase of clk does not cut or create a pulse.
module tcam_clk_gate_tb;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, expected_pulses = 0;

  tcam_clk_gate dut (.*);

  always #5 clk = ~clk;
  always @(posedge gclk) pulses++;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      logic e;
      e = 1'($urandom);
      en = e;                 // set in the low phase
      if (e) expected_pulses++;
      @(posedge clk);
      #1;
      check(gclk, e, "pulse follows enable");
      en = 1'($urandom);      // disturb in the high phase
      #2;
      check(gclk, e, "no glitch in high phase");
      @(negedge clk);
      #1;
      check(gclk, 1'b0, "low while clk low");
    end
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("FAIL pulse count %0d expected %0d", pulses, expected_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
