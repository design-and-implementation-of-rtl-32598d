// tb_led_output: self-checking test of the LED output unit.
//
// Drives random decide/granted sequences and checks the LED against a
// reference that loads granted on each decide and holds it otherwise, one
// clock later; also checks the dark LED after reset and that granted without
// decide changes nothing.
module tb_led_output;

  logic clk = 1'b0, rst_n = 1'b0, decide = 1'b0, granted = 1'b0, led;
  logic ref_led = 1'b0;
  int checks = 0, failures = 0, ons = 0, offs = 0;

  always #5 clk = ~clk;

  led_output dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(!led, "LED dark during reset");
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      decide  = ($urandom_range(0, 3) == 0);
      granted = 1'($urandom);
      @(posedge clk);
      if (decide) ref_led = granted;
      @(negedge clk);
      check(led == ref_led, $sformatf("cycle %0d: led=%0b expected %0b", k, led, ref_led));
      if (decide && granted) ons++;
      if (decide && !granted) offs++;
    end
    check(ons > 0 && offs > 0, "both results shown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
