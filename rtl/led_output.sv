// led_output: output unit that shows the authentication result on the LED.
//
// Each decide pulse from the controller loads granted into the LED register:
// the LED lights after an accepted card and goes dark after a rejected card or
// a failed read, and keeps that state until the next decision.  The LED is
// dark after reset.  The output changes one clock after decide.
//
// Showing the result on an LED follows the design description; holding it
// until the next decision and the reset value are this design's choice.
module led_output (
  input  logic clk,
  input  logic rst_n,
  input  logic decide,
  input  logic granted,
  output logic led
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      led <= 1'b0;
    else if (decide) led <= granted;
  end

endmodule
