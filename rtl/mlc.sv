// mlc: multi-level controller, a 256-level pulse-width modulator that drives a
// cooling fan or a voltage-regulating device.
//
// It is purely digital: an 8-bit period counter advances on every clock
// enable (ce, the 10 kHz MLC rate of the prototype) and the output is high
// while the counter is below the stored drive value. A drive value D thus
// gives a duty cycle of D/256 over a period of 256 ce ticks; 00H keeps the
// output low. The 256 levels and the drive-value input come from the
// prototype; the counter/compare structure is the simplest circuit with that
// function and is this design's own choice.
//
// Timing: d_in is sampled into the controller at the start of every PWM period
// (counter = 0), so a new level takes effect at the next period boundary and
// a period is never cut short. After reset the stored level is RST_LEVEL.
module mlc #(
  parameter int unsigned       W         = 8,
  parameter logic [W-1:0]      RST_LEVEL = 8'h7f
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,     // MLC clock enable
  input  logic [W-1:0] d_in,   // drive level
  output logic         out     // PWM output
);
  logic [W-1:0] cnt;
  logic [W-1:0] level;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      level <= RST_LEVEL;
      out   <= 1'b0;
    end else if (ce) begin
      cnt <= cnt + 1'b1;
      if (cnt == '0) begin
        level <= d_in;
        out   <= (d_in != '0);
      end else begin
        out <= (cnt < level);
      end
    end
  end
endmodule
