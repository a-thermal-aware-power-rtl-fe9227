// sensor_s2p: serial-to-parallel interface of one temperature sensor.
//
// A temperature sensor sends its 8-bit reading serially to save pins, framed
// by an enable line. While sen_en is high the interface shifts in one bit of
// sen per clock, most significant bit first. When sen_en falls the last
// W bits shifted in are presented on data and valid pulses for one clock.
// The sensor interface with a serial line and an enable line, and the 8-bit
// reading, are the prototype's; the bit order and the capture on the falling
// edge of the enable line are this design's choice.
//
// Timing: one bit is taken at every rising clock edge that sees sen_en high.
// The first edge that sees sen_en low again loads data and raises valid for
// one clock. A frame longer than W bits keeps the last W bits.
module sensor_s2p #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sen,     // serial data, MSB first
  input  logic         sen_en,  // frame: high while bits are sent
  output logic [W-1:0] data,
  output logic         valid    // one-clock pulse, data holds the new reading
);
  logic [W-1:0] shreg;
  logic         en_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '0;
      en_q  <= 1'b0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      en_q  <= sen_en;
      valid <= 1'b0;
      if (sen_en) shreg <= {shreg[W-2:0], sen};
      if (en_q && !sen_en) begin
        data  <= shreg;
        valid <= 1'b1;
      end
    end
  end
endmodule
