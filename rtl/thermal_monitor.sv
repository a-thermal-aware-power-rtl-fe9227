// thermal_monitor: the comparators, report flags and interrupt generator of
// the thermal management unit (TMU).
//
// Local check: each sensor reading TEMPi (unsigned) is compared with its own
// window THRESi = {high, low}; TEMPi > high is a local overflow (overheating),
// TEMPi < low a local underflow.
// Offset check: the signed difference between neighbouring sensors,
// TEMPi - TEMP((i+1) mod 4), is compared with OFFS_THRES = {high, low}; a
// difference above +high is an offset overflow, one below -low an offset
// underflow (both thresholds are magnitudes). This catches a hot spot that is
// still below its absolute limit but far hotter than the die around it.
// CONFIG[3:0] enables the local check per sensor, CONFIG[7:4] the offset check.
//
// The prototype defines local overflow/underflow against a per-sensor
// threshold pair, offset overflow/underflow of the temperature difference
// between two positions, two report registers and two interrupt lines. Which
// sensors are paired, the magnitude reading of the offset thresholds and the
// bit layout (see tapm_pkg) are this design's choices.
//
// Timing: report0/report1/intr/intr_offs are registered and follow a change of
// any input one clock later. Interrupts are level signals: they stay high
// while any enabled condition holds and drop when the readings return inside
// their windows.
module thermal_monitor
  import tapm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [NSENS-1:0][7:0]  temp,
  input  logic [NSENS-1:0][15:0] thres,
  input  logic [15:0]       offs_thres,
  input  logic [7:0]        config_r,
  output logic [7:0]        report0,   // {local overflow[3:0], local underflow[3:0]}
  output logic [7:0]        report1,   // {offset overflow[3:0], offset underflow[3:0]}
  output logic              intr,      // local overheating interrupt
  output logic              intr_offs  // offset overheating interrupt
);
  logic [NSENS-1:0] loc_ovf, loc_unf, off_ovf, off_unf;

  always_comb begin
    for (int i = 0; i < NSENS; i++) begin
      logic signed [9:0] diff;
      loc_ovf[i] = temp[i] > thres[i][15:8];
      loc_unf[i] = temp[i] < thres[i][7:0];
      diff = $signed({2'b00, temp[i]}) - $signed({2'b00, temp[(i + 1) % NSENS]});
      off_ovf[i] = diff > $signed({2'b00, offs_thres[15:8]});
      off_unf[i] = diff < -$signed({2'b00, offs_thres[7:0]});
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      report0   <= '0;
      report1   <= '0;
      intr      <= 1'b0;
      intr_offs <= 1'b0;
    end else begin
      report0   <= {loc_ovf, loc_unf};
      report1   <= {off_ovf, off_unf};
      intr      <= |((loc_ovf | loc_unf) & config_r[3:0]);
      intr_offs <= |((off_ovf | off_unf) & config_r[7:4]);
    end
  end
endmodule
