// tapm_clk_en: derives the internal clock rates of the TAPM blocks from the
// single TAPM input clock.
//
// The prototype splits its input clock into three internal clocks: one for
// the TMU (the input clock itself, 100 MHz), one for the SMBus interfaces
// (500 kHz) and one for the multi-level controllers (10 kHz). Those rates are
// the prototype's. This design keeps every flip-flop on the one input clock
// and instead produces a one-cycle clock-enable pulse at each of the slower
// rates, which avoids generated clocks and clock-domain crossings; that is
// this design's own choice.
//
// Interface: ce_smb is high for one clk cycle every SMB_DIV cycles, ce_mlc for
// one clk cycle every MLC_DIV cycles. Both counters restart at reset, the
// first pulse of each comes DIV cycles after reset is released.
module tapm_clk_en #(
  parameter int unsigned SMB_DIV = 200,    // 100 MHz / 500 kHz
  parameter int unsigned MLC_DIV = 10000   // 100 MHz / 10 kHz
) (
  input  logic clk,
  input  logic rst,
  output logic ce_smb,
  output logic ce_mlc
);
  localparam int unsigned SW = (SMB_DIV > 1) ? $clog2(SMB_DIV) : 1;
  localparam int unsigned MW = (MLC_DIV > 1) ? $clog2(MLC_DIV) : 1;

  logic [SW-1:0] smb_cnt;
  logic [MW-1:0] mlc_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      smb_cnt <= '0;
      ce_smb  <= 1'b0;
    end else if (smb_cnt == SW'(SMB_DIV - 1)) begin
      smb_cnt <= '0;
      ce_smb  <= 1'b1;
    end else begin
      smb_cnt <= smb_cnt + 1'b1;
      ce_smb  <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mlc_cnt <= '0;
      ce_mlc  <= 1'b0;
    end else if (mlc_cnt == MW'(MLC_DIV - 1)) begin
      mlc_cnt <= '0;
      ce_mlc  <= 1'b1;
    end else begin
      mlc_cnt <= mlc_cnt + 1'b1;
      ce_mlc  <= 1'b0;
    end
  end
endmodule
