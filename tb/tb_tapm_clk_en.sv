// tb_tapm_clk_en: checks that the SMBus and MLC clock enables are one-cycle
// pulses with exactly SMB_DIV and MLC_DIV clocks between them (500 kHz and
// 10 kHz at the 100 MHz default input clock).
module tb_tapm_clk_en;
  localparam int unsigned SMB_DIV = 200;
  localparam int unsigned MLC_DIV = 10000;

  logic clk = 1'b0, rst = 1'b1;
  logic ce_smb, ce_mlc;
  int   checks = 0, failures = 0;

  tapm_clk_en #(.SMB_DIV(SMB_DIV), .MLC_DIV(MLC_DIV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0, last_smb = -1, last_mlc = -1;
  int n_smb = 0, n_mlc = 0;

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (ce_smb) begin
      if (last_smb >= 0) begin
        checks++;
        if (cyc - last_smb != SMB_DIV) begin
          failures++;
          $display("ce_smb spacing %0d, expected %0d", cyc - last_smb, SMB_DIV);
        end
      end
      last_smb <= cyc;
      n_smb++;
    end
    if (ce_mlc) begin
      if (last_mlc >= 0) begin
        checks++;
        if (cyc - last_mlc != MLC_DIV) begin
          failures++;
          $display("ce_mlc spacing %0d, expected %0d", cyc - last_mlc, MLC_DIV);
        end
      end
      last_mlc <= cyc;
      n_mlc++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5 * MLC_DIV + 10) @(posedge clk);
    checks++;
    if (n_smb != (5 * MLC_DIV) / SMB_DIV) begin
      failures++;
      $display("ce_smb count %0d, expected %0d", n_smb, (5 * MLC_DIV) / SMB_DIV);
    end
    checks++;
    if (n_mlc != 5) begin
      failures++;
      $display("ce_mlc count %0d, expected 5", n_mlc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
