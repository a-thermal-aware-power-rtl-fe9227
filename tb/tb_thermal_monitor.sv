// tb_thermal_monitor: applies directed and random sensor readings, thresholds
// and configurations and compares the report registers and both interrupt
// lines, one clock later, with a reference model written here from the rules:
// local overflow TEMPi > high_i, local underflow TEMPi < low_i, offset
// overflow TEMPi - TEMP(i+1 mod 4) > offset high, offset underflow
// TEMPi - TEMP(i+1 mod 4) < -offset low; interrupts are the OR of the flags
// enabled by CONFIG.
module tb_thermal_monitor;
  import tapm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [NSENS-1:0][7:0]  temp;
  logic [NSENS-1:0][15:0] thres;
  logic [15:0] offs_thres;
  logic [7:0]  config_r;
  logic [7:0]  report0, report1;
  logic        intr, intr_offs;
  int checks = 0, failures = 0;
  int n_intr = 0, n_offs = 0;

  thermal_monitor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now(input string what);
    logic [7:0] r0, r1;
    logic ei, eo;
    for (int i = 0; i < 4; i++) begin
      int d;
      r0[4 + i] = temp[i] > thres[i][15:8];
      r0[i]     = temp[i] < thres[i][7:0];
      d = int'(temp[i]) - int'(temp[(i + 1) % 4]);
      r1[4 + i] = d > int'(offs_thres[15:8]);
      r1[i]     = d < -int'(offs_thres[7:0]);
    end
    ei = ((r0[7:4] | r0[3:0]) & config_r[3:0]) != 0;
    eo = ((r1[7:4] | r1[3:0]) & config_r[7:4]) != 0;
    @(posedge clk);
    #1;
    checks++;
    if (report0 != r0 || report1 != r1 || intr != ei || intr_offs != eo) begin
      failures++;
      $display("%s: got r0=%02h r1=%02h i=%0b o=%0b, expected %02h %02h %0b %0b",
               what, report0, report1, intr, intr_offs, r0, r1, ei, eo);
    end
    if (intr) n_intr++;
    if (intr_offs) n_offs++;
  endtask

  initial begin
    temp       = '{default: RST_TEMP};
    thres      = '{default: RST_THRES};
    offs_thres = RST_OFFS;
    config_r   = RST_CONFIG;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    check_now("reset values");                     // quiet after reset
    checks++;
    if (intr || intr_offs) begin failures++; $display("interrupt after reset"); end
    // Readings 11H/11H/13H/13H with the thresholds of the prototype's test.
    temp  = '{8'h13, 8'h13, 8'h11, 8'h11};
    thres = '{16'h1804, 16'h1703, 16'h1602, 16'h1501};
    offs_thres = 16'h05fb;
    check_now("nominal");
    checks++;
    if (intr || intr_offs) begin failures++; $display("interrupt on nominal readings"); end
    // Sensor 2 overheats: local overflow and offset overflow against sensor 3.
    temp[2] = 8'h20;
    check_now("sensor2 hot");
    checks++;
    if (!(intr && intr_offs && report0[6] && report1[6])) begin
      failures++; $display("sensor2 overheating not flagged");
    end
    // Masking through CONFIG.
    config_r = 8'hbb;     // sensor 2 disabled for both checks
    check_now("sensor2 masked");
    checks++;
    if (intr || intr_offs) begin failures++; $display("masked sensor interrupts"); end
    config_r = 8'hff;
    temp[2]  = 8'h13;
    check_now("sensor2 back");
    // Random stimulus.
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < 4; i++) begin
        temp[i]  = 8'($urandom);
        thres[i] = 16'($urandom);
      end
      if (k % 3 == 0) begin
        temp[1]  = temp[0] + 8'($urandom_range(0, 12)) - 8'd6;
        thres[0] = {temp[0] + 8'd2, temp[0] - 8'd2};
      end
      offs_thres = 16'($urandom) & 16'h3f3f;
      config_r   = 8'($urandom);
      check_now("random");
    end
    checks++;
    if (n_intr == 0 || n_offs == 0) begin failures++; $display("an interrupt never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
