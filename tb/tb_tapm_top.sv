// tb_tapm_top: end-to-end test of the whole TAPM IP at its default sizes
// (100 MHz clock, 500 kHz SMBus clock, 83 kHz bus, 10 kHz MLC clock).
//
// It follows the prototype's system test: the on-chip SMBus master, driven
// through the shared pins, programs the TMU through the SMBus slave (address
// 04H) while sensor readings change: CONFIG = FFH, all sensors 04H,
// THRES2 = 00H/14H, OFFS_THRES = FBH/05H, sensor 2 overheats (local and offset
// interrupts), REPORT1 is read back as a word, sensor 2 cools (interrupts
// end), FAN2 = 03H, and the PWM output of every fan is measured over a whole
// period. It then adds a read byte, a transfer to an absent address (fail),
// an undefined command that the slave must refuse (NACK), and the direct
// TMU test mode (mux = 0). Each mechanism is counted and a
// mechanism that never happened counts as a failure. The bus clock rate and
// the interrupt latency are checked in clock cycles.
module tb_tapm_top;
  import tapm_pkg::*;

  localparam int unsigned SMB_DIV   = 200;
  localparam int unsigned MLC_DIV   = 10000;
  localparam int unsigned BIT_TICKS = 6;
  localparam int unsigned PWM_P     = 256 * MLC_DIV;

  logic clk = 1'b0, reset = 1'b1, mux = 1'b1;
  logic [2:0] addr = 3'b100;
  logic smbclk, smbdat_in, smbdat_out;
  logic [3:0] sen = '0, sen_en = '0, fan;
  logic intr, intr_off;
  logic smb_reset = 1'b0;
  logic [7:0] smb_in_tmu_in = '0, smb_out_tmu_out;
  logic smb_en_tmu_in_en = 1'b0, smb_rw_tmu_out_en = 1'b0;
  logic smb_smbclk, smb_smbdat_in;
  logic smb_smbclk_out, smb_smbdat_out, smb_clean, smb_fail, smb_out_en;

  tapm_top dut (.*);

  // board: wired-AND bus
  wire scl = smb_smbclk_out;
  wire sda = smb_smbdat_out & smbdat_out;
  assign smbclk        = scl;
  assign smbdat_in     = sda;
  assign smb_smbclk    = scl;
  assign smb_smbdat_in = sda;

  always #5 clk = ~clk;   // 100 MHz

  int checks = 0, failures = 0;
  typedef enum int {M_WR_BYTE, M_WR_WORD, M_RD_WORD, M_RD_BYTE, M_RSTART, M_FAIL,
                    M_LOCAL_INT, M_OFFS_INT, M_INT_END, M_PWM, M_TMU_MODE, M_NACK_CMD,
                    M_NUM} mech_e;
  int mech[M_NUM];

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0h, expected %0h", what, got, exp);
    end
  endtask

  // ---------------- bus monitor: START count, clock period ----------------
  logic scl_q = 1'b1, sda_q = 1'b1;
  longint cyc = 0, last_rise = 0;
  int n_start = 0, n_per_ok = 0, n_per_short = 0;
  always @(posedge clk) if (!reset) begin
    cyc   <= cyc + 1;
    scl_q <= scl;
    sda_q <= sda;
    if (scl && scl_q && sda_q && !sda) n_start++;
    if (scl && !scl_q) begin
      if (last_rise != 0) begin
        if (cyc - last_rise == BIT_TICKS * SMB_DIV) n_per_ok++;
        else if (cyc - last_rise < BIT_TICKS * SMB_DIV) n_per_short++;
      end
      last_rise <= cyc;
    end
  end

  // ---------------- host at the master pins ----------------
  task automatic wait_ack(output logic ok);
    do @(posedge clk); while (!smb_clean && !smb_fail);
    ok = smb_clean;
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (!(scl && sda));
    repeat (BIT_TICKS * SMB_DIV * 2) @(posedge clk);
  endtask

  task automatic smb_write(input logic [7:0] b[], output logic ok);
    smb_rw_tmu_out_en <= 1'b0;
    smb_in_tmu_in     <= b[0];
    smb_en_tmu_in_en  <= 1'b1;
    ok = 1'b1;
    for (int i = 0; i < b.size(); i++) begin
      logic a;
      wait_ack(a);
      if (!a) begin ok = 1'b0; break; end
      if (i + 1 < b.size()) smb_in_tmu_in <= b[i + 1];
      else smb_en_tmu_in_en <= 1'b0;
    end
    smb_en_tmu_in_en <= 1'b0;
    wait_idle();
  endtask

  task automatic smb_read(input logic [7:0] cmd, input int n, output logic [7:0] r[$]);
    logic a;
    int s0;
    r.delete();
    s0 = n_start;
    smb_rw_tmu_out_en <= 1'b1;
    smb_in_tmu_in     <= {7'h04, 1'b0};
    smb_en_tmu_in_en  <= 1'b1;
    wait_ack(a); smb_in_tmu_in <= cmd;
    wait_ack(a); smb_in_tmu_in <= {7'h04, 1'b1};
    wait_ack(a); if (n == 1) smb_en_tmu_in_en <= 1'b0;
    for (int i = 0; i < n; i++) begin
      do @(posedge clk); while (!smb_out_en);
      r.push_back(smb_out_tmu_out);
      if (i == n - 2) smb_en_tmu_in_en <= 1'b0;
    end
    smb_rw_tmu_out_en <= 1'b0;
    wait_idle();
    if (n_start - s0 == 2) mech[M_RSTART]++;
  endtask

  task automatic wr8(input tmu_kind_e k, input logic [1:0] idx, input logic [7:0] v);
    logic ok;
    smb_write('{8'h08, tmu_cmd(1'b0, k, idx), v}, ok);
    chk($sformatf("write byte kind %0d", k), ok, 1);
    if (ok) mech[M_WR_BYTE]++;
  endtask

  task automatic wr16(input tmu_kind_e k, input logic [1:0] idx, input logic [15:0] v);
    logic ok;
    smb_write('{8'h08, tmu_cmd(1'b0, k, idx), v[7:0], v[15:8]}, ok);
    chk($sformatf("write word kind %0d", k), ok, 1);
    if (ok) mech[M_WR_WORD]++;
  endtask

  // Direct TMU access through the shared pins (mux = 0).
  task automatic pin_write(input logic [7:0] v);
    smb_in_tmu_in    <= v;
    smb_en_tmu_in_en <= 1'b1;
    repeat (3) @(posedge clk);
    smb_en_tmu_in_en <= 1'b0;
    repeat (3) @(posedge clk);
  endtask

  task automatic pin_read(output logic [7:0] v);
    smb_rw_tmu_out_en <= 1'b1;
    repeat (3) @(posedge clk);
    smb_rw_tmu_out_en <= 1'b0;
    repeat (3) @(posedge clk);
    v = smb_out_tmu_out;
  endtask

  // Reads a register over the bus and compares it.
  task automatic rd_reg(input tmu_kind_e k, input logic [1:0] idx, input int n,
                        input logic [15:0] exp);
    logic [7:0] r[$];
    smb_read(tmu_cmd(1'b1, k, idx), n, r);
    chk($sformatf("read kind %0d idx %0d length", k, idx), r.size(), n);
    if (r.size() == 1) chk($sformatf("read kind %0d idx %0d", k, idx), r[0], exp[7:0]);
    if (r.size() == 2) chk($sformatf("read kind %0d idx %0d", k, idx), {r[1], r[0]}, exp);
    if (r.size() == 1) mech[M_RD_BYTE]++;
    if (r.size() == 2) mech[M_RD_WORD]++;
  endtask

  // All four sensors send a reading; returns the clock of the frame end.
  task automatic sensors(input logic [7:0] t0, t1, t2, t3, output longint t_end);
    for (int b = 7; b >= 0; b--) begin
      sen    <= {t3[b], t2[b], t1[b], t0[b]};
      sen_en <= '1;
      @(posedge clk);
    end
    sen_en <= '0;
    sen    <= '0;
    t_end = cyc;
  endtask

  // Interrupt lines change exactly three clock edges after the last bit of a
  // sensor frame: the frame end is seen, TEMP is loaded, the interrupt
  // register follows.
  task automatic expect_irq(input string what, input logic vi, input logic vo);
    repeat (2) @(posedge clk);
    #1;
    chk({what, " interrupts not before 3 clocks"}, {intr, intr_off}, {!vi, !vo});
    @(posedge clk);
    #1;
    chk({what, " interrupts after 3 clocks"}, {intr, intr_off}, {vi, vo});
  endtask

  // High clocks and rising edges of a fan output over exactly one PWM period
  // of 256 MLC ticks: a periodic signal has the same count in any such window.
  task automatic pwm_high(input int f, output int high, output int rises);
    logic q;
    high  = 0;
    rises = 0;
    q     = fan[f];
    for (int c = 0; c < PWM_P; c++) begin
      @(posedge clk);
      if (fan[f]) high++;
      if (fan[f] && !q) rises++;
      q = fan[f];
    end
  endtask

  initial begin
    logic [7:0] r[$];
    logic ok;
    longint t;
    int high [4], rises [4];
    repeat (10) @(posedge clk);
    reset <= 1'b0;
    repeat (10) @(posedge clk);

    // Step 1: reset values inside the TMU
    rd_reg(KIND_CONFIG, 0, 1, 16'h00ff);
    rd_reg(KIND_FAN, 2, 1, 16'h007f);
    rd_reg(KIND_OFFS, 0, 2, 16'h0a0a);
    chk("no interrupt after reset", {intr, intr_off}, 2'b00);
    // Step 2: CONFIG = FFH
    wr8(KIND_CONFIG, 0, 8'hff);
    rd_reg(KIND_CONFIG, 0, 1, 16'h00ff);
    // Step 3: sensors 04H
    sensors(8'h04, 8'h04, 8'h04, 8'h04, t);
    repeat (4) @(posedge clk);
    for (int i = 0; i < 4; i++) rd_reg(KIND_TEMP, 2'(i), 1, 16'h0004);
    // Steps 4/5: THRES2 = 00H/14H, OFFS_THRES = FBH/05H
    wr16(KIND_THRES, 2, 16'h1400);
    rd_reg(KIND_THRES, 2, 2, 16'h1400);
    wr16(KIND_OFFS, 0, 16'h05fb);
    rd_reg(KIND_OFFS, 0, 2, 16'h05fb);
    chk("quiet before overheating", {intr, intr_off}, 2'b00);
    // Steps 6/7: sensor 2 overheats
    sensors(8'h04, 8'h04, 8'h20, 8'h04, t);
    expect_irq("overheating", 1'b1, 1'b1);
    if (intr) mech[M_LOCAL_INT]++;
    if (intr_off) mech[M_OFFS_INT]++;
    // Step 8: read REPORT1 as a word (second byte 00H)
    smb_read(tmu_cmd(1'b1, KIND_REPORT, 1), 2, r);
    chk("REPORT1 bytes", r.size(), 2);
    if (r.size() == 2) begin
      chk("REPORT1", {r[0], r[1]}, 16'h4000);
      mech[M_RD_WORD]++;
    end
    // Read byte of REPORT0 (local overflow of sensor 2)
    smb_read(tmu_cmd(1'b1, KIND_REPORT, 0), 1, r);
    chk("REPORT0", (r.size() == 1) ? r[0] : 8'h00, 8'h40);
    if (r.size() == 1) mech[M_RD_BYTE]++;
    // Steps 9/10: sensor 2 cools
    sensors(8'h04, 8'h04, 8'h06, 8'h04, t);
    expect_irq("cooled", 1'b0, 1'b0);
    if (!intr && !intr_off) mech[M_INT_END]++;
    // Step 11: FAN2 = 03H
    wr8(KIND_FAN, 2, 8'h03);
    rd_reg(KIND_FAN, 2, 1, 16'h0003);
    // PWM: skip one period so the new level is in effect, then measure
    repeat (PWM_P) @(posedge clk);
    fork
      pwm_high(0, high[0], rises[0]);
      pwm_high(1, high[1], rises[1]);
      pwm_high(2, high[2], rises[2]);
      pwm_high(3, high[3], rises[3]);
    join
    for (int f = 0; f < 4; f++) chk($sformatf("fan%0d pulses per 25.6 ms", f), rises[f], 1);
    chk("fan0 duty (7FH)", high[0], 8'h7f * MLC_DIV);
    chk("fan1 duty (7FH)", high[1], 8'h7f * MLC_DIV);
    chk("fan2 duty (03H)", high[2], 3 * MLC_DIV);
    chk("fan3 duty (7FH)", high[3], 8'h7f * MLC_DIV);
    if (high[2] == 3 * MLC_DIV) mech[M_PWM]++;
    // Absent address: fail pulse, nothing written
    begin
      int nf;
      nf = 0;
      smb_rw_tmu_out_en <= 1'b0;
      smb_in_tmu_in     <= {7'h05, 1'b0};
      smb_en_tmu_in_en  <= 1'b1;
      wait_ack(ok);
      if (!ok) nf++;
      smb_en_tmu_in_en  <= 1'b0;
      wait_idle();
      chk("fail on absent address", nf, 1);
      if (nf == 1) mech[M_FAIL]++;
    end
    // Undefined command: refused with NACK (fail), registers unchanged
    begin
      logic okc;
      smb_write('{8'h08, 8'h7c, 8'h55}, okc);
      chk("undefined command refused", okc, 0);
      if (!okc) mech[M_NACK_CMD]++;
      rd_reg(KIND_FAN, 2, 1, 16'h0003);
    end
    // Direct TMU mode (mux = 0): write FAN1 = 80H, read TEMP2 and FAN1
    mux <= 1'b0;
    @(posedge clk);
    begin
      logic [7:0] seq [3];
      logic [7:0] b, b1;
      seq = '{tmu_cmd(1'b0, KIND_FAN, 1), 8'h80, tmu_cmd(1'b1, KIND_TEMP, 2)};
      foreach (seq[i]) pin_write(seq[i]);
      pin_read(b);
      chk("TMU mode read TEMP2", b, 8'h06);
      pin_write(tmu_cmd(1'b1, KIND_FAN, 1));
      pin_read(b1);
      chk("TMU mode read FAN1", b1, 8'h80);
      chk("master idle in TMU mode", {smb_smbclk_out, smb_smbdat_out}, 2'b11);
      if (b == 8'h06 && b1 == 8'h80) mech[M_TMU_MODE]++;
    end
    mux <= 1'b1;

    // Bus rate: a bus clock period is 6 SMBus ticks = 1200 clocks (83.3 kHz)
    chk("no short bus clock periods", n_per_short, 0);
    checks++;
    if (n_per_ok < 100) begin failures++; $display("only %0d nominal bus periods", n_per_ok); end

    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("mechanism %s: %0d", mech_e'(m), mech[m]);
      if (mech[m] == 0) begin failures++; $display("mechanism %s never happened", mech_e'(m)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
