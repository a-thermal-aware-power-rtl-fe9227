// tb_tmu: runs the thermal management unit through the register test of the
// prototype: reset values, sensor readings 11H/11H/13H/13H, writes of CONFIG
// (FFH), FAN0..3 (11H..14H), THRES0..3 (low/high 01H/15H .. 04H/18H) and
// OFFS_THRES (low/high FBH/05H), a reading that makes sensor 2 overheat (both
// interrupts), read-back of every register, and readings that end the
// overheating. Also checks dropped undefined commands, writes to read-only
// registers, frame aborts, the FFH/00H fill bytes of the read port, and the
// command check (chk_ok) used to refuse undefined commands.
module tb_tmu;
  import tapm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] in_data = '0, out_data;
  logic in_en = 1'b0, out_en = 1'b0, frame = 1'b0;
  logic [7:0] chk_data = 8'h00;
  logic chk_ok;
  logic [NSENS-1:0] sen = '0, sen_en = '0;
  logic [NSENS-1:0][7:0] fan, temp;
  logic [7:0] report0, report1, config_r;
  logic intr, intr_offs;
  int checks = 0, failures = 0;

  tmu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0h, expected %0h", what, got, exp);
    end
  endtask

  task automatic put(input logic [7:0] b);
    in_data <= b;
    in_en   <= 1'b1;
    @(posedge clk);
    in_en   <= 1'b0;
    @(posedge clk);
  endtask

  task automatic get(output logic [7:0] b);
    out_en <= 1'b1;
    @(posedge clk);
    out_en <= 1'b0;
    @(posedge clk);
    b = out_data;
  endtask

  task automatic wr8(input tmu_kind_e k, input logic [1:0] idx, input logic [7:0] v);
    put(tmu_cmd(1'b0, k, idx));
    put(v);
  endtask

  task automatic wr16(input tmu_kind_e k, input logic [1:0] idx, input logic [15:0] v);
    put(tmu_cmd(1'b0, k, idx));
    put(v[7:0]);
    put(v[15:8]);
  endtask

  task automatic rd8(input tmu_kind_e k, input logic [1:0] idx, input logic [7:0] exp);
    logic [7:0] b;
    put(tmu_cmd(1'b1, k, idx));
    get(b);
    chk($sformatf("read kind %0d idx %0d", k, idx), b, exp);
  endtask

  task automatic rd16(input tmu_kind_e k, input logic [1:0] idx, input logic [15:0] exp);
    logic [7:0] lo, hi;
    put(tmu_cmd(1'b1, k, idx));
    get(lo);
    get(hi);
    chk($sformatf("read word kind %0d idx %0d", k, idx), {hi, lo}, exp);
  endtask

  // All four sensors send one reading each, MSB first, in parallel.
  task automatic sensors(input logic [7:0] t0, t1, t2, t3);
    for (int b = 7; b >= 0; b--) begin
      sen    <= {t3[b], t2[b], t1[b], t0[b]};
      sen_en <= '1;
      @(posedge clk);
    end
    sen_en <= '0;
    sen    <= '0;
    repeat (4) @(posedge clk);   // s2p, TEMP register, monitor register
    #1;
  endtask

  initial begin
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // Step 1: reset values
    for (int i = 0; i < 4; i++) begin
      chk("TEMP reset", temp[i], 8'h00);
      chk("FAN reset", fan[i], 8'h7f);
      rd16(KIND_THRES, 2'(i), 16'h3c00);
    end
    rd16(KIND_OFFS, 0, 16'h0a0a);
    chk("CONFIG reset", config_r, 8'hff);
    // Step 2: sensors
    sensors(8'h11, 8'h11, 8'h13, 8'h13);
    chk("TEMP after step 2", temp, 32'h13131111);
    chk("no interrupt", {intr, intr_offs}, 2'b00);
    // Steps 3..12: writes
    wr8(KIND_CONFIG, 0, 8'hff);
    chk("CONFIG", config_r, 8'hff);
    for (int i = 0; i < 4; i++) begin
      wr8(KIND_FAN, 2'(i), 8'h11 + 8'(i));
      chk("FAN", fan[i], 8'h11 + 8'(i));
    end
    for (int i = 0; i < 4; i++) begin
      wr16(KIND_THRES, 2'(i), {8'h15 + 8'(i), 8'h01 + 8'(i)});
      rd16(KIND_THRES, 2'(i), {8'h15 + 8'(i), 8'h01 + 8'(i)});
    end
    wr16(KIND_OFFS, 0, 16'h05fb);
    rd16(KIND_OFFS, 0, 16'h05fb);
    // Steps 13/14: sensor 2 overheats (local over 17H, 9 above sensor 3)
    sensors(8'h11, 8'h11, 8'h1c, 8'h13);
    chk("TEMP after step 13", temp, 32'h131c1111);
    chk("intr", intr, 1'b1);
    chk("intr_offs", intr_offs, 1'b1);
    // Steps 15..30: read everything back
    rd8(KIND_CONFIG, 0, 8'hff);
    rd8(KIND_REPORT, 0, 8'h40);                 // local overflow of sensor 2
    rd8(KIND_REPORT, 1, 8'h40);                 // offset overflow of sensor 2
    for (int i = 0; i < 4; i++) rd8(KIND_FAN, 2'(i), 8'h11 + 8'(i));
    rd8(KIND_TEMP, 0, 8'h11);
    rd8(KIND_TEMP, 1, 8'h11);
    rd8(KIND_TEMP, 2, 8'h1c);
    rd8(KIND_TEMP, 3, 8'h13);
    for (int i = 0; i < 4; i++) rd16(KIND_THRES, 2'(i), {8'h15 + 8'(i), 8'h01 + 8'(i)});
    rd16(KIND_OFFS, 0, 16'h05fb);
    // Steps 31/32: back inside the windows
    sensors(8'h12, 8'h12, 8'h14, 8'h14);
    chk("intr end", {intr, intr_offs}, 2'b00);
    rd8(KIND_REPORT, 0, 8'h00);
    // Offset underflow: sensor 1 cooler than sensor 2 by more than 5 (low = 5).
    wr16(KIND_OFFS, 0, 16'h0505);
    sensors(8'h12, 8'h0a, 8'h14, 8'h14);        // 0AH - 14H = -10, below -5
    chk("offset underflow", {intr_offs, report1[1]}, 2'b11);
    chk("no local interrupt", intr, 1'b0);
    wr8(KIND_CONFIG, 0, 8'h0f);                 // offset checks off
    @(posedge clk);
    #1;
    chk("offset masked", intr_offs, 1'b0);
    // Local underflow of sensor 1 (low threshold 02H)
    sensors(8'h12, 8'h01, 8'h14, 8'h14);
    chk("local underflow", {intr, report0[1]}, 2'b11);
    // Read-only registers ignore writes; undefined commands are dropped.
    put(tmu_cmd(1'b0, KIND_TEMP, 0));          // dropped, next byte is a command
    wr8(KIND_FAN, 3, 8'h5a);
    chk("FAN3 after dropped command", fan[3], 8'h5a);
    chk("TEMP0 unchanged", temp[0], 8'h12);
    put(8'h7c);                                 // undefined kind
    wr8(KIND_FAN, 0, 8'ha5);
    chk("FAN0 after undefined command", fan[0], 8'ha5);
    // Command check: defined commands accepted, undefined ones refused,
    // anything accepted while a write waits for its data.
    chk_data = tmu_cmd(1'b0, KIND_THRES, 3); #1; chk("chk valid write cmd", chk_ok, 1);
    chk_data = tmu_cmd(1'b1, KIND_REPORT, 1); #1; chk("chk valid read cmd", chk_ok, 1);
    chk_data = 8'h7c; #1; chk("chk undefined kind", chk_ok, 0);
    chk_data = tmu_cmd(1'b0, KIND_TEMP, 1); #1; chk("chk write to TEMP", chk_ok, 0);
    chk_data = tmu_cmd(1'b0, KIND_OFFS, 2); #1; chk("chk OFFS index 2", chk_ok, 0);
    put(tmu_cmd(1'b0, KIND_FAN, 0));
    chk_data = 8'h7c; #1; chk("chk data byte", chk_ok, 1);
    put(8'h99);
    chk("FAN0 99H", fan[0], 8'h99);
    chk_data = 8'h7c; #1; chk("chk after write", chk_ok, 0);
    // frame aborts a half-written word
    put(tmu_cmd(1'b0, KIND_THRES, 1));
    put(8'h77);
    frame <= 1'b1;
    @(posedge clk);
    frame <= 1'b0;
    wr8(KIND_FAN, 1, 8'h3c);
    chk("FAN1 after frame", fan[1], 8'h3c);
    rd16(KIND_THRES, 1, 16'h1602);             // untouched
    // Fill bytes: past the end 00H, no read set up FFH.
    put(tmu_cmd(1'b1, KIND_FAN, 1));
    get(b); chk("read FAN1", b, 8'h3c);
    get(b); chk("past end", b, 8'h00);
    put(tmu_cmd(1'b0, KIND_FAN, 2));
    get(b); chk("no read set up", b, 8'hff);
    put(8'h42);
    chk("FAN2 written after stray read", fan[2], 8'h42);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
