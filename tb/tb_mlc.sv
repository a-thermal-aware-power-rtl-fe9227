// tb_mlc: drives the drive levels 01H, 03H, 07H, 0FH, 1FH, 3FH, 7FH (and 00H,
// FFH, 80H) into the multi-level controller and measures, over whole PWM
// periods, that the output is high for exactly D of every 256 controller
// ticks, that a period is 256 ticks long and that a new level takes effect at
// a period boundary.
module tb_mlc;
  localparam int unsigned CE_DIV = 3;   // controller tick every 3 clocks

  logic       clk = 1'b0, rst = 1'b1, ce;
  logic [7:0] d_in = 8'h7f;
  logic       out;
  int         checks = 0, failures = 0;
  int         div = 0;

  mlc #(.W(8), .RST_LEVEL(8'h7f)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) div <= (div == CE_DIV - 1) ? 0 : div + 1;
  assign ce = (div == CE_DIV - 1);

  // Reference count of controller ticks since reset, modulo 256.
  logic [7:0] tcnt = 8'h00;
  always @(posedge clk) if (!rst && ce) tcnt <= tcnt + 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One sample per controller tick: at a falling clock edge with ce high, out
  // shows the level decided for the previous counter value.
  task automatic sample(output logic o, output logic [7:0] c);
    do @(negedge clk); while (!ce);
    o = out;
    c = tcnt;
  endtask

  // Waits for the last tick of a period (d_in is taken at its end), then
  // counts the high ticks of the following period of 256 ticks.
  task automatic measure(input logic [7:0] lvl);
    logic o;
    logic [7:0] c;
    int high;
    do sample(o, c); while (c != 8'h00);
    high = 0;
    for (int t = 0; t < 256; t++) begin
      sample(o, c);
      if (o) high++;
    end
    checks++;
    if (high != int'(lvl)) begin
      failures++;
      $display("level %02h: %0d high ticks of 256", lvl, high);
    end
  endtask

  initial begin
    logic [7:0] lv [10];
    logic o;
    logic [7:0] c;
    int high;
    lv = '{8'h01, 8'h03, 8'h07, 8'h0f, 8'h1f, 8'h3f, 8'h7f, 8'h00, 8'hff, 8'h80};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    measure(8'h7f);                              // reset level
    foreach (lv[i]) begin
      d_in <= lv[i];
      measure(lv[i]);
    end
    // A change in mid-period must not affect the running period.
    d_in <= 8'h10;
    measure(8'h10);
    for (int t = 0; t < 100; t++) sample(o, c);
    d_in <= 8'hc0;
    high = 0;
    do begin
      sample(o, c);
      if (o) high++;
    end while (c != 8'h00);
    checks++;
    if (high != 0) begin failures++; $display("mid-period change leaked: %0d", high); end
    measure(8'hc0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
