// tb_sensor_s2p: sends 8-bit readings MSB first, framed by the enable line,
// and checks that each appears on data with a single valid pulse one clock
// after the frame ends. Also checks that a longer frame keeps the last eight
// bits and that nothing is reported while the line stays idle.
module tb_sensor_s2p;
  logic       clk = 1'b0, rst = 1'b1;
  logic       sen = 1'b0, sen_en = 1'b0;
  logic [7:0] data;
  logic       valid;
  int         checks = 0, failures = 0, nvalid = 0;

  sensor_s2p #(.W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && valid) nvalid++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [15:0] bits, input int n, input logic [7:0] expect_v);
    int n0;
    n0 = nvalid;
    for (int i = n - 1; i >= 0; i--) begin
      sen    <= bits[i];
      sen_en <= 1'b1;
      @(posedge clk);
    end
    sen_en <= 1'b0;
    sen    <= 1'b0;
    #1;
    checks++;
    if (valid !== 1'b0) begin failures++; $display("valid too early"); end
    @(posedge clk);          // first clock edge that sees the enable low
    #1;
    checks++;
    if (!(valid && data == expect_v)) begin
      failures++;
      $display("reading %02h valid=%0b, expected %02h", data, valid, expect_v);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (nvalid != n0 + 1) begin failures++; $display("valid count %0d", nvalid - n0); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (data != 8'h00 || valid) begin failures++; $display("reset state wrong"); end
    send(16'h0011, 8, 8'h11);
    send(16'h0013, 8, 8'h13);
    send(16'h00a5, 8, 8'ha5);
    send(16'h005a, 8, 8'h5a);
    send(16'h0380, 10, 8'h80);   // ten bits: the last eight count
    for (int k = 0; k < 20; k++) begin
      logic [7:0] v;
      v = 8'($urandom);
      send({8'h00, v}, 8, v);
    end
    repeat (20) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
