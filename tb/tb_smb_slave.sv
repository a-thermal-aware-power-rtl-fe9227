// tb_smb_slave: drives the SMBus slave from a bit-level bus master written in
// the testbench (START, STOP, repeated START, bytes, ACK/NACK) and checks the
// prototype's bus test: a write word of 37H, 73H to address 04H and a read
// word returning 37H, 73H. Also checks that a wrong address is not
// acknowledged and produces no bytes, that the address pins select the
// address, that a byte the host refuses is answered with NACK and dropped,
// and the counts of out_en, in_ready and frame pulses.
module tb_smb_slave;
  localparam int unsigned CE_DIV = 4;     // slave tick every 4 clocks
  localparam int unsigned HALF   = 3 * CE_DIV;  // bus half period in clocks

  logic clk = 1'b0, rst = 1'b1, ce;
  logic [2:0] addr = 3'b100;
  logic scl = 1'b1, m_sda = 1'b1;
  logic sda_out, sda_in;
  logic [7:0] in_data = 8'h00, out_data;
  logic in_ready, out_en, frame;
  logic [7:0] chk_data;
  logic chk_ok;
  int checks = 0, failures = 0;
  int div = 0;
  int n_out = 0, n_req = 0, n_frame = 0;
  logic [7:0] rx_q[$];
  logic [7:0] tx_q[$];

  smb_slave #(.BASE(4'b0000)) dut (.*);

  assign sda_in = m_sda & sda_out;        // wired AND of the bus
  assign ce = (div == CE_DIV - 1);
  assign chk_ok = (chk_data != 8'hff);   // host refuses FFH

  always #5 clk = ~clk;
  always @(posedge clk) div <= (div == CE_DIV - 1) ? 0 : div + 1;

  // Host side of the slave: collect received bytes, serve requested ones.
  always @(posedge clk) if (!rst) begin
    if (out_en) begin rx_q.push_back(out_data); n_out++; end
    if (frame) n_frame++;
    if (in_ready) begin
      n_req++;
      in_data <= (tx_q.size() > 0) ? tx_q.pop_front() : 8'hee;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0h, expected %0h", what, got, exp);
    end
  endtask

  task automatic half(); repeat (HALF) @(posedge clk); endtask

  task automatic bus_start();        // from SCL high or low
    m_sda <= 1'b1; half();
    scl   <= 1'b1; half();
    m_sda <= 1'b0; half();
    scl   <= 1'b0; half();
  endtask

  task automatic bus_stop();
    m_sda <= 1'b0; half();
    scl   <= 1'b1; half();
    m_sda <= 1'b1; half();
  endtask

  task automatic bit_out(input logic b);
    m_sda <= b;   half();
    scl   <= 1'b1; half();
    scl   <= 1'b0;
  endtask

  task automatic bit_in(output logic b);
    m_sda <= 1'b1; half();
    scl   <= 1'b1; half();
    b = sda_in;
    scl   <= 1'b0;
  endtask

  task automatic wr_byte(input logic [7:0] v, output logic ack);
    logic a;
    for (int i = 7; i >= 0; i--) bit_out(v[i]);
    bit_in(a);
    ack = !a;
  endtask

  task automatic rd_byte(input logic send_ack, output logic [7:0] v);
    for (int i = 7; i >= 0; i--) bit_in(v[i]);
    bit_out(!send_ack);
  endtask

  initial begin
    logic ack;
    logic [7:0] v;
    scl   = 1'b1;
    m_sda = 1'b1;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (20) @(posedge clk);

    // Write word: address 04H + W, a command byte, data 37H and 73H
    bus_start();
    wr_byte({7'h04, 1'b0}, ack); chk("address ack (write)", ack, 1);
    wr_byte(8'h5a, ack);         chk("command ack", ack, 1);
    wr_byte(8'h37, ack);         chk("data ack 1", ack, 1);
    wr_byte(8'h73, ack);         chk("data ack 2", ack, 1);
    bus_stop();
    half();
    chk("bytes received", rx_q.size(), 3);
    if (rx_q.size() == 3) begin
      chk("byte 0", rx_q[0], 8'h5a);
      chk("byte 1", rx_q[1], 8'h37);
      chk("byte 2", rx_q[2], 8'h73);
    end
    chk("frame pulses", n_frame, 1);
    rx_q.delete();

    // Read word: command, repeated START, address + R, two bytes, NACK
    tx_q.push_back(8'h37);
    tx_q.push_back(8'h73);
    bus_start();
    wr_byte({7'h04, 1'b0}, ack); chk("address ack (write 2)", ack, 1);
    wr_byte(8'h5b, ack);         chk("command ack 2", ack, 1);
    bus_start();                                // repeated START
    wr_byte({7'h04, 1'b1}, ack); chk("address ack (read)", ack, 1);
    rd_byte(1'b1, v);            chk("read byte 1", v, 8'h37);
    rd_byte(1'b0, v);            chk("read byte 2", v, 8'h73);
    bus_stop();
    half();
    chk("requests", n_req, 2);
    chk("frame pulses 2", n_frame, 2);
    chk("command byte", (rx_q.size() == 1) ? rx_q[0] : 0, 8'h5b);
    rx_q.delete();

    // Wrong address: NACK and nothing delivered
    bus_start();
    wr_byte({7'h05, 1'b0}, ack); chk("foreign address nack", ack, 0);
    bus_stop();
    half();
    chk("nothing received", rx_q.size(), 0);
    chk("no frame", n_frame, 2);

    // Address pins: 05H now answers, and a read byte works
    addr = 3'b101;
    tx_q.push_back(8'hc3);
    bus_start();
    wr_byte({7'h05, 1'b1}, ack); chk("address 05H ack", ack, 1);
    rd_byte(1'b0, v);            chk("read byte", v, 8'hc3);
    bus_stop();
    half();
    chk("requests 2", n_req, 3);
    chk("out_en total", n_out, 4);

    // Refused byte: NACK, not delivered, rest of the transfer ignored
    addr = 3'b100;
    rx_q.delete();
    bus_start();
    wr_byte({7'h04, 1'b0}, ack); chk("address ack 3", ack, 1);
    wr_byte(8'h11, ack);         chk("accepted byte", ack, 1);
    wr_byte(8'hff, ack);         chk("refused byte nack", ack, 0);
    wr_byte(8'h22, ack);         chk("ignored after nack", ack, 0);
    bus_stop();
    half();
    chk("only accepted byte delivered", rx_q.size(), 1);
    chk("out_en total 2", n_out, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
