// tb_smb_master: the prototype's bus test set-up, the SMBus master talking to
// the SMBus slave (address 04H). A host model feeds the master byte by byte
// and checks: a write word (37H, 73H), a read word returning 37H, 73H
// through a repeated START, a read byte, a write to an absent address that
// must raise fail and end with STOP, a data byte the slave refuses (fail),
// a refused byte after which the host keeps en high so that the master
// retries the whole transaction from START,
// and a transfer during which the slave
// side stretches the clock. A bus monitor decodes START/STOP/bytes on the
// wires independently of both interfaces and checks that a bus clock period
// is BIT_TICKS ticks of the SMBus internal clock.
module tb_smb_master;
  localparam int unsigned CE_DIV    = 4;
  localparam int unsigned BIT_TICKS = 6;

  logic clk = 1'b0, rst = 1'b1, ce;
  int   div = 0;

  // master
  logic       en = 1'b0, rw = 1'b0;
  logic [7:0] m_in = '0, m_out;
  logic       scl_out, m_sda_out, m_out_en, clean, fail;
  // slave
  logic       s_sda_out, in_ready, s_out_en, frame, chk_ok;
  logic [7:0] chk_data;
  logic [7:0] s_in = 8'h00, s_out;
  // bus
  logic       hold_scl = 1'b0;
  wire        scl = scl_out & !hold_scl;
  wire        sda = m_sda_out & s_sda_out;

  int checks = 0, failures = 0;

  smb_master #(.BIT_TICKS(BIT_TICKS)) u_m (
    .clk, .rst, .ce, .en, .rw, .in_data(m_in), .scl_in(scl), .sda_in(sda),
    .scl_out, .sda_out(m_sda_out), .out_data(m_out), .out_en(m_out_en),
    .clean, .fail
  );

  smb_slave #(.BASE(4'b0000)) u_s (
    .clk, .rst, .ce, .addr(3'b100), .scl, .sda_in(sda), .sda_out(s_sda_out),
    .in_data(s_in), .in_ready, .out_data(s_out), .out_en(s_out_en), .frame,
    .chk_data, .chk_ok
  );

  assign ce = (div == CE_DIV - 1);
  // Slave host refuses EEH always, and DDH while refuse_dd is set.
  logic refuse_dd = 1'b0;
  assign chk_ok = !(chk_data == 8'hee || (refuse_dd && chk_data == 8'hdd));
  always #5 clk = ~clk;
  always @(posedge clk) div <= (div == CE_DIV - 1) ? 0 : div + 1;

  // Slave host: bytes received by the slave, bytes it returns.
  logic [7:0] s_rx[$], s_tx[$];
  always @(posedge clk) if (!rst) begin
    if (s_out_en) s_rx.push_back(s_out);
    if (in_ready) s_in <= (s_tx.size() > 0) ? s_tx.pop_front() : 8'hee;
  end

  // ---------------- bus monitor ----------------
  logic scl_q = 1'b1, sda_q = 1'b1;
  int   nbit = 0;
  logic [8:0] sh = '0;
  logic [7:0] mon[$];          // bytes seen on the bus (data only, no ACK)
  int   n_start = 0, n_stop = 0;
  longint cyc = 0, last_rise = 0;
  int   n_per_ok = 0, n_per_short = 0;
  int   held = 0;                // rises since the clock was last held low
  always @(posedge clk) if (!rst) begin
    cyc   <= cyc + 1;
    if (hold_scl) held <= 2;
    scl_q <= scl;
    sda_q <= sda;
    if (scl && scl_q && sda_q && !sda) begin n_start++; nbit <= 0; end
    if (scl && scl_q && !sda_q && sda) n_stop++;
    if (scl && !scl_q) begin
      if (held > 0) held <= held - 1;
      if (last_rise != 0 && held == 0) begin
        if (cyc - last_rise == BIT_TICKS * CE_DIV) n_per_ok++;
        else if (cyc - last_rise < BIT_TICKS * CE_DIV) n_per_short++;
      end
      last_rise <= cyc;
      sh <= {sh[7:0], sda};
      if (nbit == 8) begin
        mon.push_back(sh[7:0]);
        nbit <= 0;
      end else nbit <= nbit + 1;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  // Waits for clean or fail; returns 1 on clean.
  task automatic wait_ack(output logic ok);
    do @(posedge clk); while (!clean && !fail);
    ok = clean;
  endtask

  task automatic wait_idle();
    int quiet;
    quiet = 0;
    while (quiet < BIT_TICKS * CE_DIV * 2) begin
      @(posedge clk);
      quiet = (scl && sda) ? quiet + 1 : 0;
    end
  endtask

  task automatic write_tx(input logic [7:0] b[], output logic ok);
    rw   <= 1'b0;
    m_in <= b[0];
    en   <= 1'b1;
    ok = 1'b1;
    for (int i = 0; i < b.size(); i++) begin
      logic a;
      wait_ack(a);
      if (!a) begin ok = 1'b0; break; end
      if (i + 1 < b.size()) m_in <= b[i + 1];
      else en <= 1'b0;
    end
    en <= 1'b0;
    wait_idle();
  endtask

  task automatic read_tx(input logic [7:0] addr7, input logic [7:0] cmd, input int n,
                         output logic [7:0] r[$]);
    logic a;
    r.delete();
    rw   <= 1'b1;
    m_in <= {addr7[6:0], 1'b0};
    en   <= 1'b1;
    wait_ack(a); m_in <= cmd;
    wait_ack(a); m_in <= {addr7[6:0], 1'b1};
    wait_ack(a); if (n == 1) en <= 1'b0;
    for (int i = 0; i < n; i++) begin
      do @(posedge clk); while (!m_out_en);
      r.push_back(m_out);
      if (i == n - 2) en <= 1'b0;
    end
    wait_idle();
  endtask

  initial begin
    logic ok;
    logic [7:0] r[$];
    int nfail;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (50) @(posedge clk);

    // 1: write word 37H 73H (address, command, two data bytes)
    write_tx('{8'h08, 8'h30, 8'h37, 8'h73}, ok);
    chk("write word ok", ok, 1);
    chk("slave got 3 bytes", s_rx.size(), 3);
    if (s_rx.size() == 3) chk("slave bytes", {s_rx[0], s_rx[1], s_rx[2]}, 24'h303773);
    chk("monitor bytes", mon.size(), 4);
    if (mon.size() == 4) chk("bus bytes", {mon[0], mon[1], mon[2], mon[3]}, 32'h08303773);
    chk("START count", n_start, 1);
    chk("STOP count", n_stop, 1);
    s_rx.delete(); mon.delete();

    // 2: read word returning 37H 73H
    s_tx.push_back(8'h37); s_tx.push_back(8'h73);
    read_tx(8'h04, 8'hb0, 2, r);
    chk("read word bytes", r.size(), 2);
    if (r.size() == 2) chk("read word data", {r[0], r[1]}, 16'h3773);
    chk("START count (repeated)", n_start, 3);
    chk("STOP count 2", n_stop, 2);
    chk("monitor bytes 2", mon.size(), 5);
    if (mon.size() == 5) chk("bus bytes 2", {mon[0], mon[1], mon[2]}, 24'h08b009);
    mon.delete(); s_rx.delete();

    // 3: read byte
    s_tx.push_back(8'h5c);
    read_tx(8'h04, 8'hb1, 1, r);
    chk("read byte", (r.size() == 1) ? r[0] : 0, 8'h5c);
    chk("slave queue empty", s_tx.size(), 0);

    // 4: absent address: fail, STOP, nothing delivered
    nfail = 0;
    fork
      begin
        rw <= 1'b0; m_in <= 8'h0e; en <= 1'b1;
        do @(posedge clk); while (!fail && !clean);
        if (fail) nfail++;
        en <= 1'b0;
        wait_idle();
      end
    join
    chk("fail pulse", nfail, 1);
    chk("STOP after fail", n_stop, 4);
    s_rx.delete();

    // 4b: refused data byte: fail after the second byte, STOP
    write_tx('{8'h08, 8'hee, 8'h01}, ok);
    chk("refused byte fails", ok, 0);
    chk("STOP after refused byte", n_stop, 5);
    chk("refused byte not delivered", s_rx.size(), 0);

    // 4c: refused once, then retried: the host keeps en high after fail and
    // presents the address again; the master sends STOP, then a new START.
    refuse_dd = 1'b1;
    nfail = 0;
    begin
      logic a;
      int st0;
      st0 = n_start;
      rw <= 1'b0; m_in <= 8'h08; en <= 1'b1;
      wait_ack(a); m_in <= 8'hdd;
      wait_ack(a);
      if (!a) begin nfail++; refuse_dd = 1'b0; m_in <= 8'h08; end
      wait_ack(a); chk("retry address ack", a, 1); m_in <= 8'hdd;
      wait_ack(a); chk("retry command ack", a, 1); m_in <= 8'h01;
      wait_ack(a); chk("retry data ack", a, 1); en <= 1'b0;
      wait_idle();
      chk("retry fail count", nfail, 1);
      chk("retry START count", n_start - st0, 2);
      chk("retry STOP count", n_stop, 7);
      chk("retry delivered", (s_rx.size() == 2) ? {s_rx[0], s_rx[1]} : 0, 16'hdd01);
    end
    s_rx.delete();

    // 5: write byte with the clock held low by another device for a while
    fork
      write_tx('{8'h08, 8'h20, 8'hc5}, ok);
      begin
        do @(posedge clk); while (!en);
        repeat (5) begin                         // fifth falling clock edge
          do @(posedge clk); while (!(scl_q && !scl));
        end
        hold_scl <= 1'b1;
        repeat (20 * CE_DIV) @(posedge clk);
        hold_scl <= 1'b0;
      end
    join
    chk("stretched write ok", ok, 1);
    chk("stretched write bytes", (s_rx.size() == 2) ? {s_rx[0], s_rx[1]} : 0, 16'h20c5);

    chk("no short clock periods", n_per_short, 0);
    checks++;
    if (n_per_ok < 40) begin failures++; $display("only %0d nominal clock periods", n_per_ok); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
