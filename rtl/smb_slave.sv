// smb_slave: SMBus slave interface of the TAPM IP.
//
// It decodes START/STOP conditions and bytes on the two-wire System
// Management Bus, acknowledges its own 7-bit address {BASE, addr}, hands each
// received data byte to its host (out_data / out_en) and, when addressed for
// reading, transmits bytes taken from in_data, asking for each with in_ready.
// Like the prototype, the bidirectional data wire is split into sda_in (the
// bus level) and sda_out (1 = release, 0 = pull low; the bus is the wired AND
// of all drivers), so no tri-state buffer is needed. The slave never drives
// the clock. The address pins, the split data wires and the port set follow
// the prototype; the fixed upper address bits BASE (0000b, which makes the
// prototype's address 04H with addr = 100b), the frame pulse and the exact
// request timing are this design's choice. A data byte is acknowledged only
// if the host accepts it: the byte being received is shown on chk_data and
// the host answers on chk_ok in the same clock (the TMU refuses undefined
// commands). A refused byte is answered with NACK, is not delivered, and the
// slave ignores the bus until the next START, as SMBus asks of a slave that
// detects an invalid command.
//
// Timing: bus lines pass a two-flop synchronizer and are then sampled on every
// ce tick (the SMBus internal clock), so the bus clock must stay high and low
// for at least two ticks each; the companion master holds each for three.
// out_en pulses one clk after the falling clock edge that ends a data byte.
// in_ready pulses when the slave has been addressed for reading and when the
// master acknowledges a transmitted byte; the next byte is taken from in_data
// at the following falling clock edge, at least one tick later.
// frame pulses when the slave is addressed for writing.
module smb_slave #(
  parameter logic [3:0] BASE = 4'b0000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,        // SMBus internal clock enable
  input  logic [2:0] addr,      // low address bits (pins)
  input  logic       scl,       // SMBCLK
  input  logic       sda_in,    // SMBDAT as seen on the bus
  output logic       sda_out,   // 0 pulls SMBDAT low
  input  logic [7:0] in_data,   // byte to transmit
  output logic       in_ready,  // request for the next byte to transmit
  output logic [7:0] out_data,  // last received data byte
  output logic       out_en,    // out_data holds a new byte
  output logic       frame,     // addressed for writing: a new command follows
  output logic [7:0] chk_data,  // byte being received, for the host to judge
  input  logic       chk_ok     // host accepts chk_data (else NACK)
);
  typedef enum logic [2:0] {IDLE, ADDR, ADDR_ACK, RX, RX_ACK, TX, TX_ACK} state_e;

  state_e     state;
  logic [1:0] scl_s, sda_s;       // synchronizers
  logic       scl_p, sda_p;       // previous tick sample
  logic [3:0] bitcnt;
  logic [7:0] shreg;
  logic       rd_mode;

  wire scl_c = scl_s[1];
  wire sda_c = sda_s[1];
  wire start = scl_p & scl_c & sda_p & ~sda_c;
  wire stop  = scl_p & scl_c & ~sda_p & sda_c;
  wire rise  = ~scl_p & scl_c;
  wire fall  = scl_p & ~scl_c;

  assign chk_data = shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_s    <= 2'b11;
      sda_s    <= 2'b11;
      scl_p    <= 1'b1;
      sda_p    <= 1'b1;
      state    <= IDLE;
      bitcnt   <= '0;
      shreg    <= '0;
      rd_mode  <= 1'b0;
      sda_out  <= 1'b1;
      out_data <= '0;
      out_en   <= 1'b0;
      in_ready <= 1'b0;
      frame    <= 1'b0;
    end else begin
      scl_s    <= {scl_s[0], scl};
      sda_s    <= {sda_s[0], sda_in};
      out_en   <= 1'b0;
      in_ready <= 1'b0;
      frame    <= 1'b0;
      if (ce) begin
        scl_p <= scl_c;
        sda_p <= sda_c;
        if (start) begin
          state   <= ADDR;
          bitcnt  <= '0;
          sda_out <= 1'b1;
        end else if (stop) begin
          state   <= IDLE;
          sda_out <= 1'b1;
        end else begin
          unique case (state)
            IDLE: sda_out <= 1'b1;
            ADDR, RX: begin
              if (rise && bitcnt < 4'd8) begin
                shreg  <= {shreg[6:0], sda_c};
                bitcnt <= bitcnt + 1'b1;
              end else if (fall && bitcnt == 4'd8) begin
                if (state == ADDR) begin
                  if (shreg[7:1] == {BASE, addr}) begin
                    sda_out  <= 1'b0;          // ACK own address
                    rd_mode  <= shreg[0];
                    in_ready <= shreg[0];
                    frame    <= ~shreg[0];
                    state    <= ADDR_ACK;
                  end else begin
                    state <= IDLE;             // not for us: wait for START
                  end
                end else if (chk_ok) begin
                  out_data <= shreg;
                  out_en   <= 1'b1;
                  sda_out  <= 1'b0;            // ACK data byte
                  state    <= RX_ACK;
                end else begin
                  state <= IDLE;               // NACK: refused byte
                end
              end
            end
            ADDR_ACK, RX_ACK: begin
              if (fall) begin
                bitcnt <= '0;
                if (state == ADDR_ACK && rd_mode) begin
                  shreg   <= {in_data[6:0], 1'b0};
                  sda_out <= in_data[7];
                  bitcnt  <= 4'd1;
                  state   <= TX;
                end else begin
                  sda_out <= 1'b1;
                  state   <= RX;
                end
              end
            end
            TX: begin
              if (fall) begin
                if (bitcnt == 4'd8) begin
                  sda_out <= 1'b1;             // release for the master's ACK
                  state   <= TX_ACK;
                end else begin
                  sda_out <= shreg[7];
                  shreg   <= {shreg[6:0], 1'b0};
                  bitcnt  <= bitcnt + 1'b1;
                end
              end
            end
            TX_ACK: begin
              if (rise) begin
                rd_mode  <= ~sda_c;            // remember ACK (1) / NACK (0)
                in_ready <= ~sda_c;
              end else if (fall) begin
                if (rd_mode) begin
                  shreg   <= {in_data[6:0], 1'b0};
                  sda_out <= in_data[7];
                  bitcnt  <= 4'd1;
                  state   <= TX;
                end else begin
                  state <= IDLE;               // NACK: end of read
                end
              end
            end
            default: state <= IDLE;
          endcase
        end
      end
    end
  end
endmodule
