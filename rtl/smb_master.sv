// smb_master: SMBus master interface of the TAPM IP.
//
// It generates the bus clock and runs write and read byte/word transactions
// for a host that feeds it one byte at a time. Each bus clock period is
// BIT_TICKS ticks of the SMBus internal clock (ce): low for the first half,
// high for the second. With the prototype's 500 kHz internal clock and six
// ticks per bit this gives its 83 kHz bus rate, and half a period (three
// ticks, 6 us) covers the minimum clock-high time, START hold and STOP setup
// times of SMBus. Data changes one tick after the clock falls and is sampled
// in the last tick of the high half. As in the prototype the data wire is
// split into sda_in (bus level) and sda_out (0 pulls low); the master reads the
// bus clock back on scl_in and waits while another device holds it low.
// The ports, the six ticks per bit and the clean/fail handshake follow the
// prototype; the exact host handshake below is this design's own.
//
// Host protocol:
//   Raise en with rw and the first byte (address + write bit) on in_data; the
//   master sends START and that byte. After every byte the slave
//   acknowledges, clean pulses; the host then has two ticks to put the next
//   byte on in_data, or to drop en to end the transfer with STOP. A byte the
//   slave refuses pulses fail and the master sends STOP; if en is still high
//   the whole transaction is retried from START.
//   Write (rw = 0): address+W, command, one or two data bytes.
//   Read  (rw = 1): address+W, command, then address+R, which the master
//   sends after a repeated START; it then receives bytes, each delivered on
//   out_data with an out_en pulse. Whether a byte is the last one is decided
//   from en as the byte starts: a byte started with en high is acknowledged,
//   one started with en low is answered with NACK and followed by STOP. So
//   the host drops en right after the out_en of the next-to-last byte (for a
//   one-byte read, right after the clean of address+R); it has three ticks.
module smb_master #(
  parameter int unsigned BIT_TICKS = 6
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,        // SMBus internal clock enable
  input  logic       en,
  input  logic       rw,        // 1 = read protocol
  input  logic [7:0] in_data,
  input  logic       scl_in,    // SMBCLK as seen on the bus
  input  logic       sda_in,    // SMBDAT as seen on the bus
  output logic       scl_out,
  output logic       sda_out,
  output logic [7:0] out_data,
  output logic       out_en,
  output logic       clean,     // last byte sent was acknowledged
  output logic       fail       // last byte sent was refused
);
  typedef enum logic [3:0] {
    IDLE, START, TXB, TXACK, NEXT, RSTART, RXB, RXACK, STOP
  } state_e;

  localparam int unsigned HALF = BIT_TICKS / 2;
  localparam int unsigned PW   = $clog2(BIT_TICKS + 1);

  state_e        state;
  logic [PW-1:0] ph;
  logic [3:0]    bitcnt;
  logic [7:0]    shreg;
  logic [1:0]    nbyte;     // bytes sent in this transaction, saturating at 3
  logic          rw_q;
  logic          ack_q;
  logic [1:0]    scl_s, sda_s;

  wire last_ph = (ph == PW'(BIT_TICKS - 1));
  wire stretch = scl_out && !scl_s[1] && (ph == PW'(HALF + 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      ph       <= '0;
      bitcnt   <= '0;
      shreg    <= '0;
      nbyte    <= '0;
      rw_q     <= 1'b0;
      ack_q    <= 1'b0;
      scl_out  <= 1'b1;
      sda_out  <= 1'b1;
      out_data <= '0;
      out_en   <= 1'b0;
      clean    <= 1'b0;
      fail     <= 1'b0;
      scl_s    <= 2'b11;
      sda_s    <= 2'b11;
    end else begin
      scl_s  <= {scl_s[0], scl_in};
      sda_s  <= {sda_s[0], sda_in};
      out_en <= 1'b0;
      clean  <= 1'b0;
      fail   <= 1'b0;
      if (ce && !stretch) begin
        ph <= last_ph ? '0 : ph + 1'b1;
        unique case (state)
          IDLE: begin
            scl_out <= 1'b1;
            sda_out <= 1'b1;
            ph      <= last_ph ? ph : ph + 1'b1;   // bus free time
            if (last_ph && en) begin
              rw_q   <= rw;
              shreg  <= in_data;
              nbyte  <= '0;
              bitcnt <= '0;
              ph     <= '0;
              state  <= START;
            end
          end
          START: begin                             // SDA falls while SCL high
            if (ph == PW'(HALF)) sda_out <= 1'b0;
            if (last_ph) state <= TXB;
          end
          RSTART: begin                            // SDA falls while SCL high
            if (ph == 0) scl_out <= 1'b0;
            if (ph == 1) sda_out <= 1'b1;
            if (ph == 2) scl_out <= 1'b1;
            if (ph == PW'(BIT_TICKS - 2)) sda_out <= 1'b0;
            if (last_ph) state <= TXB;
          end
          TXB, TXACK, RXB, RXACK: begin
            if (ph == 0) scl_out <= 1'b0;
            if (ph == 1) begin
              unique case (state)
                TXB:     sda_out <= shreg[7];
                RXACK:   sda_out <= !ack_q;
                RXB:     begin
                  sda_out <= 1'b1;
                  if (bitcnt == 4'd0) ack_q <= en;   // more bytes wanted?
                end
                default: sda_out <= 1'b1;
              endcase
            end
            if (ph == PW'(HALF)) scl_out <= 1'b1;
            if (last_ph) begin
              unique case (state)
                TXB: begin
                  shreg  <= {shreg[6:0], 1'b0};
                  bitcnt <= bitcnt + 1'b1;
                  if (bitcnt == 4'd7) state <= TXACK;
                end
                TXACK: begin
                  bitcnt <= '0;
                  if (!sda_s[1]) begin
                    clean <= 1'b1;
                    if (nbyte != 2'd3) nbyte <= nbyte + 1'b1;
                    state <= NEXT;
                  end else begin
                    fail  <= 1'b1;
                    state <= STOP;
                  end
                end
                RXB: begin
                  shreg  <= {shreg[6:0], sda_s[1]};
                  bitcnt <= bitcnt + 1'b1;
                  if (bitcnt == 4'd7) begin
                    out_data <= {shreg[6:0], sda_s[1]};
                    out_en   <= 1'b1;
                    state    <= RXACK;
                  end
                end
                default: begin                     // RXACK
                  bitcnt <= '0;
                  state  <= ack_q ? RXB : STOP;
                end
              endcase
            end
          end
          NEXT: begin                              // SCL low: host reacts to clean
            if (ph == 0) scl_out <= 1'b0;
            if (ph == 2) begin
              ph <= '0;
              if (rw_q && nbyte == 2'd3)           state <= RXB;
              else if (!en)                        state <= STOP;
              else if (rw_q && nbyte == 2'd2)    begin shreg <= in_data; state <= RSTART; end
              else                               begin shreg <= in_data; state <= TXB; end
            end
          end
          STOP: begin                              // SDA rises while SCL high
            if (ph == 0) scl_out <= 1'b0;
            if (ph == 1) sda_out <= 1'b0;
            if (ph == PW'(HALF)) scl_out <= 1'b1;
            if (ph == PW'(BIT_TICKS - 2)) sda_out <= 1'b1;
            if (last_ph) state <= IDLE;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  // The bit timing needs a low half and a high half of at least three ticks.
  initial assert (BIT_TICKS >= 6 && BIT_TICKS % 2 == 0)
    else $error("smb_master: BIT_TICKS must be even and at least 6");
endmodule
