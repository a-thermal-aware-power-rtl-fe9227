// tmu: thermal management unit, the programmable core of the TAPM IP.
//
// The TMU holds the six kinds of registers of the IP: sensor temperatures
// TEMP0..3, local thresholds THRES0..3, the offset threshold OFFS_THRES,
// the reports REPORT0/1, the configuration CONFIG and the drive values
// FAN0..3 of the four multi-level controllers. Four sensor_s2p interfaces
// load TEMP0..3, a thermal_monitor compares them with the thresholds and
// raises intr / intr_offs, and a byte-wide command port lets a host (through
// the SMBus slave, or directly in the TMU test mode) read and write the
// registers. Register set, reset values, thresholds, reports and the two
// interrupt lines follow the prototype; the command encoding (tapm_pkg) and
// the framing below are this design's own.
//
// Command port, one byte per clock at most:
//   in_en  : in_data is taken. The first byte after reset, after frame, after a
//            completed write or while a read is set up is a command byte.
//            A write command is followed by its 1 or 2 data bytes (low byte
//            first); the register is updated when its last byte arrives. A
//            read command sets up a read of the register. An undefined
//            command is dropped and the next byte is again a command.
//   out_en : out_data is loaded, in the next clock, with the next byte of the
//            register set up by the last read command (low byte first), 00H
//            past its last byte, FFH when no read is set up.
//   frame  : one-clock pulse that aborts any command in progress (the SMBus
//            slave gives it for every START addressed to it for writing).
//   chk_ok : combinational answer for the byte on chk_data: high unless it
//            would be taken as a command byte and is undefined. The SMBus
//            slave uses it to refuse (NACK) invalid commands.
module tmu
  import tapm_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic [7:0]             in_data,
  input  logic                   in_en,
  input  logic                   out_en,
  input  logic                   frame,
  input  logic [7:0]             chk_data,
  output logic                   chk_ok,
  output logic [7:0]             out_data,
  input  logic [NSENS-1:0]       sen,
  input  logic [NSENS-1:0]       sen_en,
  output logic [NSENS-1:0][7:0]  fan,
  output logic [NSENS-1:0][7:0]  temp,
  output logic [7:0]             report0,
  output logic [7:0]             report1,
  output logic [7:0]             config_r,
  output logic                   intr,
  output logic                   intr_offs
);
  typedef enum logic [1:0] {S_CMD, S_WR, S_RD} state_e;

  state_e                  state;
  tmu_cmd_t                cmd;
  logic                    ptr;
  logic [1:0]              rd_ptr;
  logic [7:0]              hold;
  logic [NSENS-1:0][15:0]  thres;
  logic [15:0]             offs_thres;

  // ---------------- sensor interfaces ----------------
  logic [NSENS-1:0][7:0] s2p_data;
  logic [NSENS-1:0]      s2p_valid;

  for (genvar g = 0; g < NSENS; g++) begin : g_sen
    sensor_s2p #(.W(8)) u_s2p (
      .clk, .rst, .sen(sen[g]), .sen_en(sen_en[g]),
      .data(s2p_data[g]), .valid(s2p_valid[g])
    );
  end

  // ---------------- comparators and interrupt generator ----------------
  thermal_monitor u_mon (
    .clk, .rst, .temp, .thres, .offs_thres, .config_r,
    .report0, .report1, .intr, .intr_offs
  );

  // ---------------- register read multiplexer ----------------
  function automatic logic [15:0] reg_word(input tmu_kind_e kind,
                                           input logic [1:0] idx);
    case (kind)
      KIND_CONFIG: return {8'h00, config_r};
      KIND_REPORT: return {8'h00, idx[0] ? report1 : report0};
      KIND_FAN:    return {8'h00, fan[idx]};
      KIND_TEMP:   return {8'h00, temp[idx]};
      KIND_THRES:  return thres[idx];
      KIND_OFFS:   return offs_thres;
      default:     return 16'h0000;
    endcase
  endfunction

  tmu_cmd_t    in_cmd;
  int unsigned in_len, cur_len;
  assign in_cmd  = tmu_cmd_t'(in_data);
  assign in_len  = tmu_cmd_len(in_cmd);
  assign cur_len = tmu_cmd_len(cmd);
  assign chk_ok  = (state == S_WR) || (tmu_cmd_len(tmu_cmd_t'(chk_data)) != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_CMD;
      cmd        <= '0;
      ptr        <= 1'b0;
      rd_ptr     <= '0;
      hold       <= '0;
      out_data   <= 8'hff;
      temp       <= '{default: RST_TEMP};
      fan        <= '{default: RST_FAN};
      thres      <= '{default: RST_THRES};
      offs_thres <= RST_OFFS;
      config_r   <= RST_CONFIG;
    end else begin
      for (int i = 0; i < NSENS; i++)
        if (s2p_valid[i]) temp[i] <= s2p_data[i];

      if (frame) begin
        state <= S_CMD;
      end else if (in_en) begin
        if (state == S_WR) begin
          if (cur_len == 2 && !ptr) begin
            hold <= in_data;
            ptr  <= 1'b1;
          end else begin
            case (cmd.kind)
              KIND_CONFIG: config_r       <= in_data;
              KIND_FAN:    fan[cmd.idx]   <= in_data;
              KIND_THRES:  thres[cmd.idx] <= {in_data, hold};
              KIND_OFFS:   offs_thres     <= {in_data, hold};
              default: ;
            endcase
            state <= S_CMD;
          end
        end else begin
          // command byte
          cmd    <= in_cmd;
          ptr    <= 1'b0;
          rd_ptr <= '0;
          if (in_len == 0)    state <= S_CMD;
          else if (in_cmd.rd) state <= S_RD;
          else                state <= S_WR;
        end
      end else if (out_en) begin
        if (state == S_RD) begin
          logic [15:0] w;
          w = reg_word(cmd.kind, cmd.idx);
          if (rd_ptr == 2'd0)                   out_data <= w[7:0];
          else if (rd_ptr == 2'd1 && cur_len == 2) out_data <= w[15:8];
          else                                  out_data <= 8'h00;
          if (rd_ptr != 2'd3) rd_ptr <= rd_ptr + 1'b1;
        end else begin
          out_data <= 8'hff;
        end
      end
    end
  end

  // A byte write and a byte read of the command port never coincide.
  a_port_exclusive: assert property (@(posedge clk) disable iff (rst) !(in_en && out_en));
endmodule
