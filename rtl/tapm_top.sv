// tapm_top: the thermal-aware power management (TAPM) IP as a whole.
//
// Temperature sensors stream their readings into the thermal management unit
// (TMU), which compares them with programmable local and offset thresholds
// and raises an interrupt to the processor on overheating; the processor reads
// the reports and reprograms thresholds and cooling levels over a separate,
// slow power management bus (SMBus), and four multi-level controllers (MLC)
// turn the programmed levels into 256-level PWM drive for fans or voltage
// regulators. Sensors, TMU and MLCs thus close a thermal feedback loop
// without loading the fast system bus.
//
// Contents, as in the prototype: one TMU (with four sensor serial-to-parallel
// interfaces), four MLCs, an SMBus slave through which the TMU is programmed,
// an SMBus master for exercising the bus, and the derivation of the SMBus
// (500 kHz) and MLC (10 kHz) rates from the 100 MHz input clock. The mux pin
// selects what the shared pins do:
//   mux = 1: the TMU is reached through the SMBus slave; smb_in_tmu_in,
//            smb_en_tmu_in_en and smb_rw_tmu_out_en drive the SMBus master
//            (in_data, en, rw) and smb_out_tmu_out is the master's out_data.
//   mux = 0: the TMU command port is driven directly: a rising edge on
//            smb_en_tmu_in_en writes smb_in_tmu_in into the TMU, a rising
//            edge on smb_rw_tmu_out_en reads the next byte onto
//            smb_out_tmu_out; the SMBus master is held idle.
// The pins are the prototype's; the edge detection in TMU mode, the master's
// reset (reset or smb_reset) and the use of clock enables in place of three
// internal clocks are this design's choices.
//
// The bus itself is outside: the slave's data output smbdat_out and the
// master's smb_smbclk_out / smb_smbdat_out are open-drain style (0 pulls
// low); the board forms the wired AND and returns it on smbclk/smbdat_in and
// smb_smbclk/smb_smbdat_in.
module tapm_top
  import tapm_pkg::*;
#(
  parameter int unsigned SMB_DIV   = 200,     // 100 MHz -> 500 kHz SMBus clock
  parameter int unsigned MLC_DIV   = 10000,   // 100 MHz -> 10 kHz MLC clock
  parameter int unsigned BIT_TICKS = 6,       // SMBus clock = SMBus clock / 6
  parameter logic [3:0]  SLV_BASE  = 4'b0000  // upper bits of the slave address
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             mux,
  // SMBus slave side
  input  logic [2:0]       addr,
  input  logic             smbclk,
  input  logic             smbdat_in,
  output logic             smbdat_out,
  // sensors
  input  logic [NSENS-1:0] sen,
  input  logic [NSENS-1:0] sen_en,
  // controllers and interrupts
  output logic [NSENS-1:0] fan,
  output logic             intr,
  output logic             intr_off,
  // shared master / TMU test pins
  input  logic             smb_reset,
  input  logic [7:0]       smb_in_tmu_in,
  input  logic             smb_en_tmu_in_en,
  input  logic             smb_rw_tmu_out_en,
  input  logic             smb_smbclk,
  input  logic             smb_smbdat_in,
  output logic [7:0]       smb_out_tmu_out,
  output logic             smb_smbclk_out,
  output logic             smb_smbdat_out,
  output logic             smb_clean,
  output logic             smb_fail,
  output logic             smb_out_en
);
  logic ce_smb, ce_mlc;

  tapm_clk_en #(.SMB_DIV(SMB_DIV), .MLC_DIV(MLC_DIV)) u_clk_en (
    .clk, .rst(reset), .ce_smb, .ce_mlc
  );

  // ---------------- direct TMU access (mux = 0) ----------------
  logic en_q, oe_q;
  logic tst_in_en, tst_out_en;
  always_ff @(posedge clk) begin
    if (reset) begin
      en_q <= 1'b0;
      oe_q <= 1'b0;
    end else begin
      en_q <= smb_en_tmu_in_en;
      oe_q <= smb_rw_tmu_out_en;
    end
  end
  assign tst_in_en  = !mux && smb_en_tmu_in_en && !en_q;
  assign tst_out_en = !mux && smb_rw_tmu_out_en && !oe_q;

  // ---------------- SMBus slave ----------------
  logic [7:0] slv_out, tmu_out;
  logic       slv_out_en, slv_in_ready, slv_frame, slv_chk_ok;
  logic [7:0] slv_chk_data;

  smb_slave #(.BASE(SLV_BASE)) u_slave (
    .clk, .rst(reset), .ce(ce_smb), .addr,
    .scl(smbclk), .sda_in(smbdat_in), .sda_out(smbdat_out),
    .in_data(tmu_out), .in_ready(slv_in_ready),
    .out_data(slv_out), .out_en(slv_out_en), .frame(slv_frame),
    .chk_data(slv_chk_data), .chk_ok(slv_chk_ok)
  );

  // ---------------- TMU ----------------
  logic [NSENS-1:0][7:0] fan_lvl;

  // The TMU's register outputs other than FAN0..3 are for observing the
  // TMU on its own; in the IP the host reads them over the bus.
  tmu u_tmu (
    .clk, .rst(reset),
    .in_data (mux ? slv_out : smb_in_tmu_in),
    .in_en   (mux ? slv_out_en : tst_in_en),
    .out_en  (mux ? slv_in_ready : tst_out_en),
    .frame   (mux && slv_frame),
    .chk_data(slv_chk_data),
    .chk_ok  (slv_chk_ok),
    .out_data(tmu_out),
    .sen, .sen_en,
    .fan(fan_lvl), .temp(), .report0(), .report1(), .config_r(),
    .intr, .intr_offs(intr_off)
  );

  // ---------------- multi-level controllers ----------------
  for (genvar g = 0; g < NSENS; g++) begin : g_mlc
    mlc #(.W(8), .RST_LEVEL(RST_FAN)) u_mlc (
      .clk, .rst(reset), .ce(ce_mlc), .d_in(fan_lvl[g]), .out(fan[g])
    );
  end

  // ---------------- SMBus master ----------------
  logic [7:0] mst_out;

  smb_master #(.BIT_TICKS(BIT_TICKS)) u_master (
    .clk, .rst(reset || smb_reset), .ce(ce_smb),
    .en(mux && smb_en_tmu_in_en), .rw(smb_rw_tmu_out_en),
    .in_data(smb_in_tmu_in),
    .scl_in(smb_smbclk), .sda_in(smb_smbdat_in),
    .scl_out(smb_smbclk_out), .sda_out(smb_smbdat_out),
    .out_data(mst_out), .out_en(smb_out_en),
    .clean(smb_clean), .fail(smb_fail)
  );

  assign smb_out_tmu_out = mux ? mst_out : tmu_out;
endmodule
