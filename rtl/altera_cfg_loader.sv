// Passive-serial configuration loader for the FLEX 6K Altera devices.
//
// SPAC commands handled (strobes from the command decoder):
//   0x20 write  byte_wr : shift D[7:0] out on DATA0, LSB first, one DCLK each
//   0x21 write  ncfg_wr : pulse nCONFIG low for NCONFIG_NS to start a load
//   0x22 write  clks_wr : give D[3:0]+1 DCLK pulses (the extra clocks needed
//                         after CONF_DONE rises to enter user mode)
//   0x23 write  dout_wr : set DATA0 to D[0]
//   0x20 read   status  : {busy, nSTATUS, CONF_DONE} in bits 2..0
// DCLK is driven on two identical lines (dclk_l, dclk_r) for the left and
// right halves of the board.  The DCLK rate is DCLK_HZ (5 MHz by default,
// below the 10 MHz limit).  Byte and clock commands are held back until
// nSTATUS has been high for NSTATUS_WAIT_NS (1 us), because no
// configuration clock may come sooner; busy is high while a command waits,
// shifts or pulses.  nSTATUS and CONF_DONE are synchronised with two flops.
//
// The command set, the two DCLK lines, the 1 us wait after nSTATUS and the
// 10 MHz limit follow the protocol description.  The LSB-first bit order
// follows the usual FLEX passive-serial convention; the nCONFIG pulse width,
// the DCLK rate and the system clock are this design's choices.
module altera_cfg_loader #(
  parameter int unsigned CLK_HZ          = 20_000_000,
  parameter int unsigned DCLK_HZ         = 5_000_000,
  parameter int unsigned NCONFIG_NS      = 2_000,
  parameter int unsigned NSTATUS_WAIT_NS = 1_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       byte_wr,
  input  logic       ncfg_wr,
  input  logic       clks_wr,
  input  logic       dout_wr,
  input  logic [7:0] wdata,
  output logic [2:0] status,
  output logic       nconfig,
  output logic       dclk_l,
  output logic       dclk_r,
  output logic       data0,
  input  logic       nstatus,
  input  logic       conf_done
);

  localparam int unsigned HALF     = (CLK_HZ + 2*DCLK_HZ - 1) / (2 * DCLK_HZ);
  localparam int unsigned NCFG_CYC = int'((64'(CLK_HZ) * NCONFIG_NS + 999_999_999) / 1_000_000_000);
  localparam int unsigned WAIT_CYC = int'((64'(CLK_HZ) * NSTATUS_WAIT_NS + 999_999_999) / 1_000_000_000);
  localparam int unsigned PW = $clog2(NCFG_CYC + 1);
  localparam int unsigned WW = $clog2(WAIT_CYC + 1);

  logic [1:0]    nst_sync, cdn_sync;
  logic [PW-1:0] pulse_cnt;
  logic [WW-1:0] wait_cnt;
  logic          clk_ok, sh_busy, pulsing, busy;
  logic          dclk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nst_sync  <= '0;
      cdn_sync  <= '0;
      pulse_cnt <= '0;
      wait_cnt  <= '0;
    end else begin
      nst_sync <= {nst_sync[0], nstatus};
      cdn_sync <= {cdn_sync[0], conf_done};
      if (ncfg_wr && !busy)    pulse_cnt <= PW'(NCFG_CYC);
      else if (pulse_cnt != 0) pulse_cnt <= pulse_cnt - 1'b1;
      // time since nSTATUS was released
      if (!nst_sync[1])                  wait_cnt <= '0;
      else if (wait_cnt != WW'(WAIT_CYC)) wait_cnt <= wait_cnt + 1'b1;
    end
  end

  assign pulsing = (pulse_cnt != 0);
  assign clk_ok  = nst_sync[1] && (wait_cnt == WW'(WAIT_CYC));
  assign nconfig = !pulsing;
  assign busy    = sh_busy | pulsing;

  cfg_shifter #(.HALF(HALF), .MSB_FIRST(1'b0)) u_shift (
    .clk      (clk),
    .rst_n    (rst_n),
    .byte_go  (byte_wr && !pulsing),
    .clks_go  (clks_wr && !pulsing),
    .dout_go  (dout_wr && !pulsing),
    .wdata    (wdata),
    .hold     (!clk_ok),
    .busy     (sh_busy),
    .cfg_clk  (dclk),
    .cfg_dout (data0)
  );

  assign dclk_l = dclk;
  assign dclk_r = dclk;
  assign status = {busy, nst_sync[1], cdn_sync[1]};

  // no configuration clock sooner than NSTATUS_WAIT_NS after nSTATUS rises
  a_dclk_after_nstatus: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(dclk) |-> $past(clk_ok));

endmodule
