// SPAC Interface EPLD: SPAC parallel commands to FEB serial protocols.
//
// The SPAC controller writes and reads 8-bit registers by an 8-bit command
// code.  This block decodes the code and hands each command to its engine:
//   0x04        DAC chain bit-bang      (out: sdo, ld, clk;  in: sdi)
//   0x08/0x09   Altera parameter loading master (param_master)
//   0x10/0x14   Xilinx parameter bit-bang left / right (out: data, strobe; in: data)
//   0x18        I2C delay-line bit-bang (out: sda, scl; in: sda, scl pins)
//   0x1C        temperature sensor bit-bang (out: sda, scl; in: sda, scl, /int)
//   0x20..0x23  Altera passive-serial configuration (altera_cfg_loader)
//   0x28..0x2B  Xilinx slave-serial configuration (xilinx_cfg_loader)
//   0x30..0x33  shaper control (shaper_ctrl)
//   0x38        reset lines: Altera /reset, Xilinx /reset, SPAC soft reset,
//               over-temperature interrupt enable
//   0x3C        pulser DAC bit-bang (out: data, ld, clk)
// Commands not listed (0x24 included) write nothing and read zero.
// overtemp_irq is high while the enable bit of 0x38 is set and the
// temperature sensor's /interrupt pin is low.
//
// Bus: spac_wr is a one-clock write strobe with spac_addr and spac_wdata
// valid; spac_rdata is the combinational read of the register at spac_addr,
// valid in the same clock.  The I2C and temperature-sensor lines are given
// as the values to send; an open-drain pad pulls the line low for a 0 and
// releases it for a 1.
//
// The command map, the bit layouts and the overtemp enable follow the SPAC
// command tables of the protocol description.  The bus timing, the system
// clock (CLK_HZ, 20 MHz), reset values other than the reset lines' and the
// interrupt logic are this design's choices.
module spac_if_epld
  import feb_serial_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 20_000_000,
  parameter int unsigned RCLK_HZ = 5_000_000,
  parameter int unsigned CFG_HZ  = 5_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // SPAC side
  input  logic [7:0]  spac_addr,
  input  logic [7:0]  spac_wdata,
  input  logic        spac_wr,
  output logic [7:0]  spac_rdata,
  // DAC chain
  output logic        dac_sdo,
  output logic        dac_ld,
  output logic        dac_clk,
  input  logic        dac_sdi,
  // Altera parameter loading
  output logic        rclk,
  output logic        par_datain,
  input  logic        par_dataout,
  // Xilinx parameter loading, left and right
  output logic        xpl_dout,
  output logic        xpl_strobe,
  input  logic        xpl_din,
  output logic        xpr_dout,
  output logic        xpr_strobe,
  input  logic        xpr_din,
  // I2C delay line
  output logic        i2c_sda_o,
  output logic        i2c_scl_o,
  input  logic        i2c_sda_i,
  input  logic        i2c_scl_i,
  // temperature sensor
  output logic        tmp_sda_o,
  output logic        tmp_scl_o,
  input  logic        tmp_sda_i,
  input  logic        tmp_scl_i,
  input  logic        tmp_int_n,
  // Altera configuration
  output logic        acfg_nconfig,
  output logic        acfg_dclk_l,
  output logic        acfg_dclk_r,
  output logic        acfg_data0,
  input  logic        acfg_nstatus,
  input  logic        acfg_conf_done,
  // Xilinx configuration
  output logic        xcfg_program_n,
  output logic        xcfg_cclk_l,
  output logic        xcfg_cclk_r,
  output logic        xcfg_din,
  input  logic        xcfg_init_n,
  input  logic        xcfg_done,
  // shaper control
  output logic [15:0] sh_cs,
  output logic [1:0]  sh_m,
  output logic        sh_up,
  output logic        sh_down,
  output logic        sh_strobe,
  output logic [3:0]  sh_d_out,
  output logic        sh_d_oe,
  input  logic [3:0]  sh_d_in,
  // reset lines
  output logic        altera_reset_n,
  output logic        xilinx_reset_n,
  output logic        spac_soft_reset,
  output logic        overtemp_irq,
  // pulser DAC
  output logic        pdac_data,
  output logic        pdac_ld,
  output logic        pdac_clk
);

  function automatic logic wr_to(input logic [7:0] a, input logic [7:0] code, input logic w);
    return w && (a == code);
  endfunction

  logic [7:0] rd_dac, rd_xpl, rd_xpr, rd_i2c, rd_tmp, rd_rst, rd_pdac;
  logic [7:0] par_rd;
  logic       par_busy;
  logic [2:0] acfg_status, xcfg_status;
  logic [15:0] sh_cs_q;
  logic [7:0]  sh_ctrl;
  logic [3:0]  sh_rd;
  shaper_mode_t sh_mode;
  logic [2:0] dac_q, pdac_q;
  logic [1:0] xpl_q, xpr_q, i2c_q, tmp_q;
  logic [3:0] rst_q;

  // ---------------- bit-bang ports ----------------
  bitbang_port #(.NOUT(3), .NIN(1)) u_dac (
    .clk, .rst_n, .wr(wr_to(spac_addr, CMD_DAC, spac_wr)), .wdata(spac_wdata),
    .out_q(dac_q), .pins({7'b0, dac_sdi}), .rdata(rd_dac));
  assign {dac_clk, dac_ld, dac_sdo} = dac_q;

  bitbang_port #(.NOUT(2), .NIN(1)) u_xpl (
    .clk, .rst_n, .wr(wr_to(spac_addr, CMD_XPAR_LEFT, spac_wr)), .wdata(spac_wdata),
    .out_q(xpl_q), .pins({7'b0, xpl_din}), .rdata(rd_xpl));
  assign {xpl_strobe, xpl_dout} = xpl_q;

  bitbang_port #(.NOUT(2), .NIN(1)) u_xpr (
    .clk, .rst_n, .wr(wr_to(spac_addr, CMD_XPAR_RIGHT, spac_wr)), .wdata(spac_wdata),
    .out_q(xpr_q), .pins({7'b0, xpr_din}), .rdata(rd_xpr));
  assign {xpr_strobe, xpr_dout} = xpr_q;

  // I2C lines idle high (released)
  bitbang_port #(.NOUT(2), .NIN(2), .RST_VAL(8'h03)) u_i2c (
    .clk, .rst_n, .wr(wr_to(spac_addr, CMD_I2C_DELAY, spac_wr)), .wdata(spac_wdata),
    .out_q(i2c_q), .pins({6'b0, i2c_scl_i, i2c_sda_i}), .rdata(rd_i2c));
  assign {i2c_scl_o, i2c_sda_o} = i2c_q;

  bitbang_port #(.NOUT(2), .NIN(3), .RST_VAL(8'h03)) u_tmp (
    .clk, .rst_n, .wr(wr_to(spac_addr, CMD_TEMP, spac_wr)), .wdata(spac_wdata),
    .out_q(tmp_q), .pins({5'b0, tmp_int_n, tmp_scl_i, tmp_sda_i}), .rdata(rd_tmp));
  assign {tmp_scl_o, tmp_sda_o} = tmp_q;

  // reset lines come up asserted (Altera and Xilinx resets low)
  bitbang_port #(.NOUT(4), .NIN(0), .RST_VAL(8'h00)) u_rst (
    .clk, .rst_n, .wr(wr_to(spac_addr, CMD_RESET, spac_wr)), .wdata(spac_wdata),
    .out_q(rst_q), .pins(8'h00), .rdata(rd_rst));
  assign altera_reset_n  = rst_q[0];
  assign xilinx_reset_n  = rst_q[1];
  assign spac_soft_reset = rst_q[2];

  bitbang_port #(.NOUT(3), .NIN(0)) u_pdac (
    .clk, .rst_n, .wr(wr_to(spac_addr, CMD_PDAC, spac_wr)), .wdata(spac_wdata),
    .out_q(pdac_q), .pins(8'h00), .rdata(rd_pdac));
  assign {pdac_clk, pdac_ld, pdac_data} = pdac_q;

  // over-temperature interrupt; rd_tmp[4] is the synchronised /interrupt pin
  assign overtemp_irq = rst_q[3] && !rd_tmp[4];

  // ---------------- Altera parameter loading ----------------
  param_master #(.CLK_HZ(CLK_HZ), .RCLK_HZ(RCLK_HZ)) u_par (
    .clk, .rst_n,
    .data_wr (wr_to(spac_addr, CMD_PAR_DATA, spac_wr)),
    .cmd_wr  (wr_to(spac_addr, CMD_PAR_CMD,  spac_wr)),
    .wdata   (spac_wdata),
    .rd_data (par_rd),
    .busy    (par_busy),
    .rclk    (rclk),
    .datain  (par_datain),
    .dataout (par_dataout));

  // ---------------- configuration ----------------
  altera_cfg_loader #(.CLK_HZ(CLK_HZ), .DCLK_HZ(CFG_HZ)) u_acfg (
    .clk, .rst_n,
    .byte_wr (wr_to(spac_addr, CMD_ACFG_DATA, spac_wr)),
    .ncfg_wr (wr_to(spac_addr, CMD_ACFG_NCFG, spac_wr)),
    .clks_wr (wr_to(spac_addr, CMD_ACFG_CLKS, spac_wr)),
    .dout_wr (wr_to(spac_addr, CMD_ACFG_DOUT, spac_wr)),
    .wdata   (spac_wdata),
    .status  (acfg_status),
    .nconfig (acfg_nconfig),
    .dclk_l  (acfg_dclk_l),
    .dclk_r  (acfg_dclk_r),
    .data0   (acfg_data0),
    .nstatus (acfg_nstatus),
    .conf_done(acfg_conf_done));

  xilinx_cfg_loader #(.CLK_HZ(CLK_HZ), .CCLK_HZ(CFG_HZ)) u_xcfg (
    .clk, .rst_n,
    .byte_wr (wr_to(spac_addr, CMD_XCFG_DATA, spac_wr)),
    .prog_wr (wr_to(spac_addr, CMD_XCFG_PROG, spac_wr)),
    .clks_wr (wr_to(spac_addr, CMD_XCFG_CLKS, spac_wr)),
    .dout_wr (wr_to(spac_addr, CMD_XCFG_DOUT, spac_wr)),
    .wdata   (spac_wdata),
    .status  (xcfg_status),
    .program_n(xcfg_program_n),
    .cclk_l  (xcfg_cclk_l),
    .cclk_r  (xcfg_cclk_r),
    .din     (xcfg_din),
    .init_n  (xcfg_init_n),
    .done    (xcfg_done));

  // ---------------- shaper ----------------
  shaper_ctrl #(.CLK_HZ(CLK_HZ)) u_sh (
    .clk, .rst_n,
    .cs_lo_wr (wr_to(spac_addr, CMD_SH_CS_LO,  spac_wr)),
    .cs_hi_wr (wr_to(spac_addr, CMD_SH_CS_HI,  spac_wr)),
    .ctrl_p_wr(wr_to(spac_addr, CMD_SH_CTRL_P, spac_wr)),
    .ctrl_wr  (wr_to(spac_addr, CMD_SH_CTRL,   spac_wr)),
    .wdata    (spac_wdata),
    .cs       (sh_cs_q),
    .ctrl     (sh_ctrl),
    .rd_data  (sh_rd),
    .mode     (sh_mode),
    .up       (sh_up),
    .down     (sh_down),
    .strobe   (sh_strobe),
    .d_out    (sh_d_out),
    .d_oe     (sh_d_oe),
    .d_in     (sh_d_in));
  assign sh_cs = sh_cs_q;
  assign sh_m  = sh_mode;

  // ---------------- read mux ----------------
  always_comb begin
    unique case (spac_addr)
      CMD_DAC:        spac_rdata = rd_dac;
      CMD_PAR_DATA:   spac_rdata = par_rd;
      CMD_PAR_CMD:    spac_rdata = {7'b0, par_busy};
      CMD_XPAR_LEFT:  spac_rdata = rd_xpl;
      CMD_XPAR_RIGHT: spac_rdata = rd_xpr;
      CMD_I2C_DELAY:  spac_rdata = rd_i2c;
      CMD_TEMP:       spac_rdata = rd_tmp;
      CMD_ACFG_DATA:  spac_rdata = {5'b0, acfg_status};
      CMD_XCFG_DATA:  spac_rdata = {5'b0, xcfg_status};
      CMD_SH_CS_LO:   spac_rdata = sh_cs_q[7:0];
      CMD_SH_CS_HI:   spac_rdata = sh_cs_q[15:8];
      CMD_SH_CTRL_P:  spac_rdata = sh_ctrl;
      CMD_SH_CTRL:    spac_rdata = {4'b0, sh_rd};
      CMD_RESET:      spac_rdata = rd_rst;
      CMD_PDAC:       spac_rdata = rd_pdac;
      default:        spac_rdata = 8'h00;
    endcase
  end

endmodule
