// FEB serial loading system: SPAC Interface EPLD plus the FEB Altera
// parameter receivers.
//
// The EPLD (spac_if_epld) takes SPAC command writes and reads and drives all
// FEB loading protocols.  The parameter-loading line is closed here: RCLK and
// DATAIN go to NUM_DEV parameter receivers (param_slave) with device
// addresses 0..NUM_DEV-1, and their DATAOUT outputs are ORed into the return
// line (a device that is not sending keeps it low).  Each device's parameter
// set and test pulse come out as ports.  All other protocol lines (Altera and
// Xilinx configuration, DAC chain, I2C, temperature sensor, shaper, reset and
// pulser DAC lines) go to external chips and are brought out unchanged.
// par_rclk and par_datain are also brought out so the line can be observed.
//
// The set of protocols and the shared serial line follow the protocol
// description.  NUM_DEV = 8, one device per value of the 3-bit address, and
// the ORed return line are this design's choices.
module feb_serial_system
  import feb_serial_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 20_000_000,
  parameter int unsigned NUM_DEV = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  spac_addr,
  input  logic [7:0]  spac_wdata,
  input  logic        spac_wr,
  output logic [7:0]  spac_rdata,
  // FEB Altera parameter receivers
  output feb_params_t params     [NUM_DEV],
  output logic [NUM_DEV-1:0] test_pulse,
  output logic        par_rclk,
  output logic        par_datain,
  // DAC chain
  output logic        dac_sdo,
  output logic        dac_ld,
  output logic        dac_clk,
  input  logic        dac_sdi,
  // Xilinx parameter loading
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
  // shaper
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

  logic [NUM_DEV-1:0] dev_dataout;
  logic               par_dataout;

  assign par_dataout = |dev_dataout;

  spac_if_epld #(.CLK_HZ(CLK_HZ)) u_epld (
    .clk, .rst_n, .spac_addr, .spac_wdata, .spac_wr, .spac_rdata,
    .dac_sdo, .dac_ld, .dac_clk, .dac_sdi,
    .rclk(par_rclk), .par_datain, .par_dataout,
    .xpl_dout, .xpl_strobe, .xpl_din, .xpr_dout, .xpr_strobe, .xpr_din,
    .i2c_sda_o, .i2c_scl_o, .i2c_sda_i, .i2c_scl_i,
    .tmp_sda_o, .tmp_scl_o, .tmp_sda_i, .tmp_scl_i, .tmp_int_n,
    .acfg_nconfig, .acfg_dclk_l, .acfg_dclk_r, .acfg_data0, .acfg_nstatus, .acfg_conf_done,
    .xcfg_program_n, .xcfg_cclk_l, .xcfg_cclk_r, .xcfg_din, .xcfg_init_n, .xcfg_done,
    .sh_cs, .sh_m, .sh_up, .sh_down, .sh_strobe, .sh_d_out, .sh_d_oe, .sh_d_in,
    .altera_reset_n, .xilinx_reset_n, .spac_soft_reset, .overtemp_irq,
    .pdac_data, .pdac_ld, .pdac_clk);

  for (genvar i = 0; i < NUM_DEV; i++) begin : g_dev
    param_slave #(.DEV_ADDR(3'(i))) u_dev (
      .rclk      (par_rclk),
      .rst_n     (rst_n),
      .datain    (par_datain),
      .dataout   (dev_dataout[i]),
      .params    (params[i]),
      .test_pulse(test_pulse[i]));
  end

endmodule
