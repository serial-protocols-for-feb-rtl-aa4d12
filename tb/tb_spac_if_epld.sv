// Testbench for spac_if_epld.
//
// Drives the SPAC bus with command writes and reads and checks, command by
// command, that the right FEB lines move and that reads return the bit
// layouts of the SPAC command tables: DAC chain (0x04), parameter loading
// (0x08/0x09, with a device model answering reads), Xilinx parameter lines
// left and right (0x10/0x14), I2C (0x18), temperature sensor (0x1C),
// Altera and Xilinx configuration (0x20-0x23, 0x28-0x2B), shaper
// (0x30-0x33), reset lines (0x38), pulser DAC (0x3C), the over-temperature
// interrupt and an unused code.
module tb_spac_if_epld;
  import feb_serial_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] spac_addr = '0, spac_wdata = '0, spac_rdata;
  logic spac_wr = 1'b0;
  logic dac_sdo, dac_ld, dac_clk, dac_sdi = 0;
  logic rclk, par_datain, par_dataout = 0;
  logic xpl_dout, xpl_strobe, xpl_din = 0, xpr_dout, xpr_strobe, xpr_din = 0;
  logic i2c_sda_o, i2c_scl_o, i2c_sda_i = 1, i2c_scl_i = 1;
  logic tmp_sda_o, tmp_scl_o, tmp_sda_i = 1, tmp_scl_i = 1, tmp_int_n = 1;
  logic acfg_nconfig, acfg_dclk_l, acfg_dclk_r, acfg_data0, acfg_nstatus = 1, acfg_conf_done = 0;
  logic xcfg_program_n, xcfg_cclk_l, xcfg_cclk_r, xcfg_din, xcfg_init_n = 1, xcfg_done = 0;
  logic [15:0] sh_cs;
  logic [1:0] sh_m;
  logic sh_up, sh_down, sh_strobe, sh_d_oe;
  logic [3:0] sh_d_out, sh_d_in = 0;
  logic altera_reset_n, xilinx_reset_n, spac_soft_reset, overtemp_irq;
  logic pdac_data, pdac_ld, pdac_clk;

  int checks = 0, failures = 0;

  always #25 clk = ~clk;

  spac_if_epld dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(posedge clk) #1; spac_addr = a; spac_wdata = d; spac_wr = 1;
    @(posedge clk) #1; spac_wr = 0; spac_addr = 8'hFF;
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    @(posedge clk) #1; spac_addr = a;
    #1 d = spac_rdata;
    @(posedge clk) #1; spac_addr = 8'hFF;
  endtask

  // parameter line device model: record packets, answer reads with 8'hA7
  logic [15:0] pk_bits;
  int pk_state = 0, pk_cnt = 0;
  logic [7:0] pk_reply;
  always @(posedge rclk) begin
    case (pk_state)
      0: if (par_datain) begin pk_state = 1; pk_cnt = 0; end
      1: begin
        pk_bits = {pk_bits[14:0], par_datain}; pk_cnt++;
        if (pk_cnt == 8 && !par_datain && !pk_bits[7]) begin end
        if (pk_cnt == 8) begin
          if (!pk_bits[7]) begin pk_state = 2; pk_reply = 8'hA7; end
        end
        if (pk_cnt == 16) pk_state = 0;
      end
      2: begin pk_cnt++; if (pk_cnt == 16) pk_state = 0; end
      default: pk_state = 0;
    endcase
  end
  always @(negedge rclk) begin
    if (pk_state == 2) begin par_dataout <= pk_reply[7]; pk_reply = {pk_reply[6:0], 1'b0}; end
    else par_dataout <= 1'b0;
  end

  // configuration clock edge counters
  int aclk = 0, xclk = 0;
  logic [7:0] a_rx, x_rx;
  always @(posedge acfg_dclk_l) begin aclk++; a_rx = {acfg_data0, a_rx[7:1]}; end
  always @(posedge xcfg_cclk_l) begin xclk++; x_rx = {x_rx[6:0], xcfg_din}; end
  int sh_strobes = 0;
  always @(posedge sh_strobe) sh_strobes++;

  logic [7:0] v;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // reset lines come up asserted
    check(!altera_reset_n && !xilinx_reset_n && !spac_soft_reset, "reset lines after reset");
    rd(CMD_RESET, v); check(v == 8'h00, "0x38 reset value");

    // 0x04 DAC
    wr(CMD_DAC, 8'h05); dac_sdi = 1; repeat (3) @(posedge clk);
    check({dac_clk, dac_ld, dac_sdo} == 3'b101, "DAC lines");
    rd(CMD_DAC, v); check(v == 8'h0D, $sformatf("0x04 read %02h", v));

    // 0x10 / 0x14 Xilinx parameter lines
    wr(CMD_XPAR_LEFT, 8'h02); wr(CMD_XPAR_RIGHT, 8'h01); xpl_din = 1; xpr_din = 0;
    repeat (3) @(posedge clk);
    check({xpl_strobe, xpl_dout} == 2'b10 && {xpr_strobe, xpr_dout} == 2'b01, "Xilinx parameter lines");
    rd(CMD_XPAR_LEFT, v);  check(v == 8'h06, $sformatf("0x10 read %02h", v));
    rd(CMD_XPAR_RIGHT, v); check(v == 8'h01, $sformatf("0x14 read %02h", v));

    // 0x18 I2C
    rd(CMD_I2C_DELAY, v); check(v == 8'h0F, "I2C idle high");
    wr(CMD_I2C_DELAY, 8'h02); i2c_sda_i = 0; repeat (3) @(posedge clk);
    check(!i2c_sda_o && i2c_scl_o, "I2C lines");
    rd(CMD_I2C_DELAY, v); check(v == 8'h0A, $sformatf("0x18 read %02h", v));

    // 0x1C temperature sensor and interrupt
    wr(CMD_TEMP, 8'h01); tmp_int_n = 0; repeat (3) @(posedge clk);
    rd(CMD_TEMP, v); check(v == 8'h0D, $sformatf("0x1C read %02h", v));
    check(!overtemp_irq, "interrupt masked");
    wr(CMD_RESET, 8'h0B); repeat (2) @(posedge clk);
    check(overtemp_irq, "interrupt enabled");
    check(altera_reset_n && xilinx_reset_n && !spac_soft_reset, "reset lines released");
    rd(CMD_RESET, v); check(v == 8'h0B, "0x38 read");
    tmp_int_n = 1; repeat (3) @(posedge clk);
    check(!overtemp_irq, "interrupt follows pin");

    // 0x3C pulser DAC
    wr(CMD_PDAC, 8'h06);
    check({pdac_clk, pdac_ld, pdac_data} == 3'b110, "PDAC lines");
    rd(CMD_PDAC, v); check(v == 8'h06, "0x3C read");

    // 0x08 / 0x09 parameter write then read
    wr(CMD_PAR_DATA, 8'h3C);
    wr(CMD_PAR_CMD, 8'hA4);                      // write, addr 2, cmd 4
    rd(CMD_PAR_CMD, v); check(v == 8'h01, "0x09 busy");
    do rd(CMD_PAR_CMD, v); while (v[0]);
    check(pk_bits == 16'hA43C, $sformatf("packet %04h", pk_bits));
    wr(CMD_PAR_CMD, 8'h24);                      // read, addr 2, cmd 4
    do rd(CMD_PAR_CMD, v); while (v[0]);
    rd(CMD_PAR_DATA, v); check(v == 8'hA7, $sformatf("0x08 read-back %02h", v));

    // 0x20-0x23 Altera configuration (device already released nSTATUS)
    repeat (30) @(posedge clk);
    wr(CMD_ACFG_DATA, 8'h96);
    rd(CMD_ACFG_DATA, v); check(v == 8'h06, $sformatf("0x20 busy status %02h", v));
    do rd(CMD_ACFG_DATA, v); while (v[2]);
    check(aclk == 8 && a_rx == 8'h96, "Altera byte");
    wr(CMD_ACFG_CLKS, 8'h09);
    do rd(CMD_ACFG_DATA, v); while (v[2]);
    check(aclk == 18, "Altera 10 extra clocks");
    wr(CMD_ACFG_DOUT, 8'h01); check(acfg_data0, "Altera DATA0 set");
    acfg_conf_done = 1; repeat (3) @(posedge clk);
    rd(CMD_ACFG_DATA, v); check(v == 8'h03, "0x20 status done");
    wr(CMD_ACFG_NCFG, 8'h00); repeat (2) @(posedge clk);
    check(!acfg_nconfig, "nCONFIG pulse");

    // 0x28-0x2B Xilinx configuration
    wr(CMD_XCFG_PROG, 8'h00); repeat (2) @(posedge clk);
    check(!xcfg_program_n, "/PROGRAM pulse");
    do rd(CMD_XCFG_DATA, v); while (v[0]);
    wr(CMD_XCFG_DATA, 8'h5B);
    do rd(CMD_XCFG_DATA, v); while (v[0]);
    check(xclk == 8 && x_rx == 8'h5B, "Xilinx byte");
    wr(CMD_XCFG_CLKS, 8'h03);
    do rd(CMD_XCFG_DATA, v); while (v[0]);
    check(xclk == 12, "Xilinx 4 extra clocks");
    wr(CMD_XCFG_DOUT, 8'h01); check(xcfg_din, "Xilinx DIN set");
    xcfg_done = 1; xcfg_init_n = 1; repeat (3) @(posedge clk);
    rd(CMD_XCFG_DATA, v); check(v == 8'h06, $sformatf("0x28 status %02h", v));

    // 0x30-0x33 shaper
    wr(CMD_SH_CS_LO, 8'h21); wr(CMD_SH_CS_HI, 8'h84);
    check(sh_cs == 16'h8421, "shaper CS");
    rd(CMD_SH_CS_LO, v); check(v == 8'h21, "0x30 read");
    rd(CMD_SH_CS_HI, v); check(v == 8'h84, "0x31 read");
    wr(CMD_SH_CTRL_P, 8'hA5); repeat (3) @(posedge clk);
    check(sh_strobes == 1 && sh_m == 2'b01 && sh_up && !sh_down && sh_d_out == 4'hA && sh_d_oe, "shaper write + strobe");
    rd(CMD_SH_CTRL_P, v); check(v == 8'hA5, "0x32 read");
    wr(CMD_SH_CTRL, 8'h00); sh_d_in = 4'h9; repeat (3) @(posedge clk);
    check(!sh_d_oe && sh_strobes == 1, "shaper read mode, no strobe");
    rd(CMD_SH_CTRL, v); check(v == 8'h09, "0x33 read data");

    // unused code
    wr(8'h24, 8'hFF);
    rd(8'h24, v); check(v == 8'h00, "unused code reads zero");
    check({dac_clk, dac_ld, dac_sdo} == 3'b101, "unused code writes nothing");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
