// End-to-end testbench for feb_serial_system at its default parameters.
//
// The host side is a SPAC bus driver that runs the load sequences the way
// the host software would.  The FEB side is made of small models: a FLEX
// passive-serial device, an XC4000 slave-serial device, a chain of two DACs
// with 16-bit shift registers (SDO to the next SDI), an I2C target that
// acknowledges a byte, a pulser-DAC shift register and a temperature sensor
// interrupt.  The parameter receivers are the real ones.  The test
//   - loads all 8 FEB Altera devices with random parameters over the serial
//     line and reads every register back through SPAC 0x08/0x09;
//   - fires a test pulse at one device;
//   - runs the Altera load: nCONFIG, bytes (the first held back until 1 us
//     after nSTATUS), CONF_DONE, 10 extra clocks to user mode;
//   - runs the Xilinx load: /PROGRAM, wait for /INIT, bytes, DONE, 4 clocks;
//   - shifts 32 bits through the DAC chain and reads them back at its end;
//   - sends an I2C start, an address byte and reads the acknowledge;
//   - loads the pulser DAC, strobes and reads a shaper, raises the
//     over-temperature interrupt.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_feb_serial_system;
  import feb_serial_pkg::*;

  localparam int NDEV = 8;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [7:0] spac_addr = 8'hFF, spac_wdata = '0, spac_rdata;
  logic spac_wr = 1'b0;
  feb_params_t params [NDEV];
  logic [NDEV-1:0] test_pulse;
  logic par_rclk, par_datain;
  logic dac_sdo, dac_ld, dac_clk, dac_sdi;
  logic xpl_dout, xpl_strobe, xpl_din, xpr_dout, xpr_strobe, xpr_din;
  logic i2c_sda_o, i2c_scl_o, i2c_sda_i, i2c_scl_i;
  logic tmp_sda_o, tmp_scl_o, tmp_sda_i, tmp_scl_i, tmp_int_n = 1'b1;
  logic acfg_nconfig, acfg_dclk_l, acfg_dclk_r, acfg_data0, acfg_nstatus = 1'b1, acfg_conf_done = 1'b0;
  logic xcfg_program_n, xcfg_cclk_l, xcfg_cclk_r, xcfg_din, xcfg_init_n = 1'b1, xcfg_done = 1'b0;
  logic [15:0] sh_cs;
  logic [1:0] sh_m;
  logic sh_up, sh_down, sh_strobe, sh_d_oe;
  logic [3:0] sh_d_out, sh_d_in;
  logic altera_reset_n, xilinx_reset_n, spac_soft_reset, overtemp_irq;
  logic pdac_data, pdac_ld, pdac_clk;

  int checks = 0, failures = 0;

  always #25 clk = ~clk;   // 20 MHz

  feb_serial_system dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_par_wr = 0, n_par_rd = 0, n_tpulse = 0, n_holdoff = 0, n_user_mode = 0;
  int n_xdone = 0, n_dac = 0, n_i2c_ack = 0, n_strobe = 0, n_irq = 0, n_pdac = 0;
  int n_busy_poll = 0, n_xpar = 0;

  // ---------------- SPAC bus ----------------
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(posedge clk) #1; spac_addr = a; spac_wdata = d; spac_wr = 1;
    @(posedge clk) #1; spac_wr = 0; spac_addr = 8'hFF;
  endtask
  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    @(posedge clk) #1; spac_addr = a;
    #1 d = spac_rdata;
    @(posedge clk) #1; spac_addr = 8'hFF;
  endtask
  task automatic wait_bit(input logic [7:0] a, input int b, input logic val);
    logic [7:0] v;
    do begin rd(a, v); n_busy_poll++; end while (v[b] != val);
  endtask

  // ---------------- FLEX 6K passive-serial model ----------------
  localparam int ABITS = 40;
  logic [ABITS-1:0] a_rx;
  int a_n = 0, a_extra = 0, a_early = 0;
  time a_nst_t = 0;
  logic a_user = 0;
  always @(negedge acfg_nconfig) if (rst_n) begin
    acfg_nstatus <= 0; acfg_conf_done <= 0; a_n = 0; a_extra = 0; a_user = 0;
  end
  always @(posedge acfg_nconfig) if (rst_n) begin
    #2500 acfg_nstatus <= 1; a_nst_t = $time;
  end
  always @(posedge acfg_dclk_l) begin
    if (!acfg_nstatus || $time - a_nst_t < 1000) a_early++;
    if (a_n < ABITS) begin a_rx[a_n] = acfg_data0; a_n++; if (a_n == ABITS) acfg_conf_done <= 1; end
    else if (!a_user) begin a_extra++; if (a_extra == 10) a_user = 1; end
  end

  // ---------------- XC4000 slave-serial model ----------------
  localparam int XBITS = 32;
  logic [XBITS-1:0] x_rx;
  int x_n = 0;
  always @(negedge xcfg_program_n) if (rst_n) begin xcfg_init_n <= 0; xcfg_done <= 0; x_n = 0; end
  always @(posedge xcfg_program_n) if (rst_n) begin #4000 xcfg_init_n <= 1; end
  always @(posedge xcfg_cclk_l) begin
    if (x_n < XBITS) begin x_rx = {x_rx[XBITS-2:0], xcfg_din}; x_n++; end
    else xcfg_done <= 1;     // DONE after the first extra clock
  end

  // ---------------- DAC chain: 2 x 16-bit, SDO -> SDI ----------------
  logic [15:0] dac0 = '0, dac1 = '0, dac0_lat = '0, dac1_lat = '0;
  always @(posedge dac_clk) begin dac1 <= {dac1[14:0], dac0[15]}; dac0 <= {dac0[14:0], dac_sdo}; end
  always @(posedge dac_ld) begin dac0_lat <= dac0; dac1_lat <= dac1; end
  assign dac_sdi = dac1[15];

  // ---------------- pulser DAC: 12-bit shift register ----------------
  logic [11:0] pdac_sr = '0, pdac_lat = '0;
  always @(posedge pdac_clk) pdac_sr <= {pdac_sr[10:0], pdac_data};
  always @(posedge pdac_ld) pdac_lat <= pdac_sr;

  // ---------------- I2C target (address 7'h2A), open-drain bus ----------------
  logic t_sda = 1'b1;
  logic sda_bus, scl_bus;
  assign sda_bus = i2c_sda_o & t_sda;
  assign scl_bus = i2c_scl_o;
  assign i2c_sda_i = sda_bus;
  assign i2c_scl_i = scl_bus;
  int   i2c_bits = -1;
  logic [7:0] i2c_byte;
  always @(negedge sda_bus) if (scl_bus) begin i2c_bits = 0; end          // START
  always @(posedge scl_bus) if (i2c_bits >= 0 && i2c_bits < 8) begin
    i2c_byte = {i2c_byte[6:0], sda_bus}; i2c_bits++;
  end
  always @(negedge scl_bus) begin
    if (i2c_bits == 8 && i2c_byte[7:1] == 7'h2A) begin t_sda <= 1'b0; i2c_bits = 9; end
    else if (i2c_bits == 9) begin t_sda <= 1'b1; i2c_bits = -1; end
  end

  // temperature sensor lines are plain loopback; Xilinx parameter lines loop back left->right
  assign tmp_sda_i = tmp_sda_o;
  assign tmp_scl_i = tmp_scl_o;
  assign xpl_din = xpr_dout;
  assign xpr_din = xpl_dout;

  // shaper: selected pair returns 4'hC in read mode
  assign sh_d_in = (!sh_d_oe && sh_cs[3]) ? 4'hC : 4'h0;
  always @(posedge sh_strobe) n_strobe++;
  always @(posedge par_rclk) if (|test_pulse) n_tpulse++;

  // ---------------- parameter helpers ----------------
  task automatic par_write(input logic [2:0] a, input logic [3:0] c, input logic [7:0] d);
    wr(CMD_PAR_DATA, d);
    wr(CMD_PAR_CMD, {1'b1, a, c});
    wait_bit(CMD_PAR_CMD, 0, 1'b0);
    n_par_wr++;
  endtask
  task automatic par_read(input logic [2:0] a, input logic [3:0] c, output logic [7:0] d);
    wr(CMD_PAR_CMD, {1'b0, a, c});
    wait_bit(CMD_PAR_CMD, 0, 1'b0);
    rd(CMD_PAR_DATA, d);
    n_par_rd++;
  endtask

  logic [7:0] regs [NDEV][1:8];
  logic [7:0] v;
  logic [ABITS-1:0] a_img;
  logic [XBITS-1:0] x_img;
  logic [31:0] dac_word;
  logic [11:0] pdac_word;
  int tp0;
  initial begin
    #1 rst_n = 1'b0;             // a real edge, so the RCLK-domain receivers reset too
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // release the FEB resets, enable the over-temperature interrupt
    wr(CMD_RESET, 8'h0B);
    check(altera_reset_n && xilinx_reset_n, "FEB resets released");

    // ---- parameter loading of all devices ----
    for (int d = 0; d < NDEV; d++)
      for (int c = 1; c <= 8; c++) begin
        regs[d][c] = 8'($urandom);
        par_write(3'(d), 4'(c), regs[d][c]);
      end
    for (int d = 0; d < NDEV; d++) begin
      check(params[d].id == {regs[d][2][6:0], regs[d][1]}, $sformatf("dev %0d ID", d));
      check(params[d].autom == regs[d][2][7], "AUTO");
      check(params[d].ul == {regs[d][4][3:0], regs[d][3]}, "UL");
      check(params[d].ll == {regs[d][6][3:0], regs[d][5]}, "LL");
      check({params[d].ng, params[d].ga} == regs[d][4][7:4], "NG/GA");
      check({params[d].gc, params[d].gb} == regs[d][6][7:4], "GC/GB");
      check(params[d].td == {regs[d][8][3:0], regs[d][7]}, "TD");
      check({params[d].test, params[d].tmode} == regs[d][8][7:6], "TEST/TMODE");
      for (int c = 1; c <= 8; c++) begin
        logic [7:0] exp;
        exp = (c == 8) ? (regs[d][c] & 8'hCF) : regs[d][c];
        par_read(3'(d), 4'(c), v);
        check(v == exp, $sformatf("dev %0d reg %0d read %02h exp %02h", d, c, v, exp));
      end
    end
    tp0 = n_tpulse;
    par_write(3'd6, PCMD_TPULSE, 8'h00);
    repeat (10) @(posedge clk);
    check(n_tpulse == tp0 + 1, "test pulse");

    // ---- Altera configuration ----
    a_img = {$urandom, $urandom};
    wr(CMD_ACFG_NCFG, 8'h00);
    wait_bit(CMD_ACFG_DATA, 2, 1'b0);
    rd(CMD_ACFG_DATA, v); check(v[1] == 1'b0, "nSTATUS low after nCONFIG");
    wr(CMD_ACFG_DATA, a_img[7:0]);               // held until nSTATUS + 1 us
    rd(CMD_ACFG_DATA, v);
    if (v[2] && !v[1]) n_holdoff++;
    wait_bit(CMD_ACFG_DATA, 2, 1'b0);
    for (int b = 1; b < ABITS / 8; b++) begin
      wr(CMD_ACFG_DATA, a_img[8*b +: 8]);
      wait_bit(CMD_ACFG_DATA, 2, 1'b0);
    end
    rd(CMD_ACFG_DATA, v);
    check(v[0], "CONF_DONE");
    check(a_rx == a_img, "Altera image");
    wr(CMD_ACFG_CLKS, 8'h09);
    wait_bit(CMD_ACFG_DATA, 2, 1'b0);
    check(a_user, "Altera in user mode after 10 clocks");
    if (a_user) n_user_mode++;
    check(a_early == 0, "no DCLK within 1 us of nSTATUS");

    // ---- Xilinx configuration ----
    x_img = $urandom;
    wr(CMD_XCFG_PROG, 8'h00);
    wait_bit(CMD_XCFG_DATA, 0, 1'b0);
    wait_bit(CMD_XCFG_DATA, 2, 1'b1);            // /INIT released
    for (int b = 3; b >= 0; b--) begin
      wr(CMD_XCFG_DATA, x_img[8*b +: 8]);
      wait_bit(CMD_XCFG_DATA, 0, 1'b0);
    end
    check(x_rx == x_img, "Xilinx image");
    wr(CMD_XCFG_CLKS, 8'h03);
    wait_bit(CMD_XCFG_DATA, 0, 1'b0);
    repeat (3) @(posedge clk);
    rd(CMD_XCFG_DATA, v);
    check(v[1], "Xilinx DONE");
    if (v[1]) n_xdone++;

    // ---- DAC chain: shift 32 bits MSB first, latch, read the chain end ----
    dac_word = $urandom;
    for (int i = 31; i >= 0; i--) begin
      wr(CMD_DAC, {5'b0, 1'b0, 1'b0, dac_word[i]});
      wr(CMD_DAC, {5'b0, 1'b1, 1'b0, dac_word[i]});
    end
    wr(CMD_DAC, 8'h02); wr(CMD_DAC, 8'h00);
    check(dac1_lat == dac_word[31:16] && dac0_lat == dac_word[15:0], "DAC chain loaded");
    rd(CMD_DAC, v);
    check(v[3] == dac_word[31], "chain end read back");
    if (dac1_lat == dac_word[31:16]) n_dac++;

    // ---- pulser DAC ----
    pdac_word = 12'($urandom);
    for (int i = 11; i >= 0; i--) begin
      wr(CMD_PDAC, {5'b0, 1'b0, 1'b0, pdac_word[i]});
      wr(CMD_PDAC, {5'b0, 1'b1, 1'b0, pdac_word[i]});
    end
    wr(CMD_PDAC, 8'h02); wr(CMD_PDAC, 8'h00);
    check(pdac_lat == pdac_word, "pulser DAC loaded");
    if (pdac_lat == pdac_word) n_pdac++;

    // ---- I2C: START, address 0x2A write, acknowledge ----
    wr(CMD_I2C_DELAY, 8'h02);                    // SDA low while SCL high: START
    wr(CMD_I2C_DELAY, 8'h00);
    for (int i = 7; i >= 0; i--) begin
      logic bitv;
      bitv = (i == 0) ? 1'b0 : 1'(8'h2A >> (i - 1));
      wr(CMD_I2C_DELAY, {6'b0, 1'b0, bitv});
      wr(CMD_I2C_DELAY, {6'b0, 1'b1, bitv});
      wr(CMD_I2C_DELAY, {6'b0, 1'b0, bitv});
    end
    wr(CMD_I2C_DELAY, 8'h01);                    // release SDA for ACK
    wr(CMD_I2C_DELAY, 8'h03);
    repeat (3) @(posedge clk);
    rd(CMD_I2C_DELAY, v);
    check(v[2] == 1'b0, "I2C acknowledge seen on SDA pin");
    if (v[2] == 1'b0) n_i2c_ack++;
    wr(CMD_I2C_DELAY, 8'h01); wr(CMD_I2C_DELAY, 8'h00);
    wr(CMD_I2C_DELAY, 8'h02); wr(CMD_I2C_DELAY, 8'h03);   // STOP

    // ---- Xilinx parameter lines loop back ----
    wr(CMD_XPAR_LEFT, 8'h01); wr(CMD_XPAR_RIGHT, 8'h00); repeat (3) @(posedge clk);
    rd(CMD_XPAR_RIGHT, v); check(v[2] == 1'b1, "left data seen on right input");
    if (v[2]) n_xpar++;

    // ---- shaper: write to pair 3 with strobe, then read ----
    wr(CMD_SH_CS_LO, 8'h08); wr(CMD_SH_CS_HI, 8'h00);
    wr(CMD_SH_CTRL_P, 8'h51);                    // write, data 5
    repeat (30) @(posedge clk);
    check(n_strobe == 1, "shaper strobe");
    wr(CMD_SH_CTRL, 8'h00);                      // read mode
    repeat (3) @(posedge clk);
    rd(CMD_SH_CTRL, v); check(v == 8'h0C, "shaper read data");

    // ---- over-temperature interrupt ----
    tmp_int_n = 1'b0; repeat (4) @(posedge clk);
    check(overtemp_irq, "over-temperature interrupt");
    if (overtemp_irq) n_irq++;
    tmp_int_n = 1'b1;

    // every mechanism must have happened
    check(n_par_wr > 0, "parameter writes happened");
    check(n_par_rd > 0, "parameter reads happened");
    check(n_tpulse > 0, "test pulse happened");
    check(n_holdoff > 0, "nSTATUS hold-off happened");
    check(n_user_mode > 0, "Altera user mode reached");
    check(n_xdone > 0, "Xilinx DONE reached");
    check(n_dac > 0, "DAC chain load happened");
    check(n_pdac > 0, "pulser DAC load happened");
    check(n_i2c_ack > 0, "I2C acknowledge happened");
    check(n_xpar > 0, "Xilinx parameter lines used");
    check(n_strobe > 0, "shaper strobe happened");
    check(n_irq > 0, "interrupt happened");
    check(n_busy_poll > 0, "busy polling happened");
    $display("INFO: par_wr=%0d par_rd=%0d tpulse=%0d holdoff=%0d user=%0d xdone=%0d dac=%0d pdac=%0d i2c_ack=%0d strobe=%0d irq=%0d polls=%0d",
             n_par_wr, n_par_rd, n_tpulse, n_holdoff, n_user_mode, n_xdone, n_dac, n_pdac, n_i2c_ack, n_strobe, n_irq, n_busy_poll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
