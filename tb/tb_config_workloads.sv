// Full-size configuration loads through feb_serial_system, default parameters.
//
// Streams a complete XC4036-sized bitstream (832,528 bits, about 104 kbyte)
// through the Xilinx slave-serial loader and a FLEX 6K-sized bitstream
// (EPF6016, about 260,000 bits) through the Altera passive-serial loader,
// one SPAC byte write and busy poll per byte, as the host software does.
// The bitstreams are pseudo-random bytes from a 32-bit xorshift generator.
// Device models count the bits they receive and fold them into a CRC-32
// that is compared with the CRC of the bits sent; DONE / CONF_DONE rise
// when the last bit is in and user mode needs the extra clocks.  The CCLK
// time of the Xilinx load is checked against 8 periods of 200 ns per byte.
// The bitstream sizes are approximate device figures, not from the protocol
// description; the host-side frame wait after /PROGRAM is shortened.
module tb_config_workloads;
  import feb_serial_pkg::*;

  localparam int XBYTES = 104_066;     // 832,528 bits
  localparam int ABYTES = 32_500;      // 260,000 bits

  logic clk = 1'b0, rst_n = 1'b1;
  logic [7:0] spac_addr = 8'hFF, spac_wdata = '0, spac_rdata;
  logic spac_wr = 1'b0;
  feb_params_t params [8];
  logic [7:0] test_pulse;
  logic par_rclk, par_datain;
  logic dac_sdo, dac_ld, dac_clk;
  logic xpl_dout, xpl_strobe, xpr_dout, xpr_strobe;
  logic i2c_sda_o, i2c_scl_o, tmp_sda_o, tmp_scl_o;
  logic acfg_nconfig, acfg_dclk_l, acfg_dclk_r, acfg_data0, acfg_nstatus = 1'b1, acfg_conf_done = 1'b0;
  logic xcfg_program_n, xcfg_cclk_l, xcfg_cclk_r, xcfg_din, xcfg_init_n = 1'b1, xcfg_done = 1'b0;
  logic [15:0] sh_cs;
  logic [1:0] sh_m;
  logic sh_up, sh_down, sh_strobe, sh_d_oe;
  logic [3:0] sh_d_out;
  logic altera_reset_n, xilinx_reset_n, spac_soft_reset, overtemp_irq;
  logic pdac_data, pdac_ld, pdac_clk;

  int checks = 0, failures = 0;

  always #25 clk = ~clk;

  feb_serial_system dut (
    .clk, .rst_n, .spac_addr, .spac_wdata, .spac_wr, .spac_rdata,
    .params, .test_pulse, .par_rclk, .par_datain,
    .dac_sdo, .dac_ld, .dac_clk, .dac_sdi(1'b0),
    .xpl_dout, .xpl_strobe, .xpl_din(1'b0), .xpr_dout, .xpr_strobe, .xpr_din(1'b0),
    .i2c_sda_o, .i2c_scl_o, .i2c_sda_i(1'b1), .i2c_scl_i(1'b1),
    .tmp_sda_o, .tmp_scl_o, .tmp_sda_i(1'b1), .tmp_scl_i(1'b1), .tmp_int_n(1'b1),
    .acfg_nconfig, .acfg_dclk_l, .acfg_dclk_r, .acfg_data0, .acfg_nstatus, .acfg_conf_done,
    .xcfg_program_n, .xcfg_cclk_l, .xcfg_cclk_r, .xcfg_din, .xcfg_init_n, .xcfg_done,
    .sh_cs, .sh_m, .sh_up, .sh_down, .sh_strobe, .sh_d_out, .sh_d_oe, .sh_d_in(4'h0),
    .altera_reset_n, .xilinx_reset_n, .spac_soft_reset, .overtemp_irq,
    .pdac_data, .pdac_ld, .pdac_clk);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] crc_bit(input logic [31:0] c, input logic b);
    return (c[31] ^ b) ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
  endfunction

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13); y = y ^ (y >> 17); y = y ^ (y << 5);
    return y;
  endfunction

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(posedge clk) #1; spac_addr = a; spac_wdata = d; spac_wr = 1;
    @(posedge clk) #1; spac_wr = 0; spac_addr = 8'hFF;
  endtask
  task automatic wait_clear(input logic [7:0] a, input int b);
    @(posedge clk) #1; spac_addr = a;
    #1 while (spac_rdata[b]) begin @(posedge clk); #1; end
    spac_addr = 8'hFF;
  endtask
  task automatic wait_set(input logic [7:0] a, input int b);
    @(posedge clk) #1; spac_addr = a;
    #1 while (!spac_rdata[b]) begin @(posedge clk); #1; end
    spac_addr = 8'hFF;
  endtask

  // ---------------- XC4000 model ----------------
  localparam longint XBITS = longint'(XBYTES) * 8;
  longint x_n = 0;
  logic [31:0] x_crc = '1;
  int x_extra = 0;
  always @(negedge xcfg_program_n) if (rst_n) begin xcfg_init_n <= 0; xcfg_done <= 0; x_n = 0; x_crc = '1; x_extra = 0; end
  always @(posedge xcfg_program_n) if (rst_n) begin #5000 xcfg_init_n <= 1; end
  always @(posedge xcfg_cclk_l) begin
    if (x_n < XBITS) begin
      x_crc = crc_bit(x_crc, xcfg_din); x_n++;
      if (x_n == XBITS) xcfg_done <= 1;
    end else x_extra++;
  end

  // ---------------- FLEX 6K model ----------------
  localparam longint ABITS = longint'(ABYTES) * 8;
  longint a_n = 0;
  logic [31:0] a_crc = '1;
  int a_extra = 0, a_early = 0;
  time a_nst_t = 0;
  always @(negedge acfg_nconfig) if (rst_n) begin acfg_nstatus <= 0; acfg_conf_done <= 0; a_n = 0; a_crc = '1; a_extra = 0; end
  always @(posedge acfg_nconfig) if (rst_n) begin #3000 acfg_nstatus <= 1; a_nst_t = $time; end
  always @(posedge acfg_dclk_l) begin
    if (!acfg_nstatus || $time - a_nst_t < 1000) a_early++;
    if (a_n < ABITS) begin
      a_crc = crc_bit(a_crc, acfg_data0); a_n++;
      if (a_n == ABITS) acfg_conf_done <= 1;
    end else a_extra++;
  end

  logic [31:0] rng, crc_ref;
  logic [7:0] b;
  time t0, t1;
  initial begin
    #1 rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // ---------------- XC4036-sized load ----------------
    wr(CMD_XCFG_PROG, 8'h00);
    wait_clear(CMD_XCFG_DATA, 0);
    wait_set(CMD_XCFG_DATA, 2);                  // /INIT released
    rng = 32'h1234_5678; crc_ref = '1;
    t0 = $time;
    for (int i = 0; i < XBYTES; i++) begin
      rng = xorshift(rng);
      b = rng[7:0];
      for (int k = 7; k >= 0; k--) crc_ref = crc_bit(crc_ref, b[k]);
      wr(CMD_XCFG_DATA, b);
      wait_clear(CMD_XCFG_DATA, 0);
    end
    t1 = $time;
    check(x_n == XBITS, $sformatf("Xilinx received %0d bits of %0d", x_n, XBITS));
    check(x_crc == crc_ref, "Xilinx bitstream CRC");
    check(xcfg_done, "Xilinx DONE after the last bit");
    wr(CMD_XCFG_CLKS, 8'h03);
    wait_clear(CMD_XCFG_DATA, 0);
    check(x_extra == 4, "4 extra CCLKs");
    check(t1 - t0 >= longint'(XBYTES) * 1600, "CCLK time at least 8 x 200 ns per byte");
    $display("INFO: Xilinx load %0d bytes in %0t ns", XBYTES, t1 - t0);

    // ---------------- FLEX 6K-sized load ----------------
    wr(CMD_ACFG_NCFG, 8'h00);
    wait_clear(CMD_ACFG_DATA, 2);                // end of the nCONFIG pulse
    rng = 32'h0BAD_F00D; crc_ref = '1;
    t0 = $time;
    for (int i = 0; i < ABYTES; i++) begin
      rng = xorshift(rng);
      b = rng[7:0];
      for (int k = 0; k < 8; k++) crc_ref = crc_bit(crc_ref, b[k]);   // LSB first
      wr(CMD_ACFG_DATA, b);
      wait_clear(CMD_ACFG_DATA, 2);
    end
    t1 = $time;
    check(a_n == ABITS, $sformatf("Altera received %0d bits of %0d", a_n, ABITS));
    check(a_crc == crc_ref, "Altera bitstream CRC");
    check(acfg_conf_done, "CONF_DONE after the last bit");
    wr(CMD_ACFG_CLKS, 8'h09);
    wait_clear(CMD_ACFG_DATA, 2);
    check(a_extra == 10, "10 extra DCLKs");
    check(a_early == 0, "no DCLK within 1 us of nSTATUS");
    $display("INFO: Altera load %0d bytes in %0t ns", ABYTES, t1 - t0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
