// Testbench for altera_cfg_loader.
//
// A small FLEX passive-serial device model answers the nCONFIG pulse by
// pulling nSTATUS low for a while and releasing it, collects DATA0 on DCLK
// rising edges and raises CONF_DONE once all configuration bits are in.
// The test checks the nCONFIG pulse width, that no DCLK edge comes earlier
// than 1 us after nSTATUS is released (a byte written early is held back),
// the LSB-first bit order, the DCLK period (at least 100 ns, i.e. at most
// 10 MHz), the two identical DCLK lines, the N+1 extra clocks, the DATA0 set
// command and the status bits.
module tb_altera_cfg_loader;
  logic clk = 1'b0, rst_n = 1'b0;
  logic byte_wr = 0, ncfg_wr = 0, clks_wr = 0, dout_wr = 0;
  logic [7:0] wdata = '0;
  logic [2:0] status;
  logic nconfig, dclk_l, dclk_r, data0;
  logic nstatus = 1'b1, conf_done = 1'b0;

  int checks = 0, failures = 0;

  always #25 clk = ~clk;    // 20 MHz

  altera_cfg_loader dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- device model ----------------
  localparam int CFG_BITS = 24;
  logic [CFG_BITS-1:0] rx;
  int   nbits = 0, total_clks = 0;
  time  t_nst_rise = 0, t_last_rise = 0, min_period = 1s;
  int   early_edges = 0;
  always @(negedge nconfig) if (rst_n) begin
    nstatus <= 1'b0; conf_done <= 1'b0; nbits = 0;
  end
  always @(posedge nconfig) if (rst_n) begin
    #3000 nstatus <= 1'b1;                 // device releases nSTATUS 3 us later
    t_nst_rise = $time;
  end
  always @(posedge dclk_l) begin
    total_clks++;
    if (!nstatus || ($time - t_nst_rise) < 1000) early_edges++;
    if (t_last_rise != 0 && ($time - t_last_rise) < min_period) min_period = $time - t_last_rise;
    t_last_rise = $time;
    if (nbits < CFG_BITS) begin rx[nbits] = data0; nbits++; end
    if (nbits == CFG_BITS) conf_done <= 1'b1;
  end
  int lr_mismatch = 0;
  always @(posedge clk) if (dclk_l !== dclk_r) lr_mismatch++;

  // nCONFIG pulse width
  int ncfg_low = 0;
  always @(posedge clk) if (rst_n && !nconfig) ncfg_low++;

  task automatic cmd(input int which, input logic [7:0] v);
    @(posedge clk) #1;
    wdata = v;
    byte_wr = (which == 0); ncfg_wr = (which == 1); clks_wr = (which == 2); dout_wr = (which == 3);
    @(posedge clk) #1;
    byte_wr = 0; ncfg_wr = 0; clks_wr = 0; dout_wr = 0;
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (status[2]) @(posedge clk);
  endtask

  logic [CFG_BITS-1:0] image;
  int c0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(nconfig == 1'b1, "nCONFIG idle high");
    check(status == 3'b010, $sformatf("status idle %b", status));

    image = 24'($urandom);
    cmd(1, 8'h00);                         // nCONFIG pulse
    wait_idle();
    check(ncfg_low == 40, $sformatf("nCONFIG low %0d cycles (2 us)", ncfg_low));
    // first byte right away: must wait for nSTATUS + 1 us
    cmd(0, image[7:0]);
    check(status[2] == 1'b1, "busy while waiting for nSTATUS");
    check(total_clks == 0, "no DCLK before nSTATUS");
    wait_idle();
    check(($time - t_nst_rise) >= 1000 + 8 * 200, "byte finished after the hold-off");
    cmd(0, image[15:8]); wait_idle();
    cmd(0, image[23:16]); wait_idle();
    check(rx == image, $sformatf("device got %06h, expected %06h", rx, image));
    check(status[0] == 1'b1, "CONF_DONE seen in status");
    check(data0 == image[23], "DATA0 keeps the last bit");

    // extra clocks to enter user mode: N = D[3:0] + 1 = 10
    c0 = total_clks;
    cmd(2, 8'h09); wait_idle();
    check(total_clks - c0 == 10, $sformatf("extra clocks %0d == 10", total_clks - c0));
    c0 = total_clks;
    cmd(2, 8'hF0); wait_idle();
    check(total_clks - c0 == 1, "D[7:4] ignored: one clock");

    // DATA0 set
    cmd(3, 8'h01); repeat (2) @(posedge clk);
    check(data0 == 1'b1, "DATA0 set to 1");
    cmd(3, 8'hFE); repeat (2) @(posedge clk);
    check(data0 == 1'b0, "DATA0 set to 0");
    check(total_clks - c0 == 1, "DATA0 set gives no clock");

    check(early_edges == 0, $sformatf("%0d DCLK edges too early", early_edges));
    check(min_period >= 100, $sformatf("DCLK period %0t >= 100 ns", min_period));
    check(lr_mismatch == 0, "DCLK left == right");
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
