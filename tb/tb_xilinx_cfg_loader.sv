// Testbench for xilinx_cfg_loader.
//
// A small XC4000 slave-serial model pulls /INIT low while /PROGRAM is low and
// for a while after, collects DIN on CCLK rising edges and raises DONE once
// all bits are in.  The test checks the /PROGRAM pulse (high-low-high, 2 us),
// the MSB-first bit order, the CCLK period, the two identical CCLK lines,
// the N+1 extra clocks, the DIN set command and the status bits
// {/INIT, DONE, busy}.
module tb_xilinx_cfg_loader;
  logic clk = 1'b0, rst_n = 1'b0;
  logic byte_wr = 0, prog_wr = 0, clks_wr = 0, dout_wr = 0;
  logic [7:0] wdata = '0;
  logic [2:0] status;
  logic program_n, cclk_l, cclk_r, din;
  logic init_n = 1'b1, done = 1'b0;

  int checks = 0, failures = 0;

  always #25 clk = ~clk;    // 20 MHz

  xilinx_cfg_loader dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int CFG_BITS = 32;
  logic [CFG_BITS-1:0] rx;
  int  nbits = 0, total_clks = 0;
  time t_last = 0, min_period = 1s;
  always @(negedge program_n) if (rst_n) begin
    init_n <= 1'b0; done <= 1'b0; nbits = 0;
  end
  always @(posedge program_n) if (rst_n) begin
    #2000 init_n <= 1'b1;
  end
  always @(posedge cclk_l) begin
    total_clks++;
    if (t_last != 0 && ($time - t_last) < min_period) min_period = $time - t_last;
    t_last = $time;
    if (nbits < CFG_BITS) begin rx = {rx[CFG_BITS-2:0], din}; nbits++; end
    if (nbits == CFG_BITS) done <= 1'b1;
  end
  int lr_mismatch = 0, prog_low = 0;
  always @(posedge clk) begin
    if (cclk_l !== cclk_r) lr_mismatch++;
    if (rst_n && !program_n) prog_low++;
  end

  task automatic cmd(input int which, input logic [7:0] v);
    @(posedge clk) #1;
    wdata = v;
    byte_wr = (which == 0); prog_wr = (which == 1); clks_wr = (which == 2); dout_wr = (which == 3);
    @(posedge clk) #1;
    byte_wr = 0; prog_wr = 0; clks_wr = 0; dout_wr = 0;
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (status[0]) @(posedge clk);
  endtask

  logic [CFG_BITS-1:0] image;
  int c0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(program_n == 1'b1, "/PROGRAM idle high");
    check(status == 3'b100, $sformatf("status idle %b", status));

    cmd(1, 8'h00);
    check(status[0] == 1'b1, "busy during /PROGRAM pulse");
    wait_idle();
    check(prog_low == 40, $sformatf("/PROGRAM low %0d cycles (2 us)", prog_low));
    repeat (3) @(posedge clk);
    check(status[2] == 1'b0, "/INIT low seen in status");
    // software waits for /INIT
    while (!status[2]) @(posedge clk);

    image = $urandom;
    for (int b = 3; b >= 0; b--) begin
      cmd(0, image[8*b +: 8]);
      wait_idle();
    end
    check(rx == image, $sformatf("device got %08h, expected %08h", rx, image));
    repeat (3) @(posedge clk);
    check(status[1] == 1'b1, "DONE seen in status");

    c0 = total_clks;
    cmd(2, 8'h03); wait_idle();
    check(total_clks - c0 == 4, $sformatf("extra clocks %0d == 4", total_clks - c0));

    cmd(3, 8'h01); repeat (2) @(posedge clk);
    check(din == 1'b1, "DIN set to 1");
    cmd(3, 8'h00); repeat (2) @(posedge clk);
    check(din == 1'b0, "DIN set to 0");

    check(min_period == 200, $sformatf("CCLK period %0t == 200 ns", min_period));
    check(lr_mismatch == 0, "CCLK left == right");
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
