// Testbench for shaper_ctrl.
//
// Writes the chip selects and the control byte with and without the strobe
// and checks every output line against the bit layout of the shaper
// commands: CS[15:0], M[1:0], UP, DOWN and D[3:0]; that STROBE comes only for
// the 0x32 write, one clock after it, for 1 us; that D is released in read
// mode and driven in the other three modes; and that the read data follow
// the D pins.
module tb_shaper_ctrl;
  import feb_serial_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cs_lo_wr = 0, cs_hi_wr = 0, ctrl_p_wr = 0, ctrl_wr = 0;
  logic [7:0] wdata = '0;
  logic [15:0] cs;
  logic [7:0] ctrl;
  logic [3:0] rd_data, d_out, d_in = '0;
  shaper_mode_t mode;
  logic up, down, strobe, d_oe;

  int checks = 0, failures = 0;

  always #25 clk = ~clk;

  shaper_ctrl dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int strobes = 0, strobe_cycles = 0;
  logic strobe_d = 0;
  always @(posedge clk) begin
    if (strobe && !strobe_d) strobes++;
    if (strobe) strobe_cycles++;
    strobe_d <= strobe;
  end

  task automatic cmd(input int which, input logic [7:0] v);
    @(posedge clk) #1;
    wdata = v;
    cs_lo_wr = (which == 0); cs_hi_wr = (which == 1); ctrl_p_wr = (which == 2); ctrl_wr = (which == 3);
    @(posedge clk) #1;
    cs_lo_wr = 0; cs_hi_wr = 0; ctrl_p_wr = 0; ctrl_wr = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(!strobe && cs == 0, "idle after reset");

    for (int i = 0; i < 8; i++) begin
      logic [7:0] lo, hi, cb;
      int s0, sc0, delay;
      lo = 8'($urandom); hi = 8'($urandom); cb = 8'($urandom);
      cmd(0, lo); cmd(1, hi);
      check(cs == {hi, lo}, "CS lines");
      s0 = strobes; sc0 = strobe_cycles;
      // strobed control write: check delay to STROBE
      @(posedge clk) #1; wdata = cb; ctrl_p_wr = 1;
      @(posedge clk) #1; ctrl_p_wr = 0;
      check({d_out, down, up, mode} == cb, "control lines set at the write");
      delay = 0;
      while (!strobe && delay < 10) begin @(posedge clk) #1; delay++; end
      check(delay == 1, $sformatf("STROBE one clock after the write (%0d)", delay));
      repeat (30) @(posedge clk);
      check(strobes == s0 + 1, "one STROBE");
      check(strobe_cycles - sc0 == 20, $sformatf("STROBE %0d cycles (1 us)", strobe_cycles - sc0));
      check(d_oe == (cb[1:0] != 2'b00), "D driven except in read mode");
      check(ctrl == cb, "control readback");
      // plain control write: no strobe
      s0 = strobes;
      cmd(3, ~cb);
      repeat (25) @(posedge clk);
      check(strobes == s0, "no STROBE for 0x33");
      check({d_out, down, up, mode} == ~cb, "control lines set without strobe");
    end

    // read mode returns the pins
    cmd(3, 8'h00);
    check(mode == SH_READ && !d_oe, "read mode releases D");
    for (int i = 0; i < 4; i++) begin
      d_in = 4'($urandom);
      repeat (3) @(posedge clk);
      check(rd_data == d_in, "read data follow D pins");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
