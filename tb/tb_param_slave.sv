// Testbench for param_slave.
//
// The testbench plays the master: it makes a 5 MHz RCLK, changes DATAIN on
// the falling edge and samples DATAOUT on the rising edge.  It writes random
// values to every register of the device at address 5, checks the parameter
// outputs against a reference copy kept in the testbench, reads every
// register back over DATAOUT, checks that packets for another address change
// nothing and leave DATAOUT low, and checks the one-period test pulse.
module tb_param_slave;
  import feb_serial_pkg::*;

  localparam logic [2:0] ADDR = 3'd5;

  logic rclk = 1'b0, rst_n = 1'b0, datain = 1'b0;
  logic dataout, test_pulse;
  feb_params_t params, ref_p;

  int checks = 0, failures = 0;
  int pulses = 0;

  param_slave #(.DEV_ADDR(ADDR)) dut (.*);

  always #100 rclk = ~rclk;
  always @(posedge rclk) if (test_pulse) pulses++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send a packet; for reads return the byte seen on DATAOUT
  task automatic packet(input logic wr, input logic [2:0] a, input logic [3:0] c,
                        input logic [7:0] d, output logic [7:0] rd, output int high_seen);
    logic [16:0] bits;
    bits = {1'b1, wr, a, c, (wr ? d : 8'h00)};
    rd = '0; high_seen = 0;
    for (int i = 16; i >= 0; i--) begin
      @(negedge rclk); datain = bits[i];
      @(posedge rclk);
      if (i < 8) begin rd = {rd[6:0], dataout}; end
      if (i >= 8 && dataout) high_seen++;
    end
    @(negedge rclk); datain = 1'b0;
    repeat (2) @(posedge rclk);
  endtask

  function automatic logic [7:0] ref_reg(input logic [3:0] c, input feb_params_t p);
    logic [7:0] v;
    v = 8'h00;
    if (c == 4'h1) v = p.id[7:0];
    if (c == 4'h2) v = {p.autom, p.id[14:8]};
    if (c == 4'h3) v = p.ul[7:0];
    if (c == 4'h4) v = {p.ng, p.ga, p.ul[11:8]};
    if (c == 4'h5) v = p.ll[7:0];
    if (c == 4'h6) v = {p.gc, p.gb, p.ll[11:8]};
    if (c == 4'h7) v = p.td[7:0];
    if (c == 4'h8) v = {p.test, p.tmode, 2'b00, p.td[11:8]};
    return v;
  endfunction

  task automatic ref_write(input logic [3:0] c, input logic [7:0] d);
    case (c)
      4'h1: ref_p.id[7:0] = d;
      4'h2: begin ref_p.autom = d[7]; ref_p.id[14:8] = d[6:0]; end
      4'h3: ref_p.ul[7:0] = d;
      4'h4: begin ref_p.ng = d[7:6]; ref_p.ga = d[5:4]; ref_p.ul[11:8] = d[3:0]; end
      4'h5: ref_p.ll[7:0] = d;
      4'h6: begin ref_p.gc = d[7:6]; ref_p.gb = d[5:4]; ref_p.ll[11:8] = d[3:0]; end
      4'h7: ref_p.td[7:0] = d;
      4'h8: begin ref_p.td[11:8] = d[3:0]; ref_p.tmode = d[6]; ref_p.test = d[7]; end
      default: ;
    endcase
  endtask

  logic [7:0] rd;
  int hs, p0;
  initial begin
    ref_p = '0;
    #5 rst_n = 1'b0;
    #300 rst_n = 1'b1;
    check(params == '0, "parameters zero after reset");

    for (int round = 0; round < 3; round++) begin
      for (int c = 1; c <= 8; c++) begin
        logic [7:0] d;
        d = 8'($urandom);
        packet(1'b1, ADDR, 4'(c), d, rd, hs);
        ref_write(4'(c), d);
        check(params == ref_p, $sformatf("params after write cmd %0d", c));
      end
      for (int c = 1; c <= 8; c++) begin
        packet(1'b0, ADDR, 4'(c), 8'h00, rd, hs);
        check(rd == ref_reg(4'(c), ref_p), $sformatf("read cmd %0d: %02h vs %02h", c, rd, ref_reg(4'(c), ref_p)));
        check(hs == 0, "DATAOUT low during header and command");
      end
    end

    // other address: writes ignored, reads leave DATAOUT low
    for (int c = 1; c <= 8; c++) begin
      packet(1'b1, ADDR ^ 3'd3, 4'(c), 8'hFF, rd, hs);
      packet(1'b0, ADDR ^ 3'd1, 4'(c), 8'h00, rd, hs);
      check(rd == 8'h00, "no reply for another address");
    end
    check(params == ref_p, "other-address writes ignored");

    // test pulse
    p0 = pulses;
    packet(1'b1, ADDR, 4'hF, 8'h00, rd, hs);
    check(pulses == p0 + 1, "one test pulse period");
    packet(1'b1, ADDR + 3'd1, 4'hF, 8'h00, rd, hs);
    check(pulses == p0 + 1, "no test pulse for another address");
    check(params == ref_p, "test pulse leaves parameters");

    // unused command reads zero
    packet(1'b0, ADDR, 4'h0, 8'h00, rd, hs);
    check(rd == 8'h00, "unused command reads zero");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
