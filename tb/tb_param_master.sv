// Testbench for param_master.
//
// A device model in the testbench watches RCLK/DATAIN: on each RCLK rising
// edge it samples DATAIN, detects the header bit, collects the command byte
// and, for a write, the data byte; for a read it drives a chosen byte on
// DATAOUT on the following falling edges, D7 first.  The test checks the
// bits on the line, the byte returned, that DATAIN only changes while RCLK
// falls, that DATAIN is low between packets, the RCLK period (5 MHz from
// 20 MHz), and that busy lasts no longer than 18 RCLK periods.
module tb_param_master;
  import feb_serial_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic data_wr = 1'b0, cmd_wr = 1'b0;
  logic [7:0] wdata = '0, rd_data;
  logic busy, rclk, datain;
  logic dataout = 1'b0;

  int checks = 0, failures = 0;

  always #25 clk = ~clk;   // 20 MHz

  param_master dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- device model ----------------
  logic [7:0] m_cmd, m_data, m_reply;
  int         m_state = 0, m_cnt = 0, m_packets = 0;
  logic [7:0] m_rsh;
  always @(posedge rclk) begin
    case (m_state)
      0: if (datain) begin m_state = 1; m_cnt = 0; end
      1: begin
        m_cmd = {m_cmd[6:0], datain}; m_cnt++;
        if (m_cnt == 8) begin
          m_cnt = 0;
          if (m_cmd[7]) m_state = 2;
          else begin m_state = 3; m_rsh = m_reply; end
        end
      end
      2: begin
        m_data = {m_data[6:0], datain}; m_cnt++;
        if (m_cnt == 8) begin m_state = 0; m_packets++; end
      end
      3: begin
        m_cnt++;
        if (datain) begin failures++; $display("FAIL: DATAIN high during read data"); end
        if (m_cnt == 8) begin m_state = 0; m_packets++; end
      end
      default: m_state = 0;
    endcase
  end
  always @(negedge rclk) begin
    if (m_state == 3) begin dataout <= m_rsh[7]; m_rsh = {m_rsh[6:0], 1'b0}; end
    else dataout <= 1'b0;
  end

  // DATAIN may only change together with a falling RCLK
  logic prev_din = 1'b0, prev_rclk = 1'b0;
  int   bad_edges = 0;
  always @(posedge clk) begin
    if (rst_n && datain !== prev_din && !(prev_rclk && !rclk)) bad_edges++;
    prev_din  <= datain;
    prev_rclk <= rclk;
  end

  task automatic spac_write(input bit is_cmd, input logic [7:0] v);
    @(posedge clk) #1; wdata = v; data_wr = !is_cmd; cmd_wr = is_cmd;
    @(posedge clk) #1; data_wr = 0; cmd_wr = 0;
  endtask

  task automatic wait_done(output int cycles);
    cycles = 0;
    while (busy) begin @(posedge clk); cycles++; end
  endtask

  int cyc, t0, t1, pk;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // RCLK period
    @(posedge rclk); t0 = $time; @(posedge rclk); t1 = $time;
    check(t1 - t0 == 200, "RCLK period is 200 ns (5 MHz)");

    // write packets
    for (int i = 0; i < 6; i++) begin
      logic [7:0] c, d;
      c = {1'b1, 3'($urandom), 4'($urandom)};
      d = 8'($urandom);
      pk = m_packets;
      spac_write(0, d);
      spac_write(1, c);
      check(busy, "busy after command write");
      wait_done(cyc);
      check(cyc <= 18 * 4, $sformatf("write busy %0d cycles <= 72", cyc));
      check(cyc >= 17 * 4 - 2, $sformatf("write busy %0d cycles >= 66", cyc));
      check(m_packets == pk + 1, "device saw one packet");
      check(m_cmd == c, $sformatf("command byte %02h == %02h", m_cmd, c));
      check(m_data == d, $sformatf("data byte %02h == %02h", m_data, d));
      check(datain == 1'b0, "DATAIN low after packet");
    end

    // read packets
    for (int i = 0; i < 6; i++) begin
      logic [7:0] c;
      c = {1'b0, 3'($urandom), 4'($urandom)};
      m_reply = 8'($urandom);
      spac_write(1, c);
      wait_done(cyc);
      check(cyc <= 18 * 4, $sformatf("read busy %0d cycles", cyc));
      check(m_cmd == c, "read command byte");
      check(rd_data == m_reply, $sformatf("read data %02h == %02h", rd_data, m_reply));
    end

    // data register is not changed by a write packet's read-back path
    m_reply = 8'h5A;
    spac_write(1, 8'h13);
    wait_done(cyc);
    spac_write(0, 8'hC3); spac_write(1, 8'h93);
    wait_done(cyc);
    check(rd_data == 8'h5A, "rd_data kept over a write packet");

    check(bad_edges == 0, $sformatf("DATAIN changed off a falling edge %0d times", bad_edges));
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
