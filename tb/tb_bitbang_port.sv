// Testbench for bitbang_port.
//
// Two instances are checked: a DAC-chain layout (3 outputs, 1 input) and a
// temperature-sensor layout (2 outputs, 3 inputs, outputs high after reset).
// Random writes must appear on the outputs and in the read-back, input pins
// must appear above the outputs after the synchroniser, and unused bits must
// read zero.
module tb_bitbang_port;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_a = 0, wr_b = 0;
  logic [7:0] wdata = '0, pins_a = '0, pins_b = '0, rd_a, rd_b;
  logic [2:0] out_a;
  logic [1:0] out_b;

  int checks = 0, failures = 0;

  always #25 clk = ~clk;

  bitbang_port #(.NOUT(3), .NIN(1)) dut_a (
    .clk, .rst_n, .wr(wr_a), .wdata, .out_q(out_a), .pins(pins_a), .rdata(rd_a));
  bitbang_port #(.NOUT(2), .NIN(3), .RST_VAL(8'h03)) dut_b (
    .clk, .rst_n, .wr(wr_b), .wdata, .out_q(out_b), .pins(pins_b), .rdata(rd_b));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(out_a == 3'b000, "A reset value");
    check(out_b == 2'b11, "B reset value");
    for (int i = 0; i < 40; i++) begin
      logic [7:0] va, vb;
      va = 8'($urandom); vb = 8'($urandom);
      pins_a = 8'($urandom); pins_b = 8'($urandom);
      @(posedge clk) #1; wdata = va; wr_a = 1;
      @(posedge clk) #1; wdata = vb; wr_a = 0; wr_b = 1;
      @(posedge clk) #1; wr_b = 0; wdata = 8'($urandom);
      repeat (3) @(posedge clk); #1;
      check(out_a == va[2:0], "A outputs");
      check(out_b == vb[1:0], "B outputs");
      check(rd_a == {4'b0, pins_a[0], va[2:0]}, $sformatf("A read %02h", rd_a));
      check(rd_b == {3'b0, pins_b[2:0], vb[1:0]}, $sformatf("B read %02h", rd_b));
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
