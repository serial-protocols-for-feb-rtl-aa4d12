// Software-sequenced ("bit-bang") port.
//
// Several FEB devices are loaded with all sequencing done by the host: a SPAC
// write sets a few output lines, a SPAC read returns those lines and the
// state of some input pins.  One instance serves one such command (DAC chain,
// Xilinx parameter lines, I2C delay line, temperature sensor, reset lines,
// pulser DAC).  wr loads the NOUT low bits of wdata into the output register
// out_q.  rdata returns {pins, out_q} with the NIN input pins above the
// outputs, after two synchronising flops; unused high bits read zero.
// Outputs change on the clock after wr; a pin change is seen in rdata two or
// three clocks later.  RST_VAL is the output value after reset.
//
// The per-command bit layouts come from the protocol description; the
// synchroniser and the zero fill are this design's choices.
module bitbang_port #(
  parameter int unsigned    NOUT    = 2,
  parameter int unsigned    NIN     = 1,
  parameter logic [7:0]     RST_VAL = 8'h00
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr,
  input  logic [7:0]      wdata,
  output logic [NOUT-1:0] out_q,
  input  logic [7:0]      pins,      // only the NIN low bits are used
  output logic [7:0]      rdata
);

  logic [7:0] pin_s1, pin_s2;
  logic [7:0] in_mask;

  assign in_mask = 8'((16'd1 << NIN) - 16'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q  <= RST_VAL[NOUT-1:0];
      pin_s1 <= '0;
      pin_s2 <= '0;
    end else begin
      if (wr) out_q <= wdata[NOUT-1:0];
      pin_s1 <= pins & in_mask;
      pin_s2 <= pin_s1;
    end
  end

  always_comb begin
    rdata = 8'(out_q) | 8'(16'(pin_s2) << NOUT);
  end

endmodule
