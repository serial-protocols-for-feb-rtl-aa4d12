// Shaper control lines of the 128-channel front-end board.
//
// Drives the 25 shaper control lines: 16 chip selects (one per shaper pair),
// the mode bits M0/M1, UP, DOWN, STROBE and the 4-bit data bus D[3:0].  UP,
// DOWN, M0, M1, STROBE and D are shared by all shapers; CS picks the pair.
// SPAC commands handled (strobes from the command decoder):
//   0x30 write cs_lo_wr  : CS[7:0]         0x30 read: CS[7:0]
//   0x31 write cs_hi_wr  : CS[15:8]        0x31 read: CS[15:8]
//   0x32 write ctrl_p_wr : control byte, then one STROBE pulse
//   0x33 write ctrl_wr   : control byte, no pulse (used for reading)
//   0x32 read            : control byte    0x33 read: D[3:0] from the bus
// Control byte: D[1:0] = M[1:0] = {M1, M0}, D2 = UP, D3 = DOWN,
// D[7:4] = data for D[3:0].  Modes {M1,M0}: 00 read, 01 write, 10 set all,
// 11 clear all.  In read mode the D bus is released (d_oe low) so the
// selected shaper can drive it; d_in is synchronised with two flops.
// Timing: STROBE rises one clock after the 0x32 write (so the lines it
// qualifies have settled) and stays high STROBE_NS (1 us by default).
//
// Signals, command set, bit layout and mode table follow the protocol
// description.  Strobe width and polarity, releasing D in read mode and
// reset values (all zero) are this design's choices.  The shift to the
// shaper's -3 V / 0 V levels is outside this logic.
module shaper_ctrl
  import feb_serial_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 20_000_000,
  parameter int unsigned STROBE_NS = 1_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cs_lo_wr,
  input  logic        cs_hi_wr,
  input  logic        ctrl_p_wr,
  input  logic        ctrl_wr,
  input  logic [7:0]  wdata,
  output logic [15:0] cs,
  output logic [7:0]  ctrl,
  output logic [3:0]  rd_data,
  output shaper_mode_t mode,
  output logic        up,
  output logic        down,
  output logic        strobe,
  output logic [3:0]  d_out,
  output logic        d_oe,
  input  logic [3:0]  d_in
);

  localparam int unsigned STB_CYC = int'((64'(CLK_HZ) * STROBE_NS + 999_999_999) / 1_000_000_000);
  localparam int unsigned SW = $clog2(STB_CYC + 1);

  logic [SW-1:0] stb_cnt;
  logic          stb_req;
  logic [3:0]    din_s1, din_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs      <= '0;
      ctrl    <= '0;
      stb_req <= 1'b0;
      stb_cnt <= '0;
      din_s1  <= '0;
      din_s2  <= '0;
    end else begin
      din_s1 <= d_in;
      din_s2 <= din_s1;
      if (cs_lo_wr) cs[7:0]  <= wdata;
      if (cs_hi_wr) cs[15:8] <= wdata;
      if (ctrl_p_wr || ctrl_wr) ctrl <= wdata;
      stb_req <= ctrl_p_wr;
      if (stb_req)             stb_cnt <= SW'(STB_CYC);
      else if (stb_cnt != 0)   stb_cnt <= stb_cnt - 1'b1;
    end
  end

  assign mode    = shaper_mode_t'(ctrl[1:0]);
  assign up      = ctrl[2];
  assign down    = ctrl[3];
  assign d_out   = ctrl[7:4];
  assign d_oe    = (mode != SH_READ);
  assign strobe  = (stb_cnt != 0);
  assign rd_data = din_s2;

endmodule
