// Slave-serial configuration loader for the XC4000 Xilinx devices.
//
// SPAC commands handled (strobes from the command decoder):
//   0x28 write  byte_wr : shift D[7:0] out on DIN, MSB first, one CCLK each
//   0x29 write  prog_wr : pulse /PROGRAM low for PROGRAM_NS (high-low-high)
//   0x2A write  clks_wr : give D[3:0]+1 CCLK pulses (the extra clocks needed
//                         to enter user mode)
//   0x2B write  dout_wr : set DIN to D[0]
//   0x28 read   status  : {/INIT, DONE, busy} in bits 2..0
// CCLK is driven on two identical lines (cclk_l, cclk_r) for the left and
// right halves of the board.  The wait of about one millisecond per frame
// after /PROGRAM is left to the host software, as the load sequence
// prescribes; busy only covers the pulse and the shifting.  /INIT and DONE
// are synchronised with two flops.
//
// The command set, the pulse, the two CCLK lines and the status bits follow
// the protocol description.  The MSB-first bit order, the /PROGRAM pulse
// width and the CCLK rate (CCLK_HZ, 5 MHz) are this design's choices.
module xilinx_cfg_loader #(
  parameter int unsigned CLK_HZ     = 20_000_000,
  parameter int unsigned CCLK_HZ    = 5_000_000,
  parameter int unsigned PROGRAM_NS = 2_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       byte_wr,
  input  logic       prog_wr,
  input  logic       clks_wr,
  input  logic       dout_wr,
  input  logic [7:0] wdata,
  output logic [2:0] status,
  output logic       program_n,
  output logic       cclk_l,
  output logic       cclk_r,
  output logic       din,
  input  logic       init_n,
  input  logic       done
);

  localparam int unsigned HALF     = (CLK_HZ + 2*CCLK_HZ - 1) / (2 * CCLK_HZ);
  localparam int unsigned PROG_CYC = int'((64'(CLK_HZ) * PROGRAM_NS + 999_999_999) / 1_000_000_000);
  localparam int unsigned PW = $clog2(PROG_CYC + 1);

  logic [1:0]    init_sync, done_sync;
  logic [PW-1:0] pulse_cnt;
  logic          sh_busy, pulsing, busy, cclk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_sync <= '0;
      done_sync <= '0;
      pulse_cnt <= '0;
    end else begin
      init_sync <= {init_sync[0], init_n};
      done_sync <= {done_sync[0], done};
      if (prog_wr && !busy)    pulse_cnt <= PW'(PROG_CYC);
      else if (pulse_cnt != 0) pulse_cnt <= pulse_cnt - 1'b1;
    end
  end

  assign pulsing   = (pulse_cnt != 0);
  assign program_n = !pulsing;
  assign busy      = sh_busy | pulsing;

  cfg_shifter #(.HALF(HALF), .MSB_FIRST(1'b1)) u_shift (
    .clk      (clk),
    .rst_n    (rst_n),
    .byte_go  (byte_wr && !pulsing),
    .clks_go  (clks_wr && !pulsing),
    .dout_go  (dout_wr && !pulsing),
    .wdata    (wdata),
    .hold     (1'b0),
    .busy     (sh_busy),
    .cfg_clk  (cclk),
    .cfg_dout (din)
  );

  assign cclk_l = cclk;
  assign cclk_r = cclk;
  assign status = {init_sync[1], done_sync[1], busy};

endmodule
