// Parameter-loading master: sends one packet to the FEB Altera devices.
//
// A free-running RCLK (RCLK_HZ, 5 MHz by default) is made by dividing the
// system clock.  A packet is a header bit (always 1), the command byte
// {W/R, ADD[2:0], CMD[3:0]} and a data byte, highest bit first.  DATAIN
// changes when RCLK falls and the receiver samples it when RCLK rises.  For a
// write all 17 bits come from this block.  For a read DATAIN goes low after
// the command byte and the addressed device sends the data byte on DATAOUT
// with the same timing, which this block samples on the next 8 RCLK rising
// edges into rd_data.  DATAIN is low whenever no packet is sent.
//
// Interface: data_wr loads the data register (SPAC 0x08 write); cmd_wr loads
// the command register and starts the packet (SPAC 0x09 write).  busy is high
// from cmd_wr until the packet is over (SPAC 0x09 read); rd_data is the byte
// of the most recent read (SPAC 0x08 read).  A cmd_wr while busy is ignored.
// Timing: the packet starts at the next RCLK falling edge and ends at the
// falling edge after the 17th rising edge, so busy lasts at most 18 RCLK
// periods.
//
// Packet format, edge usage, 1-byte data and the 5 MHz rate follow the
// protocol description; the polarity of W/R (1 = write), ignoring commands
// while busy and deriving RCLK from the system clock are this design's choices.
module param_master
  import feb_serial_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 20_000_000,
  parameter int unsigned RCLK_HZ = 5_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       data_wr,
  input  logic       cmd_wr,
  input  logic [7:0] wdata,
  output logic [7:0] rd_data,
  output logic       busy,
  output logic       rclk,
  output logic       datain,    // to the devices
  input  logic       dataout    // from the devices
);

  localparam int unsigned HALF = (CLK_HZ / (2 * RCLK_HZ)) < 1 ? 1 : CLK_HZ / (2 * RCLK_HZ);
  localparam int unsigned DW   = HALF > 1 ? $clog2(HALF) : 1;

  logic [DW-1:0] div_cnt;
  logic          edge_now, rise_evt, fall_evt;

  par_cmd_t   cmd_q;
  logic [7:0] data_q;
  logic       pending, active;
  logic [15:0] sreg;
  logic [4:0]  nrise;

  assign edge_now = (div_cnt == DW'(HALF - 1));
  assign rise_evt = edge_now && !rclk;
  assign fall_evt = edge_now &&  rclk;

  // free-running RCLK
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      rclk    <= 1'b0;
    end else if (edge_now) begin
      div_cnt <= '0;
      rclk    <= ~rclk;
    end else begin
      div_cnt <= div_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_q   <= '0;
      data_q  <= '0;
      pending <= 1'b0;
      active  <= 1'b0;
      sreg    <= '0;
      nrise   <= '0;
      datain  <= 1'b0;
      rd_data <= '0;
    end else begin
      if (data_wr && !busy) data_q <= wdata;
      if (cmd_wr && !busy) begin
        cmd_q   <= par_cmd_t'(wdata);
        pending <= 1'b1;
      end

      if (fall_evt) begin
        if (pending) begin
          // header bit goes out first
          datain  <= 1'b1;
          sreg    <= {cmd_q, (cmd_q.write ? data_q : 8'h00)};
          pending <= 1'b0;
          active  <= 1'b1;
          nrise   <= '0;
        end else if (active) begin
          if (nrise == 5'(PAR_PACKET_BITS)) begin
            active <= 1'b0;
            datain <= 1'b0;
          end else begin
            datain <= sreg[15];
            sreg   <= {sreg[14:0], 1'b0};
          end
        end
      end

      if (rise_evt && active && nrise != 5'(PAR_PACKET_BITS)) begin
        nrise <= nrise + 1'b1;
        if (!cmd_q.write && nrise >= 5'd9)
          rd_data <= {rd_data[6:0], dataout};
      end
    end
  end

  assign busy = pending | active;

  // protocol rules: DATAIN only changes with a falling RCLK, and a packet
  // takes exactly 17 rising edges
  a_din_on_fall: assert property (@(posedge clk) disable iff (!rst_n)
    $changed(datain) |-> $past(fall_evt));
  a_packet_len: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(active) |-> $past(nrise) == 5'(PAR_PACKET_BITS));

endmodule
