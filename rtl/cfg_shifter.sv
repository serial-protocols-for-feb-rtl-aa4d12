// Serial configuration shifter shared by the Altera and Xilinx loaders.
//
// Drives a configuration clock (cfg_clk) and a data line (cfg_dout) at a rate
// set by HALF, the number of system clocks per half period of cfg_clk.
// byte_go shifts out one byte: each bit is put on cfg_dout, held for HALF
// cycles with cfg_clk low, then cfg_clk is high for HALF cycles, so the device
// samples the bit on the rising edge with a half period of setup and hold.
// MSB_FIRST selects the bit order.  clks_go gives nclk+1 clock pulses with
// cfg_dout left as it is.  dout_go sets cfg_dout to dout_val straight away.
// After a byte cfg_dout keeps the last bit.  hold delays the start of a byte
// or of clock pulses (not of dout_go) until it falls.  A request made while
// busy is ignored.  A byte takes 16*HALF cycles, N clocks 2*N*HALF cycles.
//
// The byte and clock commands and the rate limit come from the protocol
// description; the exact waveform and the ignore-while-busy rule are this
// design's choices.
module cfg_shifter #(
  parameter int unsigned HALF      = 2,
  parameter bit          MSB_FIRST = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       byte_go,
  input  logic       clks_go,
  input  logic       dout_go,
  input  logic [7:0] wdata,
  input  logic       hold,
  output logic       busy,
  output logic       cfg_clk,
  output logic       cfg_dout
);

  localparam int unsigned TW = $clog2(HALF + 1);

  typedef enum logic [1:0] {C_IDLE, C_PEND, C_LOW, C_HIGH} cstate_t;

  cstate_t     st;
  logic        shift_mode;   // 1: byte, 0: clocks only
  logic [7:0]  sreg;
  logic [4:0]  left;         // clock pulses still to give
  logic [TW-1:0] tmr;

  logic next_bit;
  assign next_bit = MSB_FIRST ? sreg[7] : sreg[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= C_IDLE;
      shift_mode <= 1'b0;
      sreg       <= '0;
      left       <= '0;
      tmr        <= '0;
      cfg_clk    <= 1'b0;
      cfg_dout   <= 1'b0;
    end else begin
      case (st)
        C_IDLE: begin
          if (dout_go) cfg_dout <= wdata[0];
          if (byte_go) begin
            shift_mode <= 1'b1;
            sreg       <= wdata;
            left       <= 5'd8;
            st         <= C_PEND;
          end else if (clks_go) begin
            shift_mode <= 1'b0;
            left       <= 5'(wdata[3:0]) + 5'd1;
            st         <= C_PEND;
          end
        end
        C_PEND: begin
          if (!hold) begin
            if (shift_mode) begin
              cfg_dout <= next_bit;
              sreg     <= MSB_FIRST ? {sreg[6:0], 1'b0} : {1'b0, sreg[7:1]};
            end
            tmr <= TW'(HALF - 1);
            st  <= C_LOW;
          end
        end
        C_LOW: begin
          if (tmr == '0) begin
            cfg_clk <= 1'b1;
            tmr     <= TW'(HALF - 1);
            st      <= C_HIGH;
          end else begin
            tmr <= tmr - 1'b1;
          end
        end
        C_HIGH: begin
          if (tmr == '0) begin
            cfg_clk <= 1'b0;
            left    <= left - 1'b1;
            if (left == 5'd1) begin
              st <= C_IDLE;
            end else begin
              if (shift_mode) begin
                cfg_dout <= next_bit;
                sreg     <= MSB_FIRST ? {sreg[6:0], 1'b0} : {1'b0, sreg[7:1]};
              end
              tmr <= TW'(HALF - 1);
              st  <= C_LOW;
            end
          end else begin
            tmr <= tmr - 1'b1;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign busy = (st != C_IDLE);

  // the clock only rises when the request has been released by hold
  a_no_clk_on_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (st == C_PEND && hold) |=> !$rose(cfg_clk));

endmodule
