// Parameter-loading receiver of one FEB Altera device.
//
// Runs on the RCLK sent by the SPAC Interface EPLD.  It samples DATAIN on the
// rising edge of RCLK and drives DATAOUT on the falling edge.  A packet starts
// with a header bit of 1.  The 8-bit command {W/R, ADD[2:0], CMD[3:0]} and
// then 8 data bits follow, highest bit first.  Only packets whose ADD equals
// the device address DEV_ADDR act on this device:
//   write: the data byte is stored into the register named by CMD, or a
//          test pulse is given for CMD 0xF;
//   read:  right after the last command bit the register is shifted out on
//          DATAOUT (D7 first), one bit per RCLK period.  For every other
//          packet DATAOUT stays low, so the DATAOUT lines of several devices
//          can be ORed onto one return line.
// Register map (CMD: bits): 1: ID[7:0]; 2: AUTO, ID[14:8]; 3: UL[7:0];
// 4: NG[1:0], GA[1:0], UL[11:8]; 5: LL[7:0]; 6: GC[1:0], GB[1:0], LL[11:8];
// 7: TD[7:0]; 8: TEST, TMODE, -, -, TD[11:8].
// test_pulse is high for one RCLK period after a write to CMD 0xF.
//
// Packet format, register map and edge usage follow the protocol
// description.  Reset values (all zero), the width of the test pulse, reading
// unused bits as zero and the ORed return line are this design's choices.
module param_slave
  import feb_serial_pkg::*;
#(
  parameter logic [2:0] DEV_ADDR = 3'd0
) (
  input  logic        rclk,
  input  logic        rst_n,
  input  logic        datain,
  output logic        dataout,
  output feb_params_t params,
  output logic        test_pulse
);

  typedef enum logic [2:0] {S_IDLE, S_CMD, S_DATA, S_READ, S_SKIP} state_t;

  state_t     state;
  logic [2:0] cnt;
  logic [6:0] sh;          // bits received so far in the current byte
  logic [2:0] addr_q;      // address and code of the packet being received
  logic [3:0] code_q;
  logic [7:0] rd_sreg;
  par_cmd_t   cmd_now;
  logic [7:0] byte_now;

  assign cmd_now  = par_cmd_t'({sh[6:0], datain});
  assign byte_now = {sh[6:0], datain};

  function automatic logic [7:0] reg_value(input logic [3:0] c, input feb_params_t p);
    case (c)
      PCMD_ID_LO: return p.id[7:0];
      PCMD_ID_HI: return {p.autom, p.id[14:8]};
      PCMD_UL_LO: return p.ul[7:0];
      PCMD_UL_HI: return {p.ng, p.ga, p.ul[11:8]};
      PCMD_LL_LO: return p.ll[7:0];
      PCMD_LL_HI: return {p.gc, p.gb, p.ll[11:8]};
      PCMD_TD_LO: return p.td[7:0];
      PCMD_TD_HI: return {p.test, p.tmode, 2'b00, p.td[11:8]};
      default:    return 8'h00;
    endcase
  endfunction

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      sh         <= '0;
      addr_q     <= '0;
      code_q     <= '0;
      rd_sreg    <= '0;
      params     <= '0;
      test_pulse <= 1'b0;
    end else begin
      test_pulse <= 1'b0;
      case (state)
        S_IDLE: begin
          cnt <= '0;
          if (datain) state <= S_CMD;
        end
        S_CMD: begin
          sh  <= byte_now[6:0];
          cnt <= cnt + 1'b1;
          if (cnt == 3'd7) begin
            addr_q <= cmd_now.addr;
            code_q <= cmd_now.cmd;
            if (cmd_now.write) begin
              state <= S_DATA;
            end else if (cmd_now.addr == DEV_ADDR) begin
              rd_sreg <= reg_value(cmd_now.cmd, params);
              state   <= S_READ;
            end else begin
              state <= S_SKIP;
            end
          end
        end
        S_DATA: begin
          sh  <= byte_now[6:0];
          cnt <= cnt + 1'b1;
          if (cnt == 3'd7) begin
            state <= S_IDLE;
            if (addr_q == DEV_ADDR) begin
              case (code_q)
                PCMD_ID_LO: params.id[7:0] <= byte_now;
                PCMD_ID_HI: {params.autom, params.id[14:8]} <= byte_now;
                PCMD_UL_LO: params.ul[7:0] <= byte_now;
                PCMD_UL_HI: {params.ng, params.ga, params.ul[11:8]} <= byte_now;
                PCMD_LL_LO: params.ll[7:0] <= byte_now;
                PCMD_LL_HI: {params.gc, params.gb, params.ll[11:8]} <= byte_now;
                PCMD_TD_LO: params.td[7:0] <= byte_now;
                PCMD_TD_HI: begin
                  params.td[11:8] <= byte_now[3:0];
                  params.tmode    <= byte_now[6];
                  params.test     <= byte_now[7];
                end
                PCMD_TPULSE: test_pulse <= 1'b1;
                default: ;
              endcase
            end
          end
        end
        S_READ: begin
          rd_sreg <= {rd_sreg[6:0], 1'b0};
          cnt     <= cnt + 1'b1;
          if (cnt == 3'd7) state <= S_IDLE;
        end
        S_SKIP: begin
          cnt <= cnt + 1'b1;
          if (cnt == 3'd7) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // return data changes on the falling edge of RCLK
  always_ff @(negedge rclk or negedge rst_n) begin
    if (!rst_n) dataout <= 1'b0;
    else        dataout <= (state == S_READ) ? rd_sreg[7] : 1'b0;
  end

endmodule
