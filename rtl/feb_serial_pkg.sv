// Shared definitions for the front-end-board (FEB) serial loading logic.
//
// The SPAC Interface EPLD turns the SPAC controller's parallel command
// writes into the serial protocols the FEB needs.  This package holds the
// SPAC command codes the EPLD answers to, the field layout of the parameter
// loading packet sent to the FEB Altera devices, the parameter register set
// those devices hold, and the shaper mode encoding.  Command codes, packet
// layout, register fields and mode encoding follow the command tables of the
// protocol description; the struct packing order is this design's choice.
package feb_serial_pkg;

  // ---------------------------------------------------------------------
  // SPAC command codes (8-bit command address on the SPAC parallel bus)
  // ---------------------------------------------------------------------
  localparam logic [7:0] CMD_DAC        = 8'h04; // DAC chain bit-bang
  localparam logic [7:0] CMD_PAR_DATA   = 8'h08; // parameter data reg / read-back data
  localparam logic [7:0] CMD_PAR_CMD    = 8'h09; // parameter command reg + send / busy
  localparam logic [7:0] CMD_XPAR_LEFT  = 8'h10; // Xilinx parameter bit-bang, left
  localparam logic [7:0] CMD_XPAR_RIGHT = 8'h14; // Xilinx parameter bit-bang, right
  localparam logic [7:0] CMD_I2C_DELAY  = 8'h18; // I2C delay line bit-bang
  localparam logic [7:0] CMD_TEMP       = 8'h1C; // temperature sensor bit-bang
  localparam logic [7:0] CMD_ACFG_DATA  = 8'h20; // Altera config byte / status
  localparam logic [7:0] CMD_ACFG_NCFG  = 8'h21; // Altera nCONFIG pulse
  localparam logic [7:0] CMD_ACFG_CLKS  = 8'h22; // Altera N extra DCLKs
  localparam logic [7:0] CMD_ACFG_DOUT  = 8'h23; // Altera DATA0 static value
  localparam logic [7:0] CMD_XCFG_DATA  = 8'h28; // Xilinx config byte / status
  localparam logic [7:0] CMD_XCFG_PROG  = 8'h29; // Xilinx /PROGRAM pulse
  localparam logic [7:0] CMD_XCFG_CLKS  = 8'h2A; // Xilinx N extra CCLKs
  localparam logic [7:0] CMD_XCFG_DOUT  = 8'h2B; // Xilinx DIN static value
  localparam logic [7:0] CMD_SH_CS_LO   = 8'h30; // shaper CS[7:0]
  localparam logic [7:0] CMD_SH_CS_HI   = 8'h31; // shaper CS[15:8]
  localparam logic [7:0] CMD_SH_CTRL_P  = 8'h32; // shaper control + STROBE pulse
  localparam logic [7:0] CMD_SH_CTRL    = 8'h33; // shaper control, no pulse / read data
  localparam logic [7:0] CMD_RESET      = 8'h38; // reset lines
  localparam logic [7:0] CMD_PDAC       = 8'h3C; // pulser DAC bit-bang

  // ---------------------------------------------------------------------
  // Parameter loading packet: 1 header bit (always 1), then the command
  // byte {W/R, ADD[2:0], CMD[3:0]}, then D[7:0]; highest bit first.
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic       write;   // 1 = write, 0 = read
    logic [2:0] addr;    // device address on the shared line
    logic [3:0] cmd;     // register / action code
  } par_cmd_t;

  localparam int PAR_PACKET_BITS = 17;

  // Register / action codes accepted by the FEB Altera devices
  localparam logic [3:0] PCMD_ID_LO  = 4'h1;
  localparam logic [3:0] PCMD_ID_HI  = 4'h2;
  localparam logic [3:0] PCMD_UL_LO  = 4'h3;
  localparam logic [3:0] PCMD_UL_HI  = 4'h4;
  localparam logic [3:0] PCMD_LL_LO  = 4'h5;
  localparam logic [3:0] PCMD_LL_HI  = 4'h6;
  localparam logic [3:0] PCMD_TD_LO  = 4'h7;
  localparam logic [3:0] PCMD_TD_HI  = 4'h8;
  localparam logic [3:0] PCMD_TPULSE = 4'hF;

  // Parameter set held by one FEB Altera device
  typedef struct packed {
    logic [14:0] id;     // header ID
    logic        autom;  // AUTO
    logic [11:0] ul;     // upper threshold
    logic [11:0] ll;     // lower threshold
    logic [1:0]  ng;
    logic [1:0]  ga;
    logic [1:0]  gb;
    logic [1:0]  gc;
    logic [11:0] td;
    logic        tmode;  // low = Xilinx ignored
    logic        test;
  } feb_params_t;

  // ---------------------------------------------------------------------
  // Shaper mode bits M[1:0] = {M1, M0}
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    SH_READ      = 2'b00,
    SH_WRITE     = 2'b01,
    SH_SET_ALL   = 2'b10,
    SH_CLEAR_ALL = 2'b11
  } shaper_mode_t;

  // ceil(a/b) for clock-cycle counts
  function automatic int cdiv(input longint a, input longint b);
    return int'((a + b - 1) / b);
  endfunction

endpackage
