// daq_pkg: types and constants shared by the sTGC DAQ FPGA logic.
//
// A VMM2 hit is 36 bits: 6-bit channel (64 channels), 10-bit peak amplitude
// (ADC), 8-bit peak timing (TAC digitised) and the 12-bit Gray-coded
// bunch-crossing counter. The field widths follow the front-end description;
// their order in the word is this design's choice.
//
// Frames exchanged with the host carry a 2-byte token after the two MAC
// addresses. A token above TOKEN_CMD_MIN marks a command; otherwise it is the
// payload length. The command codes themselves are this design's choice.
package daq_pkg;

  localparam int EVT_BITS       = 36;
  localparam int EVT_BYTES      = 5;    // 36 bits + VMM index, padded to bytes
  localparam int EVID_BITS      = 24;   // event ID, 3 bytes
  localparam int EVID_BYTES     = 3;
  localparam int EVENTS_PER_PKT = 15;
  localparam int HDR_BYTES      = 14;   // dst MAC, src MAC, token
  localparam int TOKEN_CMD_MIN  = 1000;

  // Payload lengths of the two packet formats
  localparam int PAYLOAD_SELF = EVENTS_PER_PKT * EVT_BYTES;                 // 75
  localparam int PAYLOAD_EXT  = EVENTS_PER_PKT * (EVT_BYTES + EVID_BYTES);  // 120

  typedef struct packed {
    logic [5:0]  chan;
    logic [9:0]  pdo;    // peak amplitude
    logic [7:0]  tdo;    // peak timing
    logic [11:0] bcid;   // Gray-coded bunch-crossing ID
  } vmm_hit_t;

  typedef enum logic [15:0] {
    CMD_RESET  = 16'd1001,
    CMD_CONFIG = 16'd1002,
    CMD_MODE   = 16'd1003,
    CMD_START  = 16'd1004,
    CMD_STOP   = 16'd1005,
    CMD_STATUS = 16'd1006
  } cmd_code_t;

  typedef struct packed {
    logic        ext_trig_mode;
    logic        ext_clk_sel;
    logic        run;
    logic        cfg_busy;
    logic        cfg_done;
    logic [23:0] event_id;
    logic [15:0] dropped;     // hits dropped for lack of FIFO space
    logic [15:0] lost;        // hits overwritten in a Synch unit
    logic [15:0] packets;     // packets sent
    logic [15:0] commands;    // commands executed
    logic [15:0] ignored;     // frames that were not commands for this board
  } daq_status_t;

endpackage
