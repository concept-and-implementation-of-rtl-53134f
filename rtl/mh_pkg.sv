// mh_pkg: types and constants shared by the FlexRay Message Handler blocks.
//
// The command encodings are the ones of the host, FPU-to-MH, protocol-controller
// and Message-RAM interfaces. The host command and the FPU-to-MH command are
// three bits wide; the protocol-controller command is two bits wide; the RAM
// command uses the three codes WR/RD/CONF and this design adds NONE for an idle
// port. The RAM configuration word layout (ram_conf_t) is this design's own
// choice: bit 31 tells a buffer-count word from a payload-length word.
package mh_pkg;

  // Payload path width: all buffers move 32 bits per clock.
  localparam int unsigned DEF_DATA_W = 32;

  // Message RAM defaults: up to 64 message buffers, 4096 payload bits.
  localparam int unsigned DEF_NUM_BUFFERS = 64;
  localparam int unsigned DEF_RAM_BITS    = 4096;

  // Configuration constants of the FPU. The maximum buffer count is 64, the
  // number of buffers the RAM holds (a larger maximum could not be stored).
  localparam int unsigned DEF_CONF_RAM_MIN_LENGTH      = 32;
  localparam int unsigned DEF_CONF_RAM_MAX_LENGTH      = 64;
  localparam int unsigned DEF_CONF_RAM_DEFAULT_LENGTH  = 56;
  localparam int unsigned DEF_DEFAULT_PAYLOAD_LENGTH   = 72;

  // FlexRay header as presented by the protocol controller: 11-bit frame ID
  // followed by the 6-bit cycle count (17 bits).
  localparam int unsigned FRAME_ID_W = 11;
  localparam int unsigned CYCLE_W    = 6;

  typedef struct packed {
    logic [FRAME_ID_W-1:0] frame_id;
    logic [CYCLE_W-1:0]    cycle_count;
  } header_t;

  // Host -> FPU command (CONTROL_HOST_IN).
  typedef enum logic [2:0] {
    HOST_RESET        = 3'b000,
    HOST_PAUSE        = 3'b001,
    HOST_CONTINUE     = 3'b010,
    HOST_WR           = 3'b011,
    HOST_RD           = 3'b100,
    HOST_CONF         = 3'b101,
    HOST_DEFAULT_CONF = 3'b110,
    HOST_IDLE         = 3'b111
  } host_cmd_e;

  // FPU -> Message Handler command (CONTROL_MH_OUT / CONTROL_FPU_IN).
  typedef enum logic [2:0] {
    MH_PAUSE    = 3'b000,
    MH_CONTINUE = 3'b001,
    MH_WR       = 3'b010,
    MH_RD       = 3'b011,
    MH_CONF     = 3'b100,
    MH_IDLE     = 3'b111
  } mh_cmd_e;

  // Protocol controller -> Message Handler command (CONTROL_PRT_IN).
  typedef enum logic [1:0] {
    PRT_IDLE = 2'b00,
    PRT_WR   = 2'b01,
    PRT_RD   = 2'b10
  } prt_cmd_e;

  // Message Handler -> Message RAM command (CONTROL_MH_IN), per access port.
  typedef enum logic [1:0] {
    RAM_WR   = 2'b00,
    RAM_RD   = 2'b01,
    RAM_CONF = 2'b10,
    RAM_NONE = 2'b11
  } ram_cmd_e;

  // Configuration word to the Message RAM (CONF_BITS_MH_IN).
  typedef struct packed {
    logic        set_amount;  // 1: value is the number of active buffers
    logic [30:0] value;       // buffer count, or payload length in bits
  } ram_conf_t;

endpackage
