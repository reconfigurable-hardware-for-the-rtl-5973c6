// vc_pkg: types and constants shared by the video-card cores.
//
// Holds the AXI4-Lite register offsets of the Memory Manager and of the
// H.264 encoder wrapper, the bit positions of their control and status
// registers, the configuration structures that the register files hand to
// the datapaths, and the state encodings of every state machine.  The
// register map and the bit positions follow the published register tables;
// the 64-bit register width follows the 8-byte register spacing and the
// "63:N reserved" fields of those tables.
//
// Origin: the register set, the five status bits and the state names follow
// the original Memory Manager and encoder wrapper; offsets and bit positions
// follow the original register tables too.
package vc_pkg;

  // ------------------------------------------------------------------
  // Memory Manager register map (byte offsets)
  // ------------------------------------------------------------------
  localparam logic [7:0] MM_RAW_CTRL      = 8'h00;
  localparam logic [7:0] MM_RAW_START     = 8'h08;
  localparam logic [7:0] MM_RAW_SIZE      = 8'h10;
  localparam logic [7:0] MM_HRES_BYTES    = 8'h18;
  localparam logic [7:0] MM_VRES          = 8'h20;
  localparam logic [7:0] MM_RAW_STATUS    = 8'h28;
  localparam logic [7:0] MM_ENC_CTRL      = 8'h30;
  localparam logic [7:0] MM_ENC_START     = 8'h38;
  localparam logic [7:0] MM_ENC_SIZE      = 8'h40;
  localparam logic [7:0] MM_ENC_STATUS    = 8'h48;
  localparam logic [7:0] MM_ENC_LAST_ADDR = 8'h50;

  // Raw video control register bits
  localparam int CTRL_RESTART  = 0;
  localparam int CTRL_WR_EN    = 1;
  localparam int CTRL_RD_EN    = 2;
  localparam int CTRL_HALT_EN  = 3;
  // Encoded video control register bits (and encoder control register)
  localparam int CTRL_ENC_EN   = 1;

  // Raw video status register bits
  localparam int ST_HALTED     = 0;
  localparam int ST_EOL_EARLY  = 1;
  localparam int ST_EOL_LATE   = 2;
  localparam int ST_SOF_ERR    = 3;
  localparam int ST_UNWRITTEN  = 4;

  // ------------------------------------------------------------------
  // H.264 encoder wrapper register map (byte offsets)
  // ------------------------------------------------------------------
  localparam logic [7:0] ENC_CTRL  = 8'h00;
  localparam logic [7:0] ENC_HRES  = 8'h08;
  localparam logic [7:0] ENC_VRES  = 8'h10;
  localparam logic [7:0] ENC_FPS   = 8'h18;

  // Configuration applied to the raw-video datapaths at a restart
  typedef struct packed {
    logic [63:0] start_addr;   // first byte of the raw video region
    logic [63:0] mem_size;     // size of the region in bytes
    logic [31:0] hres_bytes;   // bytes per video line
    logic [31:0] vres;         // lines per frame
  } mm_raw_cfg_t;

  // Configuration applied to the encoded-video datapath at a restart
  typedef struct packed {
    logic [63:0] start_addr;
    logic [63:0] mem_size;
  } mm_enc_cfg_t;

  // Configuration of the encoder wrapper applied at a restart
  typedef struct packed {
    logic [15:0] hres;         // pixels per line (multiple of 16)
    logic [15:0] vres;         // lines per frame (multiple of 16)
    logic [15:0] fps;          // frames per second (held for software)
  } enc_cfg_t;

  // Write subsystem main state machine (burst dispatch)
  typedef enum logic [2:0] {
    WR_RESET, WR_IDLE, WR_READ_BUFFER, WR_READ_BUFFER_DONE, WR_ERROR
  } wr_state_e;

  // Read subsystem main state machine
  typedef enum logic [1:0] {
    RD_RESET, RD_IDLE, RD_READ_MEMORY
  } rd_state_e;

  // Encoder main state machine
  typedef enum logic [2:0] {
    EM_RESET, EM_PREPARE_NEXT_FRAME, EM_PREPARE_NEW_LINE, EM_ENCODE_LINE,
    EM_ALIGN_ENCODER
  } enc_main_state_e;

  // Encoder Y and UV feeding state machines (END_OF_FRAME used by Y only)
  typedef enum logic [1:0] {
    CS_RESET, CS_WAIT_SYNC, CS_ABLE, CS_END_OF_FRAME
  } enc_comp_state_e;

  // Header delivering state machine
  typedef enum logic [1:0] {
    TX_RESET, TX_IDLE, TX_HEADER, TX_DATA
  } tx_state_e;

endpackage
