// rd50_pkg: types and constants shared by the pixel read-out chain.
//
// A recorded hit leaves the pixel as a 24-bit word {pixel address, trailing-edge
// timestamp, leading-edge timestamp}. The end-of-column logic prefixes it with its
// own 8-bit column address to form the 32-bit word that travels through the TX FIFO
// and the serializer. These word layouts and the 40-bit frame words (start of frame
// EE.., end of frame FF.., idle 3C/BC alternating, data tag CD) follow the
// read-out description; the state encodings are the ones shown on the state
// variables of the control unit and of the serializer.
package rd50_pkg;

  localparam int TS_W   = 8;   // timestamp width (TS[7:0])
  localparam int ADDR_W = 8;   // pixel and column address width
  localparam int CFG_W  = 8;   // configuration memory bits per pixel (LD[7:0])
  localparam int SER_W  = 40;  // width of one serial word

  typedef struct packed {
    logic [ADDR_W-1:0] addr;  // pixel address inside the column
    logic [TS_W-1:0]   te;    // timestamp of the trailing edge
    logic [TS_W-1:0]   le;    // timestamp of the leading edge
  } hit_word_t;               // 24 bits, the EOC FIFO entry

  typedef struct packed {
    logic [ADDR_W-1:0] eoc;   // column (EOC) address
    hit_word_t         hit;
  } data_word_t;              // 32 bits, the TX FIFO entry

  // Active-low column bus driven by the pixel that is being read. Every pixel
  // drives all ones when it is not selected, so the column bus is the AND of all
  // pixel outputs.
  typedef struct packed {
    logic              valid_b;  // low while a pixel puts a hit on the bus
    logic [ADDR_W-1:0] addr_b;   // ADDR_OUT_B
    logic [TS_W-1:0]   te_b;     // TS_TE_B
    logic [TS_W-1:0]   le_b;     // TS_LE_B
  } col_bus_t;

  localparam col_bus_t COL_BUS_IDLE = '1;

  typedef enum logic [1:0] {
    CU_UNINIT    = 2'd0,
    CU_IDLE      = 2'd1,
    CU_READ_EOCS = 2'd2,
    CU_DEBUG     = 2'd3
  } cu_state_t;

  typedef enum logic [1:0] {
    SER_UNINIT    = 2'd0,
    SER_IDLE      = 2'd1,
    SER_SEND_DATA = 2'd2,
    SER_DEBUG     = 2'd3
  } ser_state_t;

  typedef enum logic [1:0] {
    FILL_UNINIT = 2'd0,
    FILL_IDLE   = 2'd1,
    FILL_READ   = 2'd2
  } fill_state_t;

  // Kind of the 40-bit word on the serial line.
  typedef enum logic [2:0] {
    W_NONE, W_SOF, W_IDLE, W_DATA, W_EOF
  } word_kind_t;

  localparam logic [SER_W-1:0] WORD_SOF  = 40'hEE_EEEE_EEEE;
  localparam logic [SER_W-1:0] WORD_EOF  = 40'hFF_FFFF_FFFF;
  localparam logic [SER_W-1:0] WORD_IDLE = 40'h3C_BC3C_BC3C;
  localparam logic [7:0]       DATA_TAG  = 8'hCD;

endpackage
