// ccl_pkg: types and constants shared by the connected-component labelling
// hardware. Pixels and labels are one byte each (the labeller's RAM port is a
// byte wide), the bus is 32 bits, the row store holds three rows of at most
// 512 pixels in a 2048-byte RAM. The register map and the status word are
// this design's own choices.
package ccl_pkg;

  localparam int unsigned PIXEL_W    = 8;
  localparam int unsigned LABEL_W    = 8;
  localparam int unsigned BUS_W      = 32;
  localparam int unsigned RAM_BYTES  = 2048;
  localparam int unsigned ROWS       = 3;
  localparam int unsigned SLOT_BYTES = 512;
  localparam int unsigned SLOT_WORDS = SLOT_BYTES / (BUS_W / 8);
  localparam int unsigned X_W        = $clog2(SLOT_BYTES);    // column index width
  localparam int unsigned SLOT_W     = $clog2(ROWS);          // slot index width
  localparam int unsigned BYTE_AW    = $clog2(RAM_BYTES);     // RAM byte address
  localparam int unsigned WORD_AW    = $clog2(RAM_BYTES / (BUS_W / 8));
  localparam int unsigned BUS_AW     = WORD_AW;               // Avalon word address
  localparam int unsigned NLABELS    = 1 << LABEL_W;

  typedef logic [PIXEL_W-1:0] pixel_t;
  typedef logic [LABEL_W-1:0] label_t;
  typedef logic [X_W-1:0]     col_t;
  typedef logic [SLOT_W-1:0]  slot_t;

  localparam pixel_t THRESH_DEFAULT = pixel_t'(128);

  // Register offsets (word address with the top address bit set).
  typedef enum logic [2:0] {
    REG_CTRL    = 3'd0,  // W: bit0 start pass 1, bit1 start pass 2. R: bit0 pass2 mode
    REG_WIDTH   = 3'd1,  // RW: row width in pixels
    REG_THRESH  = 3'd2,  // RW: foreground threshold
    REG_COMMIT  = 3'd3,  // W: the row in the window is complete
    REG_RELEASE = 3'd4,  // W: the labelled row in the window has been read
    REG_STATUS  = 3'd5,  // R: status_t
    REG_LABELS  = 3'd6   // R: number of pass-1 labels handed out
  } reg_e;

  typedef struct packed {
    logic overflow;   // more components than labels
    logic busy;       // labeller working on a row or resolving the table
    logic ready;      // a labelled row can be read from the window
    logic space;      // a new row can be written into the window
  } status_t;

  // Control registers held by the bus slave.
  typedef struct packed {
    logic   pass2;
    col_t   width_m1;   // row width - 1
    pixel_t thresh;
  } csr_t;

  // One-clock command pulses from the bus slave.
  typedef struct packed {
    logic start1;
    logic start2;
    logic commit;
    logic release_row;
  } cmd_t;

endpackage
