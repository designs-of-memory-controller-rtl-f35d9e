// Shared types and the pixel-to-SDRAM address mapping of the frame memory
// controller.
//
// The frame store is an SDRAM with 4 banks, 4096 rows and 512 columns of
// 32 bits (four 8-bit pixels per word). One SDRAM row holds a 64x32 pixel
// window of the image, and the four banks are laid out so that horizontally
// and vertically adjacent windows always sit in different banks. A pixel at
// (x, y) with 11-bit coordinates maps as follows:
//   byte index  = x[1:0]                 (pixel inside the 32-bit word)
//   column      = {x[5:2], y[4:0]}       (16 words across, 32 lines down)
//   bank        = {y[5], x[6]}           (checkerboard of the four banks)
//   row         = {frame, y[10:6], x[10:7]}
// This covers frames up to 2048x2048 and eight frame slots. Each mapping
// function takes full coordinates and uses only the bits it needs, so lint
// reports the remaining coordinate bits as unused.
//
// The 64x32 window and checkerboard banks follow the source design; the
// struct types and bit positions are this design's choices.
package mc_pkg;

  localparam int unsigned COORD_W = 11;   // pixel coordinate width
  localparam int unsigned BANK_W  = 2;    // 4 banks
  localparam int unsigned ROW_W   = 12;   // 4096 rows
  localparam int unsigned COL_W   = 9;    // 512 columns
  localparam int unsigned FRAME_W = 3;    // frame slots in the row address
  localparam int unsigned DATA_W  = 32;   // SDRAM word: 4 pixels
  localparam int unsigned LEN_W   = 6;    // request width/height, 1..63 pixels

  // Operation issued by the control FSM in one cycle.
  typedef enum logic [2:0] {
    OP_NOP    = 3'd0,
    OP_ACT    = 3'd1,
    OP_READ   = 3'd2,
    OP_WRITE  = 3'd3,
    OP_PREALL = 3'd4
  } sdram_op_e;

  typedef struct packed {
    sdram_op_e          op;
    logic [BANK_W-1:0]  bank;
    logic [ROW_W-1:0]   row;
    logic [COL_W-1:0]   col;
  } sdram_cmd_t;

  // SDRAM command pins (active low controls) and multiplexed address bus.
  typedef struct packed {
    logic               cs_n;
    logic               ras_n;
    logic               cas_n;
    logic               we_n;
    logic [BANK_W-1:0]  ba;
    logic [ROW_W-1:0]   a;
  } sdram_pins_t;

  // A rectangular pixel request.
  typedef struct packed {
    logic [FRAME_W-1:0] frame;
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [LEN_W-1:0]   w;
    logic [LEN_W-1:0]   h;
  } mc_req_t;

  typedef struct packed {
    logic [BANK_W-1:0]  bank;
    logic [ROW_W-1:0]   row;
    logic [COL_W-1:0]   col;
  } sdram_addr_t;

  function automatic logic [BANK_W-1:0] map_bank(logic [COORD_W-1:0] x,
                                                 logic [COORD_W-1:0] y);
    return {y[5], x[6]};
  endfunction

  function automatic logic [ROW_W-1:0] map_row(logic [FRAME_W-1:0] f,
                                               logic [COORD_W-1:0] x,
                                               logic [COORD_W-1:0] y);
    return {f, y[10:6], x[10:7]};
  endfunction

  function automatic logic [COL_W-1:0] map_col(logic [COORD_W-1:0] x,
                                               logic [COORD_W-1:0] y);
    return {x[5:2], y[4:0]};
  endfunction

endpackage
