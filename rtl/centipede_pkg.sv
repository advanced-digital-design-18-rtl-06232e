// centipede_pkg: types and constants shared by the Centipede board RTL.
//
// Holds the CPU memory map, the chip-select bundle produced by the address
// decoder, the screen geometry of the tile/motion-object renderer and the
// POKEY register numbers. The document fixes the ROM (13 address bits), the
// work RAM (10 address bits), the POKEY (4 address bits), the trackball
// read addresses 0x0C00/0x0C02, the 32x30 tile grid and the 16 motion
// objects; the remaining addresses follow the original arcade board's map
// and are this design's choice.
package centipede_pkg;

  // ---------------------------------------------------------------- memory map
  // A15 and A14 are not decoded, so the whole 16 KB map repeats four times
  // and the 6502 reset vector at 0xFFFC lands on ROM address 0x1FFC. The
  // program ROM fills the upper 8 KB (A13 = 1, 0x2000-0x3FFF).
  localparam logic [13:0] RAM_BASE      = 14'h0000;  // 0x0000-0x03FF work RAM
  localparam logic [13:0] PF_BASE       = 14'h0400;  // 0x0400-0x07FF playfield RAM
  localparam logic [13:0] DSW_BASE      = 14'h0800;  // 0x0800/0x0801 option switches
  localparam logic [13:0] IN_BASE       = 14'h0C00;  // 0x0C00-0x0C03 player inputs
  localparam logic [13:0] POKEY_BASE    = 14'h1000;  // 0x1000-0x100F POKEY
  localparam logic [13:0] PALETTE_BASE  = 14'h1400;  // 0x1400-0x140F colour palette
  localparam logic [13:0] IRQACK_BASE   = 14'h1800;  // 0x1800 IRQ reset (write)

  // One select line per device on the CPU bus; exactly one is set.
  typedef struct packed {
    logic ram;
    logic playfield;
    logic dsw;
    logic inputs;
    logic pokey;
    logic palette;
    logic irq_ack;
    logic rom;
    logic unmapped;
  } bus_sel_t;

  // ---------------------------------------------------------- screen geometry
  localparam int TILE_COLS   = 32;   // playfield tiles per row
  localparam int TILE_ROWS   = 30;   // playfield tile rows
  localparam int TILE_PIX    = 8;    // tile is 8x8 game pixels
  localparam int NUM_MO      = 16;   // motion objects
  localparam int MO_W        = 8;    // motion object width, game pixels
  localparam int MO_H        = 16;   // motion object height, game pixels
  localparam int GAME_W      = TILE_COLS * TILE_PIX;  // 256
  localparam int GAME_H      = TILE_ROWS * TILE_PIX;  // 240
  localparam int VGA_SCALE   = 2;    // each game pixel is 2x2 VGA pixels
  localparam int VGA_XOFF    = (640 - GAME_W * VGA_SCALE) / 2;  // 64
  // Playfield RAM layout (10-bit offset inside 0x0400-0x07FF)
  localparam logic [9:0] MO_OFFSET = 10'h3C0;  // motion objects at 0x07C0
  typedef enum logic [1:0] {MO_PICTURE = 2'd0, MO_XPOS = 2'd1, MO_YPOS = 2'd2, MO_COLOR = 2'd3} mo_field_e;

  // ------------------------------------------------------------------- POKEY
  typedef enum logic [3:0] {
    PK_AUDF1 = 4'h0, PK_AUDC1 = 4'h1, PK_AUDF2 = 4'h2, PK_AUDC2 = 4'h3,
    PK_AUDF3 = 4'h4, PK_AUDC3 = 4'h5, PK_AUDF4 = 4'h6, PK_AUDC4 = 4'h7,
    PK_AUDCTL = 4'h8, PK_STIMER = 4'h9, PK_POTGO = 4'hB, PK_SKCTL = 4'hF
  } pokey_wreg_e;
  localparam logic [3:0] PK_ALLPOT = 4'h8;  // read
  localparam logic [3:0] PK_RANDOM = 4'hA;  // read

endpackage
