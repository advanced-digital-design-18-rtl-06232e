// compute_tile: finds the background tile under the current VGA pixel.
//
// Combinational. The 256x240 game picture is shown at 2x2 VGA pixels per game
// pixel, centred horizontally (VGA columns 64..575, all 480 rows). The game
// pixel (gx, gy) gives the tile column gx/8, tile row gy/8, the playfield
// address row*32+col (0..959) and the pixel inside the tile (gy%8, gx%8).
// `active` is low outside the game picture. The scaling and centring are this
// design's choice; the 32x30 grid is the document's.
module compute_tile
  import centipede_pkg::*;
(
  input  logic [9:0] vga_row,
  input  logic [9:0] vga_col,
  output logic       active,
  output logic [7:0] game_x,
  output logic [7:0] game_y,
  output logic [9:0] tile_addr,
  output logic [2:0] tile_row,
  output logic [2:0] tile_col
);
  logic [9:0] xrel;

  always_comb begin
    xrel      = vga_col - 10'(VGA_XOFF);
    active    = (vga_col >= 10'(VGA_XOFF)) && (vga_col < 10'(VGA_XOFF + GAME_W * VGA_SCALE))
              && (vga_row < 10'(GAME_H * VGA_SCALE));
    game_x    = xrel[8:1];
    game_y    = vga_row[8:1];
    tile_addr = {game_y[7:3], game_x[7:3]};
    tile_row  = game_y[2:0];
    tile_col  = game_x[2:0];
  end
endmodule
