// motion_object: finds the motion object, if any, under the current pixel.
//
// Combinational. Each of the 16 objects is an 8-wide, 16-tall sprite whose
// top-left corner is at game pixel (X, Y). The pixel (gx, gy) hits object i
// when gx-X is 0..7 and gy-Y is 0..15 (8-bit wrap-around arithmetic). The
// lowest-numbered hit object wins. For the winner the block outputs its
// sprite ID and the pixel inside it: a tall object is two stacked 8x8 sprites,
// {picture[6:0], row[3]}, with `obj_row`/`obj_col` the pixel in that half.
// The document gives the 16 objects and the hit / sprite ID / pixel outputs;
// the object size, priority and sprite numbering are this design's choice.
module motion_object
  import centipede_pkg::*;
(
  input  logic [7:0] game_x,
  input  logic [7:0] game_y,
  input  logic [7:0] mo_pic   [NUM_MO],
  input  logic [7:0] mo_x     [NUM_MO],
  input  logic [7:0] mo_y     [NUM_MO],
  input  logic [7:0] mo_color [NUM_MO],
  output logic       hit,
  output logic [7:0] sprite_id,
  output logic [2:0] obj_row,
  output logic [2:0] obj_col,
  output logic       color_sel
);
  logic [7:0] dx, dy;

  always_comb begin
    hit       = 1'b0;
    sprite_id = '0;
    obj_row   = '0;
    obj_col   = '0;
    color_sel = 1'b0;
    for (int i = NUM_MO - 1; i >= 0; i--) begin
      dx = game_x - mo_x[i];
      dy = game_y - mo_y[i];
      if (dx < 8'(MO_W) && dy < 8'(MO_H)) begin
        hit       = 1'b1;
        sprite_id = {mo_pic[i][6:0], dy[3]};
        obj_row   = dy[2:0];
        obj_col   = dx[2:0];
        color_sel = mo_color[i][0];
      end
    end
  end
endmodule
