// pixel_lookup: picks the sprite for the current pixel and reads its colour.
//
// When the motion-object hit is set the motion object's sprite ID and pixel
// are used, otherwise the background tile's. The sprite pixel ROM holds
// 256 sprites of 8x8 pixels at 2 bits per pixel, one 16-bit word per sprite
// row ({id, row} addressed, pixel c in bits 2c+1:2c). The ROM output is
// registered; `color` (4-bit palette index) appears one `ce` step after the
// inputs: tiles use palette entries 0-3, motion objects 8-11 or 12-15 by
// their colour bit. The document's ROM was built from raw images of the game's
// sprites; those images are not part of this design, so with no INIT_FILE
// the ROM is filled by the formula pixel(id,row,col) = (id + row + col) mod 4.
module pixel_lookup #(
  parameter string INIT_FILE = ""
) (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] tile_id,
  input  logic [2:0] tile_row,
  input  logic [2:0] tile_col,
  input  logic       mo_hit,
  input  logic [7:0] mo_id,
  input  logic [2:0] mo_row,
  input  logic [2:0] mo_col,
  input  logic       mo_color_sel,
  output logic [3:0] color
);
  logic [15:0] rom [2048];
  logic [15:0] word_q;
  logic [2:0]  col_q;
  logic        hit_q, csel_q;
  logic [10:0] raddr;

  initial begin
    for (int id = 0; id < 256; id++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          rom[id*8 + r][2*c +: 2] = 2'((id + r + c) % 4);
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign raddr = mo_hit ? {mo_id, mo_row} : {tile_id, tile_row};

  always_ff @(posedge clk) begin
    if (ce) begin
      word_q <= rom[raddr];
      col_q  <= mo_hit ? mo_col : tile_col;
      hit_q  <= mo_hit;
      csel_q <= mo_color_sel;
    end
  end

  always_comb begin
    logic [1:0] pix;
    pix   = word_q[2*col_q +: 2];
    color = hit_q ? {1'b1, csel_q, pix} : {2'b00, pix};
  end
endmodule
