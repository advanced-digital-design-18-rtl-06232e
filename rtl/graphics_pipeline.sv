// graphics_pipeline: renders the playfield and motion objects to VGA.
//
// The picture is produced in raster order, one pixel per 25 MHz pixel
// enable, by a chain of lookups (no frame buffer):
//   vga_timing -> compute_tile -> playfield_ram (tile sprite ID)
//                              -> motion_object (hit, sprite ID, pixel)
//              -> pixel_lookup (sprite ROM) -> color_lookup (palette) -> RGB
// Stage 1 registers the tile byte and the motion-object result, stage 2 the
// sprite ROM word, stage 3 the RGB value, so the syncs are delayed by three
// pixel enables to stay aligned with the colour. This chain is the
// document's; the stage split is this design's choice.
// CPU side: the playfield port (bus 0x0400-0x07FF) and the palette write port
// (bus 0x1400-0x140F). `vga_row` and `vblank` are brought out for the IRQ
// timer and the VBLANK input bit.
module graphics_pipeline
  import centipede_pkg::*;
#(
  parameter string SPRITE_FILE = ""
) (
  input  logic       clk,
  input  logic       rst,
  // CPU playfield port
  input  logic       pf_en,
  input  logic       pf_we,
  input  logic [9:0] pf_addr,
  input  logic [7:0] pf_wdata,
  output logic [7:0] pf_rdata,
  // CPU palette port
  input  logic       pal_we,
  input  logic [3:0] pal_addr,
  input  logic [7:0] pal_wdata,
  // display
  output logic [3:0] vga_r,
  output logic [3:0] vga_g,
  output logic [3:0] vga_b,
  output logic       hsync,
  output logic       vsync,
  output logic [9:0] vga_row,
  output logic       vblank
);
  logic       pix_ce, hs0, vs0, blank0;
  logic [9:0] col;
  logic       active;
  logic [7:0] gx, gy;
  logic [9:0] tile_addr;
  logic [2:0] trow, tcol;
  logic [7:0] tile_id;
  logic [7:0] mo_pic [NUM_MO], mo_x [NUM_MO], mo_y [NUM_MO], mo_color [NUM_MO];
  logic       mo_hit, mo_csel;
  logic [7:0] mo_id;
  logic [2:0] mo_row, mo_col;
  // stage 1 registers
  logic       hit1, csel1;
  logic [7:0] moid1;
  logic [2:0] morow1, mocol1, trow1, tcol1;
  logic [3:0] color2;
  logic [2:0] hs_d, vs_d;
  logic [1:0] act_d;

  vga_timing u_timing (
    .clk, .rst, .pix_ce, .row(vga_row), .col, .hsync(hs0), .vsync(vs0), .blank(blank0)
  );

  compute_tile u_tile (
    .vga_row, .vga_col(col), .active, .game_x(gx), .game_y(gy),
    .tile_addr, .tile_row(trow), .tile_col(tcol)
  );

  playfield_ram u_pf (
    .clk, .cpu_en(pf_en), .cpu_we(pf_we), .cpu_addr(pf_addr), .cpu_wdata(pf_wdata),
    .cpu_rdata(pf_rdata), .vid_ce(pix_ce), .vid_addr(tile_addr), .vid_tile(tile_id),
    .mo_pic, .mo_x, .mo_y, .mo_color
  );

  motion_object u_mo (
    .game_x(gx), .game_y(gy), .mo_pic, .mo_x, .mo_y, .mo_color,
    .hit(mo_hit), .sprite_id(mo_id), .obj_row(mo_row), .obj_col(mo_col), .color_sel(mo_csel)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      hit1 <= 1'b0; csel1 <= 1'b0; moid1 <= '0; morow1 <= '0; mocol1 <= '0;
      trow1 <= '0; tcol1 <= '0; hs_d <= '1; vs_d <= '1; act_d <= '0;
    end else if (pix_ce) begin
      hit1   <= mo_hit & active;
      csel1  <= mo_csel;
      moid1  <= mo_id;
      morow1 <= mo_row;
      mocol1 <= mo_col;
      trow1  <= trow;
      tcol1  <= tcol;
      hs_d   <= {hs_d[1:0], hs0};
      vs_d   <= {vs_d[1:0], vs0};
      act_d  <= {act_d[0], active & ~blank0};
    end
  end

  pixel_lookup #(.INIT_FILE(SPRITE_FILE)) u_pix (
    .clk, .ce(pix_ce), .tile_id, .tile_row(trow1), .tile_col(tcol1),
    .mo_hit(hit1), .mo_id(moid1), .mo_row(morow1), .mo_col(mocol1), .mo_color_sel(csel1),
    .color(color2)
  );

  color_lookup u_pal (
    .clk, .rst, .cpu_we(pal_we), .cpu_addr(pal_addr), .cpu_wdata(pal_wdata),
    .ce(pix_ce), .color(color2), .blank(~act_d[1]), .vga_r, .vga_g, .vga_b
  );

  assign hsync  = hs_d[2];
  assign vsync  = vs_d[2];
  assign vblank = (vga_row >= 10'd480);
endmodule
