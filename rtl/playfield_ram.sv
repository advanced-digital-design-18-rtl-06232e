// playfield_ram: the video memory shared by the CPU and the renderer.
//
// 1 KB at CPU offset 0x000-0x3FF (bus addresses 0x0400-0x07FF). Offsets
// 0x000-0x3BF hold the 32x30 background tiles, one sprite ID per byte in
// row-major order. Offsets 0x3C0-0x3FF hold the 16 motion objects as four
// 16-byte tables: picture (0x3C0), X (0x3D0), Y (0x3E0) and colour (0x3F0).
// The document says the RAM holds both kinds of data but not their layout;
// this layout follows the original board.
// Ports: the CPU port writes on a clock with `cpu_we` and returns the byte of
// the previous clock's address on `cpu_rdata`. The video port returns the
// tile byte one `vid_ce` step after `vid_addr`. The motion-object tables are
// kept in flip-flops so the renderer can compare all 16 objects at once.
module playfield_ram
  import centipede_pkg::*;
(
  input  logic       clk,
  // CPU port
  input  logic       cpu_en,
  input  logic       cpu_we,
  input  logic [9:0] cpu_addr,
  input  logic [7:0] cpu_wdata,
  output logic [7:0] cpu_rdata,
  // video tile port
  input  logic       vid_ce,
  input  logic [9:0] vid_addr,
  output logic [7:0] vid_tile,
  // motion-object tables
  output logic [7:0] mo_pic   [NUM_MO],
  output logic [7:0] mo_x     [NUM_MO],
  output logic [7:0] mo_y     [NUM_MO],
  output logic [7:0] mo_color [NUM_MO]
);
  logic [7:0] tiles [1024];  // 960 used; the top 64 bytes sit under the motion objects
  logic       is_mo;
  logic [3:0] mo_idx;
  logic [7:0] tile_q;
  logic       is_mo_q;
  logic [1:0] fld_q;
  logic [3:0] idx_q;

  assign is_mo  = (cpu_addr >= MO_OFFSET);
  assign mo_idx = cpu_addr[3:0];

  always_ff @(posedge clk) begin
    if (cpu_en && cpu_we) begin
      if (!is_mo) tiles[cpu_addr] <= cpu_wdata;
      else begin
        unique case (mo_field_e'(cpu_addr[5:4]))
          MO_PICTURE: mo_pic[mo_idx]   <= cpu_wdata;
          MO_XPOS:    mo_x[mo_idx]     <= cpu_wdata;
          MO_YPOS:    mo_y[mo_idx]     <= cpu_wdata;
          MO_COLOR:   mo_color[mo_idx] <= cpu_wdata;
        endcase
      end
    end
    if (cpu_en && !is_mo) tile_q <= tiles[cpu_addr];
    if (cpu_en) begin
      is_mo_q <= is_mo;
      fld_q   <= cpu_addr[5:4];
      idx_q   <= mo_idx;
    end
    if (vid_ce) vid_tile <= tiles[vid_addr];
  end

  always_comb begin
    if (!is_mo_q) cpu_rdata = tile_q;
    else begin
      unique case (mo_field_e'(fld_q))
        MO_PICTURE: cpu_rdata = mo_pic[idx_q];
        MO_XPOS:    cpu_rdata = mo_x[idx_q];
        MO_YPOS:    cpu_rdata = mo_y[idx_q];
        default:    cpu_rdata = mo_color[idx_q];
      endcase
    end
  end
endmodule
