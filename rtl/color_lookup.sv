// color_lookup: the 16-entry colour palette.
//
// The CPU writes entry i at bus address 0x1400+i. Each entry is an RGB
// 3-3-2 byte (R in bits 7:5, G in 4:2, B in 1:0). The renderer's 4-bit
// colour code reads the entry and the block drives 4-bit VGA channels,
// registered on `ce` (one step of latency), widening each field by repeating
// its top bits. Black is driven while `blank` is set. The document names this
// lookup; the palette size, entry format and channel width are this design's
// choice. Entries reset to 0 (black).
module color_lookup (
  input  logic       clk,
  input  logic       rst,
  // CPU write port
  input  logic       cpu_we,
  input  logic [3:0] cpu_addr,
  input  logic [7:0] cpu_wdata,
  // video
  input  logic       ce,
  input  logic [3:0] color,
  input  logic       blank,
  output logic [3:0] vga_r,
  output logic [3:0] vga_g,
  output logic [3:0] vga_b
);
  logic [7:0] pal [16];
  logic [7:0] e;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) pal[i] <= '0;
    end else if (cpu_we) begin
      pal[cpu_addr] <= cpu_wdata;
    end
  end

  assign e = pal[color];

  always_ff @(posedge clk) begin
    if (rst) begin
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
    end else if (ce) begin
      vga_r <= blank ? 4'd0 : {e[7:5], e[7]};
      vga_g <= blank ? 4'd0 : {e[4:2], e[4]};
      vga_b <= blank ? 4'd0 : {e[1:0], e[1:0]};
    end
  end
endmodule
