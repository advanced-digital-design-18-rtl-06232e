// centipede_top: the Centipede arcade board around an external 6502.
//
// The CPU core itself is not part of this RTL: its bus enters on the cpu_*
// ports (separate read and write data buses, as in common 6502 cores). The
// board decodes the CPU address into chip selects and connects:
//   work RAM 1 KB, playfield RAM + motion objects, option switches, player
//   inputs and trackball counters, POKEY, colour palette, IRQ reset, 8 KB
//   program ROM  (map in centipede_pkg / address_decoder)
// and runs the tile/motion-object renderer to VGA, the POKEY to a 6-bit
// digital audio level and the IRQ timer off the video line count.
// The original board put every device on a tri-state data bus; here reads go
// through a multiplexer instead.
// Timing: one clock `clk` (50 MHz). `cpu_ce` pulses once every CPU_DIV clocks
// (1.515 MHz); the CPU should advance only on those clocks. A bus cycle runs
// from one `cpu_ce` to the next: the CPU holds cpu_addr/cpu_dout/cpu_we for
// the cycle, a write takes effect on the clock with `cpu_ce` that ends it,
// and read data appears on `cpu_din` one clock after the address and holds
// until the address changes, so it is valid when the cycle ends. Reading a
// trackball count (0x0C00 / 0x0C02) clears it at the end of the read cycle.
module centipede_top
  import centipede_pkg::*;
#(
  parameter int unsigned CPU_DIV         = 33,
  parameter int unsigned EDGES_PER_COUNT = 4,
  parameter string       ROM_FILE        = "",
  parameter string       SPRITE_FILE     = ""
) (
  input  logic        clk,
  input  logic        rst,
  // 6502 bus
  input  logic [15:0] cpu_addr,
  input  logic [7:0]  cpu_dout,
  input  logic        cpu_we,
  output logic [7:0]  cpu_din,
  output logic        cpu_ce,
  output logic        cpu_irq_n,
  // trackballs (index 0 = player 1) and player select
  input  logic        flip,
  input  logic [1:0]  tb_horiz_clk,
  input  logic [1:0]  tb_horiz_dir,
  input  logic [1:0]  tb_vert_clk,
  input  logic [1:0]  tb_vert_dir,
  // buttons and switches, active low as on the connector
  input  logic        self_test_n,
  input  logic        cocktail_n,
  input  logic        coin_r_n,
  input  logic        coin_c_n,
  input  logic        coin_l_n,
  input  logic        slam_n,
  input  logic        start1_n,
  input  logic        start2_n,
  input  logic        fire1_n,
  input  logic        fire2_n,
  input  logic [7:0]  dsw1,
  input  logic [7:0]  dsw2,
  // POKEY potentiometer lines and audio
  input  logic [7:0]  pot_in,
  output logic        pot_dump,
  output logic [5:0]  audio,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hsync,
  output logic        vga_vsync
);
  bus_sel_t   sel, sel_q;
  logic       wr, rd_end;
  logic [7:0] ram_rdata, pf_rdata, rom_rdata, pokey_rdata, in_rdata, in_q;
  logic [3:0] tra, trb;
  logic       dir1, dir2, vblank;
  logic [9:0] vga_row;

  clock_enable #(.DIV(CPU_DIV)) u_ce (.clk, .rst, .ce(cpu_ce));

  address_decoder u_dec (.addr(cpu_addr), .sel);

  assign wr     = cpu_ce && cpu_we;
  assign rd_end = cpu_ce && !cpu_we;

  work_ram u_ram (
    .clk, .en(sel.ram), .we(wr), .addr(cpu_addr[9:0]), .wdata(cpu_dout), .rdata(ram_rdata)
  );

  program_rom #(.INIT_FILE(ROM_FILE)) u_rom (
    .clk, .addr(cpu_addr[12:0]), .rdata(rom_rdata)
  );

  graphics_pipeline #(.SPRITE_FILE(SPRITE_FILE)) u_gfx (
    .clk, .rst,
    .pf_en(sel.playfield), .pf_we(wr), .pf_addr(cpu_addr[9:0]), .pf_wdata(cpu_dout),
    .pf_rdata,
    .pal_we(wr && sel.palette), .pal_addr(cpu_addr[3:0]), .pal_wdata(cpu_dout),
    .vga_r, .vga_g, .vga_b, .hsync(vga_hsync), .vsync(vga_vsync), .vga_row, .vblank
  );

  pokey u_pokey (
    .clk, .rst, .ce(cpu_ce), .cs(sel.pokey), .we(wr), .addr(cpu_addr[3:0]),
    .wdata(cpu_dout), .rdata(pokey_rdata), .pot_in, .pot_dump, .audio
  );

  trackball_input #(.EDGES_PER_COUNT(EDGES_PER_COUNT)) u_tb (
    .clk, .rst, .flip,
    .horiz_clk(tb_horiz_clk), .horiz_dir(tb_horiz_dir),
    .vert_clk(tb_vert_clk), .vert_dir(tb_vert_dir),
    .clr_a(rd_end && sel.inputs && cpu_addr[1:0] == 2'd0),
    .clr_b(rd_end && sel.inputs && cpu_addr[1:0] == 2'd2),
    .tra, .trb, .dir1, .dir2
  );

  player_inputs u_in (
    .sw_sel(sel.dsw), .addr(cpu_addr[1:0]), .tra, .trb, .dir1, .dir2, .vblank,
    .self_test_n, .cocktail_n, .coin_r_n, .coin_c_n, .coin_l_n, .slam_n,
    .start1_n, .start2_n, .fire1_n, .fire2_n, .dsw1, .dsw2, .rdata(in_rdata)
  );

  irq_timer u_irq (
    .clk, .rst, .vga_row, .irq_res(wr && sel.irq_ack), .irq_n(cpu_irq_n)
  );

  // registered select and input byte, aligned with the synchronous memories
  always_ff @(posedge clk) begin
    if (rst) begin
      sel_q <= '0;
      in_q  <= '0;
    end else begin
      sel_q <= sel;
      in_q  <= in_rdata;
    end
  end

  // read multiplexer replacing the original tri-state data bus
  always_comb begin
    if (sel_q.ram)                      cpu_din = ram_rdata;
    else if (sel_q.playfield)           cpu_din = pf_rdata;
    else if (sel_q.dsw || sel_q.inputs) cpu_din = in_q;
    else if (sel_q.pokey)               cpu_din = pokey_rdata;
    else if (sel_q.rom)                 cpu_din = rom_rdata;
    else                                cpu_din = 8'hFF;  // palette, IRQ reset: write only
  end

  // the decoder must select exactly one device
  assert property (@(posedge clk) disable iff (rst) $onehot(sel));
endmodule
