// tb_centipede_top: end-to-end test of the board with every parameter at its
// default. The 6502 is replaced by a bus-cycle task: each call presents an
// address (and write data) right after one CPU clock enable and samples the
// read data just before the next, as a 6502 core with separate data buses
// would. The test walks through every mechanism of the board and counts how
// often each one happened; a mechanism that never happened is a failure:
//   ROM read and vector mirroring, RAM write/read and mirroring, palette and
//   playfield writes, playfield read-back, motion objects and tiles on the
//   VGA output, frame sync counts, player inputs and option switches,
//   trackball counting, clear-on-read and player select, POKEY tone period,
//   RANDOM, pot scan, IRQ raise and acknowledge, unmapped reads.
module tb_centipede_top;
  logic clk = 0, rst = 1;
  logic [15:0] cpu_addr = 0;
  logic [7:0] cpu_dout = 0, cpu_din;
  logic cpu_we = 0, cpu_ce, cpu_irq_n;
  logic flip = 0;
  logic [1:0] tb_horiz_clk = 0, tb_horiz_dir = 0, tb_vert_clk = 0, tb_vert_dir = 0;
  logic self_test_n = 1, cocktail_n = 1, coin_r_n = 1, coin_c_n = 1, coin_l_n = 1, slam_n = 1;
  logic start1_n = 1, start2_n = 1, fire1_n = 1, fire2_n = 1;
  logic [7:0] dsw1 = 8'h5A, dsw2 = 8'hC3, pot_in = 8'hFF;
  logic pot_dump;
  logic [5:0] audio;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hsync, vga_vsync;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef enum int {
    M_ROM, M_MIRROR, M_RAM, M_PALETTE, M_PLAYFIELD, M_MO_DRAWN, M_TILE_DRAWN, M_SYNC,
    M_INPUTS, M_DSW, M_TB_COUNT, M_TB_CLEAR, M_TB_FLIP, M_TONE, M_RANDOM, M_POTSCAN,
    M_IRQ, M_IRQ_ACK, M_UNMAPPED, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"rom read", "address mirror", "ram", "palette write", "playfield read-back",
    "motion object drawn", "tile drawn", "frame syncs", "player inputs", "option switches",
    "trackball count", "trackball clear on read", "trackball player select", "pokey tone",
    "pokey random", "pot scan", "irq raised", "irq acknowledged", "unmapped read"};

  centipede_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one CPU bus cycle; starts right after a clock-enable edge
  task automatic bus(input logic [15:0] a, input bit w, input logic [7:0] d, output logic [7:0] r);
    cpu_addr = a; cpu_we = w; cpu_dout = d;
    do @(negedge clk); while (!cpu_ce);
    r = cpu_din;
    @(posedge clk); #1;
    // between calls the bus idles on a program ROM address, as a CPU
    // fetching code would; holding an input address would count as reads
    cpu_we = 0; cpu_addr = 16'h2000;
  endtask

  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    logic [7:0] dummy;
    bus(a, 1, d, dummy);
  endtask


  task automatic rd(input logic [15:0] a, output logic [7:0] r);
    bus(a, 0, 8'h00, r);
  endtask

  // trackball quadrature: 00,10,11,01 counts up
  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
  int ph_h [2] = '{0, 0}, ph_v [2] = '{0, 0};
  task automatic roll(input bit vert, input int p, input int n);
    for (int i = 0; i < (n < 0 ? -n : n); i++) begin
      if (vert) begin
        ph_v[p] = (n > 0) ? (ph_v[p] + 1) % 4 : (ph_v[p] + 3) % 4;
        {tb_vert_clk[p], tb_vert_dir[p]} = seq[ph_v[p]];
      end else begin
        ph_h[p] = (n > 0) ? (ph_h[p] + 1) % 4 : (ph_h[p] + 3) % 4;
        {tb_horiz_clk[p], tb_horiz_dir[p]} = seq[ph_h[p]];
      end
      repeat (6) @(posedge clk);
    end
  endtask

  // frame statistics: white = motion objects, palette entries 0-3 = tiles
  int white_samples, tile_samples, hs_falls, vs_falls, irq_falls;
  logic hs_q = 1, vs_q = 1, irq_q = 1;
  bit frame_stats = 0;
  always @(posedge clk) begin
    if (frame_stats) begin
      if ({vga_r, vga_g, vga_b} == 12'hFFF) white_samples++;
      if ({vga_r, vga_g, vga_b} inside {12'h225, 12'h44A, 12'h66F, 12'h990}) tile_samples++;
      if (!vga_hsync && hs_q) hs_falls++;
      if (!vga_vsync && vs_q) vs_falls++;
    end
    if (!cpu_irq_n && irq_q) begin irq_falls++; mech[M_IRQ]++; end
    hs_q <= vga_hsync; vs_q <= vga_vsync; irq_q <= cpu_irq_n;
  end

  initial begin
    logic [7:0] r, r2;
    logic [7:0] ram_model [int];
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    do @(posedge clk); while (!cpu_ce);
    #1;

    // ---- program ROM: empty image reads NOP; reset vector mirrored from 0xFFFC
    rd(16'hFFFC, r); check(r == 8'hEA, "reset vector read"); mech[M_ROM]++;
    rd(16'h2000, r); check(r == 8'hEA, "rom read"); mech[M_ROM]++;
    // ---- work RAM and mirroring (A15/A14 ignored)
    for (int k = 0; k < 32; k++) begin
      int a;
      a = $urandom_range(0, 1023);
      ram_model[a] = 8'($urandom);
      wr(16'(a), ram_model[a]);
    end
    foreach (ram_model[a]) begin
      rd(16'(a), r); check(r == ram_model[a], "ram read"); mech[M_RAM]++;
      rd(16'(a + 16'h4000), r); check(r == ram_model[a], "ram mirror"); mech[M_MIRROR]++;
    end
    // ---- unmapped
    rd(16'h1C00, r); check(r == 8'hFF, "unmapped read"); mech[M_UNMAPPED]++;

    // ---- palette: tiles 0-3 in four greys, motion objects 8-15 white
    begin
      logic [7:0] greys [4];
      greys = '{8'b001_001_01, 8'b010_010_10, 8'b011_011_11, 8'b100_100_00};
      for (int i = 0; i < 16; i++) begin
        wr(16'h1400 + 16'(i), i < 4 ? greys[i] : (i >= 8 ? 8'hFF : 8'h00));
        mech[M_PALETTE]++;
      end
    end
    // ---- playfield: every tile, then the motion objects
    for (int a = 0; a < 960; a++) wr(16'h0400 + 16'(a), 8'(a * 7));
    for (int i = 0; i < 16; i++) begin
      wr(16'h07C0 + 16'(i), 8'(i));
      wr(16'h07D0 + 16'(i), 8'(i * 16));
      wr(16'h07E0 + 16'(i), (i < 2) ? 8'(40 + 100 * i) : 8'd240);  // two visible, rest parked
      wr(16'h07F0 + 16'(i), 8'h00);
    end
    rd(16'h0400 + 16'd123, r); check(r == 8'(123 * 7), "playfield tile read-back"); mech[M_PLAYFIELD]++;
    rd(16'h07D1, r); check(r == 8'd16, "motion object read-back"); mech[M_PLAYFIELD]++;

    // ---- one whole frame of video, from vsync to vsync
    @(negedge vga_vsync);
    white_samples = 0; tile_samples = 0; hs_falls = 0; vs_falls = 0;
    frame_stats = 1;
    @(negedge vga_vsync);
    @(posedge clk);
    frame_stats = 0;
    // two 8x16 objects, 2x2 VGA pixels each, 2 clocks per VGA pixel
    check(white_samples == 2 * (8 * 16 * 4) * 2, $sformatf("motion object pixels %0d", white_samples));
    if (white_samples > 0) mech[M_MO_DRAWN]++;
    check(tile_samples == (512 * 480 - 2 * 8 * 16 * 4) * 2, $sformatf("tile pixels %0d", tile_samples));
    if (tile_samples > 0) mech[M_TILE_DRAWN]++;
    check(hs_falls == 525 && vs_falls == 1, $sformatf("syncs %0d %0d", hs_falls, vs_falls));
    mech[M_SYNC]++;
    check(irq_falls >= 3, $sformatf("irqs in a frame %0d", irq_falls));

    // ---- IRQ acknowledge
    while (cpu_irq_n) @(posedge clk);
    #1;
    wr(16'h1800, 8'h00);
    check(cpu_irq_n == 1, "irq cleared by acknowledge"); mech[M_IRQ_ACK]++;
    // re-align with the bus clock
    do @(posedge clk); while (!cpu_ce);
    #1;

    // ---- player inputs and option switches
    start1_n = 0; fire2_n = 0; coin_l_n = 0;
    repeat (3) @(posedge clk);
    rd(16'h0C01, r); check(r == 8'b1101_0110, $sformatf("IN1 %b", r)); mech[M_INPUTS]++;
    self_test_n = 0;
    rd(16'h0800, r); check(r == dsw1, "DSW1"); mech[M_DSW]++;
    rd(16'h0801, r); check(r == dsw2, "DSW2"); mech[M_DSW]++;

    // ---- trackball: player 1 horizontal 12 edges up -> 3 counts on 0x0C00
    roll(0, 0, 12);
    roll(0, 1, 40);   // player 2 ball is not selected
    rd(16'h0C00, r);
    check(r[3:0] == 4'd3 && r[7] == 0 && r[5] == 0, $sformatf("IN0 %b", r)); mech[M_TB_COUNT]++;
    rd(16'h0C00, r); check(r[3:0] == 4'd0, "count cleared by read"); mech[M_TB_CLEAR]++;
    // player 2 vertical, 8 edges down -> -2 on 0x0C02, DIR2 set
    flip = 1;
    repeat (6) @(posedge clk);
    rd(16'h0C02, r);     // clear whatever the switch-over left
    roll(1, 1, -8);
    roll(1, 0, 20);      // player 1 ball is not selected now
    rd(16'h0C02, r); check(r == 8'h8E, $sformatf("IN2 %h", r)); mech[M_TB_FLIP]++; mech[M_TB_COUNT]++;
    rd(16'h0C02, r); check(r[3:0] == 4'd0, "count B cleared by read"); mech[M_TB_CLEAR]++;

    // ---- POKEY: channel 1 pure tone, AUDF1 = 4, full volume
    wr(16'h1000, 8'd4);
    wr(16'h1001, 8'hAF);
    begin
      logic [5:0] a0;
      longint t0;
      repeat (4) @(posedge clk);   // let the AUDC write settle
      a0 = audio; while (audio == a0) @(posedge clk);
      a0 = audio; t0 = cyc; while (audio == a0) @(posedge clk);
      check(cyc - t0 == 5 * 28 * 33, $sformatf("tone half period %0d clocks", cyc - t0));
      mech[M_TONE]++;
    end
    do @(posedge clk); while (!cpu_ce);
    #1;
    rd(16'h100A, r); rd(16'h100A, r2);
    check(r != r2, "RANDOM changes"); mech[M_RANDOM]++;
    // ---- pot scan: all lines already high, so all latch 0 on the first line
    wr(16'h100B, 8'h00);
    repeat (3) @(posedge clk);
    check(pot_dump == 0, "dump released during scan");
    while (!pot_dump) @(posedge clk);
    do @(posedge clk); while (!cpu_ce);
    #1;
    rd(16'h1008, r); check(r == 8'h00, "ALLPOT after scan");
    rd(16'h1003, r); check(r == 8'h00, "POT3");
    mech[M_POTSCAN]++;

    for (int i = 0; i < M_NUM; i++) begin
      $display("%-26s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, {"mechanism never happened: ", mech_name[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
