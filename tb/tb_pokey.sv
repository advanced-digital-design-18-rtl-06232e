// tb_pokey: checks the POKEY's audio dividers, volume and noise, RANDOM and
// the potentiometer scan. The chip clock enable is held high, so one clock is
// one chip clock. Expected tone half-periods: (N+1)*28 clocks with the 64 kHz
// base, (N+1)*114 with the 15 kHz base, N+4 with channel 1 on the full clock,
// (256*AUDF2+AUDF1+1)*28 with channels 1+2 joined. RANDOM is compared with a
// reference 17-bit x^17+x^12+1 shift register run alongside.
module tb_pokey;
  logic clk = 0, rst = 1, ce = 1, cs = 0, we = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0, rdata, pot_in = 0;
  logic pot_dump;
  logic [5:0] audio;
  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [16:0] ref17;

  pokey dut (.clk, .rst, .ce, .cs, .we, .addr, .wdata, .rdata, .pot_in, .pot_dump, .audio);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) ref17 <= '1;
    else     ref17 <= {ref17[15:0], ref17[16] ^ ref17[11]};
  end

  task automatic wr(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk) begin cs = 1; we = 1; addr = a; wdata = d; end
    @(negedge clk) begin cs = 0; we = 0; end
  endtask

  task automatic silence();
    for (int i = 0; i < 4; i++) wr(4'(2 * i + 1), 8'h00);
    wr(4'h8, 8'h00);
  endtask

  // skips the change the register writes may cause, then checks the time
  // between the next two changes of `audio`
  task automatic half_period(input string what, input longint exp);
    logic [5:0] a0;
    longint t0;
    repeat (4) @(posedge clk);
    a0 = audio; @(posedge clk); while (audio == a0) @(posedge clk);
    a0 = audio; t0 = cyc; @(posedge clk); while (audio == a0) @(posedge clk);
    checks++;
    if (cyc - t0 != exp) begin failures++; $display("%s: half period %0d exp %0d", what, cyc - t0, exp); end
  endtask

  initial begin
    int pot_line [8];
    repeat (4) @(posedge clk);
    #1 rst = 0;

    // pure tone, 64 kHz base, full volume
    wr(4'h0, 8'd9); wr(4'h1, 8'hAF);
    half_period("64k tone", 10 * 28);
    checks++; if (audio != 0 && audio != 15) failures++;
    // 15 kHz base
    wr(4'h8, 8'h01);
    half_period("15k tone", 10 * 114);
    // channel 1 on the full chip clock
    wr(4'h8, 8'h40); wr(4'h0, 8'd20);
    half_period("fast tone", 24);
    // channels 1+2 joined: 16-bit divider sounding on channel 2
    wr(4'h8, 8'h10); wr(4'h0, 8'h05); wr(4'h2, 8'h01); wr(4'h1, 8'h00); wr(4'h3, 8'hA8);
    half_period("joined tone", (256 + 5 + 1) * 28);
    checks++; if (audio != 0 && audio != 8) failures++;
    // volume-only mode on channel 4 adds a constant level
    silence();
    wr(4'h7, 8'h1A);
    repeat (3) @(posedge clk);
    checks++; if (audio != 10) begin failures++; $display("volume only: %0d", audio); end
    // channel 3 pure tone (half volume) on top of the constant
    wr(4'h4, 8'd3); wr(4'h5, 8'hA8);
    half_period("ch3 tone", 4 * 28);
    checks++; if (audio != 10 && audio != 18) begin failures++; $display("sum %0d", audio); end
    // noise: 17-bit polynomial through the 5-bit one; both levels must occur
    silence();
    wr(4'h0, 8'd0); wr(4'h1, 8'h0F);
    begin
      int seen0, seen15;
      seen0 = 0; seen15 = 0;
      repeat (20000) begin @(posedge clk); if (audio == 0) seen0++; if (audio == 15) seen15++; end
      checks++; if (seen0 == 0 || seen15 == 0) failures++;
    end
    // RANDOM follows the 17-bit polynomial
    for (int k = 0; k < 20; k++) begin
      logic [16:0] exp;
      @(negedge clk) addr = 4'hA;
      @(posedge clk); exp = ref17;   // state sampled by this edge
      #1 checks++;
      if (rdata !== exp[16:9]) begin failures++; $display("RANDOM %h exp %h", rdata, exp[16:9]); end
      repeat ($urandom_range(1, 50)) @(posedge clk);
    end
    // pot scan: lines rise after a given number of 15 kHz lines
    pot_line = '{10, 50, 100, 227, 0, 3, 200, 1000};
    checks++; if (!pot_dump) failures++;
    wr(4'hB, 8'h00);
    @(negedge clk);
    begin
      longint t0;
      t0 = cyc;
      checks++; if (pot_dump) failures++;
      while (!pot_dump && cyc - t0 < 40000) begin
        @(negedge clk);
        for (int i = 0; i < 8; i++) pot_in[i] = (cyc - t0) >= longint'(pot_line[i]) * 114;
        if (cyc - t0 == 114 * 60) begin
          addr = 4'h8;
          @(posedge clk); #1 checks++;
          if (rdata !== 8'b1100_1100) begin failures++; $display("ALLPOT %b", rdata); end
        end
      end
      checks++;
      if (pot_dump == 0 || cyc - t0 < 228 * 114 || cyc - t0 > 230 * 114) begin
        failures++; $display("scan took %0d", cyc - t0);
      end
    end
    for (int i = 0; i < 8; i++) begin
      int exp;
      exp = pot_line[i] > 228 ? 228 : pot_line[i];
      @(negedge clk) addr = 4'(i);
      @(posedge clk); #1 checks++;
      if (int'(rdata) < exp - 1 || int'(rdata) > exp + 1 || (pot_line[i] > 228 && rdata != 228)) begin
        failures++; $display("POT%0d = %0d exp %0d", i, rdata, exp);
      end
    end
    @(negedge clk) addr = 4'h8;
    @(posedge clk); #1 checks++;
    if (rdata !== 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
