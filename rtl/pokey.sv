// pokey: sound and potentiometer chip (Atari POKEY), CPU bus at 0x1000.
//
// Sound. Four channels each divide a clock by their AUDF register and, on
// every divider pulse, update a one-bit output: toggled (pure tone) or
// loaded from a polynomial counter, as selected by AUDC bits 7..5:
//   bit 7 = 0: only update when the 5-bit polynomial's output is 1
//   bit 5 = 1: toggle;  bit 5 = 0: take the 4-bit (bit 6 = 1) or the
//              17-bit polynomial's output (bit 6 = 0)
// AUDC bits 3..0 are the volume (15 full, 8 half, 0 off) and bit 4 selects
// volume-only mode, where the volume is output directly. `audio` is the
// registered sum of the four channel levels (0..60).
// AUDCTL: bit 0 selects the 15 kHz base clock instead of 64 kHz, bits 6/5
// clock channel 1/3 at the full chip clock (divider period N+4), bits 4/3 join
// channels 1+2 / 3+4 into a 16-bit divider (period N+1, or N+7 at the full
// clock) sounding on the upper channel, bits 2/1 add high-pass flip-flops
// to channel 1/2 clocked by channel 3/4, and bit 7 shortens the 17-bit
// polynomial to 9 bits. STIMER reloads all dividers. The 4-, 5-, 17- and
// 9-bit polynomial counters step on every chip clock; RANDOM reads 8 bits of
// the long one.
// Potentiometers. A POTGO write starts a scan: the dump output is released
// and a line counter starts at 0, stepping once per 15 kHz line. When pot
// line i reads 1 the counter value is latched into POT i; when the counter
// reaches POT_MAX (228) the scan ends, lines that never rose read POT_MAX and
// the dump is applied again. ALLPOT has bit i set while POT i is not yet
// latched. `pot_in` is the digital level of each line; the charging
// capacitors and dump transistors are outside this block.
// Registers: the document gives the channels, the three polynomial lengths,
// the AUDC bit fields and the 228 counter; register numbers, AUDCTL, the
// polynomial taps and the base clock divisors (28, 114) follow the original
// chip's data sheet. SKCTL is accepted and ignored.
// Timing: all state runs on `clk`, advancing on cycles where `ce` (the chip
// clock, about 1.5 MHz) is high; register writes take effect on a cycle with
// `cs && we` (the caller qualifies them with its bus clock enable). `rdata` is
// registered: it shows the register addressed on the previous clock.
module pokey
  import centipede_pkg::*;
#(
  parameter int unsigned POT_MAX = 228,
  parameter int unsigned DIV64   = 28,
  parameter int unsigned DIV15   = 114
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       cs,
  input  logic       we,
  input  logic [3:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic [7:0] pot_in,
  output logic       pot_dump,
  output logic [5:0] audio
);
  logic [7:0] audf [4];
  logic [7:0] audc [4];
  logic [7:0] audctl;
  logic       stimer;
  logic       potgo;

  // ------------------------------------------------------------ base clocks
  logic [7:0] div64_cnt, div15_cnt;
  logic       tick64, tick15, base;

  always_ff @(posedge clk) begin
    if (rst) begin
      div64_cnt <= '0;
      div15_cnt <= '0;
    end else if (ce) begin
      div64_cnt <= (div64_cnt == 8'(DIV64 - 1)) ? '0 : div64_cnt + 1'b1;
      div15_cnt <= (div15_cnt == 8'(DIV15 - 1)) ? '0 : div15_cnt + 1'b1;
    end
  end
  assign tick64 = ce && (div64_cnt == 8'(DIV64 - 1));
  assign tick15 = ce && (div15_cnt == 8'(DIV15 - 1));
  assign base   = audctl[0] ? tick15 : tick64;

  // ------------------------------------------------------ polynomial counters
  logic [3:0]  p4;
  logic [4:0]  p5;
  logic [8:0]  p9;
  logic [16:0] p17;
  logic        noise_long;
  logic [7:0]  random;

  always_ff @(posedge clk) begin
    if (rst) begin
      p4 <= '1; p5 <= '1; p9 <= '1; p17 <= '1;
    end else if (ce) begin
      p4  <= {p4[2:0],  p4[3]  ^ p4[2]};     // x^4 + x^3 + 1
      p5  <= {p5[3:0],  p5[4]  ^ p5[2]};     // x^5 + x^3 + 1
      p9  <= {p9[7:0],  p9[8]  ^ p9[3]};     // x^9 + x^4 + 1
      p17 <= {p17[15:0], p17[16] ^ p17[11]}; // x^17 + x^12 + 1
    end
  end
  assign noise_long = audctl[7] ? p9[8] : p17[16];
  assign random     = audctl[7] ? p9[8:1] : p17[16:9];

  // ------------------------------------------------------ channel dividers
  logic [15:0] cnt [4];
  logic [3:0]  pulse;
  logic        fast [4];
  logic        join_p [2];

  assign fast[0] = audctl[6];
  assign fast[1] = 1'b0;
  assign fast[2] = audctl[5];
  assign fast[3] = 1'b0;
  assign join_p[0] = audctl[4];
  assign join_p[1] = audctl[3];

  always_comb begin
    pulse = '0;
    for (int p = 0; p < 2; p++) begin
      if (join_p[p]) begin
        if ((fast[2*p] ? ce : base) && cnt[2*p+1] == 16'd0) pulse[2*p+1] = 1'b1;
      end else begin
        for (int k = 0; k < 2; k++)
          if ((fast[2*p+k] ? ce : base) && cnt[2*p+k] == 16'd0) pulse[2*p+k] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) cnt[i] <= '0;
    end else if (stimer) begin
      for (int p = 0; p < 2; p++) begin
        if (join_p[p]) cnt[2*p+1] <= {audf[2*p+1], audf[2*p]} + (fast[2*p] ? 16'd6 : 16'd0);
        else for (int k = 0; k < 2; k++)
          cnt[2*p+k] <= 16'(audf[2*p+k]) + (fast[2*p+k] ? 16'd3 : 16'd0);
      end
    end else begin
      for (int p = 0; p < 2; p++) begin
        if (join_p[p]) begin
          if (fast[2*p] ? ce : base) begin
            if (cnt[2*p+1] == 16'd0)
              cnt[2*p+1] <= {audf[2*p+1], audf[2*p]} + (fast[2*p] ? 16'd6 : 16'd0);
            else
              cnt[2*p+1] <= cnt[2*p+1] - 1'b1;
          end
        end else begin
          for (int k = 0; k < 2; k++) begin
            if (fast[2*p+k] ? ce : base) begin
              if (cnt[2*p+k] == 16'd0)
                cnt[2*p+k] <= 16'(audf[2*p+k]) + (fast[2*p+k] ? 16'd3 : 16'd0);
              else
                cnt[2*p+k] <= cnt[2*p+k] - 1'b1;
            end
          end
        end
      end
    end
  end

  // ---------------------------------------------- distortion and volume
  logic [3:0] chout;
  logic       hp0, hp1;
  logic [3:0] level [4];
  logic [3:0] eff;

  always_ff @(posedge clk) begin
    if (rst) begin
      chout <= '0;
      hp0   <= 1'b0;
      hp1   <= 1'b0;
    end else begin
      for (int i = 0; i < 4; i++) begin
        if (pulse[i] && (audc[i][7] || p5[4])) begin
          if (audc[i][5])      chout[i] <= ~chout[i];
          else if (audc[i][6]) chout[i] <= p4[3];
          else                 chout[i] <= noise_long;
        end
      end
      if (!audctl[2])    hp0 <= 1'b0;
      else if (pulse[2]) hp0 <= chout[0];
      if (!audctl[1])    hp1 <= 1'b0;
      else if (pulse[3]) hp1 <= chout[1];
    end
  end

  assign eff = {chout[3], chout[2], chout[1] ^ hp1, chout[0] ^ hp0};

  always_comb begin
    for (int i = 0; i < 4; i++)
      level[i] = (audc[i][4] || eff[i]) ? audc[i][3:0] : 4'd0;
  end

  always_ff @(posedge clk) begin
    if (rst) audio <= '0;
    else     audio <= 6'(level[0]) + 6'(level[1]) + 6'(level[2]) + 6'(level[3]);
  end

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) begin
        audf[i] <= '0;
        audc[i] <= '0;
      end
      audctl <= '0;
      stimer <= 1'b0;
      potgo  <= 1'b0;
    end else begin
      stimer <= 1'b0;
      potgo  <= 1'b0;
      if (cs && we) begin
        case (addr)
          PK_AUDF1, PK_AUDF2, PK_AUDF3, PK_AUDF4: audf[addr[2:1]] <= wdata;
          PK_AUDC1, PK_AUDC2, PK_AUDC3, PK_AUDC4: audc[addr[2:1]] <= wdata;
          PK_AUDCTL: audctl <= wdata;
          PK_STIMER: stimer <= 1'b1;
          PK_POTGO:  potgo  <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  // -------------------------------------------------------- pot scanning
  logic       scanning;
  logic [7:0] pot_cnt;
  logic [7:0] done;
  logic [7:0] potval [8];

  always_ff @(posedge clk) begin
    if (rst) begin
      scanning <= 1'b0;
      pot_cnt  <= '0;
      done     <= '1;
      for (int i = 0; i < 8; i++) potval[i] <= '0;
    end else if (potgo) begin
      scanning <= 1'b1;
      pot_cnt  <= '0;
      done     <= '0;
    end else if (scanning && tick15) begin
      for (int i = 0; i < 8; i++) begin
        if (!done[i] && (pot_in[i] || pot_cnt == 8'(POT_MAX))) begin
          potval[i] <= pot_cnt;
          done[i]   <= 1'b1;
        end
      end
      if (pot_cnt == 8'(POT_MAX)) scanning <= 1'b0;
      else                        pot_cnt  <= pot_cnt + 1'b1;
    end
  end
  assign pot_dump = ~scanning;

  // ------------------------------------------------------------- read port
  always_ff @(posedge clk) begin
    if (addr[3] == 1'b0)        rdata <= potval[addr[2:0]];
    else if (addr == PK_ALLPOT) rdata <= ~done;
    else if (addr == PK_RANDOM) rdata <= random;
    else                        rdata <= 8'hFF;
  end
endmodule
