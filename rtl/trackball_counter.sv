// trackball_counter: counts one trackball axis as a 4-bit up/down delta.
//
// Each roller gives a clocking line and a direction line a quarter period
// apart. Both are synchronised to the system clock and every edge of either
// line is decoded as a quadrature step: the sequence (clk,dir) = 00, 10, 11,
// 01, 00 counts up (direction lags clocking by 90 degrees, as in the
// document's timing figure), the reverse counts down; a jump of two states
// is a glitch and is ignored. The document's trackball resolves four times
// finer than the original, so EDGES_PER_COUNT edges make one count of the
// 4-bit output `count` (the original counted whole cycles). `dir` holds the
// direction of the last step (1 = down), like the original direction
// flip-flop. A pulse on `clr` (the CPU reading the count) restarts the
// delta from zero; a step in the same clock is kept.
module trackball_counter #(
  parameter int unsigned EDGES_PER_COUNT = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tb_clk,
  input  logic       tb_dir,
  input  logic       clr,
  output logic [3:0] count,
  output logic       dir
);
  localparam int SH = $clog2(EDGES_PER_COUNT);
  localparam int W  = 4 + SH;

  logic [1:0] sync_c, sync_d;
  logic [1:0] prev, cur;
  logic [W-1:0] acc;
  logic up, down;

  // position of a (clk,dir) state in the counting-up cycle
  function automatic logic [1:0] phase(input logic [1:0] s);
    unique case (s)
      2'b00: return 2'd0;
      2'b10: return 2'd1;
      2'b11: return 2'd2;
      default: return 2'd3;  // 2'b01
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_c <= '0; sync_d <= '0; prev <= '0;
    end else begin
      sync_c <= {sync_c[0], tb_clk};
      sync_d <= {sync_d[0], tb_dir};
      prev   <= cur;
    end
  end
  assign cur = {sync_c[1], sync_d[1]};

  always_comb begin
    logic [1:0] d;
    d    = phase(cur) - phase(prev);
    up   = (d == 2'd1);
    down = (d == 2'd3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      dir <= 1'b0;
    end else begin
      if (clr) acc <= up ? W'(1) : down ? '1 : '0;
      else if (up)   acc <= acc + 1'b1;
      else if (down) acc <= acc - 1'b1;
      if (up)   dir <= 1'b0;
      if (down) dir <= 1'b1;
    end
  end

  assign count = acc[W-1 -: 4];
endmodule
