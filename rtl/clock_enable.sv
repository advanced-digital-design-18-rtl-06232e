// clock_enable: divides the 50 MHz system clock into a one-cycle enable pulse.
//
// The 6502 and the POKEY run at about 1.5 MHz (the document gives 1.512 MHz
// for the CPU). Instead of a second clock this design keeps every register on
// the system clock and qualifies the slow logic with `ce`, which is high for
// one clock every DIV clocks; DIV = 33 gives 1.515 MHz from 50 MHz. The
// divisor is this design's choice.
// Timing: after reset the first pulse comes DIV clocks later, then every DIV.
module clock_enable #(
  parameter int unsigned DIV = 33
) (
  input  logic clk,
  input  logic rst,
  output logic ce
);
  localparam int W = (DIV > 1) ? $clog2(DIV) : 1;
  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      ce  <= 1'b0;
    end else if (cnt == W'(DIV - 1)) begin
      cnt <= '0;
      ce  <= 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
      ce  <= 1'b0;
    end
  end
endmodule
