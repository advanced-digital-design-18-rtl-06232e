// irq_timer: the CPU's periodic interrupt, four times per frame.
//
// Built like the board's IRQ flip-flop: on each rising edge of the 16V line
// counter bit the flip-flop loads the 32V bit, and its output drives IRQ
// (active low). A write to the IRQ-reset address clears it. With the game
// line number V = vga_row/2 the IRQ is raised at V = 48, 112, 176 and 240
// and drops by itself at the next 16V edge if the CPU does not clear it
// first. The 32V/16V/IRQRES wiring is the schematic's; deriving V from the
// VGA row is this design's choice.
module irq_timer (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] vga_row,
  input  logic       irq_res,
  output logic       irq_n
);
  logic v16_q, q;
  logic [8:0] v;

  assign v = vga_row[9:1];

  always_ff @(posedge clk) begin
    if (rst) begin
      v16_q <= 1'b0;
      q     <= 1'b0;
    end else begin
      v16_q <= v[4];
      if (irq_res)              q <= 1'b0;
      else if (v[4] && !v16_q)  q <= v[5];
    end
  end

  assign irq_n = ~q;
endmodule
