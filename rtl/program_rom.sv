// program_rom: the 8 KB game program memory.
//
// Addressed by the 6502's low thirteen address bits, one byte wide. As in the
// document it is a clocked block ROM rather than the original combinational
// part: `rdata` shows the byte at the address sampled on the previous clock.
// The contents are loaded with $readmemh from INIT_FILE; with no file given
// every byte reads 0xEA (6502 NOP), so an empty board still free-runs.
module program_rom #(
  parameter int    AW        = 13,
  parameter string INIT_FILE = ""
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 8'hEA;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) rdata <= mem[addr];
endmodule
