// work_ram: the CPU's 1 KB scratch RAM.
//
// Ten address bits, eight data bits, an enable and a read/write line, as in
// the document. Unlike the original asynchronous part it is synchronous: a
// write happens on the clock edge where `en` and `we` are high; a read
// (`en` high, `we` low) shows the addressed byte on `rdata` after that edge.
// `rdata` holds its value while `en` is low.
module work_ram #(
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
