// trackball_input: player select and the two axis counters of the trackball.
//
// Two trackballs (player 1 and 2, for the cocktail cabinet) each give a
// clocking and a direction line per axis. A 2:1 multiplexer chooses player 1
// when `flip` is low and player 2 when it is high, and feeds two
// trackball_counter instances. Following the schematic's wiring, counter A
// takes the horizontal lines and counter B the vertical ones; the CPU reads
// A at 0x0C00 and B at 0x0C02 (`clr_a`/`clr_b` clear them on those reads).
// Outputs are the two 4-bit deltas (TRA, TRB) and the two direction bits
// (DIR1, DIR2).
module trackball_input #(
  parameter int unsigned EDGES_PER_COUNT = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       flip,
  input  logic [1:0] horiz_clk,   // index 0 = player 1, 1 = player 2
  input  logic [1:0] horiz_dir,
  input  logic [1:0] vert_clk,
  input  logic [1:0] vert_dir,
  input  logic       clr_a,
  input  logic       clr_b,
  output logic [3:0] tra,
  output logic [3:0] trb,
  output logic       dir1,
  output logic       dir2
);
  trackball_counter #(.EDGES_PER_COUNT(EDGES_PER_COUNT)) u_a (
    .clk, .rst, .tb_clk(horiz_clk[flip]), .tb_dir(horiz_dir[flip]),
    .clr(clr_a), .count(tra), .dir(dir1)
  );

  trackball_counter #(.EDGES_PER_COUNT(EDGES_PER_COUNT)) u_b (
    .clk, .rst, .tb_clk(vert_clk[flip]), .tb_dir(vert_dir[flip]),
    .clr(clr_b), .count(trb), .dir(dir2)
  );
endmodule
