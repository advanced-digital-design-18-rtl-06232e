// player_inputs: the switch and button ports the CPU reads.
//
// A read multiplexer (the original used tri-state buffers onto the data bus)
// that returns one byte for each input address. Buttons and switches are
// passed as their raw, active-low levels. Bytes, following the board's input
// schematic for 0x0C00/0x0C01:
//   0x0C00 IN0: {DIR1, VBLANK, SELF TEST, COCKTAIL, TRA[3:0]}
//   0x0C01 IN1: {COIN R, COIN C, COIN L, SLAM, FIRE2, FIRE1, START2, START1}
//   0x0C02 IN2: {DIR2, 3'b000, TRB[3:0]}
//   0x0C03    : 0xFF
//   0x0800 / 0x0801: option switch banks 1 and 2 (`sw_sel` selects them)
// The assignment of the START/FIRE bits and the IN2 and option-switch bytes
// are this design's choice. Combinational.
module player_inputs (
  input  logic       sw_sel,      // 1: option switches, 0: player inputs
  input  logic [1:0] addr,
  input  logic [3:0] tra,
  input  logic [3:0] trb,
  input  logic       dir1,
  input  logic       dir2,
  input  logic       vblank,
  input  logic       self_test_n,
  input  logic       cocktail_n,
  input  logic       coin_r_n,
  input  logic       coin_c_n,
  input  logic       coin_l_n,
  input  logic       slam_n,
  input  logic       start1_n,
  input  logic       start2_n,
  input  logic       fire1_n,
  input  logic       fire2_n,
  input  logic [7:0] dsw1,
  input  logic [7:0] dsw2,
  output logic [7:0] rdata
);
  always_comb begin
    if (sw_sel) rdata = addr[0] ? dsw2 : dsw1;
    else begin
      unique case (addr)
        2'd0: rdata = {dir1, vblank, self_test_n, cocktail_n, tra};
        2'd1: rdata = {coin_r_n, coin_c_n, coin_l_n, slam_n, fire2_n, fire1_n, start2_n, start1_n};
        2'd2: rdata = {dir2, 3'b000, trb};
        default: rdata = 8'hFF;
      endcase
    end
  end
endmodule
