// tb_player_inputs: drives random levels on every input and checks each of
// the readable bytes against its bit layout.
module tb_player_inputs;
  logic sw_sel;
  logic [1:0] addr;
  logic [3:0] tra, trb;
  logic dir1, dir2, vblank, self_test_n, cocktail_n, coin_r_n, coin_c_n, coin_l_n, slam_n;
  logic start1_n, start2_n, fire1_n, fire2_n;
  logic [7:0] dsw1, dsw2, rdata;
  int checks = 0, failures = 0;

  player_inputs dut (.*);

  task automatic expect_byte(input logic s, input logic [1:0] a, input logic [7:0] e);
    sw_sel = s; addr = a;
    #1 checks++;
    if (rdata !== e) begin failures++; $display("sel %0d addr %0d: %h exp %h", s, a, rdata, e); end
  endtask

  initial begin
    for (int k = 0; k < 500; k++) begin
      {tra, trb, dir1, dir2, vblank, self_test_n, cocktail_n} = 13'($urandom);
      {coin_r_n, coin_c_n, coin_l_n, slam_n, start1_n, start2_n, fire1_n, fire2_n} = 8'($urandom);
      dsw1 = 8'($urandom); dsw2 = 8'($urandom);
      expect_byte(0, 0, {dir1, vblank, self_test_n, cocktail_n, tra[3], tra[2], tra[1], tra[0]});
      expect_byte(0, 1, {coin_r_n, coin_c_n, coin_l_n, slam_n, fire2_n, fire1_n, start2_n, start1_n});
      expect_byte(0, 2, {dir2, 1'b0, 1'b0, 1'b0, trb});
      expect_byte(0, 3, 8'hFF);
      expect_byte(1, 0, dsw1);
      expect_byte(1, 1, dsw2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
