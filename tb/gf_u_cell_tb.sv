// gf_u_cell_tb: exhaustive test of the U cell, r = sel ? p ^ q : p, over all eight input
// combinations, with the expected value taken from a truth table written out below.
module gf_u_cell_tb;

  logic p, q, sel, r;
  int checks = 0, failures = 0;

  // Expected r indexed by {p, q, sel}.
  localparam logic [7:0] EXPECT = {1'b0, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0};
  // index: 7:{1,1,1}->0  6:{1,1,0}->1  5:{1,0,1}->1  4:{1,0,0}->1
  //        3:{0,1,1}->1  2:{0,1,0}->0  1:{0,0,1}->0  0:{0,0,0}->0

  gf_u_cell dut (.p(p), .q(q), .sel(sel), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {p, q, sel} = 3'(k);
      #1;
      checks++;
      if (r !== EXPECT[k]) begin
        failures++;
        $display("FAIL p=%b q=%b sel=%b r=%b expected %b", p, q, sel, r, EXPECT[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
