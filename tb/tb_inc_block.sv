// tb_inc_block: exhaustive check of the half adder chain, true and
// complemented carry input forms, against (z + carry) mod 2^M.
module tb_inc_block;
  localparam int unsigned M = 5;
  logic [M-1:0] z, s_t, s_n;
  logic         c;
  int checks = 0, failures = 0;

  inc_block #(.M(M), .CIN_INV(1'b0)) dut_t (.z(z), .cin(c),  .s(s_t));
  inc_block #(.M(M), .CIN_INV(1'b1)) dut_n (.z(z), .cin(~c), .s(s_n));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int iz = 0; iz < (1 << M); iz++)
      for (int ic = 0; ic < 2; ic++) begin
        logic [M-1:0] exp_s;
        z = M'(iz); c = ic[0];
        #1;
        exp_s = M'(iz + ic);
        checks += 2;
        if (s_t !== exp_s) begin
          failures++;
          $display("FAIL true form z=%h c=%0d got %h exp %h", z, c, s_t, exp_s);
        end
        if (s_n !== exp_s) begin
          failures++;
          $display("FAIL inverted form z=%h c=%0d got %h exp %h", z, c, s_n, exp_s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
