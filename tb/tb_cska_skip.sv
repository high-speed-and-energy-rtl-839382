// tb_cska_skip: truth table of the AOI and OAI skip gates. The reference is
// the carry rule co = c_blk | (p & co_prev) in true polarity; the AOI form
// must give its complement from a true co_prev, the OAI form the true value
// from a complemented co_prev.
module tb_cska_skip;
  logic c_blk, p, cprev, co_aoi, co_oai;
  int checks = 0, failures = 0;

  cska_skip #(.OAI(1'b0)) dut_aoi (.c_blk(c_blk), .p(p), .co_prev(cprev),  .co(co_aoi));
  cska_skip #(.OAI(1'b1)) dut_oai (.c_blk(c_blk), .p(p), .co_prev(~cprev), .co(co_oai));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic exp_co;
      {c_blk, p, cprev} = 3'(i);
      #1;
      // generate, or propagate with an incoming carry
      exp_co = (c_blk == 1'b1) || (p == 1'b1 && cprev == 1'b1);
      checks += 2;
      if (co_aoi !== ~exp_co) begin
        failures++;
        $display("FAIL AOI c=%0d p=%0d cin=%0d got %0d", c_blk, p, cprev, co_aoi);
      end
      if (co_oai !== exp_co) begin
        failures++;
        $display("FAIL OAI c=%0d p=%0d cin=%0d got %0d", c_blk, p, cprev, co_oai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
