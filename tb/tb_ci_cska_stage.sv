// tb_ci_cska_stage: exhaustive check of one CI-CSKA stage in both skip gate
// forms. For operands a, b and incoming carry c the stage must give
// s = (a + b + c) mod 2^M and carry out = (a + b + c) >> M, in the polarity of
// its gate; skip must be 1 exactly when a + b = 2^M - 1.
module tb_ci_cska_stage;
  localparam int unsigned M = 4;
  logic [M-1:0] a, b, s_a, s_o;
  logic         c, co_a, co_o, skip_a, skip_o;
  int checks = 0, failures = 0, skips = 0;

  // AOI stage: true carry in, complemented carry out
  ci_cska_stage #(.M(M), .OAI(1'b0)) dut_aoi (.a(a), .b(b), .co_prev(c),  .s(s_a), .co(co_a), .skip(skip_a));
  // OAI stage: complemented carry in, true carry out
  ci_cska_stage #(.M(M), .OAI(1'b1)) dut_oai (.a(a), .b(b), .co_prev(~c), .s(s_o), .co(co_o), .skip(skip_o));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << M); ia++)
      for (int ib = 0; ib < (1 << M); ib++)
        for (int ic = 0; ic < 2; ic++) begin
          int total;
          logic [M-1:0] exp_s;
          logic exp_co, exp_skip;
          a = M'(ia); b = M'(ib); c = ic[0];
          #1;
          total    = ia + ib + ic;
          exp_s    = M'(total);
          exp_co   = (total >> M) != 0;
          exp_skip = (ia + ib) == (1 << M) - 1;
          if (exp_skip && ic == 1) skips++;
          checks += 6;
          if (s_a !== exp_s)      begin failures++; $display("FAIL AOI sum a=%h b=%h c=%0d", a, b, c); end
          if (co_a !== ~exp_co)   begin failures++; $display("FAIL AOI carry a=%h b=%h c=%0d", a, b, c); end
          if (skip_a !== exp_skip) begin failures++; $display("FAIL AOI skip a=%h b=%h", a, b); end
          if (s_o !== exp_s)      begin failures++; $display("FAIL OAI sum a=%h b=%h c=%0d", a, b, c); end
          if (co_o !== exp_co)    begin failures++; $display("FAIL OAI carry a=%h b=%h c=%0d", a, b, c); end
          if (skip_o !== exp_skip) begin failures++; $display("FAIL OAI skip a=%h b=%h", a, b); end
        end
    checks++;
    if (skips == 0) begin failures++; $display("FAIL no skipped carry exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
