// tb_bk_nucleus: exhaustive check of the 8-bit Brent-Kung nucleus stage in
// both skip gate forms, against integer addition: sum bits, stage carry (in
// the gate's polarity), p_all = all bits propagate (a ^ b all ones) and
// g_all = carry out of a + b with no carry in.
module tb_bk_nucleus;
  localparam int unsigned M = 8;
  logic [M-1:0] a, b, s_a, s_o;
  logic         c, co_a, co_o, p_a, p_o, g_a, g_o;
  int checks = 0, failures = 0;

  bk_nucleus #(.M(M), .OAI(1'b0)) dut_aoi (.a(a), .b(b), .co_prev(c),  .s(s_a), .co(co_a), .p_all(p_a), .g_all(g_a));
  bk_nucleus #(.M(M), .OAI(1'b1)) dut_oai (.a(a), .b(b), .co_prev(~c), .s(s_o), .co(co_o), .p_all(p_o), .g_all(g_o));

  initial begin : watchdog
    #10ms;
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
          logic exp_co, exp_p, exp_g;
          a = M'(ia); b = M'(ib); c = ic[0];
          #1;
          total  = ia + ib + ic;
          exp_s  = M'(total);
          exp_co = (total >> M) != 0;
          exp_p  = ((ia ^ ib) == (1 << M) - 1);
          exp_g  = ((ia + ib) >> M) != 0;
          checks += 8;
          if (s_a !== exp_s)   failures++;
          if (co_a !== ~exp_co) failures++;
          if (p_a !== exp_p)   failures++;
          if (g_a !== exp_g)   failures++;
          if (s_o !== exp_s)   failures++;
          if (co_o !== exp_co) failures++;
          if (p_o !== exp_p)   failures++;
          if (g_o !== exp_g)   failures++;
          if (failures != 0 && failures < 10)
            $display("FAIL a=%h b=%h c=%0d s=%h/%h co=%0d/%0d p=%0d g=%0d",
                     a, b, c, s_a, s_o, co_a, co_o, p_a, g_a);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
