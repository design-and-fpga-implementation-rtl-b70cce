// Self-checking testbench for rev_mux: all four (E, X) pairs. Q must be X when E is 1 and 0
// when E is 0; the garbage line takes X in the off state and E passes through.
module tb_rev_mux;
  logic e, x, e_out, q, g1;
  int checks = 0, failures = 0;

  rev_mux dut (.e(e), .x(x), .e_out(e_out), .q(q), .g1(g1));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {e, x} = 2'(v);
      #1;
      checks++;
      if (q !== (e ? x : 1'b0) || g1 !== (e ? 1'b0 : x) || e_out !== e) begin
        failures++;
        $display("FAIL e=%b x=%b -> e_out=%b q=%b g1=%b", e, x, e_out, q, g1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
