// Self-checking testbench for rev_fuse: all four (A, E) pairs. The row signal must always pass
// on (P = A); the column output must be A for an enabled fuse and 0 for an open one; the two
// garbage lines must carry E and A & ~E.
module tb_rev_fuse;
  logic a, e, p, q, e_out, g1;
  int checks = 0, failures = 0;

  rev_fuse dut (.a(a), .e(e), .p(p), .q(q), .e_out(e_out), .g1(g1));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, e} = 2'(v);
      #1;
      checks++;
      if (p !== a) begin failures++; $display("FAIL row pass a=%b e=%b p=%b", a, e, p); end
      checks++;
      if (q !== (e == 1'b1 && a == 1'b1)) begin
        failures++; $display("FAIL column a=%b e=%b q=%b", a, e, q);
      end
      checks++;
      if (e_out !== e || g1 !== (a == 1'b1 && e == 1'b0)) begin
        failures++; $display("FAIL garbage a=%b e=%b e_out=%b g1=%b", a, e, e_out, g1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
