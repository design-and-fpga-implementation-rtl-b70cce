// Self-checking testbench for rev_dec3to8: every input value must raise exactly the output line of
// its minterm (out[m] = 1 only for m = i) and nothing else. The garbage lines carry the
// low input bits that steer the Fredkin stages.
module tb_rev_dec3to8;
  logic [2:0] i;
  logic [7:0] out;
  logic [0:0] g;
  int checks = 0, failures = 0;

  rev_dec3to8 dut (.i(i), .out(out), .g(g));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      i = 3'(v);
      #1;
      for (int m = 0; m < 8; m++) begin
        checks++;
        if (out[m] !== (m == v)) begin
          failures++;
          $display("FAIL i=%0d out[%0d]=%b", v, m, out[m]);
        end
      end
      checks++;
      if (g !== i[0]) begin failures++; $display("FAIL garbage i=%b g=%b", i, g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
