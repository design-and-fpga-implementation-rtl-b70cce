// Self-checking testbench for rev_dec2to4: every input value must raise exactly the output line of
// its minterm (out[m] = 1 only for m = i) and nothing else. The garbage lines carry the
// low input bits that steer the Fredkin stages.
module tb_rev_dec2to4;
  logic [1:0] i;
  logic [3:0] out;

  int checks = 0, failures = 0;

  rev_dec2to4 dut (.i(i), .out(out));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      i = 2'(v);
      #1;
      for (int m = 0; m < 4; m++) begin
        checks++;
        if (out[m] !== (m == v)) begin
          failures++;
          $display("FAIL i=%0d out[%0d]=%b", v, m, out[m]);
        end
      end

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
