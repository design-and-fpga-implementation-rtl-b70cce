// Self-checking testbench for not_gate: both input values.
module tb_not_gate;
  logic a, p;
  int checks = 0, failures = 0;

  not_gate dut (.a(a), .p(p));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      a = 1'(v);
      #1;
      checks++;
      if (p !== (v == 0)) begin
        failures++;
        $display("FAIL a=%b p=%b", a, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
