// Self-checking testbench for feynman_gate: all four inputs, P = A, Q inverted B when A is 1,
// and the gate undoes itself (applying it twice restores A, B).
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a ? !b : b)) begin
        failures++;
        $display("FAIL ab=%b%b pq=%b%b", a, b, p, q);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL not self-inverse for ab=%b%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
