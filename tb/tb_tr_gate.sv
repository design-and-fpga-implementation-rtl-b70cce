// Self-checking testbench for tr_gate: P = A, Q = A xor B, R = AB' xor C.
// Applies all eight input patterns, compares P, Q, R with an independent description of the
// gate, and checks that the mapping is reversible (no two inputs give the same output).
module tb_tr_gate;
  logic a, b, c, p, q, r;
  logic ep, eq, er;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  tr_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ep = a;
      eq = (a != b);
      er = (a && !b) ? !c : c;
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL abc=%b%b%b pqr=%b%b%b expected %b%b%b", a, b, c, p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
