// Self-checking testbench for rev_or2: all four inputs; Y must be A or B, and the two garbage
// lines (A, A xor B) together with Y must identify the input uniquely.
module tb_rev_or2;
  logic a, b, y, g_a, g_x;
  int checks = 0, failures = 0;

  rev_or2 dut (.a(a), .b(b), .y(y), .g_a(g_a), .g_x(g_x));

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
      if (y !== (v != 0)) begin failures++; $display("FAIL or a=%b b=%b y=%b", a, b, y); end
      checks++;
      if (g_a !== a || g_x !== (a != b)) begin
        failures++; $display("FAIL garbage a=%b b=%b g=%b%b", a, b, g_a, g_x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
