// Self-checking testbench for rev_full_addsub. Every input word {A, B, C} is checked against
// arithmetic (A + B + C gives {carry, sum}; A - B - C gives {borrow, difference}) and against
// the published truth table of the full adder/subtracter.
module tb_rev_full_addsub;
  logic [2:0] in;
  logic sumdiff, carry, borrow;
  int checks = 0, failures = 0;

  // Published truth table rows in[2:0] -> {sum/diff, carry, borrow}.
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b101, 3'b101, 3'b011,
                                       3'b100, 3'b010, 3'b010, 3'b111};

  rev_full_addsub dut (.in(in), .sumdiff(sumdiff), .carry(carry), .borrow(borrow));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int a, b, c, s, d;
      in = 3'(v);
      a = (v >> 2) & 1;
      b = (v >> 1) & 1;
      c = v & 1;
      s = a + b + c;
      d = a - b - c;
      #1;
      checks++;
      if ({carry, sumdiff} !== 2'(s)) begin
        failures++; $display("FAIL add %0d+%0d+%0d: carry=%b sum=%b", a, b, c, carry, sumdiff);
      end
      checks++;
      if (sumdiff !== d[0] || borrow !== (d < 0)) begin
        failures++; $display("FAIL sub %0d-%0d-%0d: borrow=%b diff=%b", a, b, c, borrow, sumdiff);
      end
      checks++;
      if ({sumdiff, carry, borrow} !== TABLE[v]) begin
        failures++; $display("FAIL table row %0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
