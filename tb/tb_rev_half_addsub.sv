// Self-checking testbench for rev_half_addsub. Every input pair is checked twice: against
// arithmetic (A + B gives {carry, sum}; A - B gives {borrow, difference} in two's complement)
// and against the published truth table of the half adder/subtracter.
module tb_rev_half_addsub;
  logic [1:0] in;
  logic sumdiff, carry, borrow;
  int checks = 0, failures = 0;

  // Published truth table rows {in[1], in[0]} -> {sum/diff, carry, borrow}.
  localparam logic [2:0] TABLE [4] = '{3'b000, 3'b101, 3'b100, 3'b010};

  rev_half_addsub dut (.in(in), .sumdiff(sumdiff), .carry(carry), .borrow(borrow));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int a, b, s, d;
      in = 2'(v);
      a = v / 2;
      b = v % 2;
      s = a + b;
      d = a - b;
      #1;
      checks++;
      if ({carry, sumdiff} !== 2'(s)) begin
        failures++; $display("FAIL add %0d+%0d: carry=%b sum=%b", a, b, carry, sumdiff);
      end
      checks++;
      if (sumdiff !== d[0] || borrow !== (d < 0)) begin
        failures++; $display("FAIL sub %0d-%0d: borrow=%b diff=%b", a, b, borrow, sumdiff);
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
