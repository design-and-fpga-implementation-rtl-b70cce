// Self-checking testbench for rev_or at its default width (8): all 256 input words; Y must be
// 1 exactly when some input is 1.
module tb_rev_or;
  localparam int N = 8;
  logic [N-1:0]   x;
  logic           y;
  logic [2*N-3:0] g;
  int checks = 0, failures = 0;

  rev_or dut (.x(x), .y(y), .g(g));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**N; v++) begin
      logic expected;
      x = N'(v);
      #1;
      expected = 1'b0;
      for (int i = 0; i < N; i++) if (x[i]) expected = 1'b1;
      checks++;
      if (y !== expected) begin failures++; $display("FAIL x=%b y=%b", x, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
