// Self-checking testbench for rev_bool_prom. All 16 inputs are checked against the five
// minterm lists, and the rows of the published truth table (inputs 0-5, 8 and 9) separately.
module tb_rev_bool_prom;
  logic [3:0] in;
  logic [4:0] f;
  int checks = 0, failures = 0;

  // Published truth table rows: {input, F1, F2, F3, F4, F5}.
  localparam logic [8:0] ROWS [8] = '{
    {4'd0, 5'b10100}, {4'd1, 5'b10000}, {4'd2, 5'b00100}, {4'd3, 5'b00010},
    {4'd4, 5'b00000}, {4'd5, 5'b00011}, {4'd8, 5'b00001}, {4'd9, 5'b01000}};

  rev_bool_prom dut (.in(in), .f(f));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [4:0] e;
      in = 4'(v);
      #1;
      e[0] = v inside {0, 1, 10, 11};
      e[1] = v inside {9, 11, 12, 13};
      e[2] = v inside {0, 2, 14, 15};
      e[3] = v inside {3, 5, 6, 7};
      e[4] = v inside {5, 6, 8, 10};
      checks++;
      if (f !== e) begin failures++; $display("FAIL in=%0d f=%b expected %b", v, f, e); end
    end
    foreach (ROWS[r]) begin
      in = ROWS[r][8:5];
      #1;
      checks++;
      if ({f[0], f[1], f[2], f[3], f[4]} !== ROWS[r][4:0]) begin
        failures++; $display("FAIL table row in=%0d", ROWS[r][8:5]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
