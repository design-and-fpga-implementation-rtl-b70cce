// Self-checking testbench for rev_prom. The default 3-input, 3-output PROM and a 2x3 and
// 4x5 instance (the other two decoder sizes) are each loaded with random fuse maps plus the
// all-open and all-closed maps; for every map every address is applied. Expected output k is
// 1 when the fuse of column k on the active row is enabled; the row pass-through lines must
// reproduce the decoder's one-hot output.
module tb_rev_prom;
  int checks = 0, failures = 0;

  logic [2:0]        in3;
  logic [2:0][7:0]   en3;
  logic [2:0]        out3;
  logic [7:0]        row3;
  rev_prom dut3 (.in(in3), .fuse_en(en3), .out(out3), .row_out(row3));

  logic [1:0]        in2;
  logic [2:0][3:0]   en2;
  logic [2:0]        out2;
  logic [3:0]        row2;
  rev_prom #(.N_IN(2), .N_OUT(3)) dut2 (.in(in2), .fuse_en(en2), .out(out2), .row_out(row2));

  logic [3:0]        in4;
  logic [4:0][15:0]  en4;
  logic [4:0]        out4;
  logic [15:0]       row4;
  rev_prom #(.N_IN(4), .N_OUT(5)) dut4 (.in(in4), .fuse_en(en4), .out(out4), .row_out(row4));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int k = 0; k < 3; k++) begin
        en3[k] = (t == 0) ? '0 : (t == 1) ? '1 : 8'($urandom);
        en2[k] = (t == 0) ? '0 : (t == 1) ? '1 : 4'($urandom);
      end
      for (int k = 0; k < 5; k++) en4[k] = (t == 0) ? '0 : (t == 1) ? '1 : 16'($urandom);
      for (int a = 0; a < 16; a++) begin
        in3 = 3'(a);
        in2 = 2'(a);
        in4 = 4'(a);
        #1;
        for (int k = 0; k < 5; k++) begin
          if (k < 3) begin
            checks += 2;
            if (out3[k] !== en3[k][a % 8]) begin
              failures++; $display("FAIL 8x3 map %0d addr %0d out[%0d]=%b", t, a % 8, k, out3[k]);
            end
            if (out2[k] !== en2[k][a % 4]) begin
              failures++; $display("FAIL 4x3 map %0d addr %0d out[%0d]=%b", t, a % 4, k, out2[k]);
            end
          end
          checks++;
          if (out4[k] !== en4[k][a]) begin
            failures++; $display("FAIL 16x5 map %0d addr %0d out[%0d]=%b", t, a, k, out4[k]);
          end
        end
        checks += 3;
        if (row3 !== 8'(1 << (a % 8))) begin failures++; $display("FAIL 8x3 rows %b", row3); end
        if (row2 !== 4'(1 << (a % 4))) begin failures++; $display("FAIL 4x3 rows %b", row2); end
        if (row4 !== 16'(1 << a))      begin failures++; $display("FAIL 16x5 rows %b", row4); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
