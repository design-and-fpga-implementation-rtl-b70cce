// End-to-end testbench for rev_prom_top at its default configuration. All 2 x 8 x 16 input
// combinations of the three PROM circuits are applied together (so each circuit is also seen
// working while the others change). Sums, differences, carries and borrows are compared with
// integer arithmetic and the five functions with their minterm lists. It counts how often each
// mechanism occurs - a carry and a borrow in each adder/subtracter, each function asserted,
// and an active decoder row blocked by an open fuse - and counts a failure for any that never
// happens.
module tb_rev_prom_top;
  logic [1:0] ha_in;
  logic       ha_sumdiff, ha_carry, ha_borrow;
  logic [2:0] fa_in;
  logic       fa_sumdiff, fa_carry, fa_borrow;
  logic [3:0] bf_in;
  logic [4:0] bf_f;
  int checks = 0, failures = 0;
  int n_ha_carry = 0, n_ha_borrow = 0, n_fa_carry = 0, n_fa_borrow = 0, n_open = 0;
  int n_f [5] = '{default: 0};

  rev_prom_top dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 4; h++)
      for (int x = 0; x < 8; x++)
        for (int b = 0; b < 16; b++) begin
          int a1, b1, a2, b2, c2;
          logic [4:0] e;
          ha_in = 2'(h);
          fa_in = 3'(x);
          bf_in = 4'(b);
          #1;
          a1 = h >> 1; b1 = h & 1;
          a2 = x >> 2; b2 = (x >> 1) & 1; c2 = x & 1;
          checks++;
          if ({ha_carry, ha_sumdiff} !== 2'(a1 + b1) || ha_borrow !== (a1 < b1)) begin
            failures++; $display("FAIL half in=%0d", h);
          end
          checks++;
          if ({fa_carry, fa_sumdiff} !== 2'(a2 + b2 + c2) || fa_borrow !== (a2 < b2 + c2)) begin
            failures++; $display("FAIL full in=%0d", x);
          end
          e[0] = b inside {0, 1, 10, 11};
          e[1] = b inside {9, 11, 12, 13};
          e[2] = b inside {0, 2, 14, 15};
          e[3] = b inside {3, 5, 6, 7};
          e[4] = b inside {5, 6, 8, 10};
          checks++;
          if (bf_f !== e) begin failures++; $display("FAIL bool in=%0d f=%b", b, bf_f); end
          n_ha_carry  += int'(ha_carry);
          n_ha_borrow += int'(ha_borrow);
          n_fa_carry  += int'(fa_carry);
          n_fa_borrow += int'(fa_borrow);
          for (int k = 0; k < 5; k++) begin
            n_f[k] += int'(bf_f[k]);
            n_open += int'(!bf_f[k]);
          end
        end
    $display("half: carry %0d borrow %0d; full: carry %0d borrow %0d; open-fuse rows %0d",
             n_ha_carry, n_ha_borrow, n_fa_carry, n_fa_borrow, n_open);
    $display("functions asserted: F1 %0d F2 %0d F3 %0d F4 %0d F5 %0d",
             n_f[0], n_f[1], n_f[2], n_f[3], n_f[4]);
    checks++;
    if (n_ha_carry == 0 || n_ha_borrow == 0 || n_fa_carry == 0 || n_fa_borrow == 0
        || n_open == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_f[k] == 0) begin failures++; $display("FAIL F%0d never asserted", k + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
