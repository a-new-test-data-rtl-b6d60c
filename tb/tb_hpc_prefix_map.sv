// Testbench of the prefix mapping logic. Groups 3..7 are checked against
// the start values listed for the hybrid code (prefix1: 5, 21, 53, 117,
// 245; prefix2: 13, 37, 85, 181, 373); every group up to K_MAX is checked
// against first-run values obtained by counting the members of all smaller
// groups, which is independent of the closed-form formulas; group A2 must
// map to 1. Solution 3 groups are checked the same way (group sizes 2^k,
// first group A2 starting at run length 1).
module tb_hpc_prefix_map;
  localparam int unsigned K_MAX = 17;
  localparam int unsigned KW = $clog2(K_MAX + 1);
  localparam int unsigned BW = K_MAX + 2;

  logic [KW-1:0] k = '0;
  logic prefix1 = 1'b0, typed = 1'b0;
  logic [BW-1:0] base;
  int checks = 0, failures = 0;

  hpc_prefix_map #(.K_MAX(K_MAX)) dut (.k, .prefix1, .typed, .base);

  task automatic check(int kk, bit p1, bit ty, longint want);
    k = KW'(kk); prefix1 = p1; typed = ty;
    #1;
    checks++;
    if (base !== BW'(want)) begin
      failures++;
      $display("FAIL: k=%0d prefix1=%0b typed=%0b base=%0d want %0d", kk, p1, ty,
               base, want);
    end
  endtask

  initial begin
    longint next;
    int p1_tab[3:7] = '{5, 21, 53, 117, 245};
    int p2_tab[3:7] = '{13, 37, 85, 181, 373};
    for (int kk = 3; kk <= 7; kk++) begin
      check(kk, 1'b1, 1'b0, p1_tab[kk]);
      check(kk, 1'b0, 1'b0, p2_tab[kk]);
    end
    // solutions 1/2: A1 holds run 0, A2 holds 1..4, group k>=3 two halves of 2^k
    check(2, 1'b1, 1'b0, 1);
    next = 5;
    for (int kk = 3; kk <= K_MAX; kk++) begin
      check(kk, 1'b1, 1'b0, next);
      next += (64'd1 << kk);
      check(kk, 1'b0, 1'b0, next);
      next += (64'd1 << kk);
    end
    // solution 3: group k>=2 holds 2^k run lengths, starting at 1
    next = 1;
    for (int kk = 2; kk <= K_MAX; kk++) begin
      check(kk, 1'b1, 1'b1, next);
      check(kk, 1'b0, 1'b1, next);
      next += (64'd1 << kk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
