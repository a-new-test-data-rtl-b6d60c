// Testbench of the decoder controller on its own. The counters and the
// mapping logic around it are modelled in the testbench, so only the
// controller's sequencing is under test. Directed codewords of every kind
// (run 0 "01", group A2, prefix1 and prefix2 groups, solution 3 runs of 0s
// and 1s) and a stream of random codewords are sent; for each the
// testbench checks the emitted bits (L zeros then a one), the exact cycle
// count 2k+L+2 (3 for "01"), the polarity strobes (load with the first
// bit in solution 3, toggle on the end bit in solution 1, none in
// solution 2) and that the controller is idle and ready afterwards.
module tb_hpc_fsm;
  import hpc_pkg::*;
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  solution_e solution = SOL_ZEROS;
  logic en = 1'b0, bit_in = 1'b0;
  logic bit_ready, grp_clr, grp_inc, grp_dec, base_load, base_dec;
  logic tail_clr, tail_shift, tail_dec, sel, pol_toggle, pol_load, fsm_bit, v;
  logic grp_one, base_one, tail_zero;
  state_e state;
  int checks = 0, failures = 0;

  // testbench models of the datapath
  int grp_m = 0;
  longint base_m = 0, tail_m = 0;

  hpc_fsm dut (.clk, .rst_n, .solution, .en, .bit_in, .bit_ready,
               .grp_clr, .grp_inc, .grp_dec, .grp_one,
               .base_load, .base_dec, .base_one,
               .tail_clr, .tail_shift, .tail_dec, .tail_zero,
               .sel, .pol_toggle, .pol_load, .fsm_bit, .v, .state);

  assign grp_one   = (grp_m == 1);
  assign base_one  = (base_m == 1);
  assign tail_zero = (tail_m == 0);

  function automatic longint map_m(int k, bit p1, bit ty);
    if (ty) return (64'd1 << k) - 3;
    if (p1) return (k == 2) ? 1 : (64'd1 << (k + 1)) - 11;
    return 3 * (64'd1 << k) - 11;
  endfunction

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (grp_clr) grp_m <= 0;
    else if (grp_inc) grp_m <= grp_m + 1;
    else if (grp_dec) grp_m <= grp_m - 1;
    if (base_load) base_m <= map_m(grp_m, sel, solution == SOL_TYPED);
    else if (base_dec) base_m <= base_m - 1;
    if (tail_clr) tail_m <= 0;
    else if (tail_shift) tail_m <= (tail_m << 1) | longint'(bit_in);
    else if (tail_dec) tail_m <= tail_m - 1;
  end

  // Send one codeword given as a bit string, expect L zeros then a 1.
  task automatic codeword(solution_e sol, string cw, longint L, int k);
    int idx = 0, cyc = 0, zeros = 0, ones = 0, loads = 0, toggles = 0;
    bit done = 0, first_load = 0;
    solution = sol;
    while (!done && cyc < 100000) begin
      en = (idx < cw.len());
      bit_in = (idx < cw.len()) ? (cw[idx] == "1") : 1'b0;
      #1;
      if (pol_load) begin loads++; first_load = bit_in; end
      if (pol_toggle) toggles++;
      if (v) begin
        if (fsm_bit) begin ones++; done = 1; end
        else zeros++;
      end
      if (en && bit_ready) idx++;
      @(posedge clk);
      #1;
      cyc++;
    end
    en = 0;
    checks++;
    if (zeros != L || ones != 1 || idx != cw.len()) begin
      failures++;
      $display("FAIL: %s sol %0d: %0d zeros %0d ones, %0d bits read", cw, sol,
               zeros, ones, idx);
    end
    checks++;
    if (cyc != ((L == 0 && sol != SOL_TYPED) ? 3 : 2 * k + L + 2)) begin
      failures++;
      $display("FAIL: %s sol %0d took %0d cycles", cw, sol, cyc);
    end
    checks++;
    if ((sol == SOL_TYPED && (loads != 1 || first_load != (cw[0] == "1"))) ||
        (sol != SOL_TYPED && loads != 0) ||
        (toggles != ((sol == SOL_ALT) ? 1 : 0))) begin
      failures++;
      $display("FAIL: %s sol %0d: %0d loads %0d toggles", cw, sol, loads, toggles);
    end
    checks++;
    if (state != S_FIRST || !bit_ready || grp_m != 0) begin
      failures++;
      $display("FAIL: %s not idle afterwards", cw);
    end
  endtask

  function automatic string bits(longint val, int n);
    string s = "";
    for (int i = n - 1; i >= 0; i--) s = {s, val[i] ? "1" : "0"};
    return s;
  endfunction

  initial begin
    string pre;
    int k;
    longint L, lo;
    bit p;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    codeword(SOL_ZEROS, "01", 0, 1);
    codeword(SOL_ZEROS, "1000", 1, 2);
    codeword(SOL_ZEROS, "1011", 4, 2);
    codeword(SOL_ZEROS, "110000", 5, 3);
    codeword(SOL_ZEROS, "110111", 12, 3);
    codeword(SOL_ZEROS, "001000", 13, 3);
    codeword(SOL_ZEROS, "001111", 20, 3);
    codeword(SOL_ZEROS, "11100000", 21, 4);
    codeword(SOL_ZEROS, "00010000", 37, 4);
    codeword(SOL_ALT, "1001", 2, 2);
    codeword(SOL_ALT, "01", 0, 1);
    codeword(SOL_ALT, "001101", 18, 3);
    codeword(SOL_TYPED, "1000", 1, 2);
    codeword(SOL_TYPED, "0111", 4, 2);
    codeword(SOL_TYPED, "110010", 7, 3);
    codeword(SOL_TYPED, "001111", 12, 3);
    codeword(SOL_TYPED, "00011111", 28, 4);
    // random codewords of groups 2..9
    for (int n = 0; n < 60; n++) begin
      k = $urandom_range(2, 9);
      p = 1'($urandom);
      if (n % 2 == 0) begin
        if (k == 2) p = 1'b1;
        lo = map_m(k, p, 1'b0);
        L = lo + $urandom_range(0, (1 << k) - 1);
        pre = "";
        repeat (k - 1) pre = {pre, p ? "1" : "0"};
        pre = {pre, p ? "0" : "1"};
        codeword((n % 4 == 0) ? SOL_ZEROS : SOL_ALT, {pre, bits(L - lo, k)}, L, k);
      end else begin
        lo = map_m(k, p, 1'b1);
        L = lo + $urandom_range(0, (1 << k) - 1);
        pre = "";
        repeat (k - 1) pre = {pre, p ? "1" : "0"};
        pre = {pre, p ? "0" : "1"};
        codeword(SOL_TYPED, {pre, bits(L - lo, k)}, L, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
