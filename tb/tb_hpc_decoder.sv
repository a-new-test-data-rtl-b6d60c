// End-to-end testbench of the hybrid-prefix-code decompressor.
//
// The testbench holds its own run-length encoder, written from the code
// tables (group ranges 2^(k+1)-11 / 3*2^k-11 for solutions 1/2, 2^k-3 for
// solution 3), and its own model of the decoded bit stream. For each of the
// three solutions it resets the decoder, encodes a list of random runs,
// feeds the compressed bits with random tester stalls, and compares every
// valid output bit. A second pass per solution feeds the bits with no
// stalls and checks the total cycle count against 2k+L+2 per codeword
// ("01": 3). The decoder runs at its default parameters, including a run of
// the largest length group K_MAX, so this is also the full-size test.
// Mechanisms counted (each must occur): codewords of A1, A2, prefix1 and
// prefix2 groups, zero tails, the largest group, runs of 1s in solutions 1
// and 3, tester stalls, and a switch between all three solutions.
module tb_hpc_decoder;
  import hpc_pkg::*;

  localparam int unsigned K_MAX    = K_MAX_DEFAULT;
  localparam int          WATCHDOG = 6_000_000;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  solution_e solution = SOL_ZEROS;
  logic      en = 1'b0;
  logic      bit_in = 1'b0;
  logic      bit_ready, scan_out, v;

  int checks = 0, failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_a1 = 0, n_a2 = 0, n_p1 = 0, n_p2 = 0, n_tail0 = 0, n_kmax = 0;
  int n_ones_alt = 0, n_ones_typed = 0, n_stall = 0, n_switch = 0;
  int n_sol[4] = '{0, 0, 0, 0};

  bit in_q[$];     // compressed bits still to be sent
  bit exp_q[$];    // expected decoded bits
  longint exp_cycles;
  bit alpha_m;     // model of the solution 1 run type

  hpc_decoder dut (
    .clk, .rst_n, .solution, .en, .bit_in, .bit_ready, .scan_out, .v
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // output monitor
  always @(posedge clk) begin
    if (rst_n && v) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output bit at cycle %0d", cycle);
      end else begin
        if (scan_out !== exp_q[0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: cycle %0d got %0b expected %0b (%0d left)",
                     cycle, scan_out, exp_q[0], exp_q.size());
        end
        void'(exp_q.pop_front());
      end
    end
    if (rst_n && bit_ready && v) begin
      failures++;
      $display("FAIL: read and write in the same cycle");
    end
  end

  // push a codeword: prefix of k-1 copies of p ended by ~p, then k-bit tail
  function automatic void push_code(int k, bit p, longint tail, bit skip_prefix);
    if (!skip_prefix) begin
      repeat (k - 1) in_q.push_back(p);
      in_q.push_back(~p);
    end
    for (int i = k - 1; i >= 0; i--) in_q.push_back(tail[i]);
  endfunction

  // Encode one run and record the expected output bits and cycles.
  // b is the run bit for solution 3 (ignored otherwise).
  function automatic void add_run(solution_e sol, longint L, bit b);
    int k; bit p; longint tail, lo1, lo2, hi2;
    bit rb;
    if (sol == SOL_TYPED) begin
      k = 2;
      while (L > (64'd1 << (k + 1)) - 4) k++;
      push_code(k, b, L - ((64'd1 << k) - 3), 1'b0);
      rb = b;
      if (b) n_ones_typed++;
      exp_cycles += 2 * k + L + 2;
    end else if (L == 0) begin
      in_q.push_back(1'b0); in_q.push_back(1'b1);
      n_a1++;
      k = 1;
      exp_cycles += 3;
    end else begin
      if (L <= 4) begin
        k = 2; p = 1'b1; tail = L - 1; n_a2++;
      end else begin
        k = 3;
        forever begin
          lo1 = (64'd1 << (k + 1)) - 11;
          lo2 = 3 * (64'd1 << k) - 11;
          hi2 = (64'd1 << (k + 2)) - 12;
          if (L < lo2) begin p = 1'b1; tail = L - lo1; n_p1++; break; end
          if (L <= hi2) begin p = 1'b0; tail = L - lo2; n_p2++; break; end
          k++;
        end
      end
      push_code(k, p, tail, 1'b0);
      if (tail == 0) n_tail0++;
      exp_cycles += 2 * k + L + 2;
    end
    if (sol == SOL_TYPED && L == (64'd1 << k) - 3) n_tail0++;
    if (k == K_MAX) n_kmax++;
    if (sol == SOL_ALT) begin
      rb = alpha_m;
      if (alpha_m) n_ones_alt++;
      alpha_m = ~alpha_m;
    end else if (sol != SOL_TYPED) begin
      rb = 1'b0;
    end
    for (longint i = 0; i < L; i++) exp_q.push_back(rb);
    exp_q.push_back(~rb);
  endfunction

  function automatic longint rand_len(solution_e sol);
    int r = $urandom_range(0, 99);
    longint L;
    if (r < 25)      L = 0;
    else if (r < 50) L = $urandom_range(1, 4);
    else if (r < 80) L = $urandom_range(5, 60);
    else if (r < 97) L = $urandom_range(61, 600);
    else             L = $urandom_range(601, 5000);
    if (sol == SOL_TYPED && L == 0) L = 1;
    return L;
  endfunction

  task automatic start(solution_e sol);
    en <= 1'b0;
    rst_n <= 1'b0;
    repeat (2) @(posedge clk);
    if (sol != solution) n_switch++;
    solution <= sol;
    n_sol[sol]++;
    rst_n <= 1'b1;
    alpha_m = 1'b0;
    exp_cycles = 0;
    @(posedge clk);
  endtask

  // send all queued bits; stall_pct is the chance of a tester stall
  task automatic drive(int stall_pct, output int used);
    int c0, last_v, guard;
    c0 = cycle;
    last_v = cycle;
    guard = 0;
    while ((in_q.size() != 0 || exp_q.size() != 0) && guard < WATCHDOG) begin
      en     <= (in_q.size() != 0) && ($urandom_range(0, 99) >= stall_pct);
      bit_in <= (in_q.size() != 0) ? in_q[0] : 1'($urandom);
      @(posedge clk);
      if (v) last_v = cycle;
      if (bit_ready && !en && in_q.size() != 0) n_stall++;
      if (en && bit_ready) void'(in_q.pop_front());
      guard++;
    end
    en <= 1'b0;
    used = last_v - c0;
    @(posedge clk);
  endtask

  task automatic run_phase(solution_e sol, int nruns, longint big);
    int used;
    bit b;
    // stalled stream
    start(sol);
    for (int i = 0; i < nruns; i++) add_run(sol, rand_len(sol), 1'($urandom));
    if (big > 0) add_run(sol, big, 1'b1);
    drive(30, used);
    checks++;
    if (in_q.size() != 0 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL: solution %0d stalled stream left %0d/%0d bits", sol,
               in_q.size(), exp_q.size());
    end
    in_q.delete(); exp_q.delete();
    // unstalled stream with cycle count check
    start(sol);
    for (int i = 0; i < nruns / 2; i++) add_run(sol, rand_len(sol), 1'($urandom));
    drive(0, used);
    checks++;
    if (used != exp_cycles) begin
      failures++;
      $display("FAIL: solution %0d took %0d cycles, expected %0d", sol, used,
               exp_cycles);
    end
    in_q.delete(); exp_q.delete();
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    // largest runs: last member of group K_MAX of each code
    run_phase(SOL_ZEROS, 300, (64'd1 << (K_MAX + 2)) - 12);
    run_phase(SOL_ALT,   300, 3 * (64'd1 << K_MAX) - 11);
    run_phase(SOL_TYPED, 300, (64'd1 << (K_MAX + 1)) - 4);
    run_phase(SOL_ZEROS, 100, 0);
    need("A1 codeword (run 0)", n_a1);
    need("A2 codeword", n_a2);
    need("prefix1 group >= 3", n_p1);
    need("prefix2 group >= 3", n_p2);
    need("zero tail", n_tail0);
    need("largest group K_MAX", n_kmax);
    need("run of 1s, solution 1", n_ones_alt);
    need("run of 1s, solution 3", n_ones_typed);
    need("tester stall", n_stall);
    need("solution switch", n_switch);
    need("solution 1 stream", n_sol[SOL_ALT]);
    need("solution 2 stream", n_sol[SOL_ZEROS]);
    need("solution 3 stream", n_sol[SOL_TYPED]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
