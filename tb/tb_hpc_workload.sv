// Workload testbench: decompresses test sets of the sizes of the six
// benchmark circuits used to evaluate the code (T_D = 23754 ... 199104
// bits) with each of the three solutions, at the decoder's default
// parameters. The benchmark test sets themselves are not reproduced:
// each test set here is synthetic, a bit stream in which care bits equal to
// 1 are rare (probability 1/12) and all remaining bits are 0, as after
// filling don't-care bits with 0. Runs of up to a few thousand bits are
// planted as well. The testbench's own encoder splits the stream into runs
// for each solution, counts the compressed size T_E and sends the codewords
// without stalls; the decoded stream must equal the test set bit for bit
// (a final end bit beyond T_D is ignored). Printed per case: T_E, the
// compression ratio (T_D - T_E) / T_D in percent, and the cycle count.
module tb_hpc_workload;
  import hpc_pkg::*;
  localparam int WATCHDOG = 8_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  solution_e solution = SOL_ZEROS;
  logic en = 1'b0, bit_in = 1'b0;
  logic bit_ready, scan_out, v;
  int checks = 0, failures = 0;
  int cycle = 0;

  bit data[$];   // the test set T_D
  bit in_q[$];   // its encoding T_E
  int out_idx;

  hpc_decoder dut (.clk, .rst_n, .solution, .en, .bit_in, .bit_ready, .scan_out, .v);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && v) begin
    if (out_idx < data.size()) begin
      checks++;
      if (scan_out !== data[out_idx]) begin
        failures++;
        if (failures < 10) $display("FAIL: bit %0d got %0b", out_idx, scan_out);
      end
    end
    out_idx++;
  end

  // codeword for run length L with k-bit tail and prefix of k-1 copies of p
  function automatic void put(int k, bit p, int tail);
    repeat (k - 1) in_q.push_back(p);
    in_q.push_back(~p);
    for (int i = k - 1; i >= 0; i--) in_q.push_back(1'((tail >> i) & 1));
  endfunction

  function automatic void enc_hybrid(int L);
    int k = 3, lo;
    if (L == 0) begin in_q.push_back(1'b0); in_q.push_back(1'b1); return; end
    if (L <= 4) begin put(2, 1'b1, L - 1); return; end
    forever begin
      lo = (1 << (k + 1)) - 11;
      if (L < lo + (1 << k)) begin put(k, 1'b1, L - lo); return; end
      lo += (1 << k);
      if (L < lo + (1 << k)) begin put(k, 1'b0, L - lo); return; end
      k++;
    end
  endfunction

  function automatic void enc_typed(int L, bit b);
    int k = 2;
    while (L > (1 << (k + 1)) - 4) k++;
    put(k, b, L - ((1 << k) - 3));
  endfunction

  // split the data into runs for the given solution and encode them
  function automatic void encode(solution_e sol);
    int i = 0, L;
    bit a = 1'b0;
    in_q.delete();
    while (i < data.size()) begin
      if (sol == SOL_TYPED) a = data[i];
      L = 0;
      while (i < data.size() && data[i] == a) begin L++; i++; end
      i++;                               // the end bit (or past the end)
      if (sol == SOL_TYPED) enc_typed(L, a);
      else enc_hybrid(L);
      if (sol == SOL_ALT) a = ~a;
    end
  endfunction

  function automatic void make_data(int td);
    data.delete();
    while (data.size() < td) begin
      if ($urandom_range(0, 499) == 0)
        repeat ($urandom_range(100, 3000)) if (data.size() < td) data.push_back(1'b0);
      data.push_back($urandom_range(0, 11) == 0);
    end
    while (data.size() > td) void'(data.pop_back());
  endfunction

  task automatic run_case(int td, solution_e sol);
    int c0, c1, te;
    encode(sol);
    te = in_q.size();
    rst_n <= 1'b0;
    solution <= sol;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    out_idx = 0;
    c0 = cycle;
    while (in_q.size() != 0) begin
      en <= 1'b1;
      bit_in <= in_q[0];
      @(posedge clk);
      if (bit_ready) void'(in_q.pop_front());
    end
    en <= 1'b0;
    c1 = 0;
    while (out_idx < td && c1 < 20000) begin @(posedge clk); c1++; end
    repeat (4) @(posedge clk);
    checks++;
    if (out_idx < td || out_idx > td + 1) begin
      failures++;
      $display("FAIL: T_D %0d solution %0d decoded %0d bits", td, sol, out_idx);
    end
    $display("T_D %6d solution %0d: T_E %6d  CR %0.2f%%  %0d cycles", td, sol, te,
             100.0 * real'(td - te) / real'(td), cycle - c0);
  endtask

  initial begin
    int sizes[6] = '{23754, 39273, 165200, 76986, 164736, 199104};
    foreach (sizes[n]) begin
      make_data(sizes[n]);
      run_case(sizes[n], SOL_ALT);
      run_case(sizes[n], SOL_ZEROS);
      run_case(sizes[n], SOL_TYPED);
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
