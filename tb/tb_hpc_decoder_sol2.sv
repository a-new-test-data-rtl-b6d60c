// Testbench of the reduced decoder variant: polarity unit removed
// (HAS_ALT = 0, solution 2 only) and a small group range (K_MAX = 6,
// runs up to 2^8-12 = 244). Random runs of 0s, including the longest one,
// are encoded by the testbench, sent with random tester stalls, and the
// decoded bits are compared with L zeros followed by a one per run.
module tb_hpc_decoder_sol2;
  import hpc_pkg::*;
  localparam int unsigned K = 6;
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, bit_in = 1'b0;
  logic bit_ready, scan_out, v;
  int checks = 0, failures = 0, n_longest = 0;
  bit in_q[$], exp_q[$];

  hpc_decoder #(.K_MAX(K), .HAS_ALT(1'b0)) dut (
    .clk, .rst_n, .solution(SOL_ZEROS), .en, .bit_in, .bit_ready, .scan_out, .v
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && v) begin
    checks++;
    if (exp_q.size() == 0 || scan_out !== exp_q[0]) begin
      failures++;
      if (failures < 10) $display("FAIL: output bit %0b", scan_out);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  function automatic void add_run(int L);
    int k, tail, lo;
    bit p;
    if (L == 0) begin
      in_q.push_back(1'b0); in_q.push_back(1'b1);
    end else begin
      if (L <= 4) begin k = 2; p = 1'b1; tail = L - 1; end
      else begin
        k = 3;
        forever begin
          lo = (1 << (k + 1)) - 11;
          if (L < lo + (1 << k)) begin p = 1'b1; tail = L - lo; break; end
          lo += (1 << k);
          if (L < lo + (1 << k)) begin p = 1'b0; tail = L - lo; break; end
          k++;
        end
      end
      repeat (k - 1) in_q.push_back(p);
      in_q.push_back(~p);
      for (int i = k - 1; i >= 0; i--) in_q.push_back(1'((tail >> i) & 1));
    end
    if (L == (1 << (K + 2)) - 12) n_longest++;
    repeat (L) exp_q.push_back(1'b0);
    exp_q.push_back(1'b1);
  endfunction

  initial begin
    int guard = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    add_run((1 << (K + 2)) - 12);
    for (int i = 0; i < 400; i++) add_run($urandom_range(0, (1 << (K + 2)) - 12));
    while ((in_q.size() != 0 || exp_q.size() != 0) && guard < WATCHDOG) begin
      en     <= (in_q.size() != 0) && ($urandom_range(0, 3) != 0);
      bit_in <= (in_q.size() != 0) ? in_q[0] : 1'b0;
      @(posedge clk);
      if (en && bit_ready) void'(in_q.pop_front());
      guard++;
    end
    checks++;
    if (in_q.size() != 0 || exp_q.size() != 0 || n_longest == 0) begin
      failures++;
      $display("FAIL: %0d input / %0d output bits left", in_q.size(), exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
