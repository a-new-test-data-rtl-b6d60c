// Testbench of the run counter: random parallel loads, serial shifts and
// decrements are applied and the count and its zero/one flags are compared
// every cycle with a software model. A directed sequence clears the
// counter, shifts in a tail value most significant bit first, and counts
// it down to zero, checking the number of decrements needed.
module tb_hpc_run_counter;
  localparam int unsigned W = 19;
  localparam int WATCHDOG = 40000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, shift = 1'b0, shift_bit = 1'b0, dec = 1'b0;
  logic [W-1:0] load_val = '0;
  logic [W-1:0] count;
  logic zero, one;
  int checks = 0, failures = 0;
  logic [W-1:0] model;

  hpc_run_counter #(.W(W)) dut (.clk, .rst_n, .load, .load_val, .shift,
                                 .shift_bit, .dec, .count, .zero, .one);

  always #5 clk = ~clk;

  task automatic step(logic l, logic [W-1:0] lv, logic s, logic sb, logic d);
    load <= l; load_val <= lv; shift <= s; shift_bit <= sb; dec <= d;
    @(posedge clk);
    if (l) model = lv;
    else if (s) model = (model << 1) | W'(sb);
    else if (d) model = model - 1'b1;
    #1;
    checks++;
    if (count !== model || zero !== (model == 0) || one !== (model == 1)) begin
      failures++;
      $display("FAIL: count %0d zero %0b one %0b, model %0d", count, zero, one, model);
    end
  endtask

  initial begin
    int unsigned tail, n;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    checks++;
    if (count !== '0 || !zero) begin failures++; $display("FAIL: reset"); end
    // tail of group 7: 7 bits shifted in, then counted down
    for (int t = 0; t < 20; t++) begin
      tail = $urandom_range(0, 127);
      step(1'b1, '0, 1'b0, 1'b0, 1'b0);
      for (int i = 6; i >= 0; i--) step(1'b0, '0, 1'b1, tail[i], 1'b0);
      n = 0;
      while (!zero && n < 200) begin step(1'b0, '0, 1'b0, 1'b0, 1'b1); n++; end
      checks++;
      if (n != tail) begin failures++; $display("FAIL: tail %0d counted %0d", tail, n); end
    end
    for (int i = 0; i < 5000; i++)
      step(($urandom_range(0, 9) == 0), W'($urandom), 1'($urandom), 1'($urandom),
           1'($urandom));
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
