// Testbench of the group counter: random clear/increment/decrement
// commands are applied and the count and its zero/one flags are compared
// every cycle with a software model. A prefix-then-tail sequence (count up
// to k, back down to 0) is also run for every k up to 17.
module tb_hpc_group_counter;
  localparam int unsigned W = 5;
  localparam int WATCHDOG = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, inc = 1'b0, dec = 1'b0;
  logic [W-1:0] count;
  logic zero, one;
  int checks = 0, failures = 0;
  logic [W-1:0] model;

  hpc_group_counter #(.W(W)) dut (.clk, .rst_n, .clr, .inc, .dec, .count, .zero, .one);

  always #5 clk = ~clk;

  task automatic step(logic c, logic i, logic d);
    clr <= c; inc <= i; dec <= d;
    @(posedge clk);
    if (c) model = '0;
    else if (i && !d) model = model + 1'b1;
    else if (d && !i) model = model - 1'b1;
    #1;
    checks++;
    if (count !== model || zero !== (model == 0) || one !== (model == 1)) begin
      failures++;
      $display("FAIL: count %0d zero %0b one %0b, model %0d", count, zero, one, model);
    end
  endtask

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    checks++;
    if (count !== '0 || !zero) begin failures++; $display("FAIL: reset"); end
    for (int k = 1; k <= 17; k++) begin
      repeat (k) step(1'b0, 1'b1, 1'b0);
      repeat (k) step(1'b0, 1'b0, 1'b1);
    end
    for (int n = 0; n < 2000; n++)
      step(($urandom_range(0, 19) == 0), 1'($urandom), 1'($urandom));
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
