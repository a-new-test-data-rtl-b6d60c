// Testbench of the output polarity unit: random toggle/load/use_alpha
// commands and data bits are applied; alpha and the output bit are
// compared each cycle with a software model (out = bit XOR (alpha AND
// use_alpha), load before toggle, alpha 0 after reset).
module tb_hpc_alt_unit;
  localparam int WATCHDOG = 10000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic use_alpha = 1'b0, toggle = 1'b0, load = 1'b0, load_val = 1'b0, fsm_bit = 1'b0;
  logic out_bit, alpha;
  int checks = 0, failures = 0;
  bit model;

  hpc_alt_unit dut (.clk, .rst_n, .use_alpha, .toggle, .load, .load_val,
                    .fsm_bit, .out_bit, .alpha);

  always #5 clk = ~clk;

  initial begin
    model = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      use_alpha <= 1'($urandom); toggle <= 1'($urandom);
      load <= ($urandom_range(0, 3) == 0); load_val <= 1'($urandom);
      fsm_bit <= 1'($urandom);
      #1;
      checks++;
      if (out_bit !== (fsm_bit ^ (model & use_alpha)) || alpha !== model) begin
        failures++;
        $display("FAIL: out %0b alpha %0b model %0b", out_bit, alpha, model);
      end
      @(posedge clk);
      if (load) model = load_val;
      else if (toggle) model = ~model;
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
