// Output polarity unit (the optional part of the decoder datapath).
//
// The controller always produces the bits of a run as 0s followed by a
// single 1 that ends the run. This unit turns that into the real data by
// XORing it with a run-type flip-flop 'alpha':
//   solution 1 - alpha starts at 0 after reset and is toggled ('toggle')
//                each time a codeword's end bit is emitted, so runs of 0s
//                (ended by a 1) and runs of 1s (ended by a 0) alternate;
//   solution 3 - alpha is loaded ('load') with the first bit of each
//                codeword, which carries the run type;
//   solution 2 - 'use_alpha' is low and bits pass unchanged.
// A decoder built for solution 2 only can leave this unit out, as in the
// original decoder; the toggle/XOR contents and the load used for
// solution 3 are this design's reading of that optional part. The XOR is
// combinational; alpha changes at the rising clock edge, so the end bit of
// a codeword is still formed with the old alpha. 'load' has priority.
module hpc_alt_unit (
  input  logic clk,
  input  logic rst_n,      // asynchronous, active low
  input  logic use_alpha,
  input  logic toggle,
  input  logic load,
  input  logic load_val,
  input  logic fsm_bit,
  output logic out_bit,
  output logic alpha
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      alpha <= 1'b0;
    else if (load)   alpha <= load_val;
    else if (toggle) alpha <= ~alpha;
  end

  assign out_bit = fsm_bit ^ (alpha & use_alpha);

endmodule
