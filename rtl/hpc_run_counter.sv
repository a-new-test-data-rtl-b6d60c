// Run counter: loadable, shift-in down counter.
//
// The decoder uses two of these. The base counter (the "(k+1)-bit counter")
// is loaded in parallel with the value produced by the prefix mapping logic
// and then counted down once per emitted run bit. The tail counter (the
// "k-bit counter") is cleared by 'load' with a zero value, receives the k
// tail bits most significant bit first through 'shift', and is then counted
// down once per emitted run bit. The tail bits are the binary value itself,
// so no conversion is needed.
// Priority: load, then shift, then dec. 'zero' (rs1) and 'one' are
// combinational from the count; updates occur at the rising clock edge.
// The two counters and their roles follow the original decoder; the
// parallel load of the mapped value and the 'one' flag are this design's
// choices.
module hpc_run_counter #(
  parameter int unsigned W = hpc_pkg::K_MAX_DEFAULT + 2
) (
  input  logic         clk,
  input  logic         rst_n,      // asynchronous, active low
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic         shift,
  input  logic         shift_bit,
  input  logic         dec,
  output logic [W-1:0] count,
  output logic         zero,
  output logic         one
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (load)  count <= load_val;
    else if (shift) count <= {count[W-2:0], shift_bit};
    else if (dec)   count <= count - 1'b1;
  end

  assign zero = (count == '0);
  assign one  = (count == W'(1));

endmodule
