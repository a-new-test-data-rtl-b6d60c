// Group counter: the log2(k)-bit up/down counter of the decoder.
//
// While the prefix of a codeword streams in, the counter is incremented
// once per prefix bit, so at the end of the prefix it holds the group index
// k (the prefix length). While the k tail bits stream in, it is decremented
// once per bit; 'one' tells the controller that the current tail bit is the
// last one, and 'zero' (rs2 in the original naming) that the counter is
// back in its idle state. 'clr' has priority over 'inc' and 'dec'; 'inc'
// and 'dec' together leave the count unchanged. All updates take effect at
// the next rising clock edge; the flags are combinational from the count.
// The up/down use follows the original decoder; the clear input (used for
// the codeword "01") and the width W, enough for the largest group index,
// are this design's choices.
module hpc_group_counter #(
  parameter int unsigned W = $clog2(hpc_pkg::K_MAX_DEFAULT + 1)
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low
  input  logic         clr,
  input  logic         inc,
  input  logic         dec,
  output logic [W-1:0] count,
  output logic         zero,
  output logic         one
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           count <= '0;
    else if (clr)         count <= '0;
    else if (inc && !dec) count <= count + 1'b1;
    else if (dec && !inc) count <= count - 1'b1;
  end

  assign zero = (count == '0);
  assign one  = (count == W'(1));

endmodule
