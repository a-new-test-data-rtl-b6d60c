// Prefix mapping logic.
//
// Maps a finished group prefix to the run length of the first member of its
// group; the tail is then added by counting it out separately. For the
// hybrid code of solutions 1 and 2, group k (k >= 3) has two prefix forms:
//   prefix1 = 1^(k-1) 0 : run lengths 2^(k+1)-11 .. 3*2^k-12
//   prefix2 = 0^(k-1) 1 : run lengths 3*2^k-11  .. 2^(k+2)-12
// and group A2 (prefix "10") starts at run length 1. For example group 3
// maps to 5 (prefix1) and 13 (prefix2), group 4 to 21 and 37. Group A1
// (codeword "01", run length 0) never reaches the mapping logic.
// For solution 3 (typed runs) group k >= 2 starts at 2^k-3 for either
// prefix form (1, 5, 13, 29, ...); this start value follows from the group
// sizes of that code table, the formula is this design's own.
// Purely combinational. k must lie in 2..K_MAX; values outside give an
// undefined (but harmless) result.
module hpc_prefix_map #(
  parameter int unsigned K_MAX = hpc_pkg::K_MAX_DEFAULT,
  parameter int unsigned KW    = $clog2(K_MAX + 1),
  parameter int unsigned BW    = K_MAX + 2
) (
  input  logic [KW-1:0] k,        // group index = prefix length
  input  logic          prefix1,  // 1: prefix of 1s ended by 0 (sel)
  input  logic          typed,    // 1: solution 3 code table
  output logic [BW-1:0] base
);

  logic [BW:0] pow_k;   // 2^k, one spare bit so 3*2^k and 2^(k+1) fit

  always_comb begin
    pow_k = (BW + 1)'(1) << k;
    if (typed)
      base = BW'(pow_k - (BW + 1)'(3));
    else if (prefix1)
      base = (k == KW'(2)) ? BW'(1) : BW'((pow_k << 1) - (BW + 1)'(11));
    else
      base = BW'(pow_k + (pow_k << 1) - (BW + 1)'(11));
  end

endmodule
