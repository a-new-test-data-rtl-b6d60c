// Shared types and constants of the hybrid-prefix-code (HPC) decompressor.
//
// The compressed test stream uses run-length codewords made of a group
// prefix and a tail. Three code variants ("solutions") are decoded by the
// same datapath:
//   solution 1 - alternating runs: the run bit starts at 0 after reset and
//                flips after every codeword (runs of 0s and runs of 1s);
//   solution 2 - runs of 0s only, each ended by a 1 (FDR style);
//   solution 3 - every codeword carries its run type in its first bit:
//                prefix 1..10 codes a run of 1s, prefix 0..01 a run of 0s.
// The numeric encoding of solution_e follows the solution numbers; the
// unused value 0 decodes like solution 2 (a design choice).
package hpc_pkg;

  typedef enum logic [1:0] {
    SOL_RESERVED = 2'd0,
    SOL_ALT      = 2'd1,   // solution 1
    SOL_ZEROS    = 2'd2,   // solution 2
    SOL_TYPED    = 2'd3    // solution 3
  } solution_e;

  // Largest group index. Group K_MAX reaches run length 2^(K_MAX+2)-12 =
  // 524276 in solutions 1/2 and 2^(K_MAX+1)-4 = 262140 in solution 3; the
  // smallest value for which both cover any run of a 199104-bit test set.
  localparam int unsigned K_MAX_DEFAULT = 17;

  // Controller states.
  typedef enum logic [2:0] {
    S_FIRST    = 3'd0,  // waiting for the first bit of a codeword
    S_ZERO1    = 3'd1,  // solutions 1/2: first bit was 0, second decides
    S_PREFIX   = 3'd2,  // counting prefix bits up to the terminating bit
    S_MAP      = 3'd3,  // load the mapped prefix value into the base counter
    S_BASE_OUT = 3'd4,  // emit the run bits counted by the prefix value
    S_TAIL_IN  = 3'd5,  // shift in the k tail bits
    S_TAIL_OUT = 3'd6,  // emit the run bits counted by the tail, then the end bit
    S_TERM     = 3'd7   // solutions 1/2, codeword "01": emit only the end bit
  } state_e;

endpackage
