// Hybrid-prefix-code test data decompressor (top level).
//
// Sits between the tester and a core's scan input. The tester delivers the
// compressed test set one bit per cycle; the decoder expands every
// run-length codeword into its run of equal bits plus the bit that ends the
// run, and shifts them out one per cycle with 'v' high.
//
// Codewords (solutions 1 and 2): group prefix, then a tail of k bits.
//   A1  : "01"                 -> run length 0
//   A2  : "10"   + 2-bit tail  -> 1..4
//   k>=3: 1^(k-1)0 + k-bit tail -> 2^(k+1)-11 + tail
//         0^(k-1)1 + k-bit tail -> 3*2^k-11  + tail
// Codewords (solution 3): b^(k-1) ~b + k-bit tail, k >= 2, codes a run of
// bit b of length 2^k-3 + tail.
// A run of length L of bit b decodes to L copies of b followed by one ~b;
// in solution 2, b is always 0; in solution 1 it alternates, starting at 0.
//
// Structure: controller (hpc_fsm), group counter, prefix mapping logic,
// base and tail run counters and, when HAS_ALT is 1, the output polarity
// unit needed by solutions 1 and 3. With HAS_ALT = 0 only solution 2 can
// be decoded, which is the smaller decoder variant.
//
// Interface: 'solution' selects the code and must be stable during a
// stream; change it only while the decoder is idle (after reset or after
// the last end bit). Input handshake: a bit is consumed on a rising edge
// with en && bit_ready. Output: scan_out is valid when v is high; there is
// no back-pressure, the scan chain must take every valid bit.
// Timing: with 'en' always high, a group-k codeword of run length L takes
// 2k + L + 2 cycles and "01" takes 3; a run of L bits yields L+1 output bits.
// K_MAX (largest group) is a design choice sized so that any run of a test
// set of up to 199104 bits can be coded.
module hpc_decoder
  import hpc_pkg::*;
#(
  parameter int unsigned K_MAX   = K_MAX_DEFAULT,
  parameter bit          HAS_ALT = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,      // asynchronous, active low
  input  solution_e solution,
  input  logic      en,
  input  logic      bit_in,
  output logic      bit_ready,
  output logic      scan_out,
  output logic      v
);

  localparam int unsigned KW = $clog2(K_MAX + 1);
  localparam int unsigned BW = K_MAX + 2;   // prefix2 values need k+2 bits
  localparam int unsigned TW = K_MAX;       // tail of group k has k bits

  logic          grp_clr, grp_inc, grp_dec, grp_zero, grp_one;
  logic [KW-1:0] grp_count;
  logic          base_load, base_dec, base_zero, base_one;
  logic [BW-1:0] base_count, base_map;
  logic          tail_clr, tail_shift, tail_dec, tail_zero, tail_one;
  logic [TW-1:0] tail_count;
  logic          sel, pol_toggle, pol_load, fsm_bit;
  state_e        state;

  hpc_fsm u_fsm (
    .clk, .rst_n, .solution, .en, .bit_in, .bit_ready,
    .grp_clr, .grp_inc, .grp_dec, .grp_one,
    .base_load, .base_dec, .base_one,
    .tail_clr, .tail_shift, .tail_dec, .tail_zero,
    .sel, .pol_toggle, .pol_load, .fsm_bit, .v, .state
  );

  hpc_group_counter #(.W(KW)) u_grp (
    .clk, .rst_n, .clr(grp_clr), .inc(grp_inc), .dec(grp_dec),
    .count(grp_count), .zero(grp_zero), .one(grp_one)
  );

  hpc_prefix_map #(.K_MAX(K_MAX), .KW(KW), .BW(BW)) u_map (
    .k(grp_count), .prefix1(sel), .typed(solution == SOL_TYPED),
    .base(base_map)
  );

  hpc_run_counter #(.W(BW)) u_base (
    .clk, .rst_n, .load(base_load), .load_val(base_map),
    .shift(1'b0), .shift_bit(1'b0), .dec(base_dec),
    .count(base_count), .zero(base_zero), .one(base_one)
  );

  hpc_run_counter #(.W(TW)) u_tail (
    .clk, .rst_n, .load(tail_clr), .load_val('0),
    .shift(tail_shift), .shift_bit(bit_in), .dec(tail_dec),
    .count(tail_count), .zero(tail_zero), .one(tail_one)
  );

  if (HAS_ALT) begin : g_alt
    logic alpha;
    hpc_alt_unit u_alt (
      .clk, .rst_n,
      .use_alpha(solution == SOL_ALT || solution == SOL_TYPED),
      .toggle(pol_toggle), .load(pol_load), .load_val(bit_in),
      .fsm_bit, .out_bit(scan_out), .alpha
    );
  end else begin : g_no_alt
    assign scan_out = fsm_bit;
  end

  // The group index never exceeds K_MAX for a well-formed stream.
  a_group_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    grp_count <= KW'(K_MAX));
  // Every mapped prefix value is at least 1, so the base counter never
  // starts its count-down at zero.
  a_base_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_BASE_OUT) |-> !base_zero);
  // The tail is complete exactly when the group counter returns to zero.
  a_idle_group_zero: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_FIRST) |-> grp_zero);

endmodule
