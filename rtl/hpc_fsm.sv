// Controller of the hybrid-prefix-code decompressor.
//
// The FSM reads the compressed stream one bit per accepted cycle
// ('en' && 'bit_ready') and steers the group counter, the two run counters,
// the prefix mapping logic and the output polarity unit. A codeword is
// handled in this order:
//   1. prefix - bits equal to the first bit are counted up in the group
//      counter until the first different bit ends the prefix; the count k
//      is the group index. In solutions 1/2 the codeword "01" (run 0) is
//      recognised after its second bit and goes straight to the end bit.
//   2. map    - one cycle: the mapped prefix value is loaded into the base
//      counter and the tail counter is cleared.
//   3. emit   - one run bit per cycle while the base counter counts down.
//   4. tail   - k tail bits are shifted into the tail counter while the
//      group counter counts back down to zero.
//   5. emit   - one run bit per cycle while the tail counter counts down,
//      then one end bit.
// With 'en' held high a codeword of group k with run length L therefore
// takes 2k + L + 2 cycles, and "01" takes 3. The decoder never reads and
// writes in the same cycle: 'bit_ready' and 'v' are never high together.
// This order of steps, emitting the prefix part before reading the tail,
// follows the original decoder description; the separate map cycle and the
// ready/enable handshake are this design's choices.
// Outputs are Moore outputs of the registered state, except the counter
// and polarity strobes, which also depend on 'en' and 'bit_in'.
module hpc_fsm
  import hpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,       // asynchronous, active low
  input  solution_e solution,    // keep stable while a stream is decoded
  // compressed input from the tester
  input  logic      en,          // a compressed bit is present on bit_in
  input  logic      bit_in,
  output logic      bit_ready,   // the bit is taken when en && bit_ready
  // group counter (log2 k bits)
  output logic      grp_clr,
  output logic      grp_inc,
  output logic      grp_dec,
  input  logic      grp_one,
  // base counter, loaded from the mapping logic
  output logic      base_load,
  output logic      base_dec,
  input  logic      base_one,
  // tail counter
  output logic      tail_clr,
  output logic      tail_shift,
  output logic      tail_dec,
  input  logic      tail_zero,
  // mapping logic
  output logic      sel,         // 1: prefix made of 1s (prefix1)
  // output polarity unit
  output logic      pol_toggle,
  output logic      pol_load,
  // decoded data before the polarity unit
  output logic      fsm_bit,
  output logic      v,
  output state_e    state
);

  state_e state_d;
  logic   first_q, first_d;      // first bit of the current codeword
  logic   typed;

  assign typed = (solution == SOL_TYPED);
  assign sel   = first_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_FIRST;
      first_q <= 1'b0;
    end else begin
      state   <= state_d;
      first_q <= first_d;
    end
  end

  always_comb begin
    state_d    = state;
    first_d    = first_q;
    bit_ready  = 1'b0;
    grp_clr    = 1'b0;
    grp_inc    = 1'b0;
    grp_dec    = 1'b0;
    base_load  = 1'b0;
    base_dec   = 1'b0;
    tail_clr   = 1'b0;
    tail_shift = 1'b0;
    tail_dec   = 1'b0;
    pol_toggle = 1'b0;
    pol_load   = 1'b0;
    fsm_bit    = 1'b0;
    v          = 1'b0;

    unique case (state)
      S_FIRST: begin
        bit_ready = 1'b1;
        if (en) begin
          first_d = bit_in;
          grp_inc = 1'b1;
          if (typed) begin
            pol_load = 1'b1;                  // run type of this codeword
            state_d  = S_PREFIX;
          end else begin
            state_d  = bit_in ? S_PREFIX : S_ZERO1;
          end
        end
      end

      S_ZERO1: begin
        bit_ready = 1'b1;
        if (en) begin
          if (bit_in) begin                   // codeword "01": run length 0
            grp_clr = 1'b1;
            state_d = S_TERM;
          end else begin                      // second 0: prefix2 continues
            grp_inc = 1'b1;
            state_d = S_PREFIX;
          end
        end
      end

      S_PREFIX: begin
        bit_ready = 1'b1;
        if (en) begin
          grp_inc = 1'b1;
          if (bit_in != first_q) state_d = S_MAP;
        end
      end

      S_MAP: begin
        base_load = 1'b1;
        tail_clr  = 1'b1;
        state_d   = S_BASE_OUT;
      end

      S_BASE_OUT: begin                       // mapped value is always >= 1
        v        = 1'b1;
        base_dec = 1'b1;
        if (base_one) state_d = S_TAIL_IN;
      end

      S_TAIL_IN: begin
        bit_ready = 1'b1;
        if (en) begin
          tail_shift = 1'b1;
          grp_dec    = 1'b1;
          if (grp_one) state_d = S_TAIL_OUT;
        end
      end

      S_TAIL_OUT: begin
        v = 1'b1;
        if (tail_zero) begin
          fsm_bit    = 1'b1;                  // end bit of the run
          pol_toggle = (solution == SOL_ALT);
          state_d    = S_FIRST;
        end else begin
          tail_dec = 1'b1;
        end
      end

      S_TERM: begin
        v          = 1'b1;
        fsm_bit    = 1'b1;
        pol_toggle = (solution == SOL_ALT);
        state_d    = S_FIRST;
      end

      default: state_d = S_FIRST;
    endcase
  end

  // The decoder either reads a compressed bit or writes a decoded bit.
  a_no_read_and_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(bit_ready && v));

endmodule
