// lfsr_counter: the cycle counter of the WH control logic.
//
// A block multiplication takes W clock cycles, one per bit of the serial
// operand. Instead of a binary counter with an incrementer (long carry chains,
// glitches, a slow path into the control), the count is kept in a Fibonacci
// LFSR of R = log2(W) flip-flops. A plain maximal-length LFSR has 2^R - 1
// states; the feedback is extended with a NOR of the low R-1 bits (a de Bruijn
// counter) so that the all-zero state is inserted after 10...0 and the counter
// runs through exactly W = 2^R states. The extension is this design's way of
// making an R-bit LFSR "count up to W".
//
// Interface: `start` loads the state reached one step after START (the cycle in
// which `start` is high is count 0); `en` advances it by one step; `last` is
// high in count W-1, i.e. in the W-th cycle of a run. When neither is
// asserted the state holds. After W steps the state is back at START, so
// `last` is never high between runs as long as `en` is only raised during one. The terminal state is worked out at elaboration by
// stepping the LFSR W-1 times from START.
module lfsr_counter #(
  parameter int unsigned W = 64,                // states to count (power of 2)
  parameter int unsigned R = $clog2(W),          // flip-flops
  parameter int unsigned K = wh_pkg::lfsr_tap(R) // middle tap of x^R + x^K + 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,   // first cycle of a run (count 0)
  input  logic en,      // advance one count
  output logic last     // current count is W-1
);

  localparam logic [R-1:0] START = '0;

  function automatic logic [R-1:0] lfsr_step(input logic [R-1:0] s);
    logic fb;
    fb = s[R-1] ^ s[K-1] ^ (s[R-2:0] == '0);
    return {s[R-2:0], fb};
  endfunction

  function automatic logic [R-1:0] lfsr_after(input logic [R-1:0] s,
                                               input int unsigned n);
    logic [R-1:0] v;
    v = s;
    for (int unsigned i = 0; i < n; i++) v = lfsr_step(v);
    return v;
  endfunction

  localparam logic [R-1:0] FINAL = lfsr_after(START, W - 1);

  if (W < 4 || W != (1 << R)) begin : g_bad_width
    $error("lfsr_counter: W must be a power of two of at least 4");
  end

  logic [R-1:0] state;

  // After W steps the counter is back in START, ready for the next run.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= START;
    else if (start) state <= lfsr_step(START);
    else if (en)    state <= lfsr_step(state);
  end

  assign last = (state == FINAL);

endmodule
