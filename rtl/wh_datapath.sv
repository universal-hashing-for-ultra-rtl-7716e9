// wh_datapath: the arithmetic of the WH hash, one bit of the serial operand per
// clock cycle.
//
// WH_K(M) = sum_{i=1..n/2} (m_{2i-1}+k_{2i-1})(m_{2i}+k_{2i}) x^((n/2-i)w) mod p
// is evaluated by Horner's rule, most significant bit of the serial operand
// first:
//     acc <- acc * x + a * b_j  (mod p),   j = W-1 .. 0
// where a = m1 ^ k1 and b = m2 ^ k2 (addition in GF(2) is XOR, so the two key
// adders are W XOR gates each). Over the W cycles of one block pair the old
// accumulator is multiplied by x^W and the new product a*b mod p is added,
// which is exactly the weighting x^((n/2-i)w) of the definition. The running
// hash therefore lives in the multiplier's own register: no separate product
// register, multiplexer or final adder is needed.
//
// Per cycle: gf_xtime shifts and reduces the accumulator, W AND gates select
// a, W XOR gates add it in. b is captured in a W-bit shift register.
//
// Timing and interface:
//  * `load` high: cycle 0 of a block pair. m2/k2 are sampled; the top bit of
//    b = m2^k2 is used directly and the remaining bits go into the shift
//    register. If `clear` is also high the accumulator starts from zero (first
//    pair of a message), otherwise from the previous hash.
//  * `step` high: cycles 1 .. W-1, using the next bit of the shift register.
//  * m1 and k1 are read in every one of the W cycles and must be held stable by
//    the source for the whole block period: the multiplicand is deliberately
//    not registered, which saves W flip-flops.
//  * `acc` holds the hash after the last pair's W-th cycle.
module wh_datapath #(
  parameter int unsigned  W    = 64,
  parameter logic [W-1:0] POLY = W'(wh_pkg::default_poly(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // cycle 0 of a block pair
  input  logic         clear,  // with load: first pair of a message
  input  logic         step,   // cycles 1 .. W-1 of a block pair
  input  logic [W-1:0] m1,
  input  logic [W-1:0] k1,
  input  logic [W-1:0] m2,
  input  logic [W-1:0] k2,
  output logic [W-1:0] acc
);

  logic [W-1:0] a, b_in;
  logic [W-1:0] sh;         // remaining bits of b, next bit on top
  logic [W-1:0] acc_base;   // value multiplied by x this cycle
  logic [W-1:0] acc_x;      // acc_base * x mod p
  logic [W-1:0] acc_next;
  logic         bit_j;

  assign a    = m1 ^ k1;
  assign b_in = m2 ^ k2;

  assign bit_j    = load ? b_in[W-1] : sh[W-1];
  assign acc_base = (load && clear) ? '0 : acc;

  gf_xtime #(.W(W), .POLY(POLY)) u_red (
    .a (acc_base),
    .y (acc_x)
  );

  assign acc_next = acc_x ^ (a & {W{bit_j}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      sh  <= '0;
    end else if (load) begin
      acc <= acc_next;
      sh  <= {b_in[W-2:0], 1'b0};
    end else if (step) begin
      acc <= acc_next;
      sh  <= {sh[W-2:0], 1'b0};
    end
  end

endmodule
