// wh_toeplitz: Toeplitz-WH hash unit, WH^T[n, w, t] with a 64-bit result.
//
// Leakage power grows with circuit size, and circuit size with the block
// width. To shrink the circuit without losing security, the full 64-bit word
// is split: the hash core works on blocks of W = 64/T bits, and the message is
// hashed T times, each time with the key window moved on by two key words
// (Toeplitz construction; key material grows only from n to n + 2(T-1)
// words). The T partial hashes of W bits are concatenated into a 64-bit tag,
// giving the collision probability 2^-64 of a 64-bit WH. T = 1, 2, 4 give
// WH-64, WH-32 and WH-16; the default is WH-16, the smallest of the three.
//
// The unit that stores the message, generates the shifted key windows and
// replays the message T times sits outside this module: it presents, for
// hash j = 1..T and pair i = 1..n/2,
//     m1 = m_{2i-1}, k1 = k_{2i+2j-3}, m2 = m_{2i}, k2 = k_{2i+2j-2}
// with in_first on i = 1 and in_last on i = n/2 (see wh_core for the
// handshake and the rule that m1/k1 are held during a multiplication).
//
// Timing: W cycles per block pair, so a message of L bits takes T * L / 2
// cycles when pairs are fed back to back. hash_valid pulses after each partial
// hash; tag_valid pulses one cycle after the T-th one.
//
// The construction, the block split and running the passes on one core
// follow the published scheme; the default T = 4, the handshake and the tag
// register with the first pass in its top bits are this design's choices.
module wh_toeplitz #(
  parameter int unsigned  T    = 4,                          // Toeplitz count
  parameter int unsigned  WT   = wh_pkg::WORD_BITS,          // tag width
  parameter int unsigned  W    = WT / T,                     // block width
  parameter logic [W-1:0] POLY = W'(wh_pkg::default_poly(W)) // p(x) - x^W
) (
  input  logic          clk,
  input  logic          rst_n,
  // block-pair stream from the message/key source
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [W-1:0]  m1,
  input  logic [W-1:0]  k1,
  input  logic [W-1:0]  m2,
  input  logic [W-1:0]  k2,
  // each partial hash WH_{K(2j-1)..}(M)
  output logic [W-1:0]  hash,
  output logic          hash_valid,
  // the concatenated Toeplitz-WH result
  output logic [WT-1:0] tag,
  output logic          tag_valid
);

  if (T * W != WT) begin : g_bad_split
    $error("wh_toeplitz: T must divide the tag width");
  end

  wh_core #(.W(W), .POLY(POLY)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_first   (in_first),
    .in_last    (in_last),
    .m1         (m1),
    .k1         (k1),
    .m2         (m2),
    .k2         (k2),
    .hash       (hash),
    .hash_valid (hash_valid)
  );

  tag_concat #(.W(W), .T(T)) u_tag (
    .clk        (clk),
    .rst_n      (rst_n),
    .hash_valid (hash_valid),
    .hash       (hash),
    .tag        (tag),
    .tag_valid  (tag_valid)
  );

endmodule
