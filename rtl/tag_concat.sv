// tag_concat: assembles the Toeplitz-WH result from its t partial hashes.
//
// WH^T_K(M) = (WH_{K1..n}(M), WH_{K3..n+2}(M), ..., WH_{K2t-1..n+2t-2}(M)):
// the message is hashed t times with the key window shifted by two words each
// time, and the t W-bit hashes are concatenated into a T*W-bit value. The
// hashes arrive one after another from a single WH core; each one is shifted
// in at the bottom of the tag register, so the first hash ends up in the most
// significant W bits. A modulo-T count tells when the tag is complete; the
// register is this design's way of doing the concatenation.
//
// Interface: `hash_valid` strobes one partial hash in; `tag_valid` pulses one
// cycle after the T-th strobe, and `tag` holds the completed value until the
// next strobe. With T = 1 the unit is a plain output register.
module tag_concat #(
  parameter int unsigned W = 16,   // partial-hash (block) width
  parameter int unsigned T = 4     // Toeplitz iteration count
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           hash_valid,
  input  logic [W-1:0]   hash,
  output logic [T*W-1:0] tag,
  output logic           tag_valid
);

  localparam int unsigned CW = (T > 1) ? $clog2(T) : 1;

  logic [CW-1:0] count;   // partial hashes already in the current tag
  logic          full;

  assign full = (count == CW'(T - 1));

  logic [T*W-1:0] tag_shifted;

  if (T > 1) begin : g_multi
    assign tag_shifted = {tag[(T-1)*W-1:0], hash};
  end else begin : g_single
    assign tag_shifted = hash;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag       <= '0;
      count     <= '0;
      tag_valid <= 1'b0;
    end else begin
      tag_valid <= hash_valid && full;
      if (hash_valid) begin
        tag   <= tag_shifted;
        count <= full ? '0 : count + 1'b1;
      end
    end
  end

endmodule
