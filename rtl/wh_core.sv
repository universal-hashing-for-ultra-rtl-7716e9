// wh_core: a complete WH hash unit of block size W: datapath plus control.
//
// A message is delivered as a sequence of block pairs (m_{2i-1}, m_{2i}) with
// their key words (k_{2i-1}, k_{2i}). Each pair takes exactly W clock cycles,
// one per bit of b = m2 ^ k2, and pairs can follow back to back. After the
// last pair the W-bit hash is presented on `hash` with a one-cycle
// `hash_valid` pulse; it stays on `hash` until the next message starts.
//
// Handshake (this design's choice; the algorithm only fixes the data order):
//  * A pair is accepted in a cycle where in_valid and in_ready are both high.
//    in_first marks the first pair of a message, in_last the last one; a
//    one-pair message has both set.
//  * in_ready is high whenever no multiplication is in progress, so a new pair
//    is accepted every W cycles at most.
//  * m1 and k1 must stay unchanged from the accepting cycle through the W-1
//    cycles after it (the multiplicand is read every cycle, not stored);
//    m2 and k2 are only needed in the accepting cycle.
// Latency: hash_valid rises W cycles after the last pair is accepted.
//
// Control: a busy flag plus the LFSR cycle counter, which flags the W-th
// cycle of each multiplication.
module wh_core #(
  parameter int unsigned  W    = 64,
  parameter logic [W-1:0] POLY = W'(wh_pkg::default_poly(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_first,
  input  logic         in_last,
  input  logic [W-1:0] m1,
  input  logic [W-1:0] k1,
  input  logic [W-1:0] m2,
  input  logic [W-1:0] k2,
  output logic [W-1:0] hash,
  output logic         hash_valid
);

  logic accept, busy, last_cycle, last_pair;

  assign in_ready = !busy;
  assign accept   = in_valid && in_ready;

  lfsr_counter #(.W(W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .start (accept),
    .en    (busy),
    .last  (last_cycle)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      last_pair  <= 1'b0;
      hash_valid <= 1'b0;
    end else begin
      hash_valid <= busy && last_cycle && last_pair;
      if (accept) begin
        busy      <= 1'b1;
        last_pair <= in_last;
      end else if (busy && last_cycle) begin
        busy      <= 1'b0;
      end
    end
  end

  // The multiplicand is not registered: its source must hold it.
  a_operand_held: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> ($stable(m1) && $stable(k1)))
    else $error("wh_core: m1/k1 changed during a block multiplication");

  wh_datapath #(.W(W), .POLY(POLY)) u_dp (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (accept),
    .clear (in_first),
    .step  (busy),
    .m1    (m1),
    .k1    (k1),
    .m2    (m2),
    .k2    (k2),
    .acc   (hash)
  );

endmodule
