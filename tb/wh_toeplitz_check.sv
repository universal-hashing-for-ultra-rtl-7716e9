// wh_toeplitz_check: message/key source and checker for one Toeplitz-WH unit.
//
// Plays the part of the circuit that holds the message and the key and feeds
// the hash unit: for hash j = 1..T it replays the message pairs with the key
// window starting at word 2j-1 (k1 = k_{2i+2j-3}, k2 = k_{2i+2j-2}), marking
// the first and last pair of each pass, and holds m1/k1 while a pair is being
// multiplied. Every partial hash is checked against wh_ref_pkg::wh() and every
// tag against the concatenation of the T expected hashes.
//
// Sequence: (1) a fixed 128-bit message and 256-bit key with a known tag
// (GOLDEN, worked out separately), pairs back to back, checking that the tag
// takes exactly T * 128 / 2 cycles + 1; (2) NMSG random messages of 2..16
// words (a multiple of 2) with random stalls of the source; (3) one message of
// a single pair. It counts how often each mechanism occurred and reports a
// failure for any that never did.
module wh_toeplitz_check #(
  parameter int unsigned T      = 4,
  parameter int unsigned W      = 64 / T,
  parameter logic [63:0] PLOW   = 64'h2B,
  parameter logic [63:0] GOLDEN = 64'hdb2f_74eb_c4ba_709d,
  parameter int unsigned NMSG   = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  // to / from the unit under test
  output logic         in_valid,
  input  logic         in_ready,
  output logic         in_first,
  output logic         in_last,
  output logic [W-1:0] m1,
  output logic [W-1:0] k1,
  output logic [W-1:0] m2,
  output logic [W-1:0] k2,
  input  logic [W-1:0] hash,
  input  logic         hash_valid,
  input  logic [63:0]  tag,
  input  logic         tag_valid,
  input  logic         reduce_evt,  // accumulator top bit set in an active cycle
  // results
  output logic         done,
  output int           checks,
  output int           failures
);
  import wh_ref_pkg::*;

  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_back_to_back = 0, n_stall = 0, n_key_shift = 0, n_tags = 0;
  int n_reduce = 0, n_restart = 0, n_single_pair = 0;

  word_t exp_hash [$];
  logic [63:0] exp_tag [$];
  int tag_cycle;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL T=%0d: %s", T, what);
    end
  endtask

  // monitor: partial hashes and tags
  always @(negedge clk) if (rst_n && !done) begin
    if (reduce_evt) n_reduce++;
    if (hash_valid) begin
      if (exp_hash.size() == 0) check(0, "unexpected hash_valid");
      else begin
        word_t e;
        e = exp_hash.pop_front();
        check(hash == W'(e), $sformatf("partial hash %h expected %h", hash, W'(e)));
      end
    end
    if (tag_valid) begin
      n_tags++;
      tag_cycle = cyc;
      if (exp_tag.size() == 0) check(0, "unexpected tag_valid");
      else begin
        logic [63:0] e;
        e = exp_tag.pop_front();
        check(tag == e, $sformatf("tag %h expected %h", tag, e));
      end
    end
  end

  // Feeds one message of n words through all T passes.
  // Returns the cycle in which the first pair was accepted.
  task automatic send(input word_t msg [64], input word_t key [64], input int n,
                      input bit stalls, output int first_cyc);
    logic [63:0] t;
    t = '0;
    for (int j = 0; j < int'(T); j++) begin
      word_t e;
      e = wh(msg, key, 2 * j, n, PLOW, W);
      exp_hash.push_back(e);
      t = (T == 1) ? e : ((t << W) | (e & mask(W)));
    end
    exp_tag.push_back(t);
    if (n == 2) n_single_pair++;
    for (int j = 0; j < int'(T); j++) begin
      if (j > 0) n_key_shift++;
      for (int p = 0; p < n / 2; p++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        if (stalls && $urandom_range(0, 2) == 0) begin
          repeat ($urandom_range(1, 3)) begin
            in_valid = 0;
            m1 = W'($urandom()); k1 = W'($urandom());
            m2 = W'($urandom()); k2 = W'($urandom());
            n_stall++;
            @(negedge clk);
          end
        end else if (j + p > 0) n_back_to_back++;
        in_valid = 1;
        in_first = (p == 0);
        in_last  = (p == n / 2 - 1);
        if (p == 0 && hash != '0) n_restart++;
        m1 = W'(msg[2*p]);   k1 = W'(key[2*j + 2*p]);
        m2 = W'(msg[2*p+1]); k2 = W'(key[2*j + 2*p + 1]);
        if (j == 0 && p == 0) first_cyc = cyc;
        @(negedge clk);
        in_valid = 0;
        m2 = W'($urandom()); k2 = W'($urandom());
      end
    end
    // wait for the tag
    while (exp_tag.size() != 0) @(negedge clk);
  endtask

  initial begin
    word_t msg [64], key [64];
    logic [127:0] gm;
    logic [255:0] gk;
    int n, first_cyc;
    done = 0; checks = 0; failures = 0;
    in_valid = 0; in_first = 0; in_last = 0;
    m1 = '0; k1 = '0; m2 = '0; k2 = '0;
    foreach (msg[i]) begin msg[i] = '0; key[i] = '0; end
    wait (rst_n);

    // (1) fixed vector: words taken most significant first
    gm = 128'h0123456789ABCDEF_FEDCBA9876543210;
    gk = 256'h243F6A8885A308D3_13198A2E03707344_A4093822299F31D0_082EFA98EC4E6C89;
    n  = 128 / W;
    for (int i = 0; i < n; i++)                msg[i] = word_t'(gm >> (128 - W * (i + 1))) & mask(W);
    for (int i = 0; i < n + 2 * (T - 1); i++)  key[i] = word_t'(gk >> (256 - W * (i + 1))) & mask(W);
    send(msg, key, n, 0, first_cyc);
    check(tag == GOLDEN, $sformatf("128-bit message tag %h, known value %h", tag, GOLDEN));
    check(tag_cycle - first_cyc == int'(T) * 64 + 1,
          $sformatf("128-bit message took %0d cycles to the tag, expected %0d",
                    tag_cycle - first_cyc, T * 64 + 1));

    // (2) random messages with source stalls
    for (int r = 0; r < int'(NMSG); r++) begin
      n = 2 * $urandom_range(1, 8);
      for (int i = 0; i < n + 2 * (T - 1); i++) begin
        msg[i] = {$urandom(), $urandom()} & mask(W);
        key[i] = {$urandom(), $urandom()} & mask(W);
      end
      send(msg, key, n, 1, first_cyc);
    end

    // (3) single-pair message
    for (int i = 0; i < 2 * int'(T); i++) begin
      msg[i] = {$urandom(), $urandom()} & mask(W);
      key[i] = {$urandom(), $urandom()} & mask(W);
    end
    send(msg, key, 2, 0, first_cyc);

    repeat (2) @(negedge clk);
    check(exp_hash.size() == 0, "partial hashes missing");
    $display("T=%0d mechanisms: back-to-back pairs %0d, source stalls %0d, key window shifts %0d,",
             T, n_back_to_back, n_stall, n_key_shift);
    $display("      reductions %0d, message restarts %0d, single-pair messages %0d, tags %0d",
             n_reduce, n_restart, n_single_pair, n_tags);
    check(n_back_to_back > 0, "no back-to-back pairs");
    check(n_stall > 0, "no source stalls");
    check(T == 1 || n_key_shift > 0, "no Toeplitz key window shifts");
    check(n_reduce > 0, "no modular reductions");
    check(n_restart > 0, "no message restart over a non-zero accumulator");
    check(n_single_pair > 0, "no single-pair message");
    check(n_tags == int'(NMSG) + 2, "wrong number of tags");
    done = 1;
  end
endmodule
