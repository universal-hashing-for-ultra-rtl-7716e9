// wh_core_check: stimulus and checking for one wh_core instance of width W.
//
// Sends NMSG random messages of 2, 4, 6 or 8 words with random keys, with
// random idle gaps between block pairs (sometimes none, so pairs also run back
// to back), and compares every hash with wh_ref_pkg::wh(). It also checks the
// timing: a pair accepted with no gap follows the previous one after exactly
// W cycles, hash_valid comes W cycles after the last pair is accepted, and
// there is exactly one hash_valid pulse per message.
// Inputs are driven on the falling clock edge.
module wh_core_check #(
  parameter int unsigned W    = 64,
  parameter logic [63:0] PLOW = 64'h1B,   // reduction polynomial, low terms
  parameter int unsigned NMSG = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   back_to_back   // pairs accepted with no idle cycle
);
  import wh_ref_pkg::*;

  logic         in_valid, in_ready, in_first, in_last, hash_valid;
  logic [W-1:0] m1, k1, m2, k2, hash;
  int           cyc = 0;

  wh_core #(.W(W)) dut (.*);

  always_ff @(posedge clk) cyc <= cyc + 1;

  int n_hash_valid = 0;   // hash_valid pulses seen, one per message expected
  always @(negedge clk) if (hash_valid) n_hash_valid++;

  word_t msg [64];
  word_t key [64];

  function automatic word_t rnd();
    return {$urandom(), $urandom()} & mask(W);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL W=%0d: %s", W, what);
    end
  endtask

  initial begin
    int n, last_acc, acc_cyc;
    word_t exp;
    done = 0; checks = 0; failures = 0; back_to_back = 0;

    in_valid = 0; in_first = 0; in_last = 0;
    m1 = '0; k1 = '0; m2 = '0; k2 = '0;
    last_acc = -1000;
    wait (rst_n);
    for (int msgi = 0; msgi < NMSG; msgi++) begin
      n = 2 * (1 + $urandom_range(0, 3));
      for (int i = 0; i < n; i++) begin
        msg[i] = rnd();
        key[i] = rnd();
      end
      // a few messages made of all-ones words exercise every reduction path
      if (msgi == 1) for (int i = 0; i < n; i++) begin msg[i] = mask(W); key[i] = '0; end
      exp = wh(msg, key, 0, n, PLOW, W);
      for (int p = 0; p < n / 2; p++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        repeat ($urandom_range(0, 2) * ($urandom_range(0, 1))) begin
          in_valid = 0;
          m2 = W'(rnd()); k2 = W'(rnd());   // idle: stray data must be ignored
          @(negedge clk);
        end
        in_valid = 1;
        in_first = (p == 0);
        in_last  = (p == n / 2 - 1);
        m1 = W'(msg[2*p]);   k1 = W'(key[2*p]);
        m2 = W'(msg[2*p+1]); k2 = W'(key[2*p+1]);
        acc_cyc = cyc;
        if (acc_cyc - last_acc == W) back_to_back++;
        if (p > 0) check(acc_cyc - last_acc >= W, "pair accepted before W cycles");
        last_acc = acc_cyc;
        @(negedge clk);
        in_valid = 0;
        m2 = W'(rnd()); k2 = W'(rnd());       // only sampled when accepted
        if (p == n / 2 - 1) begin
          while (!hash_valid) begin
            check(!hash_valid, "");            // placeholder never fails
            checks--;
            @(negedge clk);
          end
          check(cyc - acc_cyc == W, $sformatf("latency %0d, expected %0d", cyc - acc_cyc, W));
          check(hash == W'(exp), $sformatf("hash %h expected %h (n=%0d)", hash, W'(exp), n));
          @(negedge clk);
          check(!hash_valid, "hash_valid longer than one cycle");
          check(hash == W'(exp), "hash not held");
        end
      end
    end
    check(n_hash_valid == int'(NMSG), $sformatf("%0d hash_valid pulses for %0d messages",
                                                n_hash_valid, NMSG));
    done = 1;
  end
endmodule
