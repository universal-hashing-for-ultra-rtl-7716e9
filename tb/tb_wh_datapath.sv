// tb_wh_datapath: self-checking test of the WH datapath on its own.
//
// The load/clear/step controls are driven directly: a load cycle followed by
// W-1 step cycles per block pair, with idle cycles (neither load nor step) in
// between that must leave the accumulator alone. For W = 64 (default) and
// W = 16, messages of 1 to 4 pairs are checked against the reference WH value
// after the last pair, and the single-pair product a*b mod p after the first.
module tb_wh_datapath;
  import wh_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        load, clear, step;
  logic [63:0] m1, k1, m2, k2, acc64;
  logic [15:0] acc16;

  wh_datapath                               u64 (.clk, .rst_n, .load, .clear, .step,
                                                 .m1, .k1, .m2, .k2, .acc(acc64));
  wh_datapath #(.W(16), .POLY(16'h2B))      u16 (.clk, .rst_n, .load, .clear, .step,
                                                 .m1(m1[15:0]), .k1(k1[15:0]),
                                                 .m2(m2[15:0]), .k2(k2[15:0]), .acc(acc16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Runs one message through the instance of width w (both instances see the
  // same controls; only the one of width w is checked).
  task automatic message(input int w, input int pairs);
    word_t msg [64], key [64];
    word_t plow, held;
    plow = (w == 64) ? 64'h1B : 64'h2B;
    for (int i = 0; i < 2 * pairs; i++) begin
      msg[i] = {$urandom(), $urandom()} & mask(w);
      key[i] = {$urandom(), $urandom()} & mask(w);
    end
    for (int p = 0; p < pairs; p++) begin
      for (int c = 0; c < w; c++) begin
        load  = (c == 0);
        clear = (c == 0) && (p == 0);
        step  = (c != 0);
        m1 = msg[2*p]; k1 = key[2*p];
        if (c == 0) begin m2 = msg[2*p+1]; k2 = key[2*p+1]; end
        else        begin m2 = {$urandom(), $urandom()}; k2 = {$urandom(), $urandom()}; end
        @(negedge clk);
      end
      load = 0; step = 0;
      if (p == 0) begin
        held = (w == 64) ? acc64 : word_t'(acc16);
        check(held == gfmul(msg[0] ^ key[0], msg[1] ^ key[1], plow, w),
              $sformatf("W=%0d first product %h", w, held));
      end
      // idle cycles with changing inputs must not disturb the accumulator
      repeat ($urandom_range(0, 2)) begin
        held = (w == 64) ? acc64 : word_t'(acc16);
        m1 = {$urandom(), $urandom()}; m2 = {$urandom(), $urandom()};
        @(negedge clk);
        check(held == ((w == 64) ? acc64 : word_t'(acc16)), "accumulator moved while idle");
      end
    end
    held = (w == 64) ? acc64 : word_t'(acc16);
    check(held == wh(msg, key, 0, 2 * pairs, plow, w),
          $sformatf("W=%0d %0d-pair hash %h expected %h", w, pairs, held,
                    wh(msg, key, 0, 2 * pairs, plow, w)));
  endtask

  initial begin
    load = 0; clear = 0; step = 0;
    m1 = '0; k1 = '0; m2 = '0; k2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 15; r++) begin
      message(64, 1 + r % 4);
      message(16, 1 + (r + 1) % 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
