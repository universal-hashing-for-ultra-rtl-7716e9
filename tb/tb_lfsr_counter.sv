// tb_lfsr_counter: self-checking test of the LFSR cycle counter.
//
// For W = 64 (default), 32, 16 and 4 the counter is started repeatedly, with
// and without idle cycles between runs, and back to back. Checks that `last`
// is high exactly in the W-th cycle of each run and never otherwise, and that
// the W states visited in a run are all different (the extended LFSR really
// has W states). Each instance has its own start/enable, as in the core.
module tb_lfsr_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] start, en;   // one pair per instance: 0 = W64 .. 3 = W4
  logic last64, last32, last16, last4;

  lfsr_counter            u64 (.clk, .rst_n, .start(start[0]), .en(en[0]), .last(last64));
  lfsr_counter #(.W(32))  u32 (.clk, .rst_n, .start(start[1]), .en(en[1]), .last(last32));
  lfsr_counter #(.W(16))  u16 (.clk, .rst_n, .start(start[2]), .en(en[2]), .last(last16));
  lfsr_counter #(.W(4))   u4  (.clk, .rst_n, .start(start[3]), .en(en[3]), .last(last4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One run of length w: start in count 0, en in counts 1..w-1.
  // Checks `last` of the selected instance in every count.
  task automatic run(input int w);
    bit seen [64];
    logic [5:0] s;
    int k;
    foreach (seen[i]) seen[i] = 0;
    k = (w == 64) ? 0 : (w == 32) ? 1 : (w == 16) ? 2 : 3;
    for (int c = 0; c < w; c++) begin
      start = '0; en = '0;
      start[k] = (c == 0);
      en[k]    = (c != 0);
      case (w)
        64: s = u64.state;
        32: s = 6'(u32.state);
        16: s = 6'(u16.state);
        default: s = 6'(u4.state);
      endcase
      #1;
      case (w)
        64: check(last64 == (c == w - 1), $sformatf("W=64 last in count %0d", c));
        32: check(last32 == (c == w - 1), $sformatf("W=32 last in count %0d", c));
        16: check(last16 == (c == w - 1), $sformatf("W=16 last in count %0d", c));
        default: check(last4 == (c == w - 1), $sformatf("W=4 last in count %0d", c));
      endcase
      check(!seen[s], $sformatf("W=%0d state %0d repeated in count %0d", w, s, c));
      seen[s] = 1;
      @(negedge clk);
    end
    start = '0; en = '0;
  endtask

  initial begin
    start = '0; en = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 6; r++) begin
      run(64); run(32); run(16); run(4);
      repeat (r % 3) begin
        #1 check(!last64 && !last32 && !last16 && !last4, "last while idle");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
