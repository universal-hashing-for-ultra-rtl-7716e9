// tb_wh_core: self-checking test of the WH hash core.
//
// Runs the core at its default width (WH-64) and at 32, 16 and 8 bits, each
// on random messages against a reference computed directly from the WH
// definition. Checks hash values, the W-cycle pair rate and the W-cycle
// latency from the last pair to hash_valid.
module tb_wh_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d64, d32, d16, d8;
  int   c64, c32, c16, c8, f64, f32, f16, f8, b64, b32, b16, b8;
  int   checks, failures;

  wh_core_check #(.W(64), .PLOW(64'h1B)) u64 (.clk, .rst_n, .done(d64), .checks(c64), .failures(f64), .back_to_back(b64));
  wh_core_check #(.W(32), .PLOW(64'h8D)) u32 (.clk, .rst_n, .done(d32), .checks(c32), .failures(f32), .back_to_back(b32));
  wh_core_check #(.W(16), .PLOW(64'h2B)) u16 (.clk, .rst_n, .done(d16), .checks(c16), .failures(f16), .back_to_back(b16));
  wh_core_check #(.W(8),  .PLOW(64'h1B)) u8  (.clk, .rst_n, .done(d8),  .checks(c8),  .failures(f8),  .back_to_back(b8));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d64 && d32 && d16 && d8);
    checks   = c64 + c32 + c16 + c8 + 1;
    failures = f64 + f32 + f16 + f8;
    if (b64 == 0 || b32 == 0 || b16 == 0 || b8 == 0) begin
      failures++;
      $display("FAIL: no back-to-back pairs were exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c64 + c32 + c16 + c8, f64 + f32 + f16 + f8 + 1);
    $finish;
  end
endmodule
