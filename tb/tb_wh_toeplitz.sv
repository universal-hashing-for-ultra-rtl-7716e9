// tb_wh_toeplitz: end-to-end test of the Toeplitz-WH unit at its default
// configuration (WH-16: T = 4, 16-bit blocks, 64-bit tag).
//
// wh_toeplitz_check acts as the message/key source: it hashes a fixed
// 128-bit message whose tag is known, then random messages with source
// stalls, then a single-pair message, checking every partial hash, every tag,
// the cycle count of the 128-bit message (T * 64 + 1 cycles to the tag) and
// that every mechanism of the unit was exercised.
module tb_wh_toeplitz;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int unsigned W = 16;

  logic         in_valid, in_ready, in_first, in_last, hash_valid, tag_valid, done;
  logic [W-1:0] m1, k1, m2, k2, hash;
  logic [63:0]  tag;
  logic         reduce_evt;
  int           checks, failures;

  wh_toeplitz dut (.*);

  // a reduction happens whenever the bit shifted out of the accumulator is set
  assign reduce_evt = dut.u_core.u_dp.acc_base[W-1] &&
                      (dut.u_core.u_dp.load || dut.u_core.u_dp.step);

  wh_toeplitz_check #(.T(4), .PLOW(64'h2B), .GOLDEN(64'hdb2f_74eb_c4ba_709d)) chk (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
