// tb_wh_variants: the Toeplitz-WH unit in its other two configurations,
// WH-64 (T = 1, one 64-bit hash) and WH-32 (T = 2, two 32-bit hashes).
//
// Same source/checker as the default test: a 128-bit message with a known
// tag (cycle count T * 64 + 1), random messages with stalls, a single-pair
// message. Together with tb_wh_toeplitz this covers all three block sizes.
module tb_wh_variants;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        v1, r1, f1, l1, hv1, tv1, d1, e1;
  logic [63:0] m1a, k1a, m2a, k2a, h1, t1;
  logic        v2, r2, f2, l2, hv2, tv2, d2, e2;
  logic [31:0] m1b, k1b, m2b, k2b, h2;
  logic [63:0] t2;
  int          c1, x1, c2, x2;

  wh_toeplitz #(.T(1)) dut64 (.clk, .rst_n, .in_valid(v1), .in_ready(r1), .in_first(f1),
                              .in_last(l1), .m1(m1a), .k1(k1a), .m2(m2a), .k2(k2a),
                              .hash(h1), .hash_valid(hv1), .tag(t1), .tag_valid(tv1));
  assign e1 = dut64.u_core.u_dp.acc_base[63] &&
              (dut64.u_core.u_dp.load || dut64.u_core.u_dp.step);
  wh_toeplitz_check #(.T(1), .PLOW(64'h1B), .GOLDEN(64'h394e_5e49_adce_7a21)) chk64 (
    .clk, .rst_n, .in_valid(v1), .in_ready(r1), .in_first(f1), .in_last(l1),
    .m1(m1a), .k1(k1a), .m2(m2a), .k2(k2a), .hash(h1), .hash_valid(hv1),
    .tag(t1), .tag_valid(tv1), .reduce_evt(e1), .done(d1), .checks(c1), .failures(x1));

  wh_toeplitz #(.T(2)) dut32 (.clk, .rst_n, .in_valid(v2), .in_ready(r2), .in_first(f2),
                              .in_last(l2), .m1(m1b), .k1(k1b), .m2(m2b), .k2(k2b),
                              .hash(h2), .hash_valid(hv2), .tag(t2), .tag_valid(tv2));
  assign e2 = dut32.u_core.u_dp.acc_base[31] &&
              (dut32.u_core.u_dp.load || dut32.u_core.u_dp.step);
  wh_toeplitz_check #(.T(2), .PLOW(64'h8D), .GOLDEN(64'h41a1_87fb_17c3_49f7)) chk32 (
    .clk, .rst_n, .in_valid(v2), .in_ready(r2), .in_first(f2), .in_last(l2),
    .m1(m1b), .k1(k1b), .m2(m2b), .k2(k2b), .hash(h2), .hash_valid(hv2),
    .tag(t2), .tag_valid(tv2), .reduce_evt(e2), .done(d2), .checks(c2), .failures(x2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, x1 + x2);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, x1 + x2 + 1);
    $finish;
  end
endmodule
