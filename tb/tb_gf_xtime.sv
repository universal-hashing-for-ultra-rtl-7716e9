// tb_gf_xtime: self-checking test of the multiply-by-x reduction unit.
//
// Instances at 64, 32 and 16 bits (with their reduction polynomials) are fed
// random elements and the edge values 0, 1, x^(W-1) and all-ones; each output
// is compared with the reference product a * x mod p computed by long
// division in wh_ref_pkg.
module tb_gf_xtime;
  import wh_ref_pkg::*;

  logic [63:0] a64, y64;
  logic [31:0] a32, y32;
  logic [15:0] a16, y16;
  int checks = 0, failures = 0;

  gf_xtime                                u64 (.a(a64), .y(y64));
  gf_xtime #(.W(32), .POLY(32'h8D))       u32 (.a(a32), .y(y32));
  gf_xtime #(.W(16), .POLY(16'h2B))       u16 (.a(a16), .y(y16));

  task automatic check(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic apply(input word_t v);
    a64 = v; a32 = v[31:0]; a16 = v[15:0];
    #1;
    check(y64, gfmul(v, 64'd2, 64'h1B, 64), "W=64");
    check(word_t'(y32), gfmul(v & mask(32), 64'd2, 64'h8D, 32), "W=32");
    check(word_t'(y16), gfmul(v & mask(16), 64'd2, 64'h2B, 16), "W=16");
  endtask

  initial begin
    apply('0);
    apply(64'd1);
    apply(64'h8000_0000_8000_8000);
    apply('1);
    for (int i = 0; i < 2000; i++) apply({$urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
