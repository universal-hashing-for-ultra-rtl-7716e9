// tb_tag_concat: self-checking test of the partial-hash concatenation.
//
// Default instance (W = 16, T = 4) plus T = 2 and T = 1 instances. Random
// partial hashes are strobed in with random gaps; after every T-th strobe the
// tag must equal the T hashes concatenated, first hash in the top bits, and
// tag_valid must pulse for exactly one cycle.
module tb_tag_concat;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        hv4, hv2, hv1, tv4, tv2, tv1;
  logic [15:0] h4;
  logic [31:0] h2;
  logic [63:0] h1, t4, t2, t1;

  tag_concat                    u4 (.clk, .rst_n, .hash_valid(hv4), .hash(h4), .tag(t4), .tag_valid(tv4));
  tag_concat #(.W(32), .T(2))   u2 (.clk, .rst_n, .hash_valid(hv2), .hash(h2), .tag(t2), .tag_valid(tv2));
  tag_concat #(.W(64), .T(1))   u1 (.clk, .rst_n, .hash_valid(hv1), .hash(h1), .tag(t1), .tag_valid(tv1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Sends one tag's worth of partial hashes to the instance with T = t.
  task automatic one_tag(input int t);
    logic [63:0] exp;
    int w;
    w = 64 / t;
    exp = '0;
    for (int j = 0; j < t; j++) begin
      logic [63:0] h;
      h = {$urandom(), $urandom()};
      if (w < 64) h = h & ((64'd1 << w) - 1);
      exp = (t == 1) ? h : ((exp << w) | h);
      hv4 = (t == 4); hv2 = (t == 2); hv1 = (t == 1);
      h4 = h[15:0]; h2 = h[31:0]; h1 = h;
      @(negedge clk);
      hv4 = 0; hv2 = 0; hv1 = 0;
      h4 = 16'($urandom()); h2 = $urandom(); h1 = {$urandom(), $urandom()};
      if (j < t - 1) begin
        check(!tv4 && !tv2 && !tv1, "tag_valid before the tag is complete");
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    case (t)
      4: check(tv4 && t4 == exp, $sformatf("T=4 tag %h expected %h", t4, exp));
      2: check(tv2 && t2 == exp, $sformatf("T=2 tag %h expected %h", t2, exp));
      default: check(tv1 && t1 == exp, $sformatf("T=1 tag %h expected %h", t1, exp));
    endcase
    @(negedge clk);
    check(!tv4 && !tv2 && !tv1, "tag_valid longer than one cycle");
  endtask

  initial begin
    hv4 = 0; hv2 = 0; hv1 = 0; h4 = '0; h2 = '0; h1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < 20; r++) begin
      one_tag(4); one_tag(2); one_tag(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
