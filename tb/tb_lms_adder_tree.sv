// tb_lms_adder_tree - streams random groups through three adder trees
// (K=5 with one level per cycle, K=8 with two levels per cycle, K=1) and
// checks that each sum equals the wrapped sum of the inputs scaled from
// FM to FO fractional bits, after exactly M_ADD = ceil(log2 K / L_ADD)
// cycles, tag included.
module tb_lms_adder_tree;
  import fxp_pkg::*;
  localparam int BM = 32, FM = 30, BO = 24, FO = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [BM-1:0] d5 [5], d8 [8], d1 [1];
  logic signed [BO-1:0] s5, s8, s1;
  grp_tag_t t5i, t5o, t8i, t8o, t1i, t1o;

  lms_adder_tree #(.K(5), .BM(BM), .FM(FM), .BO(BO), .FO(FO), .L_ADD(1)) u5 (
    .clk, .rst_n, .d(d5), .tag_in(t5i), .sum(s5), .tag_out(t5o));
  lms_adder_tree #(.K(8), .BM(BM), .FM(FM), .BO(BO), .FO(FO), .L_ADD(2)) u8 (
    .clk, .rst_n, .d(d8), .tag_in(t8i), .sum(s8), .tag_out(t8o));
  lms_adder_tree #(.K(1), .BM(BM), .FM(FM), .BO(BO), .FO(FO), .L_ADD(1)) u1 (
    .clk, .rst_n, .d(d1), .tag_in(t1i), .sum(s1), .tag_out(t1o));

  function automatic longint wrapo(longint v);
    v = v & ((longint'(1) << BO) - 1);
    if (v >= (longint'(1) << (BO - 1))) v -= (longint'(1) << BO);
    return v;
  endfunction

  // expected sums in flight, indexed by issue cycle
  longint e5 [$], e8 [$], e1 [$];
  int cyc = 0;

  initial begin
    t5i = '0; t8i = '0; t1i = '0;
    for (int l = 0; l < 5; l++) d5[l] = '0;
    for (int l = 0; l < 8; l++) d8[l] = '0;
    d1[0] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      longint a5, a8;
      @(negedge clk);
      a5 = 0; a8 = 0;
      for (int l = 0; l < 5; l++) begin d5[l] = BM'($urandom); a5 += longint'(d5[l]) >>> (FM - FO); end
      for (int l = 0; l < 8; l++) begin d8[l] = BM'($urandom); a8 += longint'(d8[l]) >>> (FM - FO); end
      d1[0] = BM'($urandom);
      t5i = '{valid: 1'b1, first: n[0], last: n[1]};
      t8i = '{valid: 1'b1, first: n[1], last: n[0]};
      t1i = '{valid: 1'b1, first: 1'b0, last: 1'b0};
      // K=1: no register, check in the same cycle
      #1;
      checks++;
      if (longint'(s1) != wrapo(longint'(d1[0]) >>> (FM - FO)) || !t1o.valid) failures++;
      e5.push_back(wrapo(a5));
      e8.push_back(wrapo(a8));
    end
    @(negedge clk);
    t5i = '0; t8i = '0;
    repeat (5) @(negedge clk);
    checks += 2;
    if (e5.size() != 0 || e8.size() != 0) begin
      failures++;
      $display("outputs missing: %0d %0d", e5.size(), e8.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // outputs: K=5 -> 3 stages, K=8 with L_ADD=2 -> 2 stages
  int issue5 [$], issue8 [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (t5i.valid) issue5.push_back(cyc);
    if (t8i.valid) issue8.push_back(cyc);
    if (rst_n && t5o.valid) begin
      checks += 2;
      if (longint'(s5) != e5.pop_front()) begin failures++; $display("s5 mismatch at %0d", cyc); end
      if (cyc - issue5.pop_front() != 3) begin failures++; $display("lat5 at %0d", cyc); end
    end
    if (rst_n && t8o.valid) begin
      checks += 2;
      if (longint'(s8) != e8.pop_front()) begin failures++; $display("s8 mismatch at %0d", cyc); end
      if (cyc - issue8.pop_front() != 2) failures++;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
