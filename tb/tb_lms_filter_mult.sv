// tb_lms_filter_mult - random operands through the K multipliers; each
// registered product must equal the exact product truncated to FM
// fractional bits and wrapped to BM bits, one cycle later, with the tag.
// A narrow output format (BM=20, FM=18) makes truncation and wrap matter.
module tb_lms_filter_mult;
  import fxp_pkg::*;
  localparam int K = 3, BX = 16, FX = 15, BH = 16, FH = 15, BM = 20, FM = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [BX-1:0] x [K];
  logic signed [BH-1:0] h [K];
  logic signed [BM-1:0] m [K];
  grp_tag_t tag_in, tag_out;
  int checks = 0, failures = 0;

  lms_filter_mult #(.K(K), .BX(BX), .FX(FX), .BH(BH), .FH(FH), .BM(BM), .FM(FM)) dut (.*);

  function automatic longint ref_q(longint a, longint b);
    longint p, r;
    p = a * b;
    r = p >>> (FX + FH - FM);
    r = r & ((longint'(1) << BM) - 1);
    if (r >= (longint'(1) << (BM - 1))) r -= (longint'(1) << BM);
    return r;
  endfunction

  initial begin
    longint e [K];
    grp_tag_t et;
    tag_in = '0;
    for (int l = 0; l < K; l++) begin x[l] = '0; h[l] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int l = 0; l < K; l++) begin
        x[l] = BX'($urandom);
        h[l] = (n < 5) ? -16'sd32768 : BH'($urandom);
        e[l] = ref_q(longint'(x[l]), longint'(h[l]));
      end
      tag_in = grp_tag_t'($urandom_range(7));
      et = tag_in;
      @(negedge clk);
      for (int l = 0; l < K; l++) begin
        checks++;
        if (longint'(m[l]) != e[l]) begin
          failures++;
          $display("lane %0d: %0d expected %0d", l, m[l], e[l]);
        end
      end
      checks++;
      if (tag_out != et) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
