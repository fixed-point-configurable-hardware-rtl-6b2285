// tb_lms_accumulator - feeds random-length runs of tagged partial sums
// (first ... last) with idle cycles in between and checks that y_valid
// pulses once per run, one cycle after the last partial sum, with y equal
// to the wrapped sum of the run.
module tb_lms_accumulator;
  import fxp_pkg::*;
  localparam int BO = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [BO-1:0] s, y;
  grp_tag_t tag_in;
  logic y_valid;
  int checks = 0, failures = 0, nout = 0;
  longint expq [$];

  lms_accumulator #(.BO(BO)) dut (.*);

  function automatic longint wrapo(longint v);
    v = v & ((longint'(1) << BO) - 1);
    if (v >= (longint'(1) << (BO - 1))) v -= (longint'(1) << BO);
    return v;
  endfunction

  always @(posedge clk) if (rst_n && y_valid) begin
    checks++;
    nout++;
    if (longint'(y) != expq.pop_front()) begin
      failures++;
      $display("y = %0d wrong", y);
    end
  end

  initial begin
    tag_in = '0; s = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      int len;
      longint acc;
      len = 1 + int'($urandom_range(6));
      acc = 0;
      for (int g = 0; g < len; g++) begin
        @(negedge clk);
        s = BO'($urandom);
        acc += longint'(s);
        tag_in = '{valid: 1'b1, first: (g == 0), last: (g == len - 1)};
        // y_valid must stay low while the run is in progress
        if (g > 0) begin
          checks++;
          if (y_valid) failures++;
        end
      end
      expq.push_back(wrapo(acc));
      @(negedge clk);
      tag_in = '0;
      checks++;
      if (!y_valid) failures++;          // one cycle after the last sum
      repeat ($urandom_range(2)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (nout != 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
