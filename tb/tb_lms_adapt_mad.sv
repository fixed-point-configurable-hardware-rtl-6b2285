// tb_lms_adapt_mad - issues random groups to the K multiply-add units
// against a coefficient array held here. Checks that one cycle after each
// issue the unit presents the issued group on h_grp / wr_grp with wr_en
// and wr_data = h + round(x * e * 2^-MU) in the coefficient format.
module tb_lms_adapt_mad;
  localparam int N = 12, K = 4, BX = 16, FX = 15, BH = 16, FH = 15, BO = 32, FO = 24, MU = 3;
  localparam int P = N / K, GW = $clog2(P);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic issue, wr_en;
  logic [GW-1:0] grp, h_grp, wr_grp;
  logic signed [BX-1:0] x [K];
  logic signed [BO-1:0] e;
  logic signed [BH-1:0] h_in [K], wr_data [K];
  int checks = 0, failures = 0;
  longint hm [N];

  lms_adapt_mad #(.N(N), .K(K), .BX(BX), .FX(FX), .BH(BH), .FH(FH), .BO(BO), .FO(FO),
                  .MU_SHIFT(MU)) dut (.*);

  // coefficient array read combinationally at h_grp
  always_comb for (int l = 0; l < K; l++) h_in[l] = BH'(hm[int'(h_grp) * K + l]);

  function automatic longint wrap(longint v, int b);
    v = v & ((longint'(1) << b) - 1);
    if (v >= (longint'(1) << (b - 1))) v -= (longint'(1) << b);
    return v;
  endfunction

  initial begin
    longint ex [K];
    int g;
    issue = 0; grp = '0; e = '0;
    for (int l = 0; l < K; l++) x[l] = '0;
    for (int i = 0; i < N; i++) hm[i] = wrap(longint'($urandom), BH);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      g = int'($urandom_range(P - 1));
      issue = 1; grp = GW'(g);
      e = BO'($urandom) >>> $urandom_range(8);
      for (int l = 0; l < K; l++) x[l] = BX'($urandom);
      #1;
      for (int l = 0; l < K; l++)
        ex[l] = wrap(hm[g * K + l] + wrap((longint'(x[l]) * longint'(e) + (64'sd1 <<< (FX + FO + MU - FH - 1))) >>> (FX + FO + MU - FH), BH), BH);
      @(negedge clk);
      issue = 0;
      checks += 2;
      if (!wr_en || int'(wr_grp) != g || int'(h_grp) != g) failures++;
      for (int l = 0; l < K; l++) begin
        checks++;
        if (longint'(wr_data[l]) != ex[l]) begin
          failures++;
          $display("lane %0d: %0d expected %0d", l, wr_data[l], ex[l]);
        end
        hm[g * K + l] = ex[l];
      end
      @(negedge clk);
      if (wr_en) failures++;
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
