// tb_lms_data_mem - checks the circular input memory: after each push,
// both read ports must return the delay line x(n-i) (filter) and
// x(n-i-A_OFS) (adaptation) held by a simple shift-register model, with
// taps at or beyond N reading zero. N=10, K=4 leaves two dead lanes.
module tb_lms_data_mem;
  localparam int N = 10, K = 4, BX = 16, A_OFS = 2;
  localparam int P = (N + K - 1) / K, GW = $clog2(P);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en;
  logic signed [BX-1:0] wr_data, f_data [K], a_data [K];
  logic [GW-1:0] f_grp, a_grp;
  int checks = 0, failures = 0;
  int model [N + A_OFS];

  lms_data_mem #(.N(N), .K(K), .BX(BX), .A_OFS(A_OFS)) dut (.*);

  initial begin
    wr_en = 0; wr_data = '0; f_grp = '0; a_grp = '0;
    for (int i = 0; i < N + A_OFS; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      wr_en = ($urandom_range(3) != 0);
      wr_data = BX'($urandom);
      @(posedge clk);
      if (wr_en) begin
        for (int i = N + A_OFS - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = int'(wr_data);
      end
      @(negedge clk);
      wr_en = 0;
      for (int g = 0; g < P; g++) begin
        f_grp = GW'(g);
        a_grp = GW'(P - 1 - g);
        #1;
        for (int l = 0; l < K; l++) begin
          int tf, ta, ef, ea;
          tf = g * K + l;
          ta = (P - 1 - g) * K + l;
          ef = (tf < N) ? model[tf] : 0;
          ea = (ta < N) ? model[ta + A_OFS] : 0;
          checks += 2;
          if (int'(f_data[l]) != ef) begin
            failures++;
            $display("f tap %0d: %0d expected %0d", tf, f_data[l], ef);
          end
          if (int'(a_data[l]) != ea) begin
            failures++;
            $display("a tap %0d: %0d expected %0d", ta, a_data[l], ea);
          end
        end
      end
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
