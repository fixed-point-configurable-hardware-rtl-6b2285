// tb_lms_coef_mem - writes random groups into the coefficient memory and
// checks all three read ports against an array model, including the
// read-before-write behaviour within one cycle and the dead lanes of the
// last group (N=10, K=4).
module tb_lms_coef_mem;
  localparam int N = 10, K = 4, BH = 16;
  localparam int P = (N + K - 1) / K, GW = $clog2(P), AW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [GW-1:0] f_grp, a_grp, wr_grp;
  logic signed [BH-1:0] f_data [K], a_data [K], wr_data [K], dbg_data;
  logic wr_en;
  logic [AW-1:0] dbg_addr;
  int checks = 0, failures = 0;
  int model [N];

  lms_coef_mem #(.N(N), .K(K), .BH(BH)) dut (.*);

  task automatic check_all();
    for (int g = 0; g < P; g++) begin
      f_grp = GW'(g); a_grp = GW'(g);
      #1;
      for (int l = 0; l < K; l++) begin
        int t, e;
        t = g * K + l;
        e = (t < N) ? model[t] : 0;
        checks += 2;
        if (int'(f_data[l]) != e || int'(a_data[l]) != e) begin
          failures++;
          $display("h[%0d]: %0d/%0d expected %0d", t, f_data[l], a_data[l], e);
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      dbg_addr = AW'(i);
      #1;
      checks++;
      if (int'(dbg_data) != model[i]) begin
        failures++;
        $display("dbg h[%0d]: %0d expected %0d", i, dbg_data, model[i]);
      end
    end
  endtask

  initial begin
    wr_en = 0; wr_grp = '0; f_grp = '0; a_grp = '0; dbg_addr = '0;
    for (int l = 0; l < K; l++) wr_data[l] = '0;
    for (int i = 0; i < N; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 30; n++) begin
      @(negedge clk);
      wr_en = 1;
      wr_grp = GW'($urandom_range(P - 1));
      for (int l = 0; l < K; l++) wr_data[l] = BH'($urandom);
      // before the edge the old contents are still read
      f_grp = wr_grp;
      #1;
      checks++;
      if (int'(f_data[0]) != model[int'(wr_grp) * K]) failures++;
      @(posedge clk);
      for (int l = 0; l < K; l++)
        if (int'(wr_grp) * K + l < N) model[int'(wr_grp) * K + l] = int'(wr_data[l]);
      @(negedge clk);
      wr_en = 0;
      check_all();
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
