// lms_coef_mem - coefficient memory of the LMS/DLMS IP.
//
// Stores the N filter coefficients h_i (the weight vector w_n), each of
// b_h bits. Coefficient i lives at address i. Per cycle it serves one
// group of K coefficients to the filter multipliers (f_grp), one group to
// the adaptation adders (a_grp), and accepts the write-back of one updated
// group h_i(n+1) (wr_en, wr_grp). A fourth, single-word read port (dbg_*)
// lets the surrounding system observe the weights. Lanes whose coefficient
// index is N or above read as zero and are never written.
//
// Organisation as one array with combinational reads and one group write
// per cycle is this design's choice; the document only names the memory
// and its word length b_h. Reset clears every coefficient: the adaptive
// filter starts from the zero weight vector.
//
// Timing: writes at the clock edge; reads are combinational, so a group
// read in the cycle it is written returns the old value.
module lms_coef_mem #(
  parameter int unsigned N  = 128,
  parameter int unsigned K  = 4,
  parameter int unsigned BH = 16,   // coefficient word length b_h
  localparam int unsigned P  = (N + K - 1) / K,
  localparam int unsigned GW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [GW-1:0]        f_grp,
  output logic signed [BH-1:0] f_data [K],
  input  logic [GW-1:0]        a_grp,
  output logic signed [BH-1:0] a_data [K],
  input  logic                 wr_en,
  input  logic [GW-1:0]        wr_grp,
  input  logic signed [BH-1:0] wr_data [K],
  input  logic [AW-1:0]        dbg_addr,
  output logic signed [BH-1:0] dbg_data
);
  logic signed [BH-1:0] mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem[i] <= '0;
    end else if (wr_en) begin
      for (int l = 0; l < K; l++)
        if (int'(wr_grp) * K + l < N) mem[int'(wr_grp) * K + l] <= wr_data[l];
    end
  end

  always_comb begin
    for (int l = 0; l < K; l++) begin
      int unsigned ti, ta;
      ti = int'(f_grp) * K + l;
      ta = int'(a_grp) * K + l;
      f_data[l] = (ti < N) ? mem[ti] : '0;
      a_data[l] = (ta < N) ? mem[ta] : '0;
    end
    dbg_data = (int'(dbg_addr) < N) ? mem[dbg_addr] : '0;
  end
endmodule
