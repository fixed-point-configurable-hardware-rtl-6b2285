// lms_data_mem - input data memory of the LMS/DLMS IP.
//
// Holds the N + A_OFS most recent input samples x(n) ... x(n-N-A_OFS+1)
// as a circular buffer: a push writes the new sample over the oldest one and
// moves the write pointer, so no sample is ever shifted. The filter part
// and the adaptation part each read one group of K consecutive taps per
// cycle: for group g, lane l returns x(n-i) with i = g*K + l on the
// filter port and x(n-i-A_OFS) on the adaptation port, where A_OFS is the
// DLMS delay D (the update pairs e(n-D) with x_{n-D}). Taps i >= N (when
// K does not divide N) read as zero. The two read ports let the
// DLMS schedule run filtering and adaptation in the same cycles.
//
// The document draws this memory as a stack of banks feeding K multipliers;
// how it is organised is this design's choice: one register array with 2K
// combinational read ports (equivalent to K banks with rotating lane
// assignment). The array is cleared by reset, so the filter starts from an
// all-zero history.
//
// Timing: push (wr_en) takes effect at the clock edge; reads are
// combinational from the current contents.
module lms_data_mem #(
  parameter int unsigned N  = 128,  // filter length (taps)
  parameter int unsigned K  = 4,    // parallelism level
  parameter int unsigned BX = 16,   // input word length b_x
  parameter int unsigned A_OFS = 0, // tap offset of the adaptation port
  localparam int unsigned P  = (N + K - 1) / K,
  localparam int unsigned GW = (P > 1) ? $clog2(P) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic signed [BX-1:0] wr_data,
  input  logic [GW-1:0]        f_grp,
  output logic signed [BX-1:0] f_data [K],
  input  logic [GW-1:0]        a_grp,
  output logic signed [BX-1:0] a_data [K]
);
  localparam int unsigned NX = N + A_OFS;             // stored samples
  localparam int unsigned AW = (NX > 1) ? $clog2(NX) : 1;

  logic signed [BX-1:0] mem [NX];
  logic [AW-1:0]        wp, nwp;   // address of x(n), next address

  function automatic logic [AW-1:0] addr_of(input logic [AW-1:0] p, input int unsigned tap);
    return AW'((int'(p) + NX - tap) % NX);
  endfunction

  assign nwp = (int'(wp) == NX - 1) ? '0 : wp + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      for (int i = 0; i < NX; i++) mem[i] <= '0;
    end else if (wr_en) begin
      wp <= nwp;
      mem[nwp] <= wr_data;
    end
  end

  always_comb begin
    for (int l = 0; l < K; l++) begin
      int unsigned ti, ta;
      ti = int'(f_grp) * K + l;
      ta = int'(a_grp) * K + l;
      f_data[l] = (ti < N) ? mem[addr_of(wp, ti)] : '0;
      a_data[l] = (ta < N) ? mem[addr_of(wp, ta + A_OFS)] : '0;
    end
  end
endmodule
