// lms_ctrl - control unit (finite state machine) of the LMS/DLMS IP.
//
// Sequences one input sample through the processing unit, P = ceil(N/K)
// groups of K taps at a time:
//   IDLE  : ready; a sample is accepted (push into the data memory).
//   FILT  : P cycles, one filter group issued per cycle. For the DLMS
//           (DELAY > 0) the adaptation group of the same index is issued
//           in the same cycle, using the delayed error.
//   WAIT  : the adder tree and accumulator drain until yhat is valid.
//           LMS: the error is registered and ADAPT follows.
//           DLMS: the error is registered and, in the same cycle, the next
//           sample may already be accepted.
//   ADAPT : LMS only, P cycles, one adaptation group per cycle; the last
//           multiply-add finishes in the following cycle, during which the
//           next sample may be accepted.
// Sample period in cycles: LMS  T_FIR + T_Adapt = (P+M_ADD+1) + (P+2);
//                          DLMS T_FIR + 1       = P + M_ADD + 2.
// The document gives these execution times; the state encoding and the
// ready/valid input handshake are this design's choices.
module lms_ctrl #(
  parameter int unsigned P     = 32,   // groups per sample, N/K
  parameter int unsigned DELAY = 0,    // DLMS error delay D (0: LMS)
  localparam int unsigned GW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  output logic          x_ready,
  output logic          push,       // accept the sample this cycle
  input  logic          yhat_valid, // filter output valid this cycle
  output logic          f_issue,
  output logic [GW-1:0] f_grp,
  output logic          f_first,
  output logic          f_last,
  output logic          a_issue,
  output logic [GW-1:0] a_grp
);
  typedef enum logic [1:0] {S_IDLE, S_FILT, S_WAIT, S_ADAPT} state_e;
  state_e        state, state_n;
  logic [GW-1:0] g, g_n;

  localparam logic [GW-1:0] GLAST = GW'(P - 1);

  always_comb begin
    state_n = state;
    g_n     = g;
    x_ready = 1'b0;
    f_issue = 1'b0;
    a_issue = 1'b0;
    f_grp   = g;
    a_grp   = g;
    f_first = (g == '0);
    f_last  = (g == GLAST);
    unique case (state)
      S_IDLE: begin
        x_ready = 1'b1;
        if (x_valid) begin
          state_n = S_FILT;
          g_n     = '0;
        end
      end
      S_FILT: begin
        f_issue = 1'b1;
        a_issue = (DELAY > 0);
        if (g == GLAST) begin
          state_n = S_WAIT;
          g_n     = '0;
        end else g_n = g + 1'b1;
      end
      S_WAIT: begin
        if (yhat_valid) begin
          g_n = '0;
          if (DELAY == 0) state_n = S_ADAPT;
          else begin
            x_ready = 1'b1;
            state_n = x_valid ? S_FILT : S_IDLE;
          end
        end
      end
      S_ADAPT: begin
        a_issue = 1'b1;
        if (g == GLAST) begin
          state_n = S_IDLE;
          g_n     = '0;
        end else g_n = g + 1'b1;
      end
      default: state_n = S_IDLE;
    endcase
  end

  assign push = x_valid & x_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      g     <= '0;
    end else begin
      state <= state_n;
      g     <= g_n;
    end
  end

  // The filter output may only arrive while the controller waits for it.
  a_yhat_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    yhat_valid |-> state == S_WAIT);
endmodule
