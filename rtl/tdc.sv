// tdc: time-to-digital converter, counting delay-chain pulses.
// pulse, frame and error_set arrive asynchronously and each pass through a
// two flip-flop synchroniser into the delay-chain clock tdc_clk. A
// measurement starts at a falling edge of frame and ends at the next one;
// error_value is then the number of tdc_clk rising edges in between (the
// first included, the last excluded) at which pulse was high, saturating at
// all ones, and error_valid rises. The result is held, and further frames
// are ignored, until error_set: while error_set is high the result is
// cleared and nothing is counted; when it falls, the TDC waits for the next
// frame falling edge to start a new measurement.
// Latency: a result is valid three tdc_clk edges after the frame's end.
// The counting of delay-chain pulses, the 29-bit error_value and the
// error_valid flag follow the error detector's description; the frame
// input, the hold-until-error_set protocol and the synchronisers are this
// design's choice.
module tdc
  import sdpll_pkg::*;
(
  input  logic                tdc_clk,
  input  logic                rst_n,
  input  logic                pulse,
  input  logic                frame,
  input  logic                error_set,
  output logic [ERRVAL_W-1:0] error_value,
  output logic                error_valid
);
  timeunit 1ps; timeprecision 1fs;

  typedef enum logic [1:0] {S_ARM, S_COUNT, S_DONE} state_e;

  state_e              state;
  logic [1:0]          p_s, f_s, e_s;
  logic                f_q;
  logic [ERRVAL_W-1:0] cnt;
  logic                f_fall;

  assign f_fall = f_q & ~f_s[1];

  always_ff @(posedge tdc_clk or negedge rst_n) begin
    if (!rst_n) begin
      p_s         <= '0;
      f_s         <= '0;
      e_s         <= '0;
      f_q         <= 1'b0;
      state       <= S_ARM;
      cnt         <= '0;
      error_value <= '0;
      error_valid <= 1'b0;
    end else begin
      p_s <= {p_s[0], pulse};
      f_s <= {f_s[0], frame};
      e_s <= {e_s[0], error_set};
      f_q <= f_s[1];
      if (e_s[1]) begin
        state       <= S_ARM;
        error_valid <= 1'b0;
        error_value <= '0;
        cnt         <= '0;
      end else begin
        unique case (state)
          S_ARM: if (f_fall) begin
            state <= S_COUNT;
            cnt   <= ERRVAL_W'(p_s[1]);
          end
          S_COUNT: if (f_fall) begin
            state       <= S_DONE;
            error_value <= cnt;
            error_valid <= 1'b1;
          end else if (p_s[1] && cnt != '1) begin
            cnt <= cnt + ERRVAL_W'(1);
          end
          default: ;
        endcase
      end
    end
  end

endmodule
