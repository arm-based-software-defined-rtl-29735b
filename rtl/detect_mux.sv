// detect_mux: selects what the TDC measures, by detect mode.
//   DET_PERIOD (frequency search): pulse = ref_pulse, the re-generated
//     reference pulse one reference period wide; frame = ~ref_pulse, so a
//     frame runs from one ref_pulse rising edge to the next and holds one
//     whole pulse.
//   DET_PHASE (phase tracking): pulse = the PFD phase error; frame = the
//     reference clock, so a frame runs from one reference falling edge to
//     the next, centred on the reference rising edge around which the phase
//     error pulse lies.
//   DET_IDLE and the reserved code: both held low, nothing is measured.
// The TDC counts pulse-high time over one frame. The choice between the
// reference pulse and the phase error by detect mode follows the error
// detector's structure; the frame signal is this design's addition, so that
// a phase error too short for the TDC still gives a result (zero).
// Purely combinational.
module detect_mux
  import sdpll_pkg::*;
(
  input  detect_mode_e detect_mode,
  input  logic         ref_clk,
  input  logic         ref_pulse,
  input  logic         phase_error,
  output logic         pulse,
  output logic         frame
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    unique case (detect_mode)
      DET_PERIOD: begin pulse = ref_pulse;   frame = ~ref_pulse; end
      DET_PHASE:  begin pulse = phase_error; frame = ref_clk;    end
      default:    begin pulse = 1'b0;        frame = 1'b0;       end
    endcase
  end

endmodule
