// bb_pfd -- bang-bang phase-frequency detector, written as an event-driven
// finite state automaton.
//
// The two compared clocks reach this block as one-cycle rising-edge strobes
// (ref_rise, div_rise) in the fast system clock domain.  The first edge to
// arrive opens an interval: MODE goes high and SIGN says which input led
// (1: ref led, div lags; 0: div led).  The edge of the other input closes the
// interval: MODE falls and `done` pulses for one cycle, so that the TDC can
// hand over the interval length it measured.  If the leading input produces
// another edge before the lagging one arrives (a frequency error), the
// interval simply stays open, which drives the TDC into saturation: this is
// the frequency-detector part of the behaviour.  Edges arriving in the same
// cycle give a zero-length interval (done with MODE never raised).
//
// The SIGN/MODE/automaton structure follows the design; the state encoding,
// the handling of coincident edges and the `done` strobe are this design's
// choices.  Timing: MODE rises the cycle after the opening edge strobe and
// falls, with `done` high, the cycle after the closing strobe.
module bb_pfd (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_rise,  // rising-edge event of the "+" (ref) input
  input  logic div_rise,  // rising-edge event of the "-" (div) input
  output logic sign,      // 1: ref leads (positive error), 0: div leads
  output logic mode,      // high while the phase-error interval is open
  output logic done       // one-cycle pulse when an interval closes
);

  typedef enum logic [1:0] {S_IDLE, S_REF_LEAD, S_DIV_LEAD} state_t;
  state_t state, state_n;
  logic   sign_n, done_n;

  always_comb begin
    state_n = state;
    sign_n  = sign;
    done_n  = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (ref_rise && div_rise) begin
          done_n = 1'b1;            // coincident edges: zero phase error
        end else if (ref_rise) begin
          state_n = S_REF_LEAD;
          sign_n  = 1'b1;
        end else if (div_rise) begin
          state_n = S_DIV_LEAD;
          sign_n  = 1'b0;
        end
      end
      S_REF_LEAD: if (div_rise) begin
        state_n = S_IDLE;
        done_n  = 1'b1;
      end
      S_DIV_LEAD: if (ref_rise) begin
        state_n = S_IDLE;
        done_n  = 1'b1;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sign  <= 1'b1;
      done  <= 1'b0;
    end else begin
      state <= state_n;
      sign  <= sign_n;
      done  <= done_n;
    end
  end

  assign mode = (state != S_IDLE);

  // A closed interval always leaves the automaton idle.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !mode);

endmodule
