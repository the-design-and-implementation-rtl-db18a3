// Time-difference counter for the three microphones.
//
// The latched microphone outputs rise one after another as the sound of an
// impact spreads across the board. From the moment the first microphone
// fires, the counter for every microphone that has not fired yet runs at
// the enable rate; each stops when its own microphone fires. The result is
// three counts: zero for the first microphone and the arrival delay, in
// enable periods, for the other two.
//
// As in the original design this is an eight-state machine: an idle state,
// six counting states (each pair of microphones, each single microphone)
// and a ready state. State changes and counts happen only on enable cycles;
// counter_reset returns the machine to idle at once, whatever the enable.
// Counts saturate at all ones (an own choice; the document does not say).
//
// Interface: mic[0..2] are level inputs, high once the microphone's latch
// has fired. ready stays high, with the counts held, until counter_reset.
module mic_counter #(
  parameter int unsigned CW = 12
) (
  input  logic          clk,
  input  logic          en,
  input  logic          counter_reset,
  input  logic [2:0]    mic,
  output logic [CW-1:0] delta0,
  output logic [CW-1:0] delta1,
  output logic [CW-1:0] delta2,
  output logic          ready
);
  typedef enum logic [2:0] {
    IDLE, CNT01, CNT02, CNT12, CNT0, CNT1, CNT2, DONE
  } state_t;

  state_t state;

  // Which counters run in a state.
  function automatic logic [2:0] running(input state_t s);
    case (s)
      CNT01:   return 3'b011;
      CNT02:   return 3'b101;
      CNT12:   return 3'b110;
      CNT0:    return 3'b001;
      CNT1:    return 3'b010;
      CNT2:    return 3'b100;
      default: return 3'b000;
    endcase
  endfunction

  // State for a set of microphones still waiting (1 = not yet heard).
  function automatic state_t waiting_state(input logic [2:0] w);
    case (w)
      3'b000:  return DONE;
      3'b011:  return CNT01;
      3'b101:  return CNT02;
      3'b110:  return CNT12;
      3'b001:  return CNT0;
      3'b010:  return CNT1;
      3'b100:  return CNT2;
      default: return IDLE;   // none heard yet
    endcase
  endfunction

  logic [2:0] run;
  assign run = running(state);

  always_ff @(posedge clk) begin
    if (counter_reset) begin
      state  <= IDLE;
      delta0 <= '0;
      delta1 <= '0;
      delta2 <= '0;
      ready  <= 1'b0;
    end else if (en) begin
      case (state)
        IDLE: begin
          delta0 <= '0;
          delta1 <= '0;
          delta2 <= '0;
          ready  <= 1'b0;
          state  <= waiting_state(~mic);
        end
        DONE: ready <= 1'b1;
        default: begin
          if (run[0] && delta0 != '1) delta0 <= delta0 + 1'b1;
          if (run[1] && delta1 != '1) delta1 <= delta1 + 1'b1;
          if (run[2] && delta2 != '1) delta2 <= delta2 + 1'b1;
          state <= waiting_state(run & ~mic);
        end
      endcase
    end
  end
endmodule
