// resize_fsm: the asymmetric n-bit state machine (STATE) of power control.
//
// Filters one core's local requests so that the number of active ways grows
// at once but shrinks only after down-sizing requests have repeated. With
// SM_BITS = 3 the states are 000 (INC), 001..110 (KEEP0..KEEP5) and 111 (DEC):
//   inc  in any state      -> output INC,  go to 000
//   dec  in 000..101       -> output KEEP, go to the next state
//   dec  in 110 or 111     -> output DEC,  go to 111
// so the first DEC comes with the seventh dec in a row and every further dec
// gives DEC. A keep request leaves the state as it is and outputs KEEP; the
// source shows no transition for keep, so that is this design's choice.
//
// The machine steps once per sampling interval, on a cycle where `en` is
// high; the command is registered with the state and is valid from the cycle
// after `en`, together with `nact_vld`. Reset goes to state 000.
module resize_fsm
  import pac_pkg::*;
#(
  parameter int unsigned SM_BITS = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,        // one step per sampling interval
  input  resize_e nxt,       // local request from t_comp
  output resize_e nact,      // filtered command: INC, DEC or KEEP
  output logic    nact_vld,  // nact belongs to the step just taken
  output logic [SM_BITS-1:0] state_o
);

  localparam logic [SM_BITS-1:0] S_TOP = '1;

  logic [SM_BITS-1:0] state, state_n;
  resize_e            out_n;

  always_comb begin
    state_n = state;
    out_n   = RS_KEEP;
    unique case (nxt)
      RS_INC: begin
        state_n = '0;
        out_n   = RS_INC;
      end
      RS_DEC: begin
        if (state >= S_TOP - 1'b1) begin
          state_n = S_TOP;
          out_n   = RS_DEC;
        end else begin
          state_n = state + 1'b1;
          out_n   = RS_KEEP;
        end
      end
      default: begin
        state_n = state;
        out_n   = RS_KEEP;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= '0;
      nact     <= RS_KEEP;
      nact_vld <= 1'b0;
    end else begin
      nact_vld <= en;
      if (en) begin
        state <= state_n;
        nact  <= out_n;
      end
    end
  end

  assign state_o = state;

endmodule
