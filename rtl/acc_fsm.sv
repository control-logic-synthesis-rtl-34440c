// acc_fsm -- accumulator state machine.
//
// Three states, RESET, GO and STOP, and an 8-bit accumulator acc. Each cycle
// the current state and the inputs select one of three updates, taking
// effect at the next clock edge:
//   RESET and go      -> GO,   acc <= acc + val
//   GO and not stop   -> GO,   acc <= acc + val
//   GO and stop       -> STOP, acc unchanged
//   STOP and reset    -> RESET, acc <= 0
// In every other case state and acc hold. val is two bits, zero-extended.
// The states, transitions and updates follow the published state diagram;
// the encoding RESET = 0, GO = 1, STOP = 2 is this design's choice, as is the
// synchronous active-low rst_n, which gives RESET with acc = 0.
module acc_fsm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       reset,
  input  logic       go,
  input  logic       stop,
  input  logic [1:0] val,
  output logic [7:0] acc,
  output logic [1:0] state_o
);

  typedef enum logic [1:0] {
    S_RESET = 2'd0,
    S_GO    = 2'd1,
    S_STOP  = 2'd2
  } acc_state_e;

  acc_state_e state, state_n;
  logic [7:0] acc_n;

  always_comb begin
    state_n = state;
    acc_n   = acc;
    unique case (state)
      S_RESET: if (go) begin
        state_n = S_GO;
        acc_n   = acc + {6'b0, val};
      end
      S_GO: if (stop) begin
        state_n = S_STOP;
      end else begin
        acc_n   = acc + {6'b0, val};
      end
      S_STOP: if (reset) begin
        state_n = S_RESET;
        acc_n   = '0;
      end
      default: state_n = S_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_RESET;
      acc   <= '0;
    end else begin
      state <= state_n;
      acc   <= acc_n;
    end
  end

  assign state_o = state;

endmodule
