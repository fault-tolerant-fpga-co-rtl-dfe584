// Triplicated state register for a triple-redundant finite state machine.
//
// A TMR state machine keeps three copies of its next-state logic and of its
// state register. Plain triplication is not enough: once one copy is upset it
// would stay out of step with the other two until a reset. Here every copy
// loads the majority vote of the three next-state values, so a copy hit by an
// upset (in its register or its next-state logic) is pulled back into step on
// the next clock edge. Inputs next0..next2 come from the three next-state
// logic copies; outputs cur0..cur2 feed them back. Synchronous reset to
// RESET_VAL, one clock of latency.
// The copies are identical logic, so a synthesis flow that flattens and
// merges equivalent cells folds them into one register; an implementation
// must keep the hierarchy (or mark the copies to be kept) for the redundancy
// to survive, which is also what the toolkit asks of its TMR modules.
module tmr_state_reg #(
  parameter int            W         = 4,
  parameter logic [W-1:0]  RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] next0,
  input  logic [W-1:0] next1,
  input  logic [W-1:0] next2,
  output logic [W-1:0] cur0,
  output logic [W-1:0] cur1,
  output logic [W-1:0] cur2
);
  logic [W-1:0] v0, v1, v2;

  // One voter per copy, so a fault in a voter only reaches one register.
  tmr_voter #(.W(W)) u_v0 (.a(next0), .b(next1), .c(next2), .y(v0));
  tmr_voter #(.W(W)) u_v1 (.a(next0), .b(next1), .c(next2), .y(v1));
  tmr_voter #(.W(W)) u_v2 (.a(next0), .b(next1), .c(next2), .y(v2));

  always_ff @(posedge clk) begin
    if (rst) begin
      cur0 <= RESET_VAL;
      cur1 <= RESET_VAL;
      cur2 <= RESET_VAL;
    end else begin
      cur0 <= v0;
      cur1 <= v1;
      cur2 <= v2;
    end
  end
endmodule
