// Triplicated output pins with minority-voter tri-state control.
//
// A triplicated signal leaves the chip on three package pins tied to one board
// trace. Each pin has a minority voter that compares its own copy (P) with the
// other two (R1, R2); when its copy disagrees with both, the pin's output
// buffer is switched off (high impedance), so a faulty copy never fights the
// two good ones on the trace. When all three agree, all three drive.
// Outputs pin_o/pin_oe model the three output buffers (oe=1: driving); trace
// is the value the board trace settles to (the majority), for observation.
// Combinational, W bits wide.
module tmr_pin_driver #(
  parameter int W = 1
) (
  input  logic [W-1:0] tr0,
  input  logic [W-1:0] tr1,
  input  logic [W-1:0] tr2,
  output logic [W-1:0] pin_o  [3],
  output logic [W-1:0] pin_oe [3],
  output logic [W-1:0] trace
);
  always_comb begin
    pin_o[0] = tr0;
    pin_o[1] = tr1;
    pin_o[2] = tr2;
    // Minority: own copy differs from both others.
    pin_oe[0] = ~((tr0 ^ tr1) & (tr0 ^ tr2));
    pin_oe[1] = ~((tr1 ^ tr0) & (tr1 ^ tr2));
    pin_oe[2] = ~((tr2 ^ tr0) & (tr2 ^ tr1));
  end

  tmr_voter #(.W(W)) u_trace (.a(tr0), .b(tr1), .c(tr2), .y(trace));
endmodule
