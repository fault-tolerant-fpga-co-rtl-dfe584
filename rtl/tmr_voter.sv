// Bitwise two-out-of-three majority voter.
//
// Each output bit is the value held by at least two of the three inputs, so a
// single faulty copy of a triplicated module is outvoted. On the FPGA the
// voter is built from three tri-state buffers on a pulled-up line (each buffer
// enabled by one of the other two copies); here it is written as the
// equivalent AND-OR logic so that it simulates and synthesises on any target.
// The width is a parameter, as in the reusable voter of the toolkit.
// Purely combinational, no latency.
module tmr_voter #(
  parameter int W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);
  always_comb y = (a & b) | (b & c) | (a & c);
endmodule
