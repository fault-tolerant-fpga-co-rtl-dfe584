// Proof-of-concept co-processing design: returns every byte it receives plus one.
//
// Sits in the co-processing FPGA behind its end of the inter-FPGA link. Each
// byte delivered by the link (in_wr, in_data) is incremented modulo 256 and
// queued in a small result FIFO, from which the link reads the replies
// (out_rd, out_data valid one clock later, out_empty). in_full tells the link
// to hold off while the FIFO is full. RESULT_DEPTH is this design's choice.
module copro_incrementer #(
  parameter int RESULT_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_wr,
  input  logic [7:0] in_data,
  output logic       in_full,
  input  logic       out_rd,
  output logic [7:0] out_data,
  output logic       out_empty
);
  logic [7:0] result;

  always_comb result = in_data + 8'd1;

  sync_fifo #(.WIDTH(8), .DEPTH(RESULT_DEPTH)) u_results (
    .clk, .rst, .clr(1'b0), .wr(in_wr), .din(result),
    .rd(out_rd), .dout(out_data), .empty(out_empty), .full(in_full)
  );
endmodule
