// (12,8) Hamming decoder with single-error correction.
//
// Recomputes the four parity checks of a 12-bit code word (layout as in
// hamming_enc). The syndrome is the Hamming position of a single flipped bit:
// 0 means no error, 1..12 names the bit to invert. Syndromes 13..15 cannot be
// produced by one error and are flagged as uncorrectable; the data is then
// passed on as received. With only four check bits a double error usually
// looks like a single one and is miscorrected: full double-error detection
// would need a fifth (overall parity) bit. Combinational.
// The corrected word's check-bit positions are computed but not used (only
// the data positions are read out); lint reports them as unused bits.
// The check-bit layout and the handling of syndromes 13..15 are this
// design's choice; the 8 data + 4 check bit code size is the toolkit's.
module hamming_dec (
  input  logic [11:0] code,
  output logic [7:0]  data,
  output logic        corrected,     // a single-bit error was fixed
  output logic        uncorrectable  // syndrome outside the code word
);
  logic [3:0]  syn;
  logic [11:0] fixed;

  always_comb begin
    syn[0] = code[0] ^ code[2] ^ code[4] ^ code[6] ^ code[8] ^ code[10];
    syn[1] = code[1] ^ code[2] ^ code[5] ^ code[6] ^ code[9] ^ code[10];
    syn[2] = code[3] ^ code[4] ^ code[5] ^ code[6] ^ code[11];
    syn[3] = code[7] ^ code[8] ^ code[9] ^ code[10] ^ code[11];
    fixed  = code;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (syn != 4'd0) begin
      if (syn <= 4'd12) begin
        fixed[syn - 4'd1] = ~code[syn - 4'd1];
        corrected = 1'b1;
      end else begin
        uncorrectable = 1'b1;
      end
    end
    data = {fixed[11], fixed[10], fixed[9], fixed[8], fixed[6], fixed[5], fixed[4], fixed[2]};
  end
endmodule
