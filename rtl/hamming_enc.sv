// (12,8) Hamming encoder for bytes crossing off-chip links.
//
// Links with too few pins for triplication (the ISA bus and the pins between
// the two FPGAs) carry each byte as a 12-bit Hamming code word: 8 data bits and
// 4 check bits. Code word bit i holds Hamming position i+1; check bits sit at
// positions 1, 2, 4 and 8, data bits 0..7 at positions 3, 5, 6, 7, 9, 10, 11, 12.
// Each check bit makes the parity of the positions whose index has that bit
// set even. Combinational.
module hamming_enc (
  input  logic [7:0]  data,
  output logic [11:0] code
);
  always_comb begin
    code     = '0;
    code[2]  = data[0];
    code[4]  = data[1];
    code[5]  = data[2];
    code[6]  = data[3];
    code[8]  = data[4];
    code[9]  = data[5];
    code[10] = data[6];
    code[11] = data[7];
    code[0]  = code[2] ^ code[4] ^ code[6] ^ code[8] ^ code[10];
    code[1]  = code[2] ^ code[5] ^ code[6] ^ code[9] ^ code[10];
    code[3]  = code[4] ^ code[5] ^ code[6] ^ code[11];
    code[7]  = code[8] ^ code[9] ^ code[10] ^ code[11];
  end
endmodule
