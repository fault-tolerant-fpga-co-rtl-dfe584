// CRC16 generator over 16-bit flash words.
//
// Used to check blocks of 512 flash words as they are read into the on-chip
// flash buffer. The polynomial is CRC-16-CCITT, x^16 + x^12 + x^5 + 1
// (0x1021), initial value 0xFFFF, no final inversion, data taken MSB first,
// one whole 16-bit word per clock. (Only "CRC16" is specified; the polynomial
// and initial value are this design's choice and must match the host software
// that embeds the check words.) clr restarts the CRC; en folds din in; crc is
// the registered result after the words given so far. The CRC register is
// held three times with voted feedback (tmr_state_reg), as for every state
// register of the toolkit.
module crc16 (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        en,
  input  logic [15:0] din,
  output logic [15:0] crc
);
  localparam logic [15:0] POLY = 16'h1021;
  localparam logic [15:0] INIT = 16'hFFFF;

  function automatic logic [15:0] step(input logic [15:0] c_in, input logic [15:0] d);
    logic [15:0] c;
    c = c_in;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ d[i]) c = {c[14:0], 1'b0} ^ POLY;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  // CRC register as three copies, each loading the voted next value
  logic [15:0] cur [3], nxt [3];

  for (genvar i = 0; i < 3; i++) begin : g_nsl
    assign nxt[i] = clr ? INIT : en ? step(cur[i], din) : cur[i];
  end

  tmr_state_reg #(.W(16), .RESET_VAL(INIT)) u_crc (
    .clk, .rst, .next0(nxt[0]), .next1(nxt[1]), .next2(nxt[2]),
    .cur0(cur[0]), .cur1(cur[1]), .cur2(cur[2])
  );
  tmr_voter #(.W(16)) u_vote (.a(cur[0]), .b(cur[1]), .c(cur[2]), .y(crc));
endmodule
