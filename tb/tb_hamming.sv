// Self-checking test of hamming_enc and hamming_dec. For every byte: the code
// word must have a zero syndrome by an independent parity-check matrix
// computation, decode cleanly, and decode correctly with any single bit
// flipped (reporting a correction). Double flips must never be reported as
// clean.
module tb_hamming;
  int checks = 0, failures = 0;
  logic [7:0]  d, dout;
  logic [11:0] code, rx;
  logic        corr, unc;

  hamming_enc u_enc (.data(d), .code(code));
  hamming_dec u_dec (.code(rx), .data(dout), .corrected(corr), .uncorrectable(unc));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Syndrome: XOR of the (1-based) positions of all set bits.
  function automatic logic [3:0] syndrome(input logic [11:0] c);
    logic [3:0] s = '0;
    for (int p = 1; p <= 12; p++) if (c[p-1]) s ^= 4'(p);
    return s;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      d = 8'(v);
      #1;
      check(syndrome(code) == 4'd0, $sformatf("code of %02x is a code word", v));
      check({code[11], code[10], code[9], code[8], code[6], code[5], code[4], code[2]} == d, "systematic data bits");
      rx = code; #1;
      check(dout == d && !corr && !unc, "clean decode");
      for (int b = 0; b < 12; b++) begin
        rx = code ^ (12'd1 << b); #1;
        check(dout == d && corr && !unc, $sformatf("single error %02x bit %0d", v, b));
      end
      for (int k = 0; k < 4; k++) begin
        int b1, b2;
        b1 = $urandom_range(11); b2 = (b1 + 1 + $urandom_range(10)) % 12;
        rx = code ^ (12'd1 << b1) ^ (12'd1 << b2); #1;
        check(corr || unc, "double error is not reported clean");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
