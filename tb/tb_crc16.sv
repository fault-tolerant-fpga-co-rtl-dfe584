// Self-checking test of crc16 (CRC-16-CCITT, poly 0x1021, init 0xFFFF).
// A byte-wise bit-serial reference runs over the same data (high byte of each
// word first) and must agree with the word-parallel hardware, over random
// blocks with idle (en low) cycles in between, after clr. The reference itself
// is checked against the published value 0x29B1 for ASCII "123456789".
module tb_crc16;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic [15:0] din, crc;

  always #5 clk = ~clk;
  crc16 dut (.clk, .rst, .clr, .en, .din, .crc);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] ref_byte(input logic [15:0] c, input logic [7:0] b);
    logic [15:0] r = c ^ {b, 8'h00};
    for (int i = 0; i < 8; i++) r = r[15] ? ((r << 1) ^ 16'h1021) : (r << 1);
    return r;
  endfunction

  logic [15:0] words [64];
  logic [15:0] ref_crc;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(crc == 16'hFFFF, "initial value");
    for (int trial = 0; trial < 20; trial++) begin
      int n;
      n = 1 + $urandom_range(63);
      clr = 1; @(posedge clk); #1 clr = 0;
      ref_crc = 16'hFFFF;
      for (int i = 0; i < n; i++) begin
        words[i] = 16'($urandom);
        ref_crc = ref_byte(ref_byte(ref_crc, words[i][15:8]), words[i][7:0]);
      end
      for (int i = 0; i < n; i++) begin
        din = words[i]; en = 1;
        @(posedge clk); #1;
        en = 0;
        if (i % 5 == 2) begin din = 16'hDEAD; @(posedge clk); #1; end  // idle cycle, en low
      end
      check(crc == ref_crc, $sformatf("trial %0d crc %04x ref %04x", trial, crc, ref_crc));
    end
    // "123456789" -> 0x29B1 (CRC-16/CCITT-FALSE); here the first 8 bytes as words.
    clr = 1; @(posedge clk); #1 clr = 0;
    ref_crc = 16'hFFFF;
    foreach (words[i]) if (i < 4) begin
      words[i] = {8'(8'h31 + 2*i), 8'(8'h32 + 2*i)};
      ref_crc = ref_byte(ref_byte(ref_crc, words[i][15:8]), words[i][7:0]);
    end
    for (int i = 0; i < 4; i++) begin din = words[i]; en = 1; @(posedge clk); #1; end
    en = 0;
    check(crc == ref_crc, "ASCII 12345678");
    check(ref_byte(ref_crc, 8'h39) == 16'h29B1, "reference model matches published check value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
