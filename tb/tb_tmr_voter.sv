// Self-checking test of tmr_voter: exhaustive over 3 one-bit inputs, then
// random 16-bit words where one copy is corrupted (the result must equal the
// two good copies) and fully random words checked against a per-bit count.
module tb_tmr_voter;
  int checks = 0, failures = 0;
  logic [15:0] a, b, c, y;
  logic        a1, b1, c1, y1;

  tmr_voter #(.W(16)) dut (.a, .b, .c, .y);
  tmr_voter #(.W(1))  dut1 (.a(a1), .b(b1), .c(c1), .y(y1));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a1, b1, c1} = 3'(v);
      #1;
      check(y1 == (int'(a1) + int'(b1) + int'(c1) >= 2), $sformatf("1-bit vote %03b", v));
    end
    for (int n = 0; n < 300; n++) begin
      logic [15:0] good, bad;
      good = 16'($urandom);
      bad  = 16'($urandom);
      case (n % 3)
        0: begin a = bad;  b = good; c = good; end
        1: begin a = good; b = bad;  c = good; end
        default: begin a = good; b = good; c = bad; end
      endcase
      #1;
      check(y == good, $sformatf("single bad copy %0d", n));
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      #1;
      for (int i = 0; i < 16; i++)
        check(y[i] == (int'(a[i]) + int'(b[i]) + int'(c[i]) >= 2), "random bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
