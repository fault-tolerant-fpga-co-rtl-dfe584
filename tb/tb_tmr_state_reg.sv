// Self-checking test of tmr_state_reg as the state register of a TMR counter
// FSM. Three copies of "next = cur + 1" feed the register. An upset is forced
// into one copy's register, or one copy's next-state value is corrupted for a
// cycle; the copies must be back in step after one clock and the voted count
// must never deviate from a reference counter.
module tb_tmr_state_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [7:0] cur0, cur1, cur2, n0, n1, n2, voted;
  logic [7:0] ref_cnt;
  logic       corrupt_next;
  int         cyc = 0;

  always #5 clk = ~clk;

  tmr_state_reg #(.W(8), .RESET_VAL(8'h10)) dut (
    .clk, .rst, .next0(n0), .next1(n1), .next2(n2), .cur0, .cur1, .cur2
  );
  tmr_voter #(.W(8)) u_v (.a(cur0), .b(cur1), .c(cur2), .y(voted));

  always_comb begin
    n0 = cur0 + 8'd1;
    n1 = corrupt_next ? 8'hA5 : cur1 + 8'd1;
    n2 = cur2 + 8'd1;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    corrupt_next = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(cur0 == 8'h10 && cur1 == 8'h10 && cur2 == 8'h10, "reset value");
    ref_cnt = 8'h10;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk); #1;
      ref_cnt++;
      cyc = n;
      check(cur0 == ref_cnt && cur1 == ref_cnt && cur2 == ref_cnt, "copies in step");
      if (n % 10 == 3) begin
        // upset one register copy directly
        case ((n / 10) % 3)
          0: dut.cur0 = $urandom;
          1: dut.cur1 = $urandom;
          default: dut.cur2 = $urandom;
        endcase
        #1 check(voted == ref_cnt, "voted output hides the upset");
      end
      if (n % 10 == 6) corrupt_next = 1;
      if (n % 10 == 7) corrupt_next = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
