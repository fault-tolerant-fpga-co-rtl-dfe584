// Self-checking test of tmr_pin_driver: for random triples, a pin must drive
// exactly when its copy agrees with at least one other copy, and the value on
// the resolved trace (wired pins that drive) must be the majority.
module tb_tmr_pin_driver;
  int checks = 0, failures = 0;
  logic [7:0] tr0, tr1, tr2, trace;
  logic [7:0] pin_o [3];
  logic [7:0] pin_oe [3];

  tmr_pin_driver #(.W(8)) dut (.tr0, .tr1, .tr2, .pin_o, .pin_oe, .trace);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [7:0] good;
      good = 8'($urandom);
      tr0 = good; tr1 = good; tr2 = good;
      case (n % 4)
        0: tr0 = 8'($urandom);
        1: tr1 = 8'($urandom);
        2: tr2 = 8'($urandom);
        default: ;
      endcase
      #1;
      for (int b = 0; b < 8; b++) begin
        logic v [3];
        int ones, drivers, driven_ones;
        v[0] = tr0[b]; v[1] = tr1[b]; v[2] = tr2[b];
        ones = int'(v[0]) + int'(v[1]) + int'(v[2]);
        drivers = 0; driven_ones = 0;
        for (int p = 0; p < 3; p++) begin
          logic agrees;
          agrees = (v[p] == v[(p+1)%3]) || (v[p] == v[(p+2)%3]);
          check(pin_oe[p][b] == agrees, "pin enabled iff not in minority");
          check(pin_o[p][b] == v[p], "pin carries its copy");
          if (pin_oe[p][b]) begin drivers++; driven_ones += int'(pin_o[p][b]); end
        end
        check(drivers >= 2 && (driven_ones == 0 || driven_ones == drivers), "no contention on trace");
        check(good[b] == (ones >= 2) && trace[b] == good[b], "trace is the majority");
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
