// Self-checking test of flash_arbiter against a reference model: random
// requesters that hold their request for random times. Checks one grant at a
// time, grant held while requested, lowest index wins a free flash, only the
// owner's command strobe reaches the flash, and that an upset forced into one
// copy of the TMR owner register changes nothing outside and is voted away.
module tb_flash_arbiter;
  import ftcp_pkg::*;
  localparam int N = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [N-1:0] request, grant;
  flash_req_t req_in [N];
  flash_req_t req_out;
  logic owned;
  logic [1:0] owner_id;
  logic       m_owned;
  int         m_id;
  int         handovers = 0, upsets = 0;

  always #5 clk = ~clk;
  flash_arbiter #(.N(N)) dut (.clk, .rst, .request, .req_in, .req_out, .grant, .owned, .owner_id);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    request = '0;
    for (int i = 0; i < N; i++) begin
      req_in[i] = FLASH_REQ_IDLE;
    end
    m_owned = 0; m_id = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 4000; n++) begin
      // random request changes
      for (int i = 0; i < N; i++) begin
        if ($urandom_range(9) == 0) request[i] = !request[i];
        req_in[i] = '{valid: 1'($urandom), cmd: FCMD_READ, addr: 21'(i * 1000 + n), wdata: 16'(i), cached: 1'b0};
      end
      #1;
      // compare outputs with the model (state before this edge)
      check(owned == m_owned && (!m_owned || int'(owner_id) == m_id), "owner matches model");
      check($countones(grant) == (m_owned ? 1 : 0), "one grant at most");
      if (m_owned) check(req_out == req_in[m_id], "owner's command passed");
      else         check(req_out.valid == 1'b0, "no command without owner");
      if (n % 97 == 50) begin
        // upset one copy of the owner register
        case ($urandom_range(2))
          0: dut.cur[0] = ~dut.cur[0];
          1: dut.cur[1] = ~dut.cur[1];
          default: dut.cur[2] = ~dut.cur[2];
        endcase
        upsets++;
        #1 check(owned == m_owned && (!m_owned || int'(owner_id) == m_id), "upset hidden by vote");
      end
      @(posedge clk);
      // model update
      if (!(m_owned && request[m_id])) begin
        logic prev;
        prev = m_owned;
        m_owned = 0;
        for (int i = N - 1; i >= 0; i--) if (request[i]) begin m_owned = 1; m_id = i; end
        if (m_owned && prev) handovers++;
      end
      #1;
      check(dut.cur[0] == dut.cur[1] && dut.cur[1] == dut.cur[2], "copies in step");
    end
    check(handovers > 10, "ownership changed hands");
    $display("handovers=%0d upsets=%0d", handovers, upsets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
