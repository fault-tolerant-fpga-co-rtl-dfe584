// Self-checking test of flash_if with the flash behavioural model.
// Unlocks and erases a main block and a boot block, programs words, reads
// them back, locks a block and checks that a write to it has no effect, and
// checks that block commands off a block start are ignored (no flash cycle).
// Checks the write-cycle timing through the model's violation counter and the
// duration of a read command against the configured cycle timing.
module tb_flash_if;
  import ftcp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  flash_req_t req;
  flash_rsp_t rsp;
  logic [20:0] f_addr;
  logic [15:0] f_dq_o, f_dq_i;
  logic f_dq_oe, f_ce_n, f_oe_n, f_we_n, f_rp_n;

  always #10 clk = ~clk;   // 50 MHz

  flash_if dut (.clk, .rst, .req, .rsp, .f_addr, .f_dq_o, .f_dq_oe, .f_dq_i, .f_ce_n, .f_oe_n, .f_we_n, .f_rp_n);
  flash_model #(.BUSY_CLKS(30)) u_flash (.clk, .addr(f_addr), .dq_i(f_dq_o), .dq_oe(f_dq_oe), .dq_o(f_dq_i),
    .ce_n(f_ce_n), .oe_n(f_oe_n), .we_n(f_we_n), .rp_n(f_rp_n), .corrupt_mask(16'h0000));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Issue a command, wait for completion; returns read data and clock count.
  task automatic cmd(input flash_cmd_e c, input logic [20:0] a, input logic [15:0] d,
                     output logic [15:0] rd, output int clks);
    rd = '0; clks = 0;
    while (rsp.busy) @(posedge clk);
    #1 req = '{valid: 1'b1, cmd: c, addr: a, wdata: d, cached: 1'b0};
    @(posedge clk); #1 req.valid = 1'b0; clks = 1;
    while (rsp.busy) begin
      if (rsp.rvalid) rd = rsp.rdata;
      @(posedge clk); #1; clks++;
    end
  endtask

  logic [15:0] rd;
  int clks, cyc_before;

  initial begin
    req = FLASH_REQ_IDLE;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    check(f_rp_n == 1'b1, "RP# released after reset");
    // read of erased flash; a read is one write cycle + one read cycle
    cmd(FCMD_READ, 21'h000123, 16'h0, rd, clks);
    check(rd == 16'hFFFF, "erased word reads FFFF");
    // strobe clock, then write cycle (0xFF) 1+1+3+2, read cycle 1+5+1, next step 1, end 1
    check(clks == 17, $sformatf("read command takes 17 clocks (%0d)", clks));
    // program to a locked block does nothing
    cmd(FCMD_WRITE, 21'h008010, 16'h1234, rd, clks);
    cmd(FCMD_READ, 21'h008010, 16'h0, rd, clks);
    check(rd == 16'hFFFF, "locked block not programmed");
    // unlock block 1 (0x8000), erase, program, read back
    cmd(FCMD_UNLOCK, 21'h008000, 16'h0, rd, clks);
    check(u_flash.locked[1] == 1'b0, "block 1 unlocked");
    cmd(FCMD_ERASE, 21'h008000, 16'h0, rd, clks);
    check(u_flash.n_erases == 1, "erase issued");
    check(clks > 30, "erase waited for the busy status");
    for (int i = 0; i < 20; i++) begin
      logic [15:0] v;
      v = 16'($urandom);
      cmd(FCMD_WRITE, 21'h008000 + 21'(i * 37), v, rd, clks);
      check(clks > 30, "program waited for status ready");
      cmd(FCMD_READ, 21'h008000 + 21'(i * 37), 16'h0, rd, clks);
      check(rd == v, $sformatf("program/read word %0d: %04x vs %04x", i, rd, v));
    end
    // block command off a block start: ignored, no bus cycle
    cyc_before = u_flash.n_cmds;
    cmd(FCMD_ERASE, 21'h008001, 16'h0, rd, clks);
    check(u_flash.n_cmds == cyc_before && clks <= 3, "erase off block start ignored");
    cmd(FCMD_LOCK, 21'h1F8800, 16'h0, rd, clks);
    check(u_flash.n_cmds == cyc_before, "lock inside a boot block ignored");
    // boot block at 0x1F9000 is a block start
    cmd(FCMD_UNLOCK, 21'h1F9000, 16'h0, rd, clks);
    check(u_flash.locked[64] == 1'b0, "boot block 64 unlocked");
    cmd(FCMD_WRITE, 21'h1F9005, 16'hA5A5, rd, clks);
    cmd(FCMD_READ, 21'h1F9005, 16'h0, rd, clks);
    check(rd == 16'hA5A5, "boot block program");
    cmd(FCMD_LOCK, 21'h1F9000, 16'h0, rd, clks);
    check(u_flash.locked[64] == 1'b1, "boot block relocked");
    cmd(FCMD_WRITE, 21'h1F9006, 16'h0000, rd, clks);
    cmd(FCMD_READ, 21'h1F9006, 16'h0, rd, clks);
    check(rd == 16'hFFFF, "locked boot block refuses program");
    check(u_flash.n_timing_viol == 0, $sformatf("write-cycle timing respected (%0d violations)", u_flash.n_timing_viol));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
