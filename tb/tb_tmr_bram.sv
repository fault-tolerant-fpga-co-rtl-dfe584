// Self-checking test of tmr_bram. Fills the RAM, then while random user reads
// and writes go on it injects upsets into single copies (one copy per word at
// a time). Reads must always return the model's data (voting). After one full
// refresh sweep (8 * 2^AW clocks) all three copies must hold the model's data
// again (refresh), including words written by the user during the sweep
// (collision detection must not let refresh restore old data). Counts refresh
// write-backs and collision skips.
module tb_tmr_bram;
  localparam int DW = 16, AW = 5, N = 1 << AW;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, we = 0;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata, rdata;
  logic refresh_wb, refresh_skip;
  logic [DW-1:0] model [N];
  int wbs = 0, skips = 0;

  always #5 clk = ~clk;
  tmr_bram #(.DW(DW), .AW(AW)) dut (.clk, .rst, .en, .we, .addr, .wdata, .rdata, .refresh_wb, .refresh_skip);

  always @(posedge clk) begin
    if (refresh_wb) wbs++;
    if (refresh_skip) skips++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic upset(input int copy, input int a);
    logic [DW-1:0] m;
    m = DW'($urandom) | 1;
    case (copy)
      0: dut.g_copy[0].u_ram.mem[a] = dut.g_copy[0].u_ram.mem[a] ^ m;
      1: dut.g_copy[1].u_ram.mem[a] = dut.g_copy[1].u_ram.mem[a] ^ m;
      default: dut.g_copy[2].u_ram.mem[a] = dut.g_copy[2].u_ram.mem[a] ^ m;
    endcase
  endtask

  function automatic logic copies_ok(input int a);
    return dut.g_copy[0].u_ram.mem[a] == model[a] && dut.g_copy[1].u_ram.mem[a] == model[a] &&
           dut.g_copy[2].u_ram.mem[a] == model[a];
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < N; a++) begin
      en = 1; we = 1; addr = AW'(a); wdata = DW'($urandom); model[a] = wdata;
      @(posedge clk); #1;
    end
    en = 0; we = 0;
    for (int round = 0; round < 4; round++) begin
      // one upset per word, in a random copy
      for (int a = 0; a < N; a++) upset($urandom_range(2), a);
      for (int n = 0; n < 8 * N + 16; n++) begin
        en = ($urandom_range(1) == 1);
        we = en && ($urandom_range(3) == 0);
        addr = AW'($urandom);
        // hammer the word being refreshed now and then to provoke collisions
        if (n % 7 == 0) begin en = 1; we = 1; addr = dut.cnt[0][AW+2:3]; end
        wdata = DW'($urandom);
        @(posedge clk);
        if (en && we) model[addr] = wdata;
        #1;
        if (en && !we) check(rdata == model[addr], $sformatf("voted read a=%0d", addr));
        en = 0; we = 0;
      end
      for (int a = 0; a < N; a++) check(copies_ok(a), $sformatf("round %0d word %0d refreshed in all copies", round, a));
    end
    check(wbs > 0, "refresh write-backs happened");
    check(skips > 0, "collision skips happened");
    $display("refresh write-backs=%0d collision skips=%0d", wbs, skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
