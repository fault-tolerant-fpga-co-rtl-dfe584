// Self-checking test of flash_ctrl. Host command bytes are fed through a
// FIFO model, replies collected from an output FIFO model that stalls now
// and then; the flash side is a flash_if with the flash model, the grant is
// given one clock after the request (and checked to be requested only while
// a command is in flight). Exercises load/increment address, unlock, erase,
// a burst write, a single-word write (count 0), reads, address-to-bus and
// lock, comparing with the model's memory and expected replies.
module tb_flash_ctrl;
  import ftcp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic in_rd, in_empty, out_wr, out_full;
  logic [7:0] in_data, out_data;
  logic arb_request, arb_grant;
  flash_req_t freq;
  flash_rsp_t frsp;
  logic [20:0] f_addr;
  logic [15:0] f_dq_o, f_dq_i;
  logic f_dq_oe, f_ce_n, f_oe_n, f_we_n, f_rp_n;
  logic [7:0] inq [$];
  logic [7:0] outq [$];
  int strobes_without_grant = 0;

  always #10 clk = ~clk;

  flash_ctrl dut (.clk, .rst, .in_rd, .in_data, .in_empty, .out_wr, .out_data, .out_full,
                  .arb_request, .arb_grant, .freq, .frsp);
  flash_if u_fif (.clk, .rst, .req(freq), .rsp(frsp), .f_addr, .f_dq_o, .f_dq_oe, .f_dq_i, .f_ce_n, .f_oe_n, .f_we_n, .f_rp_n);
  flash_model #(.BUSY_CLKS(10)) u_flash (.clk, .addr(f_addr), .dq_i(f_dq_o), .dq_oe(f_dq_oe), .dq_o(f_dq_i),
    .ce_n(f_ce_n), .oe_n(f_oe_n), .we_n(f_we_n), .rp_n(f_rp_n), .corrupt_mask(16'h0000));

  assign in_empty = (inq.size() == 0);
  // The queue is popped just after the edge so that in_empty is stable
  // while the DUT samples it.
  always @(posedge clk) begin
    if (in_rd && inq.size() > 0) begin
      in_data <= inq[0];
      fork begin #1; void'(inq.pop_front()); end join_none
    end
    if (out_wr && !out_full) outq.push_back(out_data);
    out_full  <= ($urandom_range(3) == 0);
    arb_grant <= arb_request && !rst;
    if (freq.valid && !arb_grant) strobes_without_grant++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic send(input logic [7:0] b); inq.push_back(b); endtask
  task automatic send_addr(input logic [20:0] a);
    send(FC_LOAD_ADDR); send(a[7:0]); send(a[15:8]); send({3'b111, a[20:16]});  // upper bits must be ignored
  endtask
  task automatic idle_wait();
    int quiet = 0;
    while (quiet < 60) begin
      @(posedge clk);
      if (inq.size() == 0 && !arb_request && !frsp.busy) quiet++; else quiet = 0;
    end
  endtask
  task automatic get_bytes(input int n, output logic [23:0] v);
    v = '0;
    for (int i = 0; i < n; i++) begin
      while (outq.size() == 0) @(posedge clk);
      v[8*i +: 8] = outq.pop_front();
    end
  endtask

  logic [15:0] words [40];
  logic [23:0] v;

  initial begin
    in_data = '0; out_full = 0; arb_grant = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    send_addr(21'h010000);
    send(FC_UNLOCK); send(FC_ERASE);
    idle_wait();
    check(u_flash.locked[2] == 1'b0, "unlock command");
    check(u_flash.n_erases == 1, "erase command");
    // burst of 40 words
    send(FC_WRITE); send(8'd40); send(8'd0); send(8'd0); send(8'd0);
    for (int i = 0; i < 40; i++) begin
      words[i] = 16'($urandom);
      send(words[i][7:0]); send(words[i][15:8]);
    end
    idle_wait();
    for (int i = 0; i < 40; i++)
      check(u_flash.mem[21'h010000 + i] == words[i], $sformatf("burst word %0d in flash", i));
    send(FC_ADDR2BUS);
    idle_wait();
    get_bytes(3, v);
    check(v == 24'h010028, $sformatf("address auto-incremented by the burst (%06x)", v));
    // single-word write with count 0
    send(FC_WRITE); send(8'd0); send(8'd0); send(8'd0); send(8'd0); send(8'h34); send(8'h12);
    idle_wait();
    check(u_flash.mem[21'h010028] == 16'h1234, "count 0 writes one word");
    check(u_flash.mem[21'h010029] == 16'hFFFF, "and only one");
    // read back words 5..9 with read + increment
    send_addr(21'h010005);
    for (int i = 5; i < 10; i++) begin send(FC_READ); send(FC_INC_ADDR); end
    idle_wait();
    for (int i = 5; i < 10; i++) begin
      get_bytes(2, v);
      check(v[15:0] == words[i], $sformatf("read word %0d: %04x", i, v[15:0]));
    end
    // lock, then a write has no effect
    send_addr(21'h010000); send(FC_LOCK);
    send_addr(21'h010030);
    send(FC_WRITE); send(8'd1); send(8'd0); send(8'd0); send(8'd0); send(8'h00); send(8'h00);
    idle_wait();
    check(u_flash.locked[2] == 1'b1, "lock command");
    check(u_flash.mem[21'h010030] == 16'hFFFF, "locked block keeps data");
    send(8'h5A);   // unknown command is dropped
    send(FC_ADDR2BUS);
    idle_wait();
    get_bytes(3, v);
    check(v == 24'h010031, "unknown byte ignored, address register intact");
    check(strobes_without_grant == 0, "no flash command without grant");
    check(outq.size() == 0, "no stray reply bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
