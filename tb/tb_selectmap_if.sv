// Self-checking test of selectmap_if. Two instances: a first-generation
// Virtex target (VIRTEX1 = 1) and a newer target (VIRTEX1 = 0), each with a
// host byte queue, an acknowledge collector, a flash responder and a
// SelectMap monitor that captures bytes on rising CCLK with CS and write
// asserted, detects abort sequences, and checks that data are stable at each
// rising CCLK and that rising CCLK edges are at least 2 clocks apart (<= 25 MHz).
// Checks: program from flash (bytes low first, acks 0xBF/0xEF), program from
// bus (acks 0xBB/0xEB), the abort command, scrubbing with a pause between
// passes, an abort before each pass only on the first-generation target, and
// the stop command (0xE5 after the last pass completes).
module tb_selectmap_if;
  import ftcp_pkg::*;
  localparam int PAUSE = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  always #10 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- per-instance harness ----------------
  logic        in_rd [2], in_empty [2], out_wr [2], out_full [2];
  logic [7:0]  in_data [2], out_data [2];
  logic        arb_request [2], arb_grant [2];
  flash_req_t  freq [2];
  flash_rsp_t  frsp [2];
  logic [7:0]  sm_d [2];
  logic        sm_write_n [2], sm_cs_n [2], sm_cclk [2], scrubbing [2], abort_done [2];
  logic [7:0]  inq0 [$], inq1 [$], ackq0 [$], ackq1 [$], capq0 [$], capq1 [$];
  int          aborts [2], passes [2], min_gap [2], gap [2], rate_err [2], stab_err [2];

  selectmap_if #(.VIRTEX1(1'b1), .SCRUB_PAUSE(PAUSE)) dut1 (
    .clk, .rst, .in_rd(in_rd[0]), .in_data(in_data[0]), .in_empty(in_empty[0]),
    .out_wr(out_wr[0]), .out_data(out_data[0]), .out_full(out_full[0]),
    .arb_request(arb_request[0]), .arb_grant(arb_grant[0]), .freq(freq[0]), .frsp(frsp[0]),
    .sm_d(sm_d[0]), .sm_write_n(sm_write_n[0]), .sm_cs_n(sm_cs_n[0]), .sm_cclk(sm_cclk[0]),
    .scrubbing(scrubbing[0]), .abort_done(abort_done[0]));
  selectmap_if #(.VIRTEX1(1'b0), .SCRUB_PAUSE(PAUSE)) dut2 (
    .clk, .rst, .in_rd(in_rd[1]), .in_data(in_data[1]), .in_empty(in_empty[1]),
    .out_wr(out_wr[1]), .out_data(out_data[1]), .out_full(out_full[1]),
    .arb_request(arb_request[1]), .arb_grant(arb_grant[1]), .freq(freq[1]), .frsp(frsp[1]),
    .sm_d(sm_d[1]), .sm_write_n(sm_write_n[1]), .sm_cs_n(sm_cs_n[1]), .sm_cclk(sm_cclk[1]),
    .scrubbing(scrubbing[1]), .abort_done(abort_done[1]));

  flash_responder u_fr0 (.clk, .rst, .request(arb_request[0]), .grant(arb_grant[0]), .req(freq[0]), .rsp(frsp[0]));
  flash_responder u_fr1 (.clk, .rst, .request(arb_request[1]), .grant(arb_grant[1]), .req(freq[1]), .rsp(frsp[1]));

  assign in_empty[0] = (inq0.size() == 0);
  assign in_empty[1] = (inq1.size() == 0);

  always @(posedge clk) begin
    if (in_rd[0] && inq0.size() > 0) begin in_data[0] <= inq0[0]; fork begin #1; void'(inq0.pop_front()); end join_none end
    if (in_rd[1] && inq1.size() > 0) begin in_data[1] <= inq1[0]; fork begin #1; void'(inq1.pop_front()); end join_none end
    if (!rst && out_wr[0] && !out_full[0]) ackq0.push_back(out_data[0]);
    if (!rst && out_wr[1] && !out_full[1]) ackq1.push_back(out_data[1]);
    out_full[0] <= ($urandom_range(4) == 0);
    out_full[1] <= ($urandom_range(4) == 0);
  end

  // SelectMap monitors
  for (genvar k = 0; k < 2; k++) begin : g_mon
    logic cclk_q, wn_q, cs_q;
    logic [7:0] d_q;
    int since_rise = 10;
    always @(posedge clk) begin
      cclk_q <= sm_cclk[k]; wn_q <= sm_write_n[k]; cs_q <= sm_cs_n[k]; d_q <= sm_d[k];
      if (rst) begin
        aborts[k] = 0; passes[k] = 0; min_gap[k] = 1 << 30; gap[k] = 0; rate_err[k] = 0; stab_err[k] = 0;
      end else begin
        if (sm_cclk[k] && !cclk_q && !sm_cs_n[k] && !sm_write_n[k]) begin
          if (k == 0) capq0.push_back(sm_d[k]); else capq1.push_back(sm_d[k]);
          if (sm_d[k] != d_q) stab_err[k]++;
        end
        if (sm_cclk[k] && !cclk_q) begin
          if (since_rise < 1) rate_err[k]++;
          since_rise = 0;
        end else since_rise++;
        if (!sm_cs_n[k] && sm_write_n[k] && !wn_q) aborts[k]++;   // write released with CS low
        if (sm_cs_n[k] && !cs_q) passes[k]++;
        if (sm_cs_n[k]) gap[k]++;
        if (!sm_cs_n[k] && cs_q) begin if (gap[k] < min_gap[k]) min_gap[k] = gap[k]; gap[k] = 0; end
      end
    end
  end

  // ---------------- helpers ----------------
  task automatic send(input int k, input logic [7:0] b);
    if (k == 0) inq0.push_back(b); else inq1.push_back(b);
  endtask
  task automatic send3(input int k, input logic [7:0] c, input logic [20:0] a);
    send(k, c); send(k, a[7:0]); send(k, a[15:8]); send(k, {3'b000, a[20:16]});
  endtask
  task automatic get_ack(input int k, output logic [7:0] b);
    int t = 0;
    b = 8'h00;
    while ((k == 0 ? ackq0.size() : ackq1.size()) == 0 && t < 50000) begin @(posedge clk); t++; end
    if (t < 50000) b = (k == 0) ? ackq0.pop_front() : ackq1.pop_front();
  endtask
  function automatic logic [15:0] fw(input logic [20:0] a);
    return a[15:0] ^ {a[7:0], a[15:8]} ^ 16'h5A3C;
  endfunction
  task automatic check_flash_stream(input int k, input logic [20:0] a0, input int nwords, input string what);
    for (int i = 0; i < nwords; i++) begin
      logic [15:0] w;
      logic [7:0] lo, hi;
      w = fw(a0 + 21'(i));
      lo = (k == 0) ? capq0.pop_front() : capq1.pop_front();
      hi = (k == 0) ? capq0.pop_front() : capq1.pop_front();
      check(lo == w[7:0] && hi == w[15:8], $sformatf("%s: word %0d", what, i));
    end
  endtask

  logic [7:0] b;
  logic [7:0] busbytes [20];
  int ab_before, p_before, p1_before;

  initial begin
    in_data[0] = 0; in_data[1] = 0; out_full[0] = 0; out_full[1] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // ---- program from flash, both targets ----
    for (int k = 0; k < 2; k++) begin
      send3(k, SM_LOAD_START, 21'h000100);
      send3(k, SM_LOAD_STOP, 21'h00010F);
      send(k, SM_PROG_FLASH);
      get_ack(k, b); check(b == ACK_BEGIN_FLASH, $sformatf("t%0d begin-flash ack %02x", k, b));
      get_ack(k, b); check(b == ACK_END_FLASH, $sformatf("t%0d end-flash ack %02x", k, b));
      repeat (5) @(posedge clk);
      check(((k == 0) ? capq0.size() : capq1.size()) == 32, "32 bytes for 16 words");
      check_flash_stream(k, 21'h000100, 16, $sformatf("t%0d program from flash", k));
    end
    // ---- program from bus ----
    send(0, SM_LOAD_COUNT); send(0, 8'd20); send(0, 8'd0); send(0, 8'd0); send(0, 8'd0);
    send(0, SM_PROG_BUS);
    for (int i = 0; i < 20; i++) begin busbytes[i] = 8'($urandom); send(0, busbytes[i]); end
    get_ack(0, b); check(b == ACK_BEGIN_BUS, "begin-bus ack");
    get_ack(0, b); check(b == ACK_END_BUS, "end-bus ack");
    repeat (5) @(posedge clk);
    check(capq0.size() == 20, "20 bus bytes sent");
    for (int i = 0; i < 20; i++) begin b = capq0.pop_front(); check(b == busbytes[i], $sformatf("bus byte %0d", i)); end
    // ---- abort command ----
    ab_before = aborts[0];
    send(0, SM_ABORT);
    wait (abort_done[0]); repeat (3) @(posedge clk);
    check(aborts[0] == ab_before + 1, "abort sequence on first-generation target");
    check(capq0.size() == 0, "abort writes no data");
    ab_before = aborts[1];
    send(1, SM_ABORT);
    repeat (100) @(posedge clk);
    check(aborts[1] == ab_before, "abort command ignored by newer target");
    // ---- scrubbing, both targets ----
    send3(0, SM_LOAD_STOP, 21'h000103);
    send3(1, SM_LOAD_STOP, 21'h000103);
    for (int k = 0; k < 2; k++) send(k, SM_SCRUB);
    for (int k = 0; k < 2; k++) begin get_ack(k, b); check(b == ACK_SCRUB_ON, $sformatf("t%0d scrub-on ack", k)); end
    p_before = passes[0];
    p1_before = passes[1];
    min_gap[0] = 1 << 30; min_gap[1] = 1 << 30; gap[0] = 1 << 20; gap[1] = 1 << 20;
    ab_before = aborts[0];
    begin
      int ab1;
      ab1 = aborts[1];
      wait (passes[0] >= p_before + 6 && passes[1] >= p1_before + 4);
      for (int k = 0; k < 2; k++) send(k, SM_STOP);
      for (int k = 0; k < 2; k++) begin get_ack(k, b); check(b == ACK_SCRUB_OFF, $sformatf("t%0d scrub-off ack %02x", k, b)); end
      check(aborts[1] == ab1, "no abort before scrub passes on newer target");
    end
    check(!scrubbing[0] && !scrubbing[1], "scrubbing stopped");
    // first-generation target: every pass is an abort (its own CS-low period) then a stream
    check(aborts[0] - ab_before >= 3, "abort before scrub passes on first-generation target");
    check(capq0.size() % 8 == 0 && capq0.size() >= 24, $sformatf("whole passes only (%0d bytes)", capq0.size()));
    while (capq0.size() >= 8) check_flash_stream(0, 21'h000100, 4, "scrub pass t0");
    check(capq1.size() % 8 == 0 && capq1.size() >= 32, "whole passes only t1");
    while (capq1.size() >= 8) check_flash_stream(1, 21'h000100, 4, "scrub pass t1");
    check(min_gap[1] >= PAUSE, $sformatf("pause between passes >= %0d clocks (%0d)", PAUSE, min_gap[1]));
    for (int k = 0; k < 2; k++) begin
      check(rate_err[k] == 0, "CCLK at most half the clock rate");
      check(stab_err[k] == 0, "data stable at rising CCLK");
    end
    check(u_fr0.bad_strobes == 0 && u_fr1.bad_strobes == 0, "flash strobes only with grant");
    repeat (2 * PAUSE) @(posedge clk);
    check(capq0.size() == 0 && capq1.size() == 0, "nothing sent after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
