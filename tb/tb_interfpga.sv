// Testbench for interfpga_link and copro_incrementer.
//
// Two links are wired pin to pin, as on the board. The support end gets bytes
// from a testbench queue and hands received bytes to a testbench sink that
// stalls at random (dst_full). The co-processing end feeds copro_incrementer,
// whose results travel back. Every byte sent must come back, in order, plus
// one (mod 256).
// Faults injected on the pins:
//   - phase 1: none;
//   - phase 2: a random single-bit error on each code lane, changed every few
//     clocks, with one request line and one acknowledge line stuck in each
//     direction. Every byte must still arrive, with corrections counted.
//   - phase 3: a double error with an uncorrectable syndrome on the outgoing
//     lane for one byte. The byte must be dropped and signalled; the link
//     must then go on working.
// The testbench counts every mechanism (transfers, corrections, voted
// strobes with a bad copy, dropped words) and counts a failure for any that
// never happened.
`timescale 1ns/1ps
module tb_interfpga;
  logic clk = 0, rst = 1;
  always #10 clk = !clk;
  int checks = 0, failures = 0;

  // support end
  logic        s_src_rd, s_src_empty, s_dst_wr, s_dst_full;
  logic [7:0]  s_src_data, s_dst_data;
  logic [11:0] s_tx_code, c_tx_code;
  logic [2:0]  s_tx_req, c_tx_req, s_rx_ack, c_rx_ack;
  logic        s_corr, s_err, c_corr, c_err;
  // co-processing end
  logic        c_src_rd, c_src_empty, c_dst_wr, c_dst_full;
  logic [7:0]  c_src_data, c_dst_data;
  // pin faults
  logic [11:0] flip_sc = '0, flip_cs = '0;
  logic [2:0]  req_and_sc = '1, req_or_sc = '0, req_and_cs = '1, req_or_cs = '0;
  logic [2:0]  ack_and_sc = '1, ack_or_sc = '0, ack_and_cs = '1, ack_or_cs = '0;

  interfpga_link u_sup (
    .clk, .rst,
    .src_rd(s_src_rd), .src_data(s_src_data), .src_empty(s_src_empty),
    .dst_wr(s_dst_wr), .dst_data(s_dst_data), .dst_full(s_dst_full),
    .tx_code(s_tx_code), .tx_req(s_tx_req), .tx_ack_i((c_rx_ack & ack_and_sc) | ack_or_sc),
    .rx_code_i(c_tx_code ^ flip_cs), .rx_req_i((c_tx_req & req_and_cs) | req_or_cs),
    .rx_ack(s_rx_ack), .ecc_corrected(s_corr), .ecc_error(s_err)
  );
  interfpga_link u_cop (
    .clk, .rst,
    .src_rd(c_src_rd), .src_data(c_src_data), .src_empty(c_src_empty),
    .dst_wr(c_dst_wr), .dst_data(c_dst_data), .dst_full(c_dst_full),
    .tx_code(c_tx_code), .tx_req(c_tx_req), .tx_ack_i((s_rx_ack & ack_and_cs) | ack_or_cs),
    .rx_code_i(s_tx_code ^ flip_sc), .rx_req_i((s_tx_req & req_and_sc) | req_or_sc),
    .rx_ack(c_rx_ack), .ecc_corrected(c_corr), .ecc_error(c_err)
  );
  copro_incrementer #(.RESULT_DEPTH(4)) u_inc (
    .clk, .rst, .in_wr(c_dst_wr), .in_data(c_dst_data), .in_full(c_dst_full),
    .out_rd(c_src_rd), .out_data(c_src_data), .out_empty(c_src_empty)
  );

  // testbench source FIFO: data valid the clock after src_rd
  logic [7:0] srcq [$], expq [$];
  assign s_src_empty = (srcq.size() == 0);
  always @(posedge clk)
    if (s_src_rd && srcq.size() > 0) begin
      s_src_data <= srcq[0];
      fork begin #1; void'(srcq.pop_front()); end join_none
    end

  // sink with random stalls
  int n_rx = 0, n_corr = 0, n_err = 0, n_stall = 0, n_bad_strobe = 0;
  always @(posedge clk) begin
    s_dst_full <= ($urandom_range(0, 3) == 0);
    if (!rst && s_dst_wr) begin
      checks++;
      if (s_dst_full) begin failures++; $display("FAIL @%0t: write while full", $time); end
      else if (expq.size() == 0) begin failures++; $display("FAIL @%0t: unexpected byte %02x", $time, s_dst_data); end
      else begin
        logic [7:0] e;
        e = expq.pop_front();
        if (s_dst_data !== e) begin failures++; $display("FAIL @%0t: got %02x expected %02x", $time, s_dst_data, e); end
        n_rx++;
      end
    end
    if (!rst && s_dst_full) n_stall++;
    if (!rst && (s_corr || c_corr)) n_corr++;
    if (!rst && (s_err || c_err)) n_err++;
    if (!rst && !(&u_cop.rx_req_i == |u_cop.rx_req_i && &u_sup.rx_req_i == |u_sup.rx_req_i)) n_bad_strobe++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic send_bytes(input int n);
    for (int i = 0; i < n; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      srcq.push_back(b);
      expq.push_back(b + 8'd1);
    end
  endtask
  task automatic wait_drained(input int max_clks);
    int t = 0;
    while ((expq.size() != 0 || srcq.size() != 0) && t < max_clks) begin @(posedge clk); t++; end
    check(expq.size() == 0, $sformatf("all bytes returned (%0d left)", expq.size()));
  endtask

  bit   noise_on = 0;
  always @(posedge clk)
    if (noise_on && $urandom_range(0, 4) == 0) begin
      flip_sc <= 12'(1 << $urandom_range(0, 11));
      flip_cs <= 12'(1 << $urandom_range(0, 11));
    end

  int rx_before, t0, corr_before;
  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 0;

    // ---- phase 1: clean pins ----
    t0 = $time;
    send_bytes(40);
    wait_drained(4000);
    check(n_rx == 40, "40 bytes round trip");
    $display("clean round trip: %0d ns for 40 bytes", $time - t0);

    // ---- phase 2: bit errors and stuck strobe copies ----
    corr_before = n_corr;
    noise_on = 1;
    req_and_sc = 3'b110;   // copy 0 of support->copro request stuck at 0
    req_or_cs  = 3'b010;   // copy 1 of copro->support request stuck at 1
    ack_or_sc  = 3'b100;   // copy 2 of the acknowledge seen by the support end stuck at 1
    ack_and_cs = 3'b011;   // copy 2 of the acknowledge seen by the copro end stuck at 0
    send_bytes(100);
    wait_drained(20000);
    noise_on = 0;
    @(posedge clk); flip_sc <= '0; flip_cs <= '0;
    req_and_sc = '1; req_or_cs = '0; ack_or_sc = '0; ack_and_cs = '1;
    check(n_rx == 140, "140 bytes through noise");
    check(n_corr > corr_before, "bit errors corrected");

    // ---- phase 3: uncorrectable word dropped ----
    repeat (20) @(posedge clk);
    flip_sc <= 12'b1000_0000_0001;   // positions 1 and 12: syndrome 13
    srcq.push_back(8'h7E);           // expected nothing back
    repeat (200) @(posedge clk);
    check(n_err == 1, $sformatf("one uncorrectable word signalled (%0d)", n_err));
    check(expq.size() == 0 && n_rx == 140, "dropped word produces no result");
    flip_sc <= '0;
    repeat (5) @(posedge clk);
    send_bytes(10);
    wait_drained(4000);
    check(n_rx == 150, "link recovers after a dropped word");

    $display("mechanisms: transfers=%0d corrected=%0d dropped=%0d sink_stalls=%0d bad_strobe_cycles=%0d",
             n_rx, n_corr, n_err, n_stall, n_bad_strobe);
    check(n_rx > 0, "mechanism: byte transfer");
    check(n_corr > 0, "mechanism: single-bit correction");
    check(n_err > 0, "mechanism: uncorrectable word dropped");
    check(n_stall > 0, "mechanism: sink back-pressure");
    check(n_bad_strobe > 0, "mechanism: voted strobe with a bad copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
