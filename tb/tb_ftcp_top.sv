// End-to-end testbench for ftcp_top.
//
// The host side is the ISA bus, driven by the tasks in ftcp_host.svh. Every
// byte crosses the bus as a Hamming code word. A behavioural Intel flash is on
// the flash pins. Monitors on the two SelectMap ports capture the bytes
// clocked into each FPGA (rising CCLK with CS# and WRITE# low) and compare
// each stream with the flash or host data it should carry.
//
// Operations, in order:
//   1. the triplicated pin stage, with one disagreeing copy;
//   2. flash control:
//      - unlock, erase, program and read back four words, one host byte
//        carrying a bit error;
//      - address readback;
//      - a program refused after the block is locked;
//   3. configuration streams loaded into the flash as records of 512 words
//      plus a CRC. Both SelectMap ports are programmed from the flash through
//      the buffer, and the support port also from the bus; then an abort;
//   4. the co-processing incrementer over the inter-FPGA link;
//   5. both ports scrubbing at once, with host flash reads in between (flash
//      contention), then stopped;
//   6. a read error between flash and FPGA: the record fails its CRC, is
//      retried after the wait and the stream is still correct;
//   7. an uncorrectable bus word, which is dropped;
//   8. a module reset from its control address.
// Each mechanism is counted; one that never happens counts as a failure.
// The scrub pause and retry wait are scaled down (30000 and 20000 clocks)
// to keep the run short.
`timescale 1ns/1ps
module tb_ftcp_top;
  import ftcp_pkg::*;

  localparam int PAUSE = 30000, RETRY = 20000;
  localparam logic [9:0] A_FC = 10'h300, A_SMV = 10'h302, A_SMV2 = 10'h304, A_LINK = 10'h306;

  logic clk = 0, rst = 1;
  always #10 clk = !clk;
  int checks = 0, failures = 0;

  logic [9:0]  isa_sa = '0;
  logic        isa_aen = 1'b0, isa_iow_n = 1'b1, isa_ior_n = 1'b1;
  logic [15:0] isa_sd_i = '0, isa_sd_o;
  logic        isa_sd_oe;
  logic [20:0] f_addr;
  logic [15:0] f_dq_o, f_dq_i;
  logic        f_dq_oe, f_ce_n, f_oe_n, f_we_n, f_rp_n;
  logic [7:0]  smv_d, smv2_d;
  logic        smv_write_n, smv_cs_n, smv_cclk, smv2_write_n, smv2_cs_n, smv2_cclk;
  logic [7:0]  pd_tr0 = '0, pd_tr1 = '0, pd_tr2 = '0, pd_trace;
  logic [7:0]  pd_pin_o [3], pd_pin_oe [3];
  logic        scrubbing_v, scrubbing_v2, abort_done_v, flash_owned, crc_fail, ecc_corrected, ecc_error;
  logic [1:0]  flash_owner;
  logic [15:0] corrupt = '0;

  ftcp_top #(.FIFO_DEPTH(512), .ECC(1'b1), .SCRUB_PAUSE(PAUSE), .RETRY_WAIT(RETRY)) dut (.*);

  flash_model #(.BUSY_CLKS(20), .MIN_WP(3)) u_flash (
    .clk, .addr(f_addr), .dq_i(f_dq_o), .dq_oe(f_dq_oe), .dq_o(f_dq_i),
    .ce_n(f_ce_n), .oe_n(f_oe_n), .we_n(f_we_n), .rp_n(f_rp_n), .corrupt_mask(corrupt)
  );

  `include "ftcp_host.svh"

  // ---------------- configuration data in the flash ----------------
  // Record r holds logical words r*512 .. r*512+511 at physical r*513 ...
  function automatic logic [15:0] bs_word(input int l);
    return 16'(l * 40503 + 7) ^ 16'hC3A5;
  endfunction
  task automatic load_record(input int r);
    logic [15:0] c = 16'hFFFF;
    for (int i = 0; i < 512; i++) begin
      logic [15:0] w;
      w = bs_word(r * 512 + i);
      u_flash.mem[r * 513 + i] = w;
      c = crc_byte(crc_byte(c, w[15:8]), w[7:0]);
    end
    u_flash.mem[r * 513 + 512] = c;
  endtask

  // ---------------- SelectMap monitors ----------------
  logic [7:0] cap [2][$];
  int         passes [2], aborts [2], pass_err [2];
  logic [20:0] exp_lo [2], exp_hi [2];   // logical range expected per scrub pass
  bit         check_passes = 0;
  for (genvar k = 0; k < 2; k++) begin : g_mon
    logic cclk_q = 1'b0, cs_q = 1'b1;
    wire  cclk = (k == 0) ? smv_cclk : smv2_cclk;
    wire  cs_n = (k == 0) ? smv_cs_n : smv2_cs_n;
    wire  wr_n = (k == 0) ? smv_write_n : smv2_write_n;
    wire [7:0] d = (k == 0) ? smv_d : smv2_d;
    always @(posedge clk) begin
      cclk_q <= cclk; cs_q <= cs_n;
      if (rst) begin passes[k] = 0; aborts[k] = 0; pass_err[k] = 0; end
      else begin
        if (cclk && !cclk_q && !cs_n && !wr_n) cap[k].push_back(d);
        if (cclk && !cclk_q && !cs_n && wr_n) aborts[k]++;
        if (cs_n && !cs_q) begin
          passes[k]++;
          if (check_passes && cap[k].size() > 0) begin
            // a scrub pass must carry exactly the configured stream
            int n;
            bit ok;
            logic [15:0] w;
            n  = int'(exp_hi[k] - exp_lo[k]) + 1;
            ok = (cap[k].size() == 2 * n);
            for (int i = 0; ok && i < n; i++) begin
              w  = bs_word(int'(exp_lo[k]) + i);
              ok = (cap[k][2*i] == w[7:0]) && (cap[k][2*i+1] == w[15:8]);
            end
            if (!ok) pass_err[k]++;
            cap[k].delete();
          end
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_corr = 0, n_unc = 0, n_contend = 0, n_crc_fail = 0, n_valid = 0, n_hits = 0;
  int n_abort_done = 0, n_mod_rst = 0, n_owner_change = 0, n_minority = 0;
  logic buf_valid_q = 1'b0;
  logic [1:0] owner_q = '0;
  always @(posedge clk) if (!rst) begin
    if (ecc_corrected) n_corr++;
    if (ecc_error) n_unc++;
    if ($countones(dut.request) > 1) n_contend++;
    if (crc_fail) n_crc_fail++;
    buf_valid_q <= dut.u_cache.buf_valid;
    if (dut.u_cache.buf_valid && !buf_valid_q) n_valid++;
    if (int'(dut.u_cache.v.state) == 5) n_hits++;   // voted buffer state S_HIT
    if (abort_done_v) n_abort_done++;
    if (dut.g_bus[2].u_bus.rst_out) n_mod_rst++;
    owner_q <= flash_owner;
    if (flash_owned && flash_owner != owner_q) n_owner_change++;
  end

  // ---------------- helpers ----------------
  task automatic expect_byte(input logic [9:0] base, input logic [7:0] e, input string what);
    logic [7:0] b;
    bit ok;
    get_byte(base, b, ok);
    check(ok && b == e, $sformatf("%s: got %02x expected %02x", what, b, e));
  endtask
  task automatic fc_read(input logic [20:0] a, output logic [15:0] w);
    logic [7:0] lo, hi;
    bit ok1, ok2;
    put_addr(A_FC, FC_LOAD_ADDR, a);
    put_byte(A_FC, FC_READ);
    get_byte(A_FC, lo, ok1);
    get_byte(A_FC, hi, ok2);
    w = {hi, lo};
    check(ok1 && ok2, "flash read reply");
  endtask
  task automatic check_stream(input int k, input int l0, input int n, input string what);
    bit ok = (cap[k].size() == 2 * n);
    for (int i = 0; ok && i < n; i++) begin
      logic [15:0] w = bs_word(l0 + i);
      ok = (cap[k][2*i] == w[7:0]) && (cap[k][2*i+1] == w[15:8]);
    end
    check(ok, $sformatf("%s (%0d bytes)", what, cap[k].size()));
    cap[k].delete();
  endtask

  logic [15:0] w;
  logic [7:0]  b, busbytes [16];
  logic [3:0]  st;
  bit          ok;
  int          p0, p1, corr_before, v_before, fail_before, minority_exp;

  initial begin
    repeat (5) @(posedge clk);
    #3 rst = 0;
    repeat (5) @(posedge clk);

    // ---- 1. triplicated pin stage ----
    for (int i = 0; i < 40; i++) begin
      logic [7:0] good, bad;
      int lane;
      good = 8'($urandom); bad = 8'($urandom); lane = i % 3;
      pd_tr0 = (lane == 0) ? bad : good;
      pd_tr1 = (lane == 1) ? bad : good;
      pd_tr2 = (lane == 2) ? bad : good;
      #5;
      check(pd_trace == good, "pin stage voted value");
      check(pd_pin_oe[lane] == ~(bad ^ good) && pd_pin_oe[(lane + 1) % 3] == 8'hFF,
            "minority copy disabled, others enabled");
      n_minority += $countones(bad ^ good);
    end

    // ---- 2. flash control ----
    corr_before = n_corr;
    put_addr(A_FC, FC_LOAD_ADDR, 21'h010000);
    put_byte(A_FC, FC_UNLOCK);
    put_byte(A_FC, FC_ERASE);
    put_byte(A_FC, FC_WRITE);
    put_word32(A_FC, 32'd4);
    put_byte(A_FC, 8'h34, 12'h010);   // bit error on the bus, corrected
    put_byte(A_FC, 8'h12);
    put_byte(A_FC, 8'h78); put_byte(A_FC, 8'h56);
    put_byte(A_FC, 8'hBC); put_byte(A_FC, 8'h9A);
    put_byte(A_FC, 8'hF0); put_byte(A_FC, 8'hDE, 12'h800);
    put_byte(A_FC, FC_ADDR2BUS);
    expect_byte(A_FC, 8'h04, "address after write, low");
    expect_byte(A_FC, 8'h00, "address after write, mid");
    expect_byte(A_FC, 8'h01, "address after write, high");
    check(n_corr - corr_before == 2, "two bus errors corrected");
    fc_read(21'h010000, w); check(w == 16'h1234, $sformatf("flash word 0 %04x", w));
    put_byte(A_FC, FC_INC_ADDR); put_byte(A_FC, FC_READ);
    get_byte(A_FC, b, ok); w[7:0] = b; get_byte(A_FC, b, ok); w[15:8] = b;
    check(w == 16'h5678, $sformatf("flash word 1 %04x", w));
    fc_read(21'h010003, w); check(w == 16'hDEF0, $sformatf("flash word 3 %04x", w));
    check(u_flash.mem[21'h010002] == 16'h9ABC, "word 2 stored in the flash");
    check(u_flash.n_erases == 1 && u_flash.n_unlocks == 1 && u_flash.n_programs == 4, "erase, unlock, 4 programs");
    // lock the block: a further program is refused
    put_addr(A_FC, FC_LOAD_ADDR, 21'h010000);
    put_byte(A_FC, FC_LOCK);
    put_addr(A_FC, FC_LOAD_ADDR, 21'h010004);
    put_byte(A_FC, FC_WRITE); put_word32(A_FC, 32'd1); put_byte(A_FC, 8'h00); put_byte(A_FC, 8'h00);
    fc_read(21'h010004, w); check(w == 16'hFFFF, "program of a locked block refused");
    check(u_flash.n_locks == 1, "lock command reached the flash");

    // ---- 3. configuration ----
    load_record(0);
    load_record(1);
    // co-processing FPGA (Virtex II port) from flash: 40 words of record 0
    put_addr(A_SMV2, SM_LOAD_START, 21'd0);
    put_addr(A_SMV2, SM_LOAD_STOP, 21'd39);
    put_byte(A_SMV2, SM_PROG_FLASH);
    expect_byte(A_SMV2, ACK_BEGIN_FLASH, "V2 begin-flash ack");
    expect_byte(A_SMV2, ACK_END_FLASH, "V2 end-flash ack");
    check_stream(1, 0, 40, "V2 configured from flash");
    // support FPGA (Virtex port) from flash: 24 words of record 1
    put_addr(A_SMV, SM_LOAD_START, 21'd512);
    put_addr(A_SMV, SM_LOAD_STOP, 21'd535);
    put_byte(A_SMV, SM_PROG_FLASH);
    expect_byte(A_SMV, ACK_BEGIN_FLASH, "V begin-flash ack");
    expect_byte(A_SMV, ACK_END_FLASH, "V end-flash ack");
    check_stream(0, 512, 24, "V configured from flash");
    // support FPGA from the bus
    put_byte(A_SMV, SM_LOAD_COUNT); put_word32(A_SMV, 32'd16);
    put_byte(A_SMV, SM_PROG_BUS);
    for (int i = 0; i < 16; i++) begin busbytes[i] = 8'($urandom); put_byte(A_SMV, busbytes[i]); end
    expect_byte(A_SMV, ACK_BEGIN_BUS, "begin-bus ack");
    expect_byte(A_SMV, ACK_END_BUS, "end-bus ack");
    ok = (cap[0].size() == 16);
    for (int i = 0; ok && i < 16; i++) ok = (cap[0][i] == busbytes[i]);
    check(ok, "V configured from the bus");
    cap[0].delete();
    // abort
    put_byte(A_SMV, SM_ABORT);
    repeat (100) @(posedge clk);
    check(n_abort_done == 1 && aborts[0] == 4, $sformatf("abort sequence (%0d CCLK)", aborts[0]));

    // ---- 4. co-processing FPGA over the link ----
    for (int i = 0; i < 8; i++) put_byte(A_LINK, 8'(i * 37 + 250));
    for (int i = 0; i < 8; i++) expect_byte(A_LINK, 8'(i * 37 + 251), $sformatf("incremented byte %0d", i));

    // ---- 5. both ports scrubbing, host reading the flash in between ----
    put_addr(A_SMV, SM_LOAD_STOP, 21'd519);      // 8 words of record 1
    put_addr(A_SMV2, SM_LOAD_STOP, 21'd15);      // 16 words of record 0
    exp_lo[0] = 21'd512; exp_hi[0] = 21'd519;
    exp_lo[1] = 21'd0;   exp_hi[1] = 21'd15;
    check_passes = 1;
    p0 = passes[0]; p1 = passes[1];
    put_byte(A_SMV, SM_SCRUB);
    put_byte(A_SMV2, SM_SCRUB);
    expect_byte(A_SMV, ACK_SCRUB_ON, "V scrub-on ack");
    expect_byte(A_SMV2, ACK_SCRUB_ON, "V2 scrub-on ack");
    check(scrubbing_v && scrubbing_v2, "both ports scrubbing");
    for (int i = 0; i < 3; i++) begin
      fc_read(21'h010000 + 21'(i), w);
      check(w == ((i == 0) ? 16'h1234 : (i == 1) ? 16'h5678 : 16'h9ABC), "host flash read during scrubbing");
    end
    wait (passes[0] >= p0 + 2 * 4 && passes[1] >= p1 + 4);
    put_byte(A_SMV, SM_STOP);
    put_byte(A_SMV2, SM_STOP);
    expect_byte(A_SMV, ACK_SCRUB_OFF, "V scrub-off ack");
    expect_byte(A_SMV2, ACK_SCRUB_OFF, "V2 scrub-off ack");
    check(!scrubbing_v && !scrubbing_v2, "scrubbing stopped");
    check(pass_err[0] == 0 && pass_err[1] == 0, $sformatf("every scrub pass correct (%0d, %0d bad)", pass_err[0], pass_err[1]));
    check(n_abort_done >= 5, "abort before each first-generation scrub pass");
    check_passes = 0;
    cap[0].delete(); cap[1].delete();

    // ---- 6. flash read error: CRC failure and retry ----
    // make sure the buffer holds record 1, then read record 0 with a bad pin
    put_addr(A_SMV, SM_LOAD_START, 21'd512); put_addr(A_SMV, SM_LOAD_STOP, 21'd515);
    put_byte(A_SMV, SM_PROG_FLASH);
    expect_byte(A_SMV, ACK_BEGIN_FLASH, "V begin-flash ack");
    expect_byte(A_SMV, ACK_END_FLASH, "V end-flash ack");
    check_stream(0, 512, 4, "V stream before the read error");
    fail_before = n_crc_fail;
    corrupt = 16'h0040;
    put_addr(A_SMV2, SM_LOAD_START, 21'd100); put_addr(A_SMV2, SM_LOAD_STOP, 21'd131);
    put_byte(A_SMV2, SM_PROG_FLASH);
    expect_byte(A_SMV2, ACK_BEGIN_FLASH, "V2 begin-flash ack");
    wait (n_crc_fail > fail_before);
    corrupt = '0;                                   // the routing has been repaired
    expect_byte(A_SMV2, ACK_END_FLASH, "V2 end-flash ack after retry");
    check_stream(1, 100, 32, "V2 stream correct despite the read error");
    check(n_crc_fail == fail_before + 1, "one CRC failure");

    // ---- 7. uncorrectable bus word is dropped ----
    put_byte(A_LINK, 8'h40, 12'b1000_0000_0001);
    put_byte(A_LINK, 8'h41);
    expect_byte(A_LINK, 8'h42, "byte after a dropped word");
    repeat (200) @(posedge clk);
    get_status(A_LINK, st);
    check(st[2], "dropped word produced no reply");
    check(n_unc == 1, "uncorrectable word signalled");

    // ---- 8. module reset from its control address ----
    put_byte(A_SMV2, SM_LOAD_START); put_byte(A_SMV2, 8'h55);   // half a command
    put_byte(A_SMV2 + 10'd1, 8'h00);                          // reset the module
    put_addr(A_SMV2, SM_LOAD_START, 21'd200); put_addr(A_SMV2, SM_LOAD_STOP, 21'd203);
    put_byte(A_SMV2, SM_PROG_FLASH);
    expect_byte(A_SMV2, ACK_BEGIN_FLASH, "ack after module reset");
    expect_byte(A_SMV2, ACK_END_FLASH, "end ack after module reset");
    check_stream(1, 200, 4, "stream after module reset");

    check(u_flash.n_timing_viol == 0, $sformatf("flash write timing (%0d violations)", u_flash.n_timing_viol));

    $display("mechanisms: bus_corrected=%0d bus_dropped=%0d flash_programs=%0d erases=%0d locks=%0d unlocks=%0d",
             n_corr, n_unc, u_flash.n_programs, u_flash.n_erases, u_flash.n_locks, u_flash.n_unlocks);
    $display("mechanisms: records_validated=%0d buffer_hits=%0d crc_failures=%0d contention_cycles=%0d owner_changes=%0d",
             n_valid, n_hits, n_crc_fail, n_contend, n_owner_change);
    $display("mechanisms: scrub_passes=%0d/%0d aborts=%0d module_resets=%0d minority_pins_disabled=%0d",
             passes[0], passes[1], n_abort_done, n_mod_rst, n_minority);
    check(n_corr > 0, "mechanism: bus error corrected");
    check(n_unc > 0, "mechanism: uncorrectable bus word dropped");
    check(u_flash.n_programs > 0, "mechanism: flash program");
    check(u_flash.n_erases > 0, "mechanism: flash erase");
    check(u_flash.n_locks > 0 && u_flash.n_unlocks > 0, "mechanism: block lock and unlock");
    check(n_valid > 0, "mechanism: record validated by CRC");
    check(n_hits > 0, "mechanism: buffer hit");
    check(n_crc_fail > 0, "mechanism: CRC failure and retry");
    check(n_contend > 0, "mechanism: flash contention");
    check(n_owner_change > 0, "mechanism: arbiter hand-over");
    check(n_abort_done > 0, "mechanism: abort sequence");
    check(n_mod_rst > 0, "mechanism: module reset");
    check(n_minority > 0, "mechanism: minority pin disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
