// Full-size testbench: ftcp_top with every parameter at its default
// (512-byte FIFOs, ECC on the bus, one-second scrub pause, two-second retry
// wait at 50 MHz).
//
// Takes the system through one complete configuration cycle, driven from the
// ISA bus exactly as a host would:
//   - a 64-word configuration stream is stored in the flash as a record with
//     its CRC;
//   - the co-processing FPGA is configured from it through the CRC-checked
//     buffer;
//   - the stream is checked byte for byte on the SelectMap pins;
//   - one scrub pass is started and stopped in the pause that follows;
//   - the configured co-processing design is used over the inter-FPGA link;
//   - a flash word is read back through flash control.
// The one-second pause is not waited out: the stop command ends scrubbing
// during the pause.
`timescale 1ns/1ps
module tb_ftcp_top_full;
  import ftcp_pkg::*;

  localparam logic [9:0] A_FC = 10'h300, A_SMV2 = 10'h304, A_LINK = 10'h306;

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

  ftcp_top dut (.*);

  flash_model #(.BUSY_CLKS(20), .MIN_WP(3)) u_flash (
    .clk, .addr(f_addr), .dq_i(f_dq_o), .dq_oe(f_dq_oe), .dq_o(f_dq_i),
    .ce_n(f_ce_n), .oe_n(f_oe_n), .we_n(f_we_n), .rp_n(f_rp_n), .corrupt_mask(corrupt)
  );

  `include "ftcp_host.svh"

  function automatic logic [15:0] bs_word(input int l);
    return 16'(l * 7919 + 3) ^ 16'h5AA5;
  endfunction

  logic [7:0] cap [$];
  int         passes = 0;
  logic       cclk_q = 1'b0, cs_q = 1'b1;
  always @(posedge clk) begin
    cclk_q <= smv2_cclk; cs_q <= smv2_cs_n;
    if (!rst && smv2_cclk && !cclk_q && !smv2_cs_n && !smv2_write_n) cap.push_back(smv2_d);
    if (!rst && smv2_cs_n && !cs_q) passes++;
  end

  task automatic expect_byte(input logic [9:0] base, input logic [7:0] e, input string what);
    logic [7:0] b;
    bit ok;
    get_byte(base, b, ok);
    check(ok && b == e, $sformatf("%s: got %02x expected %02x", what, b, e));
  endtask
  task automatic check_stream(input int n, input string what);
    bit ok;
    logic [15:0] w;
    ok = (cap.size() == 2 * n);
    for (int i = 0; ok && i < n; i++) begin
      w  = bs_word(i);
      ok = (cap[2*i] == w[7:0]) && (cap[2*i+1] == w[15:8]);
    end
    check(ok, $sformatf("%s (%0d bytes)", what, cap.size()));
    cap.delete();
  endtask

  logic [15:0] c, w;
  logic [7:0]  lo, hi;
  bit          ok1, ok2;
  int          t0;

  initial begin
    // record 0: 512 words (64 used by the stream, the rest zero) and the CRC
    c = 16'hFFFF;
    for (int i = 0; i < 512; i++) begin
      w = (i < 64) ? bs_word(i) : 16'h0000;
      u_flash.mem[i] = w;
      c = crc_byte(crc_byte(c, w[15:8]), w[7:0]);
    end
    u_flash.mem[512] = c;

    repeat (5) @(posedge clk);
    #3 rst = 0;
    repeat (5) @(posedge clk);

    // configure the co-processing FPGA from the flash
    put_addr(A_SMV2, SM_LOAD_START, 21'd0);
    put_addr(A_SMV2, SM_LOAD_STOP, 21'd63);
    t0 = $time;
    put_byte(A_SMV2, SM_PROG_FLASH);
    expect_byte(A_SMV2, ACK_BEGIN_FLASH, "begin-flash ack");
    expect_byte(A_SMV2, ACK_END_FLASH, "end-flash ack");
    $display("configuration from flash: %0d ns", $time - t0);
    check_stream(64, "co-processing FPGA configured");
    check(!crc_fail && dut.u_cache.buf_valid, "record passed its CRC");

    // one scrub pass, stopped during the pause
    put_byte(A_SMV2, SM_SCRUB);
    expect_byte(A_SMV2, ACK_SCRUB_ON, "scrub-on ack");
    wait (passes >= 2);
    check(scrubbing_v2, "scrubbing during the pause");
    put_byte(A_SMV2, SM_STOP);
    expect_byte(A_SMV2, ACK_SCRUB_OFF, "scrub-off ack");
    check_stream(64, "scrub pass");

    // use the co-processing design
    for (int i = 0; i < 4; i++) put_byte(A_LINK, 8'(i + 100));
    for (int i = 0; i < 4; i++) expect_byte(A_LINK, 8'(i + 101), "incremented over the link");

    // raw flash read: the record's CRC word
    put_addr(A_FC, FC_LOAD_ADDR, 21'd512);
    put_byte(A_FC, FC_READ);
    get_byte(A_FC, lo, ok1);
    get_byte(A_FC, hi, ok2);
    check(ok1 && ok2 && {hi, lo} == c, "CRC word read back by flash control");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
