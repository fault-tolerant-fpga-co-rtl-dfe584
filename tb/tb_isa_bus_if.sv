// Testbench for isa_bus_if: two interfaces on one ISA bus.
//
// The host side is driven with asynchronous ISA I/O cycles. Their timing is
// chosen not to line up with the 50 MHz clock: address and AEN are set up
// 37 ns before the strobe, the strobe is held low for 290 ns, and data are held
// 30 ns after it. Device A sits at 0x300 with ECC (12,8 Hamming words). Device B
// sits at 0x308 without ECC. The testbench's own Hamming code places the check
// bits at positions 1, 2, 4 and 8 of a 12-bit word, with data at the other
// positions. It is written here independently of the RTL coder. Checked:
//   - data written by the host arrive in order in the input FIFO;
//   - single-bit errors are corrected and signalled;
//   - words with an uncorrectable syndrome are dropped;
//   - module data come back to the host in order;
//   - an empty FIFO reads as 0;
//   - the status register;
//   - the control-address clear and its rst_out pulse;
//   - overflow of a full FIFO;
//   - cycles at another address or with AEN high are ignored.
// FIFO_DEPTH is reduced to 16 to reach full quickly.
`timescale 1ns/1ps
module tb_isa_bus_if;
  localparam int DEPTH = 16;
  logic        clk = 0, rst = 1;
  logic [9:0]  sa = '0;
  logic        aen = 1'b0, iow_n = 1'b1, ior_n = 1'b1;
  logic [15:0] sd_host = '0;
  logic [15:0] sd_o [2];
  logic        sd_oe [2];
  logic        in_rd [2], in_empty [2], in_full [2], out_wr [2], out_empty [2], out_full [2];
  logic [7:0]  in_data [2], out_data [2];
  logic        rst_out [2], ecc_corr [2], ecc_err [2];
  int          checks = 0, failures = 0;
  int          n_corr = 0, n_err = 0, n_rst = 0;

  always #10 clk = !clk;

  isa_bus_if #(.BASE_ADDR(10'h300), .FIFO_DEPTH(DEPTH), .ECC(1'b1)) dut_a (
    .clk, .rst, .isa_sa(sa), .isa_aen(aen), .isa_iow_n(iow_n), .isa_ior_n(ior_n),
    .isa_sd_i(sd_host), .isa_sd_o(sd_o[0]), .isa_sd_oe(sd_oe[0]),
    .in_rd(in_rd[0]), .in_data(in_data[0]), .in_empty(in_empty[0]), .in_full(in_full[0]),
    .out_wr(out_wr[0]), .out_data(out_data[0]), .out_empty(out_empty[0]), .out_full(out_full[0]),
    .rst_out(rst_out[0]), .ecc_corrected(ecc_corr[0]), .ecc_error(ecc_err[0])
  );
  isa_bus_if #(.BASE_ADDR(10'h308), .FIFO_DEPTH(DEPTH), .ECC(1'b0)) dut_b (
    .clk, .rst, .isa_sa(sa), .isa_aen(aen), .isa_iow_n(iow_n), .isa_ior_n(ior_n),
    .isa_sd_i(sd_host), .isa_sd_o(sd_o[1]), .isa_sd_oe(sd_oe[1]),
    .in_rd(in_rd[1]), .in_data(in_data[1]), .in_empty(in_empty[1]), .in_full(in_full[1]),
    .out_wr(out_wr[1]), .out_data(out_data[1]), .out_empty(out_empty[1]), .out_full(out_full[1]),
    .rst_out(rst_out[1]), .ecc_corrected(ecc_corr[1]), .ecc_error(ecc_err[1])
  );

  always @(posedge clk) begin
    if (!rst && ecc_corr[0]) n_corr++;
    if (!rst && ecc_err[0]) n_err++;
    if (!rst && rst_out[0]) n_rst++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- reference (12,8) Hamming code ----
  function automatic logic [11:0] enc(input logic [7:0] d);
    logic [11:0] c = '0;
    int di = 0;
    for (int p = 1; p <= 12; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8) begin c[p-1] = d[di]; di++; end
    for (int k = 0; k < 4; k++) begin
      logic par = 1'b0;
      for (int p = 1; p <= 12; p++) if (p[k] && p != (1 << k)) par ^= c[p-1];
      c[(1 << k) - 1] = par;
    end
    return c;
  endfunction
  function automatic logic [7:0] dec(input logic [11:0] c);
    logic [7:0] d;
    int di = 0;
    int syn = 0;
    for (int p = 1; p <= 12; p++) if (c[p-1]) syn ^= p;
    if (syn >= 1 && syn <= 12) c[syn-1] = !c[syn-1];
    for (int p = 1; p <= 12; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8) begin d[di] = c[p-1]; di++; end
    return d;
  endfunction

  // ---- ISA host cycles ----
  task automatic isa_write(input logic [9:0] a, input logic [15:0] d, input bit use_aen = 1'b0);
    sa = a; aen = use_aen; sd_host = d;
    #37 iow_n = 1'b0;
    #290 iow_n = 1'b1;
    #30 sa = 10'h000; aen = 1'b0;
    #83;
  endtask
  task automatic isa_read(input logic [9:0] a, output logic [15:0] d, output bit driven);
    sa = a;
    #37 ior_n = 1'b0;
    #290 d = sd_oe[0] ? sd_o[0] : sd_oe[1] ? sd_o[1] : 16'hFFFF;
    driven = sd_oe[0] || sd_oe[1];
    ior_n = 1'b1;
    #30 sa = 10'h000;
    #83;
  endtask
  task automatic host_put(input int dev, input logic [7:0] b, input logic [11:0] flip = '0);
    if (dev == 0) isa_write(10'h300, {4'h0, enc(b) ^ flip});
    else          isa_write(10'h308, {8'h00, b});
  endtask
  task automatic host_get(input int dev, output logic [7:0] b);
    logic [15:0] w;
    bit drv;
    isa_read(dev == 0 ? 10'h300 : 10'h308, w, drv);
    check(drv, "data read drives the bus");
    b = (dev == 0) ? dec(w[11:0]) : w[7:0];
    if (dev == 0) check(w[11:0] == enc(b), "read word is a valid code word");
  endtask
  task automatic host_status(input int dev, output logic [3:0] s);
    logic [15:0] w;
    bit drv;
    isa_read(dev == 0 ? 10'h301 : 10'h309, w, drv);
    s = (dev == 0) ? dec(w[11:0]) : w[3:0];
  endtask
  // internal side: pop one byte
  task automatic mod_pop(input int dev, output logic [7:0] b);
    @(posedge clk); #1 in_rd[dev] = 1'b1;
    @(posedge clk); #1 in_rd[dev] = 1'b0;
    b = in_data[dev];
  endtask
  task automatic mod_push(input int dev, input logic [7:0] b);
    @(posedge clk); #1 out_wr[dev] = 1'b1; out_data[dev] = b;
    @(posedge clk); #1 out_wr[dev] = 1'b0;
  endtask

  logic [7:0]  q [$];
  logic [7:0]  b, r;
  logic [3:0]  st;
  logic [15:0] w;
  bit          drv;
  int          corr_before, err_before, rst_before;

  initial begin
    for (int i = 0; i < 2; i++) begin in_rd[i] = 0; out_wr[i] = 0; out_data[i] = 0; end
    repeat (4) @(posedge clk);
    #3 rst = 0;
    repeat (4) @(posedge clk);

    // ---- status after reset: both FIFOs empty ----
    for (int d = 0; d < 2; d++) begin
      host_status(d, st);
      check(st == 4'b0101, $sformatf("dev%0d reset status %b", d, st));
    end

    // ---- host -> module, with and without single-bit errors ----
    corr_before = n_corr;
    for (int d = 0; d < 2; d++) begin
      int ncorr = 0;
      q.delete();
      for (int i = 0; i < 12; i++) begin
        logic [11:0] flip;
        b = 8'($urandom);
        flip = (d == 0 && i % 3 == 1) ? 12'(1 << (i % 12)) : 12'h000;
        if (flip != 0) ncorr++;
        host_put(d, b, flip);
        q.push_back(b);
      end
      check(!in_empty[d], "input FIFO not empty after writes");
      for (int i = 0; i < 12; i++) begin
        mod_pop(d, r);
        check(r == q[i], $sformatf("dev%0d byte %0d: %02x vs %02x", d, i, r, q[i]));
      end
      check(in_empty[d], "input FIFO drained");
      if (d == 0) check(n_corr - corr_before == ncorr, $sformatf("corrected words %0d of %0d", n_corr - corr_before, ncorr));
    end

    // ---- uncorrectable word (syndrome 13) is dropped ----
    err_before = n_err;
    host_put(0, 8'hA5, 12'b1000_0000_0001);
    host_put(0, 8'h3C);
    mod_pop(0, r);
    check(r == 8'h3C, "uncorrectable word dropped, next word delivered");
    check(in_empty[0], "only one word delivered");
    check(n_err == err_before + 1, "uncorrectable word signalled");

    // ---- module -> host ----
    for (int d = 0; d < 2; d++) begin
      q.delete();
      for (int i = 0; i < 10; i++) begin b = 8'($urandom); q.push_back(b); mod_push(d, b); end
      host_status(d, st);
      check(st == 4'b0001, $sformatf("dev%0d status with output data %b", d, st));
      for (int i = 0; i < 10; i++) begin
        host_get(d, r);
        check(r == q[i], $sformatf("dev%0d out byte %0d: %02x vs %02x", d, i, r, q[i]));
      end
      host_get(d, r);
      check(r == 8'h00, "empty output FIFO reads as 0");
    end

    // ---- input FIFO overflow: extra writes ignored ----
    q.delete();
    for (int i = 0; i < DEPTH + 4; i++) begin b = 8'(i * 7 + 1); q.push_back(b); host_put(1, b); end
    check(in_full[1], "input FIFO full");
    host_status(1, st);
    check(st == 4'b0110, $sformatf("full status %b", st));
    for (int i = 0; i < DEPTH; i++) begin
      mod_pop(1, r);
      check(r == q[i], $sformatf("kept byte %0d", i));
    end
    check(in_empty[1], "overflow bytes were dropped");

    // ---- other address and AEN cycles ignored, bus not driven ----
    isa_write(10'h304, 16'h0055);
    isa_write(10'h308, 16'h0055, 1'b1);
    repeat (4) @(posedge clk);
    check(in_empty[0] && in_empty[1], "foreign and DMA writes ignored");
    isa_read(10'h30A, w, drv);
    check(!drv, "foreign read leaves the bus undriven");

    // ---- control write clears both FIFOs and pulses rst_out ----
    rst_before = n_rst;
    host_put(0, 8'h11); host_put(0, 8'h22);
    mod_push(0, 8'h33);
    isa_write(10'h301, {4'h0, enc(8'h00)});
    repeat (3) @(posedge clk);
    check(in_empty[0] && out_empty[0], "control write clears FIFOs");
    check(n_rst == rst_before + 1, "control write pulses rst_out once");
    check(in_empty[1], "other device untouched");

    $display("mechanisms: corrected=%0d dropped=%0d resets=%0d", n_corr, n_err, n_rst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
