// Host-side helpers shared by the system testbenches. They are included inside
// a testbench module that declares the ISA signals (isa_sa, isa_aen, isa_iow_n,
// isa_ior_n, isa_sd_i, isa_sd_o, isa_sd_oe), clk, checks and failures.
//
// - The reference (12,8) Hamming code puts check bits at positions 1, 2, 4
//   and 8 of the 12-bit word, with data bits 0..7 at positions 3, 5, 6, 7,
//   9, 10, 11 and 12.
// - ISA I/O cycles are asynchronous to the clock: 37 ns address setup,
//   290 ns strobe, 30 ns hold, and about 400 ns from one cycle to the next.
// - The record CRC is CRC-16/CCITT: polynomial 0x1021, initial value 0xFFFF,
//   taken over each word's high byte and then its low byte.

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
endtask

function automatic logic [11:0] ham_enc(input logic [7:0] d);
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

function automatic logic [7:0] ham_dec(input logic [11:0] c);
  logic [7:0] d;
  int di = 0;
  int syn = 0;
  for (int p = 1; p <= 12; p++) if (c[p-1]) syn ^= p;
  if (syn >= 1 && syn <= 12) c[syn-1] = !c[syn-1];
  for (int p = 1; p <= 12; p++)
    if (p != 1 && p != 2 && p != 4 && p != 8) begin d[di] = c[p-1]; di++; end
  return d;
endfunction

function automatic logic [15:0] crc_byte(input logic [15:0] c, input logic [7:0] b);
  logic [15:0] r = c ^ {b, 8'h00};
  for (int i = 0; i < 8; i++) r = r[15] ? ((r << 1) ^ 16'h1021) : (r << 1);
  return r;
endfunction

task automatic isa_write(input logic [9:0] a, input logic [15:0] d);
  isa_sa = a; isa_sd_i = d;
  #37 isa_iow_n = 1'b0;
  #290 isa_iow_n = 1'b1;
  #30 isa_sa = 10'h000;
  #83;
endtask

task automatic isa_read(input logic [9:0] a, output logic [15:0] d);
  isa_sa = a;
  #37 isa_ior_n = 1'b0;
  #290 d = isa_sd_oe ? isa_sd_o : 16'hFFFF;
  isa_ior_n = 1'b1;
  #30 isa_sa = 10'h000;
  #83;
endtask

// one byte to a module; flip is XORed onto the code word (injected bus error)
task automatic put_byte(input logic [9:0] base, input logic [7:0] b, input logic [11:0] flip = '0);
  isa_write(base, {4'h0, ham_enc(b) ^ flip});
endtask

// status byte {out_full, out_empty, in_full, in_empty} of a module
task automatic get_status(input logic [9:0] base, output logic [3:0] s);
  logic [15:0] w;
  isa_read(base + 10'd1, w);
  s = ham_dec(w[11:0]);
endtask

// wait for a byte in a module's output FIFO and read it
task automatic get_byte(input logic [9:0] base, output logic [7:0] b, output bit ok, input int max_polls = 20000);
  logic [15:0] w;
  logic [3:0]  s;
  int          n = 0;
  ok = 1'b0;
  b  = 8'h00;
  do begin get_status(base, s); n++; end while (s[2] && n < max_polls);
  if (!s[2]) begin
    isa_read(base, w);
    b  = ham_dec(w[11:0]);
    ok = 1'b1;
  end
endtask

task automatic put_addr(input logic [9:0] base, input logic [7:0] cmd, input logic [20:0] a);
  put_byte(base, cmd);
  put_byte(base, a[7:0]);
  put_byte(base, a[15:8]);
  put_byte(base, {3'b000, a[20:16]});
endtask

task automatic put_word32(input logic [9:0] base, input logic [31:0] n);
  for (int i = 0; i < 4; i++) put_byte(base, n[8*i +: 8]);
endtask
