// PC104/ISA bus slave interface with input and output FIFOs.
//
// Gives one support module its own pair of I/O addresses on the host's ISA
// bus. Bytes the host writes to the data address (BASE_ADDR) go into the input
// FIFO, where the module reads them; bytes the module writes into the output
// FIFO are returned by host reads of the data address. A write to the control
// address (BASE_ADDR + 1) empties both FIFOs and raises rst_out for one clock
// (other modules use it as their reset); a read of the control address returns
// the flags {out_full, out_empty, in_full, in_empty} in bits 3..0.
//
// Bus side: the ISA strobes are asynchronous to the 50 MHz system clock. IOW#,
// IOR#, the address match and the data lines pass through a two-stage
// synchroniser. A write is taken on the rising edge of IOW# using the data
// sampled in the last clock IOW# was still low (the data are valid while
// IOW# is low). A read starts on the falling edge of IOR#: the FIFO is popped
// (or the status sampled) and the byte appears in the read register two clocks
// later; sd_oe follows IOR#, AEN and the address directly so the bus driver
// turns on and off with the strobe. An empty FIFO reads as 0. Cycles with AEN
// high (DMA) are ignored. The host must hold IOR# low for at least 6 clocks
// (120 ns); a standard ISA cycle is several times longer.
//
// With ECC = 1 (the fault-tolerant configuration) every byte crosses the bus
// as a 12-bit (12,8) Hamming code word in bits 11:0 of a 16-bit transfer: the
// received word is corrected before it enters the input FIFO, and read data
// and status are encoded. A word with an uncorrectable syndrome is dropped.
// With ECC = 0 bytes travel on bits 7:0.
//
// Internal side: in_rd pops the input FIFO and in_data is valid the next
// clock; out_wr pushes out_data. Flags are combinational from the FIFOs.
// A full FIFO ignores further writes.
// Fault tolerance: the FIFOs are triplicated inside sync_fifo, and every
// register of this module (synchroniser stages, read register, output
// pulses) is one struct held in tmr_state_reg, each copy loading the voted
// next state. The event decode between the registers is a single copy fed
// from the voted state; that split is this design's choice.
module isa_bus_if #(
  parameter logic [9:0] BASE_ADDR  = 10'h300,
  parameter int         FIFO_DEPTH = 512,
  parameter bit         ECC        = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  // ISA bus
  input  logic [9:0]  isa_sa,
  input  logic        isa_aen,
  input  logic        isa_iow_n,
  input  logic        isa_ior_n,
  input  logic [15:0] isa_sd_i,
  output logic [15:0] isa_sd_o,
  output logic        isa_sd_oe,
  // internal side
  input  logic        in_rd,
  output logic [7:0]  in_data,
  output logic        in_empty,
  output logic        in_full,
  input  logic        out_wr,
  input  logic [7:0]  out_data,
  output logic        out_empty,
  output logic        out_full,
  output logic        rst_out,
  output logic        ecc_corrected,   // pulse: a received word was corrected
  output logic        ecc_error        // pulse: a received word was dropped
);
  typedef struct packed {
    logic        iow_n;
    logic        ior_n;
    logic        sel_data;
    logic        sel_ctrl;
    logic [15:0] sd;
  } bus_sample_t;

  localparam bus_sample_t IDLE_SAMPLE = '{iow_n: 1'b1, ior_n: 1'b1, sel_data: 1'b0, sel_ctrl: 1'b0, sd: '0};

  typedef struct packed {
    bus_sample_t s1;
    bus_sample_t s2;
    bus_sample_t s3;
    logic        out_rd_q;
    logic        out_had;
    logic [7:0]  rd_byte;
    logic        rst_out;
    logic        ecc_corrected;
    logic        ecc_error;
  } regs_t;

  localparam regs_t REGS_RESET = '{s1: IDLE_SAMPLE, s2: IDLE_SAMPLE, s3: IDLE_SAMPLE, default: '0};

  // the fields read outside the registers
  typedef struct packed {
    logic iow_n;
    logic ior_n;
    logic sel_data;
    logic sel_ctrl;
  } strobes_t;

  typedef struct packed {
    strobes_t    s2;
    bus_sample_t s3;
    logic [7:0]  rd_byte;
    logic        rst_out;
    logic        ecc_corrected;
    logic        ecc_error;
  } out_t;

  regs_t       cur [3], nxt [3];
  out_t        oc [3], v;
  strobes_t    s2;
  bus_sample_t s3;
  logic        wr_evt, rd_evt;
  logic        fifo_clr;
  logic        in_wr;
  logic [7:0]  in_byte, dec_byte;
  logic        dec_corr, dec_unc;
  logic        out_rd;
  logic [7:0]  out_byte;
  logic [7:0]  rd_byte;
  logic [11:0] rd_code;
  logic [15:0] rd_reg;
  logic [7:0]  status;
  bus_sample_t pins;
  logic        corr_evt, err_evt;

  // Synchroniser: s1, s2 resolve metastability, s3 is the previous s2.
  assign pins = '{iow_n: isa_iow_n, ior_n: isa_ior_n,
                  sel_data: !isa_aen && (isa_sa == BASE_ADDR),
                  sel_ctrl: !isa_aen && (isa_sa == BASE_ADDR + 10'd1),
                  sd: isa_sd_i};

  // Read register: FIFO data arrives the clock after the pop.
  function automatic regs_t next_regs(input regs_t c, input bus_sample_t p, input logic pop,
                                      input logic have, input logic clr_evt, input logic corr,
                                      input logic err, input logic stat_rd, input logic [7:0] stat,
                                      input logic [7:0] fifo_byte);
    regs_t n = c;
    n.s1            = p;
    n.s2            = c.s1;
    n.s3            = c.s2;
    n.out_rd_q      = pop;
    n.out_had       = have;
    n.rst_out       = clr_evt;
    n.ecc_corrected = corr;
    n.ecc_error     = err;
    if (stat_rd) n.rd_byte = stat;
    if (c.out_rd_q) n.rd_byte = c.out_had ? fifo_byte : 8'h00;
    return n;
  endfunction

  for (genvar i = 0; i < 3; i++) begin : g_nsl
    assign nxt[i] = next_regs(cur[i], pins, out_rd, !out_empty, fifo_clr, corr_evt, err_evt,
                              rd_evt && s2.sel_ctrl, status, out_byte);
    assign oc[i]  = '{s2: '{iow_n: cur[i].s2.iow_n, ior_n: cur[i].s2.ior_n,
                           sel_data: cur[i].s2.sel_data, sel_ctrl: cur[i].s2.sel_ctrl},
                      s3: cur[i].s3, rd_byte: cur[i].rd_byte, rst_out: cur[i].rst_out,
                      ecc_corrected: cur[i].ecc_corrected, ecc_error: cur[i].ecc_error};
  end

  tmr_state_reg #(.W($bits(regs_t)), .RESET_VAL(REGS_RESET)) u_regs (
    .clk, .rst, .next0(nxt[0]), .next1(nxt[1]), .next2(nxt[2]),
    .cur0(cur[0]), .cur1(cur[1]), .cur2(cur[2])
  );
  tmr_voter #(.W($bits(out_t))) u_vote (.a(oc[0]), .b(oc[1]), .c(oc[2]), .y(v));

  assign s2            = v.s2;
  assign s3            = v.s3;
  assign rd_byte       = v.rd_byte;
  assign rst_out       = v.rst_out;
  assign ecc_corrected = v.ecc_corrected;
  assign ecc_error     = v.ecc_error;

  assign wr_evt = s2.iow_n && !s3.iow_n;   // rising edge of IOW#; s3 = last low sample
  assign rd_evt = !s2.ior_n && s3.ior_n;   // falling edge of IOR#

  hamming_dec u_dec (.code(s3.sd[11:0]), .data(dec_byte), .corrected(dec_corr), .uncorrectable(dec_unc));

  always_comb begin
    in_byte  = ECC ? dec_byte : s3.sd[7:0];
    in_wr    = wr_evt && s3.sel_data && !(ECC && dec_unc);
    fifo_clr = wr_evt && s3.sel_ctrl;
    out_rd   = rd_evt && s2.sel_data;
    status   = {4'b0000, out_full, out_empty, in_full, in_empty};
    corr_evt = ECC && wr_evt && (s3.sel_data || s3.sel_ctrl) && dec_corr;
    err_evt  = ECC && wr_evt && (s3.sel_data || s3.sel_ctrl) && dec_unc;
  end

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst, .clr(fifo_clr), .wr(in_wr), .din(in_byte),
    .rd(in_rd), .dout(in_data), .empty(in_empty), .full(in_full)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst, .clr(fifo_clr), .wr(out_wr), .din(out_data),
    .rd(out_rd), .dout(out_byte), .empty(out_empty), .full(out_full)
  );

  hamming_enc u_enc (.data(rd_byte), .code(rd_code));

  assign rd_reg    = ECC ? {4'b0000, rd_code} : {8'h00, rd_byte};
  assign isa_sd_o  = rd_reg;
  assign isa_sd_oe = !isa_ior_n && !isa_aen && (isa_sa == BASE_ADDR || isa_sa == BASE_ADDR + 10'd1);
endmodule
