// Fault tolerant FPGA co-processing support system: top level.
//
// Holds the logic of the two-FPGA co-processing board:
//   * the support FPGA, which owns every board connection: four ISA bus
//     interfaces (one address pair each for flash control, the two SelectMap
//     interfaces and the inter-FPGA link), flash control, the flash arbiter,
//     the CRC-verified flash buffer, the flash interface, a SelectMap
//     interface for the co-processing FPGA (Virtex II type) and one for the
//     support FPGA itself (first-generation Virtex type, with abort; on the
//     board its pins are routed through the co-processing FPGA), and the
//     support end of the inter-FPGA link;
//   * the co-processing FPGA's user side: the other end of the link and the
//     proof-of-concept incrementer. The link pins between the two ends are
//     wired inside this module.
//   * a triplicated output stage with minority voters (tmr_pin_driver), the
//     recommended pin scheme for boards that have three pins per signal; it
//     stands alone here with its own ports.
// Arbiter priority: 0 = support-FPGA SelectMap, 1 = co-processing SelectMap,
// 2 = flash control. I/O addresses (data, data+1 = control): flash control
// 0x300, support SelectMap 0x302, co-processing SelectMap 0x304, link 0x306.
// A write to a module's control address also resets that module.
// The ISA data bus is shared: the interface whose address is read drives it.
// One clock domain (the board's 50 MHz oscillator feeds both FPGAs).
// Left open on purpose (lint notes): the input-full and output-empty flags of
// the bus interfaces (the modules only need in_empty and out_full), the abort
// pulse of the Virtex II interface (it never aborts) and the buffer's
// valid flag.
// TMR in this top: the registers of every module (bus interfaces, FIFO
// pointers, flash control, arbiter, flash buffer and its CRC, flash
// interface, both SelectMap interfaces, both ends of the link) are
// triplicated with voted next state, and the FIFO and buffer RAMs are
// triplicated with voted reads; the byte paths are Hamming-coded and the
// link strobes triplicated. The output decode after each module's voter,
// some event decode between registers, and the link's code-word and data
// synchroniser registers (protected by the Hamming code) are single copies.
module ftcp_top
  import ftcp_pkg::*;
#(
  parameter int FIFO_DEPTH  = 512,
  parameter bit ECC         = 1'b1,
  parameter int SCRUB_PAUSE = 50_000_000,
  parameter int RETRY_WAIT  = 100_000_000
) (
  input  logic                clk,
  input  logic                rst,
  // PC104/ISA bus
  input  logic [9:0]          isa_sa,
  input  logic                isa_aen,
  input  logic                isa_iow_n,
  input  logic                isa_ior_n,
  input  logic [15:0]         isa_sd_i,
  output logic [15:0]         isa_sd_o,
  output logic                isa_sd_oe,
  // flash
  output logic [FLASH_AW-1:0] f_addr,
  output logic [FLASH_DW-1:0] f_dq_o,
  output logic                f_dq_oe,
  input  logic [FLASH_DW-1:0] f_dq_i,
  output logic                f_ce_n,
  output logic                f_oe_n,
  output logic                f_we_n,
  output logic                f_rp_n,
  // SelectMap of the support FPGA (Virtex)
  output logic [7:0]          smv_d,
  output logic                smv_write_n,
  output logic                smv_cs_n,
  output logic                smv_cclk,
  // SelectMap of the co-processing FPGA (Virtex II)
  output logic [7:0]          smv2_d,
  output logic                smv2_write_n,
  output logic                smv2_cs_n,
  output logic                smv2_cclk,
  // triplicated pin stage
  input  logic [7:0]          pd_tr0,
  input  logic [7:0]          pd_tr1,
  input  logic [7:0]          pd_tr2,
  output logic [7:0]          pd_pin_o  [3],
  output logic [7:0]          pd_pin_oe [3],
  output logic [7:0]          pd_trace,
  // status
  output logic                scrubbing_v,
  output logic                scrubbing_v2,
  output logic                abort_done_v,
  output logic [1:0]          flash_owner,
  output logic                flash_owned,
  output logic                crc_fail,
  output logic                ecc_corrected,
  output logic                ecc_error
);
  localparam int NB = 4;                    // bus interfaces
  localparam int B_FC = 0, B_SMV = 1, B_SMV2 = 2, B_LINK = 3;
  localparam logic [9:0] BASES [NB] = '{10'h300, 10'h302, 10'h304, 10'h306};

  // ---- ISA bus interfaces ----
  logic        in_rd    [NB];
  logic [7:0]  in_data  [NB];
  logic        in_empty [NB];
  logic        in_full  [NB];
  logic        out_wr   [NB];
  logic [7:0]  out_data [NB];
  logic        out_empty[NB];
  logic        out_full [NB];
  logic        rst_out  [NB];
  logic        mod_rst  [NB];
  logic [15:0] sd_o     [NB];
  logic        sd_oe    [NB];
  logic [NB-1:0] corr, err;

  for (genvar i = 0; i < NB; i++) begin : g_bus
    isa_bus_if #(.BASE_ADDR(BASES[i]), .FIFO_DEPTH(FIFO_DEPTH), .ECC(ECC)) u_bus (
      .clk, .rst,
      .isa_sa, .isa_aen, .isa_iow_n, .isa_ior_n, .isa_sd_i,
      .isa_sd_o(sd_o[i]), .isa_sd_oe(sd_oe[i]),
      .in_rd(in_rd[i]), .in_data(in_data[i]), .in_empty(in_empty[i]), .in_full(in_full[i]),
      .out_wr(out_wr[i]), .out_data(out_data[i]), .out_empty(out_empty[i]), .out_full(out_full[i]),
      .rst_out(rst_out[i]), .ecc_corrected(corr[i]), .ecc_error(err[i])
    );
    always_ff @(posedge clk) mod_rst[i] <= rst || rst_out[i];
  end

  always_comb begin
    isa_sd_o  = '0;
    isa_sd_oe = 1'b0;
    for (int i = 0; i < NB; i++) begin
      if (sd_oe[i]) begin
        isa_sd_o  = sd_o[i];
        isa_sd_oe = 1'b1;
      end
    end
  end

  // ---- flash users, arbiter, buffer, interface ----
  flash_req_t arb_in [3];
  flash_req_t arb_out, fl_req;
  flash_rsp_t cache_rsp, fl_rsp;
  logic [2:0] request, grant;

  flash_ctrl u_flash_ctrl (
    .clk, .rst(mod_rst[B_FC]),
    .in_rd(in_rd[B_FC]), .in_data(in_data[B_FC]), .in_empty(in_empty[B_FC]),
    .out_wr(out_wr[B_FC]), .out_data(out_data[B_FC]), .out_full(out_full[B_FC]),
    .arb_request(request[2]), .arb_grant(grant[2]), .freq(arb_in[2]), .frsp(cache_rsp)
  );

  selectmap_if #(.VIRTEX1(1'b1), .SCRUB_PAUSE(SCRUB_PAUSE)) u_sm_v (
    .clk, .rst(mod_rst[B_SMV]),
    .in_rd(in_rd[B_SMV]), .in_data(in_data[B_SMV]), .in_empty(in_empty[B_SMV]),
    .out_wr(out_wr[B_SMV]), .out_data(out_data[B_SMV]), .out_full(out_full[B_SMV]),
    .arb_request(request[0]), .arb_grant(grant[0]), .freq(arb_in[0]), .frsp(cache_rsp),
    .sm_d(smv_d), .sm_write_n(smv_write_n), .sm_cs_n(smv_cs_n), .sm_cclk(smv_cclk),
    .scrubbing(scrubbing_v), .abort_done(abort_done_v)
  );

  selectmap_if #(.VIRTEX1(1'b0), .SCRUB_PAUSE(SCRUB_PAUSE)) u_sm_v2 (
    .clk, .rst(mod_rst[B_SMV2]),
    .in_rd(in_rd[B_SMV2]), .in_data(in_data[B_SMV2]), .in_empty(in_empty[B_SMV2]),
    .out_wr(out_wr[B_SMV2]), .out_data(out_data[B_SMV2]), .out_full(out_full[B_SMV2]),
    .arb_request(request[1]), .arb_grant(grant[1]), .freq(arb_in[1]), .frsp(cache_rsp),
    .sm_d(smv2_d), .sm_write_n(smv2_write_n), .sm_cs_n(smv2_cs_n), .sm_cclk(smv2_cclk),
    .scrubbing(scrubbing_v2), .abort_done()
  );

  flash_arbiter #(.N(3)) u_arb (
    .clk, .rst, .request, .req_in(arb_in), .req_out(arb_out), .grant,
    .owned(flash_owned), .owner_id(flash_owner)
  );

  flash_cache #(.RETRY_WAIT(RETRY_WAIT)) u_cache (
    .clk, .rst, .up_req(arb_out), .up_rsp(cache_rsp), .dn_req(fl_req), .dn_rsp(fl_rsp),
    .crc_fail, .buf_valid()
  );

  flash_if u_flash_if (
    .clk, .rst, .req(fl_req), .rsp(fl_rsp),
    .f_addr, .f_dq_o, .f_dq_oe, .f_dq_i, .f_ce_n, .f_oe_n, .f_we_n, .f_rp_n
  );

  // ---- inter-FPGA link and co-processing design ----
  logic [11:0] s2c_code, c2s_code;
  logic [2:0]  s2c_req, s2c_ack, c2s_req, c2s_ack;
  logic        cp_rd, cp_wr, cp_full, cp_empty;
  logic [7:0]  cp_in, cp_out;
  logic [1:0]  lcorr, lerr;

  interfpga_link u_link_support (
    .clk, .rst(mod_rst[B_LINK]),
    .src_rd(in_rd[B_LINK]), .src_data(in_data[B_LINK]), .src_empty(in_empty[B_LINK]),
    .dst_wr(out_wr[B_LINK]), .dst_data(out_data[B_LINK]), .dst_full(out_full[B_LINK]),
    .tx_code(s2c_code), .tx_req(s2c_req), .tx_ack_i(s2c_ack),
    .rx_code_i(c2s_code), .rx_req_i(c2s_req), .rx_ack(c2s_ack),
    .ecc_corrected(lcorr[0]), .ecc_error(lerr[0])
  );

  interfpga_link u_link_copro (
    .clk, .rst,
    .src_rd(cp_rd), .src_data(cp_out), .src_empty(cp_empty),
    .dst_wr(cp_wr), .dst_data(cp_in), .dst_full(cp_full),
    .tx_code(c2s_code), .tx_req(c2s_req), .tx_ack_i(c2s_ack),
    .rx_code_i(s2c_code), .rx_req_i(s2c_req), .rx_ack(s2c_ack),
    .ecc_corrected(lcorr[1]), .ecc_error(lerr[1])
  );

  copro_incrementer u_incr (
    .clk, .rst, .in_wr(cp_wr), .in_data(cp_in), .in_full(cp_full),
    .out_rd(cp_rd), .out_data(cp_out), .out_empty(cp_empty)
  );

  // ---- triplicated output pin stage ----
  tmr_pin_driver #(.W(8)) u_pins (
    .tr0(pd_tr0), .tr1(pd_tr1), .tr2(pd_tr2), .pin_o(pd_pin_o), .pin_oe(pd_pin_oe), .trace(pd_trace)
  );

  assign ecc_corrected = |corr || |lcorr;
  assign ecc_error     = |err  || |lerr;
endmodule
