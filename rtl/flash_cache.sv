// CRC-verified flash read buffer (on-chip flash cache).
//
// The flash contents are trusted, but the pins and routing between flash and
// FPGA are not. The host therefore stores the flash in records of 513 words:
// 512 data words followed by their CRC16. Modules that read through this
// buffer (req.cached = 1) use logical addresses, 512 data words per record;
// logical word L lives at physical address (L / 512) * 513 + (L mod 512),
// truncated to 21 bits.
//
// On a cached read outside the buffered record, the whole record is read
// (513 flash reads) into a 512-word triple-redundant block RAM while crc16
// runs over the data; the last word is compared with the result. On a match
// the buffer is marked valid and serves all reads in that record from the
// RAM; on a mismatch it is marked empty, the module waits RETRY_WAIT clocks
// (to be chosen longer than the configuration scrub period, so that a routing
// upset has been repaired) and reads the record again.
// Commands that are not cached reads (host reads, writes, erase, lock,
// unlock) pass straight through to the flash interface; write and erase also
// empty the buffer.
//
// It sits between the flash arbiter and the flash interface and keeps the
// command-bus protocol on both sides: busy rises the clock after the strobe;
// rvalid in the last busy clock. A hit takes three clocks.
// The RAM's refresh status outputs are left open (lint notes them).
// The control registers are one struct held as a TMR state machine
// (tmr_state_reg, three copies of the next-state function) and the outputs
// are decoded from a voted copy; the buffer RAM and the CRC register are
// triplicated in their own modules.
module flash_cache
  import ftcp_pkg::*;
#(
  parameter int RETRY_WAIT = 100_000_000   // clocks before re-reading a bad record (2 s at 50 MHz)
) (
  input  logic       clk,
  input  logic       rst,
  input  flash_req_t up_req,
  output flash_rsp_t up_rsp,
  output flash_req_t dn_req,
  input  flash_rsp_t dn_rsp,
  output logic       crc_fail,    // one-cycle pulse: a record failed its CRC
  output logic       buf_valid
);
  localparam int BW = 9;                 // 512 data words per record
  localparam int SEGW = FLASH_AW - BW;

  typedef enum logic [2:0] {S_IDLE, S_PASS, S_FILL, S_FILL_W, S_RETRY, S_HIT, S_HIT2} state_e;

  typedef struct packed {
    state_e          state;
    logic [SEGW-1:0] req_seg;
    logic [BW-1:0]   req_off;
    logic [BW:0]     idx;               // 0..512
    logic [31:0]     wait_cnt;
    logic            buf_valid;
    logic            crc_fail;
  } st_t;

  // the fields the outputs are decoded from
  typedef struct packed {
    state_e          state;
    logic [SEGW-1:0] req_seg;
    logic [BW-1:0]   req_off;
    logic [BW:0]     idx;
    logic            buf_valid;
    logic            crc_fail;
  } out_t;

  st_t                 cur [3], nxt [3];
  out_t                oc [3], v;
  logic [SEGW-1:0]     seg;
  logic [FLASH_AW-1:0] phys;
  logic                pass_now;

  // RAM port A: fill writes and hit reads.
  logic              ram_en, ram_we;
  logic [BW-1:0]     ram_addr;
  logic [15:0]       ram_rdata;
  logic              crc_en, crc_clr;
  logic [15:0]       crc_val;

  function automatic logic is_pass(input state_e st, input logic up_valid, input logic up_cached,
                                   input flash_cmd_e up_cmd);
    return (st == S_IDLE) && up_valid && !(up_cached && up_cmd == FCMD_READ);
  endfunction

  function automatic st_t next_state(input st_t c, input logic up_valid, input logic up_cached,
                                     input flash_cmd_e up_cmd, input logic [SEGW-1:0] seg_in,
                                     input logic [BW-1:0] up_off, input logic dn_busy,
                                     input logic dn_rvalid, input logic [15:0] dn_rdata,
                                     input logic [15:0] crc_in);
    st_t  n = c;
    logic pass;
    pass = is_pass(c.state, up_valid, up_cached, up_cmd);
    n.crc_fail = 1'b0;
    unique case (c.state)
      S_IDLE: if (up_valid) begin
        if (pass) begin
          if (up_cmd == FCMD_WRITE || up_cmd == FCMD_ERASE) n.buf_valid = 1'b0;
          n.state = S_PASS;
        end else begin
          n.req_off = up_off;
          if (c.buf_valid && seg_in == c.req_seg) n.state = S_HIT;
          else begin
            n.req_seg   = seg_in;
            n.idx       = '0;
            n.buf_valid = 1'b0;
            n.state     = S_FILL;
          end
        end
      end
      S_PASS: if (!dn_busy) n.state = S_IDLE;
      S_FILL: if (!dn_busy) n.state = S_FILL_W;
      S_FILL_W: if (dn_rvalid) begin
        if (!c.idx[BW]) begin
          n.idx   = c.idx + 1'b1;
          n.state = S_FILL;
        end else if (dn_rdata == crc_in) begin
          n.buf_valid = 1'b1;
          n.state     = S_HIT;
        end else begin
          n.crc_fail = 1'b1;
          n.wait_cnt = 32'(RETRY_WAIT);
          n.state    = S_RETRY;
        end
      end
      S_RETRY: if (c.wait_cnt <= 32'd1) begin
        n.idx   = '0;
        n.state = S_FILL;
      end else n.wait_cnt = c.wait_cnt - 1'b1;
      S_HIT:  n.state = S_HIT2;
      S_HIT2: n.state = S_IDLE;
      default: n.state = S_IDLE;
    endcase
    return n;
  endfunction

  assign seg = up_req.addr[FLASH_AW-1:BW];

  for (genvar i = 0; i < 3; i++) begin : g_nsl
    assign nxt[i] = next_state(cur[i], up_req.valid, up_req.cached, up_req.cmd, seg,
                               up_req.addr[BW-1:0], dn_rsp.busy, dn_rsp.rvalid, dn_rsp.rdata,
                               crc_val);
    assign oc[i]  = '{state: cur[i].state, req_seg: cur[i].req_seg, req_off: cur[i].req_off,
                      idx: cur[i].idx, buf_valid: cur[i].buf_valid, crc_fail: cur[i].crc_fail};
  end

  tmr_state_reg #(.W($bits(st_t)), .RESET_VAL('0)) u_state (
    .clk, .rst, .next0(nxt[0]), .next1(nxt[1]), .next2(nxt[2]),
    .cur0(cur[0]), .cur1(cur[1]), .cur2(cur[2])
  );
  tmr_voter #(.W($bits(out_t))) u_vote (.a(oc[0]), .b(oc[1]), .c(oc[2]), .y(v));

  assign buf_valid = v.buf_valid;
  assign crc_fail  = v.crc_fail;
  assign phys      = FLASH_AW'({v.req_seg, {BW{1'b0}}}) + FLASH_AW'(v.req_seg) + FLASH_AW'(v.idx);
  assign pass_now  = is_pass(v.state, up_req.valid, up_req.cached, up_req.cmd);

  always_comb begin
    dn_req = FLASH_REQ_IDLE;
    if (pass_now) dn_req = up_req;
    else if (v.state == S_FILL) begin
      dn_req.valid = !dn_rsp.busy;
      dn_req.cmd   = FCMD_READ;
      dn_req.addr  = phys;
    end
    ram_en   = 1'b0;
    ram_we   = 1'b0;
    ram_addr = v.req_off;
    crc_en   = 1'b0;
    if (v.state == S_FILL_W && dn_rsp.rvalid && !v.idx[BW]) begin
      ram_en   = 1'b1;
      ram_we   = 1'b1;
      ram_addr = v.idx[BW-1:0];
      crc_en   = 1'b1;
    end
    if (v.state == S_HIT) ram_en = 1'b1;
    up_rsp.busy   = (v.state != S_IDLE);
    up_rsp.rvalid = ((v.state == S_PASS) && dn_rsp.rvalid) || (v.state == S_HIT2);
    up_rsp.rdata  = (v.state == S_HIT2) ? ram_rdata : dn_rsp.rdata;
  end

  assign crc_clr = (v.state == S_FILL) && (v.idx == '0);

  crc16 u_crc (.clk, .rst, .clr(crc_clr), .en(crc_en), .din(dn_rsp.rdata), .crc(crc_val));

  tmr_bram #(.DW(16), .AW(BW)) u_buf (
    .clk, .rst, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(dn_rsp.rdata),
    .rdata(ram_rdata), .refresh_wb(), .refresh_skip()
  );
endmodule
