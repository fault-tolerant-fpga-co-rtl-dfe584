// Flash interface: turns flash commands into Intel flash bus cycles.
//
// Accepts one command at a time on the shared flash command bus (see
// ftcp_pkg: flash_req_t / flash_rsp_t) and plays the matching sequence of
// asynchronous write and read cycles on the flash pins:
//   read   : write 0xFF (read array), read the word      -> rvalid + rdata
//   write  : write 0x40, write the data, poll status until SR.7 = 1, write 0xFF
//   erase  : write 0x20, write 0xD0, poll status,                   write 0xFF
//   lock   : write 0x60, write 0x01,                                write 0xFF
//   unlock : write 0x60, write 0xD0,                                write 0xFF
// Lock, unlock and erase are only carried out at the start address of a flash
// block (a multiple of 0x8000 for the main blocks, of 0x1000 for the boot
// blocks at the top); elsewhere the command is dropped after one busy cycle.
// The command codes and the status polling are those of the Intel flash
// command interface; the document gives only the five commands.
//
// Bus cycle timing, in clocks of CLK_NS (default 20 ns at 50 MHz), is set
// from the program-cycle timing diagram: address and data are set up with
// CE# low, WE# is held low for T_WP clocks (60 ns) and high again for T_WPH
// clocks (30 ns rounded up to 40 ns) before the next cycle. A read holds CE#
// and OE# low for T_ACC clocks before the data are sampled (100 ns assumed,
// the access time is not given) and then idles one clock with OE# high.
// f_rp_n is held low while in reset and high otherwise.
// busy is high from the clock after the command strobe until the command ends;
// rvalid comes in its last busy clock.
// The request's cached bit is meant for the flash buffer in front of this
// module and is not used here (lint notes it as an unused bit).
// The whole register set, the flash pin registers included, is one struct
// held as a TMR state machine (tmr_state_reg with three copies of the
// next-state function); the pins and the response are decoded from a voted
// copy. Triplicated FSM state follows the toolkit; folding the datapath
// registers into it is this design's choice.
module flash_if
  import ftcp_pkg::*;
#(
  parameter int T_WP  = 3,
  parameter int T_WPH = 2,
  parameter int T_ACC = 5
) (
  input  logic                clk,
  input  logic                rst,
  input  flash_req_t          req,
  output flash_rsp_t          rsp,
  // flash pins
  output logic [FLASH_AW-1:0] f_addr,
  output logic [FLASH_DW-1:0] f_dq_o,
  output logic                f_dq_oe,
  input  logic [FLASH_DW-1:0] f_dq_i,
  output logic                f_ce_n,
  output logic                f_oe_n,
  output logic                f_we_n,
  output logic                f_rp_n
);
  typedef enum logic [2:0] {S_IDLE, S_NEXT, S_WSETUP, S_WLOW, S_WHIGH, S_READ, S_RHOLD, S_END} state_e;
  typedef enum logic [1:0] {OP_WR, OP_RD, OP_POLL, OP_DONE} op_e;

  typedef struct packed {
    state_e              state;
    flash_cmd_e          cmd;
    logic [2:0]          step;
    logic [3:0]          tcnt;
    logic [FLASH_DW-1:0] wdata;
    logic [FLASH_DW-1:0] rdata;
    logic [FLASH_DW-1:0] bus_data;
    logic                is_read;
    logic [FLASH_AW-1:0] f_addr;
    logic                f_ce_n;
    logic                f_oe_n;
    logic                f_we_n;
    logic                f_dq_oe;
    logic                f_rp_n;
  } st_t;

  localparam st_t ST_RESET = '{state: S_IDLE, cmd: FCMD_READ, f_ce_n: 1'b1, f_oe_n: 1'b1,
                               f_we_n: 1'b1, default: '0};

  // Micro-sequence of each command.
  function automatic void micro(input flash_cmd_e cmd, input logic [2:0] step,
                                input logic [FLASH_DW-1:0] wdata,
                                output op_e op, output logic [FLASH_DW-1:0] op_data);
    op      = OP_DONE;
    op_data = '0;
    unique case (cmd)
      FCMD_READ: case (step)
        3'd0: begin op = OP_WR; op_data = {8'h00, ICMD_READ_ARRAY}; end
        3'd1: op = OP_RD;
        default: op = OP_DONE;
      endcase
      FCMD_WRITE: case (step)
        3'd0: begin op = OP_WR; op_data = {8'h00, ICMD_PROGRAM}; end
        3'd1: begin op = OP_WR; op_data = wdata; end
        3'd2: op = OP_POLL;
        3'd3: begin op = OP_WR; op_data = {8'h00, ICMD_READ_ARRAY}; end
        default: op = OP_DONE;
      endcase
      FCMD_ERASE: case (step)
        3'd0: begin op = OP_WR; op_data = {8'h00, ICMD_ERASE_SETUP}; end
        3'd1: begin op = OP_WR; op_data = {8'h00, ICMD_CONFIRM}; end
        3'd2: op = OP_POLL;
        3'd3: begin op = OP_WR; op_data = {8'h00, ICMD_READ_ARRAY}; end
        default: op = OP_DONE;
      endcase
      FCMD_LOCK, FCMD_UNLOCK: case (step)
        3'd0: begin op = OP_WR; op_data = {8'h00, ICMD_LOCK_SETUP}; end
        3'd1: begin op = OP_WR; op_data = (cmd == FCMD_LOCK) ? {8'h00, ICMD_LOCK} : {8'h00, ICMD_CONFIRM}; end
        3'd2: begin op = OP_WR; op_data = {8'h00, ICMD_READ_ARRAY}; end
        default: op = OP_DONE;
      endcase
      default: op = OP_DONE;
    endcase
  endfunction

  function automatic st_t next_state(input st_t c, input logic rq_valid, input flash_cmd_e rq_cmd,
                                     input logic [FLASH_AW-1:0] rq_addr,
                                     input logic [FLASH_DW-1:0] rq_wdata,
                                     input logic [FLASH_DW-1:0] dq_in);
    st_t                 n = c;
    op_e                 op;
    logic [FLASH_DW-1:0] op_data;
    micro(c.cmd, c.step, c.wdata, op, op_data);
    n.f_rp_n = 1'b1;
    unique case (c.state)
      S_IDLE: if (rq_valid) begin
        n.cmd    = rq_cmd;
        n.f_addr = rq_addr;
        n.wdata  = rq_wdata;
        n.step   = '0;
        if (rq_cmd != FCMD_READ && rq_cmd != FCMD_WRITE && !is_block_start(rq_addr))
          n.state = S_END;  // block command off a block start: ignored
        else
          n.state = S_NEXT;
      end
      S_NEXT: begin
        unique case (op)
          OP_WR: begin
            n.bus_data = op_data;
            n.f_ce_n   = 1'b0;
            n.f_dq_oe  = 1'b1;
            n.state    = S_WSETUP;
          end
          OP_RD, OP_POLL: begin
            n.f_ce_n  = 1'b0;
            n.f_oe_n  = 1'b0;
            n.f_dq_oe = 1'b0;
            n.tcnt    = 4'(T_ACC - 1);
            n.state   = S_READ;
          end
          default: n.state = S_END;
        endcase
      end
      S_WSETUP: begin
        n.f_we_n = 1'b0;
        n.tcnt   = 4'(T_WP - 1);
        n.state  = S_WLOW;
      end
      S_WLOW: if (c.tcnt == '0) begin
        n.f_we_n = 1'b1;
        n.tcnt   = 4'(T_WPH - 1);
        n.state  = S_WHIGH;
      end else n.tcnt = c.tcnt - 1'b1;
      S_WHIGH: begin
        n.f_ce_n  = 1'b1;
        n.f_dq_oe = 1'b0;
        if (c.tcnt == '0) begin
          n.step  = c.step + 1'b1;
          n.state = S_NEXT;
        end else n.tcnt = c.tcnt - 1'b1;
      end
      S_READ: if (c.tcnt == '0) begin
        n.f_ce_n = 1'b1;
        n.f_oe_n = 1'b1;
        n.state  = S_RHOLD;
        if (op == OP_RD) begin
          n.rdata   = dq_in;
          n.is_read = 1'b1;
          n.step    = c.step + 1'b1;
        end else if (dq_in[7]) begin
          n.step = c.step + 1'b1;        // status register: write c.state machine ready
        end
      end else n.tcnt = c.tcnt - 1'b1;
      S_RHOLD: n.state = S_NEXT;
      S_END: begin
        n.is_read = 1'b0;
        n.state   = S_IDLE;
      end
      default: n.state = S_IDLE;
    endcase
    return n;
  endfunction

  // the fields the outputs are decoded from
  typedef struct packed {
    logic                busy;
    logic                rvalid;
    logic [FLASH_DW-1:0] rdata;
    logic [FLASH_DW-1:0] bus_data;
    logic [FLASH_AW-1:0] f_addr;
    logic                f_ce_n;
    logic                f_oe_n;
    logic                f_we_n;
    logic                f_dq_oe;
    logic                f_rp_n;
  } out_t;

  st_t  cur [3], nxt [3];
  out_t oc [3], v;

  for (genvar i = 0; i < 3; i++) begin : g_nsl
    assign nxt[i] = next_state(cur[i], req.valid, req.cmd, req.addr, req.wdata, f_dq_i);
    assign oc[i]  = '{busy: cur[i].state != S_IDLE, rvalid: (cur[i].state == S_END) && cur[i].is_read,
                      rdata: cur[i].rdata, bus_data: cur[i].bus_data, f_addr: cur[i].f_addr,
                      f_ce_n: cur[i].f_ce_n, f_oe_n: cur[i].f_oe_n, f_we_n: cur[i].f_we_n,
                      f_dq_oe: cur[i].f_dq_oe, f_rp_n: cur[i].f_rp_n};
  end

  tmr_state_reg #(.W($bits(st_t)), .RESET_VAL(ST_RESET)) u_state (
    .clk, .rst, .next0(nxt[0]), .next1(nxt[1]), .next2(nxt[2]),
    .cur0(cur[0]), .cur1(cur[1]), .cur2(cur[2])
  );
  tmr_voter #(.W($bits(out_t))) u_vote (.a(oc[0]), .b(oc[1]), .c(oc[2]), .y(v));

  assign f_addr     = v.f_addr;
  assign f_dq_o     = v.bus_data;
  assign f_dq_oe    = v.f_dq_oe;
  assign f_ce_n     = v.f_ce_n;
  assign f_oe_n     = v.f_oe_n;
  assign f_we_n     = v.f_we_n;
  assign f_rp_n     = v.f_rp_n;
  assign rsp.busy   = v.busy;
  assign rsp.rvalid = v.rvalid;
  assign rsp.rdata  = v.rdata;
endmodule
