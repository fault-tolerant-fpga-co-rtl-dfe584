// Flash control: executes host flash commands arriving over the ISA bus.
//
// Reads command bytes from the input FIFO of its ISA bus interface, keeps a
// 21-bit flash address, and drives the flash command bus through the flash
// arbiter. Host commands (one command byte, then its argument bytes):
//   0x07 a0 a1 a2   load address; a0 is the low byte, only bits 4:0 of a2 used
//   0x08            increment the address
//   0x00            read the word at the address; two bytes (low, high) are
//                   pushed into the output FIFO
//   0x01 n0..n3     write: n (32 bits, low byte first) words follow as byte
//                   pairs (low, high); each is programmed at the address, which
//                   then increments. n = 0 writes a single word.
//   0x02/0x03/0x04  lock / unlock / erase the block at the address
//   0x09            push the address as three bytes (low first)
// Unknown command bytes are dropped. The byte order and the codes of lock,
// unlock and erase are this design's choice.
// For each flash command the module raises its arbiter request, waits for the
// grant, issues the command when the flash interface is not busy, waits for it
// to finish and then releases the flash (one grant per flash word, so
// scrubbing is not held off during a slow host burst).
// Flash control reads raw flash words (req.cached = 0), so the host sees the
// stored CRC words as well as the data.
// The whole register set is one struct held as a TMR state machine: three
// copies of the next-state function, each register copy loading the voted
// next state (tmr_state_reg), and the outputs decoded from a voted copy. An
// upset in one copy is repaired on the next clock. This follows the
// toolkit's rule that FSM state is triplicated with voted feedback; folding
// every register (address, counters, buffers) into the voted state is this
// design's choice.
module flash_ctrl
  import ftcp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // ISA bus interface, internal side
  output logic        in_rd,
  input  logic [7:0]  in_data,
  input  logic        in_empty,
  output logic        out_wr,
  output logic [7:0]  out_data,
  input  logic        out_full,
  // flash arbiter / flash interface
  output logic        arb_request,
  input  logic        arb_grant,
  output flash_req_t  freq,
  input  flash_rsp_t  frsp
);
  typedef enum logic [3:0] {
    S_CMD, S_CMD_W, S_ARG, S_ARG_W, S_EXEC, S_WLO, S_WLO_W, S_WHI, S_WHI_W,
    S_ACQ, S_ISSUE, S_WAIT, S_PUSH
  } state_e;

  typedef struct packed {
    state_e              state;
    logic [7:0]          opcode;
    logic [31:0]         arg;
    logic [2:0]          nargs;
    logic [FLASH_AW-1:0] addr;
    logic [31:0]         words;
    logic [15:0]         wbuf;
    flash_cmd_e          fcmd;
    logic [23:0]         pbuf;
    logic [1:0]          npush;
  } st_t;

  localparam st_t ST_RESET = '{state: S_CMD, fcmd: FCMD_READ, default: '0};

  function automatic st_t next_state(input st_t c, input logic [7:0] d_in, input logic empty_in,
                                     input logic full_out, input logic grant, input flash_rsp_t rsp);
    st_t n = c;
    unique case (c.state)
      S_CMD:   if (!empty_in) n.state = S_CMD_W;
      S_CMD_W: begin
        n.opcode = d_in;
        unique case (d_in)
          FC_LOAD_ADDR: begin n.nargs = 3'd3; n.state = S_ARG; end
          FC_WRITE:     begin n.nargs = 3'd4; n.state = S_ARG; end
          FC_READ, FC_INC_ADDR, FC_LOCK, FC_UNLOCK, FC_ERASE, FC_ADDR2BUS: n.state = S_EXEC;
          default:      n.state = S_CMD;
        endcase
      end
      S_ARG:   if (!empty_in) n.state = S_ARG_W;
      S_ARG_W: begin
        n.arg   = {d_in, c.arg[31:8]};
        n.nargs = c.nargs - 1'b1;
        n.state = (c.nargs == 3'd1) ? S_EXEC : S_ARG;
      end
      S_EXEC: begin
        unique case (c.opcode)
          FC_LOAD_ADDR: begin n.addr = {c.arg[28:24], c.arg[23:8]}; n.state = S_CMD; end
          FC_INC_ADDR:  begin n.addr = c.addr + 1'b1; n.state = S_CMD; end
          FC_READ:      begin n.fcmd = FCMD_READ; n.state = S_ACQ; end
          FC_WRITE:     begin n.words = (c.arg == '0) ? 32'd1 : c.arg; n.state = S_WLO; end
          FC_LOCK:      begin n.fcmd = FCMD_LOCK; n.state = S_ACQ; end
          FC_UNLOCK:    begin n.fcmd = FCMD_UNLOCK; n.state = S_ACQ; end
          FC_ERASE:     begin n.fcmd = FCMD_ERASE; n.state = S_ACQ; end
          FC_ADDR2BUS:  begin n.pbuf = 24'(c.addr); n.npush = 2'd3; n.state = S_PUSH; end
          default:      n.state = S_CMD;
        endcase
      end
      S_WLO:   if (!empty_in) n.state = S_WLO_W;
      S_WLO_W: begin n.wbuf[7:0] = d_in; n.state = S_WHI; end
      S_WHI:   if (!empty_in) n.state = S_WHI_W;
      S_WHI_W: begin n.wbuf[15:8] = d_in; n.fcmd = FCMD_WRITE; n.state = S_ACQ; end
      S_ACQ:   if (grant) n.state = S_ISSUE;
      S_ISSUE: if (grant && !rsp.busy) n.state = S_WAIT;
      S_WAIT: begin
        if (rsp.rvalid) n.pbuf = {8'h00, rsp.rdata};
        if (!rsp.busy) begin
          unique case (c.fcmd)
            FCMD_READ:  begin n.npush = 2'd2; n.state = S_PUSH; end
            FCMD_WRITE: begin
              n.addr  = c.addr + 1'b1;
              n.words = c.words - 1'b1;
              n.state = (c.words == 32'd1) ? S_CMD : S_WLO;
            end
            default: n.state = S_CMD;
          endcase
        end
      end
      S_PUSH: if (!full_out) begin
        n.pbuf  = {8'h00, c.pbuf[23:8]};
        n.npush = c.npush - 1'b1;
        if (c.npush == 2'd1) n.state = S_CMD;
      end
      default: n.state = S_CMD;
    endcase
    return n;
  endfunction

  // the fields the outputs are decoded from
  typedef struct packed {
    state_e              state;
    flash_cmd_e          fcmd;
    logic [FLASH_AW-1:0] addr;
    logic [15:0]         wbuf;
    logic [7:0]          pbyte;
  } out_t;

  st_t  cur [3], nxt [3];
  out_t oc [3], v;

  for (genvar i = 0; i < 3; i++) begin : g_nsl
    assign nxt[i] = next_state(cur[i], in_data, in_empty, out_full, arb_grant, frsp);
    assign oc[i]  = '{state: cur[i].state, fcmd: cur[i].fcmd, addr: cur[i].addr,
                      wbuf: cur[i].wbuf, pbyte: cur[i].pbuf[7:0]};
  end

  tmr_state_reg #(.W($bits(st_t)), .RESET_VAL(ST_RESET)) u_state (
    .clk, .rst, .next0(nxt[0]), .next1(nxt[1]), .next2(nxt[2]),
    .cur0(cur[0]), .cur1(cur[1]), .cur2(cur[2])
  );
  tmr_voter #(.W($bits(out_t))) u_vote (.a(oc[0]), .b(oc[1]), .c(oc[2]), .y(v));

  always_comb begin
    in_rd       = 1'b0;
    out_wr      = 1'b0;
    out_data    = v.pbyte;
    arb_request = (v.state == S_ACQ) || (v.state == S_ISSUE) || (v.state == S_WAIT);
    freq        = FLASH_REQ_IDLE;
    freq.cmd    = v.fcmd;
    freq.addr   = v.addr;
    freq.wdata  = v.wbuf;
    unique case (v.state)
      S_CMD, S_ARG, S_WLO, S_WHI: in_rd = !in_empty;
      S_ISSUE:                    freq.valid = arb_grant && !frsp.busy;
      S_PUSH:                     out_wr = !out_full;
      default: ;
    endcase
  end
endmodule
