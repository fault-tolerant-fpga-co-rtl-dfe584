// SelectMap interface: configures and scrubs an FPGA through its SelectMap port.
//
// Repeats configuration bytes, from the flash or from the host, onto the 8-bit
// SelectMap port of a target FPGA. Host commands (from the input FIFO of its
// ISA bus interface; multi-byte arguments low byte first):
//   0x0A a0 a1 a2   load the flash start address of a configuration stream
//   0x01 a0 a1 a2   load the flash stop (last) address
//   0x02            program from flash: ack 0xBF, stream words start..stop,
//                   ack 0xEF
//   0x03 n0..n3     load the number of bytes of a stream sent over the bus
//   0x04            program from the bus: ack 0xBB, pass the next n bytes from
//                   the input FIFO to the FPGA, ack 0xEB
//   0x05            scrub: ack 0xB5, then repeat "stream start..stop from
//                   flash, pause SCRUB_PAUSE clocks" until the host sends 0x0E;
//                   the cycle under way is finished, then ack 0xE5
//   0x08            abort sequence (VIRTEX1 = 1 only)
// With VIRTEX1 = 1 (first-generation Virtex target) an abort sequence also
// precedes every scrub pass; newer targets stop listening by a command inside
// their bit stream and need none.
//
// Each 16-bit flash word is sent as two bytes, low byte first (the order in
// which flash control packed them). The flash is read through the CRC-checked
// buffer (req.cached = 1) and held, through the arbiter, for a whole stream;
// the pause between scrub passes releases it. The scrub-on and scrub-off
// acknowledge codes and the pause length are this design's choice; the pause
// is also stretched by waiting for the flash grant.
//
// SelectMap timing: write mode (sm_write_n low) and chip select (sm_cs_n low)
// are set before the first byte. Each byte is put on sm_d with sm_cclk low and
// sm_cclk rises one clock later, so the FPGA latches stable data and CCLK runs
// at most at half the system clock (25 MHz), below the 50 MHz limit above
// which BUSY handshaking would be needed. Between bytes CCLK simply waits, so
// uneven data arrival is harmless. Abort: CS and write are asserted for two
// clocks with CCLK idle, then write is released while CS stays low and CCLK
// runs for 4 periods; CS is then raised.
// The whole register set, the SelectMap pin registers included, is one struct
// held as a TMR state machine: three copies of the next-state function, each
// register copy loading the voted next state (tmr_state_reg), and the outputs
// decoded from a voted copy, so an upset in one copy is repaired on the next
// clock. Triplicating FSM state with voted feedback follows the toolkit;
// folding every register into the voted state is this design's choice.
module selectmap_if
  import ftcp_pkg::*;
#(
  parameter bit VIRTEX1     = 1'b0,
  parameter int SCRUB_PAUSE = 50_000_000   // clocks between scrub passes (1 s at 50 MHz)
) (
  input  logic                clk,
  input  logic                rst,
  // ISA bus interface, internal side
  output logic                in_rd,
  input  logic [7:0]          in_data,
  input  logic                in_empty,
  output logic                out_wr,
  output logic [7:0]          out_data,
  input  logic                out_full,
  // flash arbiter / flash interface
  output logic                arb_request,
  input  logic                arb_grant,
  output flash_req_t          freq,
  input  flash_rsp_t          frsp,
  // SelectMap pins of the target FPGA
  output logic [7:0]          sm_d,
  output logic                sm_write_n,
  output logic                sm_cs_n,
  output logic                sm_cclk,
  // status
  output logic                scrubbing,
  output logic                abort_done   // one-cycle pulse after an abort sequence
);
  typedef enum logic [4:0] {
    S_CMD, S_CMD_W, S_ARG, S_ARG_W, S_EXEC, S_ACK,
    S_ITER, S_FACQ, S_FISSUE, S_FWAIT, S_FBYTE, S_FCLK, S_FEND, S_PAUSE,
    S_BGET, S_BGET_W, S_BCLK, S_BEND,
    S_ABORT
  } state_e;

  typedef enum logic [1:0] {M_PROG, M_SCRUB, M_BUS, M_ABORT} mode_e;

  typedef struct packed {
    state_e              state;
    state_e              after_ack;
    mode_e               mode;
    logic [7:0]          opcode;
    logic [7:0]          ack_byte;
    logic [31:0]         arg;
    logic [2:0]          nargs;
    logic [FLASH_AW-1:0] start_addr;
    logic [FLASH_AW-1:0] stop_addr;
    logic [FLASH_AW-1:0] faddr;
    logic [31:0]         bus_count;
    logic [31:0]         bleft;
    logic [15:0]         word;
    logic                hi_byte;
    logic                stop_req;
    logic [31:0]         pause_cnt;
    logic [3:0]          ab_cnt;
    logic                mon_pend;
    logic [7:0]          sm_d;
    logic                sm_write_n;
    logic                sm_cs_n;
    logic                sm_cclk;
    logic                abort_done;
  } st_t;

  localparam st_t ST_RESET = '{state: S_CMD, after_ack: S_CMD, mode: M_PROG,
                               sm_write_n: 1'b1, sm_cs_n: 1'b1, default: '0};

  // Bytes are fetched from the input FIFO for commands and bus programming;
  // while scrubbing the FIFO is only watched for the stop command.
  function automatic logic is_fetch(input state_e st);
    return (st == S_CMD) || (st == S_ARG) || (st == S_BGET);
  endfunction

  function automatic st_t next_state(input st_t c, input logic [7:0] d_in, input logic empty_in,
                                     input logic full_out, input logic grant, input flash_rsp_t rsp);
    st_t  n = c;
    logic fetch;
    fetch = is_fetch(c.state);
    n.abort_done = 1'b0;
    // Stop-command watch while scrubbing.
    n.mon_pend = (c.mode == M_SCRUB) && !fetch && c.state != S_CMD_W && c.state != S_ARG_W &&
                c.state != S_EXEC && !empty_in;
    if (c.mon_pend && d_in == SM_STOP) n.stop_req = 1'b1;

    unique case (c.state)
      S_CMD:   if (!empty_in) n.state = S_CMD_W;
      S_CMD_W: begin
        n.opcode = d_in;
        unique case (d_in)
          SM_LOAD_START, SM_LOAD_STOP: begin n.nargs = 3'd3; n.state = S_ARG; end
          SM_LOAD_COUNT:               begin n.nargs = 3'd4; n.state = S_ARG; end
          SM_PROG_FLASH, SM_PROG_BUS, SM_SCRUB: n.state = S_EXEC;
          SM_ABORT:                    n.state = VIRTEX1 ? S_EXEC : S_CMD;
          default:                     n.state = S_CMD;
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
          SM_LOAD_START: begin n.start_addr = {c.arg[28:24], c.arg[23:8]}; n.state = S_CMD; end
          SM_LOAD_STOP:  begin n.stop_addr  = {c.arg[28:24], c.arg[23:8]}; n.state = S_CMD; end
          SM_LOAD_COUNT: begin n.bus_count  = c.arg; n.state = S_CMD; end
          SM_PROG_FLASH: begin
            n.mode = M_PROG; n.ack_byte = ACK_BEGIN_FLASH; n.after_ack = S_ITER; n.state = S_ACK;
          end
          SM_SCRUB: begin
            n.mode = M_SCRUB; n.stop_req = 1'b0;
            n.ack_byte = ACK_SCRUB_ON; n.after_ack = S_ITER; n.state = S_ACK;
          end
          SM_PROG_BUS: begin
            n.mode = M_BUS; n.bleft = c.bus_count;
            n.ack_byte = ACK_BEGIN_BUS; n.after_ack = S_BEND; n.state = S_ACK;
            n.sm_write_n = 1'b0;
          end
          SM_ABORT: begin n.mode = M_ABORT; n.ab_cnt = '0; n.state = S_ABORT; end
          default: n.state = S_CMD;
        endcase
      end
      S_ACK: if (!full_out) n.state = c.after_ack;

      // ---- stream from flash (program or one scrub pass) ----
      S_ITER: begin
        if (VIRTEX1 && c.mode == M_SCRUB) begin
          n.ab_cnt = '0;
          n.state  = S_ABORT;
        end else begin
          n.state = S_FACQ;
        end
      end
      S_FACQ: if (grant) begin
        n.faddr      = c.start_addr;
        n.hi_byte    = 1'b0;
        n.sm_write_n = 1'b0;
        n.sm_cs_n    = 1'b0;
        n.state      = S_FISSUE;
      end
      S_FISSUE: if (grant && !rsp.busy) n.state = S_FWAIT;
      S_FWAIT: if (rsp.rvalid) begin
        n.word  = rsp.rdata;
        n.state = S_FBYTE;
      end
      S_FBYTE: begin
        n.sm_d    = c.hi_byte ? c.word[15:8] : c.word[7:0];
        n.sm_cclk = 1'b0;
        n.state   = S_FCLK;
      end
      S_FCLK: begin
        n.sm_cclk = 1'b1;
        n.hi_byte = !c.hi_byte;
        if (!c.hi_byte) n.state = S_FBYTE;
        else if (c.faddr == c.stop_addr) n.state = S_FEND;
        else begin
          n.faddr = c.faddr + 1'b1;
          n.state = S_FISSUE;
        end
      end
      S_FEND: begin
        n.sm_cclk    = 1'b0;
        n.sm_cs_n    = 1'b1;
        n.sm_write_n = 1'b1;
        if (c.mode == M_SCRUB) begin
          if (c.stop_req) begin
            n.mode = M_PROG; n.ack_byte = ACK_SCRUB_OFF; n.after_ack = S_CMD; n.state = S_ACK;
          end else begin
            n.pause_cnt = 32'(SCRUB_PAUSE);
            n.state     = S_PAUSE;
          end
        end else begin
          n.ack_byte = ACK_END_FLASH; n.after_ack = S_CMD; n.state = S_ACK;
        end
      end
      S_PAUSE: begin
        if (c.stop_req) begin
          n.mode = M_PROG; n.ack_byte = ACK_SCRUB_OFF; n.after_ack = S_CMD; n.state = S_ACK;
        end else if (c.pause_cnt <= 32'd1) n.state = S_ITER;
        else n.pause_cnt = c.pause_cnt - 1'b1;
      end

      // ---- stream from the bus ----
      S_BEND: begin
        if (c.bleft == '0) begin
          n.sm_cclk = 1'b0; n.sm_cs_n = 1'b1; n.sm_write_n = 1'b1;
          n.mode = M_PROG; n.ack_byte = ACK_END_BUS; n.after_ack = S_CMD; n.state = S_ACK;
        end else begin
          n.sm_cs_n = 1'b0;
          n.state   = S_BGET;
        end
      end
      S_BGET:   if (!empty_in) n.state = S_BGET_W;
      S_BGET_W: begin
        n.sm_d    = d_in;
        n.sm_cclk = 1'b0;
        n.state   = S_BCLK;
      end
      S_BCLK: begin
        n.sm_cclk = 1'b1;
        n.bleft   = c.bleft - 1'b1;
        n.state   = S_BEND;
      end

      // ---- abort sequence (first-generation Virtex) ----
      S_ABORT: begin
        // c.ab_cnt 0..1: CS and write asserted, CCLK idle (as during a
        // configuration); 2..9: write released with CS low, CCLK running
        // for 4 periods; 10: CS released.
        n.sm_cs_n = 1'b0;
        n.ab_cnt  = c.ab_cnt + 1'b1;
        if (c.ab_cnt < 4'd2) begin
          n.sm_write_n = 1'b0;
          n.sm_cclk    = 1'b0;
        end else begin
          n.sm_write_n = 1'b1;
          n.sm_cclk    = c.ab_cnt[0];
        end
        if (c.ab_cnt == 4'd10) begin
          n.sm_cs_n    = 1'b1;
          n.sm_cclk    = 1'b0;
          n.abort_done = 1'b1;
          n.ab_cnt     = '0;
          n.state      = (c.mode == M_SCRUB) ? S_FACQ : S_CMD;
          if (c.mode != M_SCRUB) n.mode = M_PROG;
        end
      end
      default: n.state = S_CMD;
    endcase
    return n;
  endfunction

  // the fields the outputs are decoded from
  typedef struct packed {
    state_e              state;
    mode_e               mode;
    logic [7:0]          ack_byte;
    logic [FLASH_AW-1:0] faddr;
    logic [7:0]          sm_d;
    logic                sm_write_n;
    logic                sm_cs_n;
    logic                sm_cclk;
    logic                abort_done;
  } out_t;

  st_t  cur [3], nxt [3];
  out_t oc [3], v;
  logic fetching;

  for (genvar i = 0; i < 3; i++) begin : g_nsl
    assign nxt[i] = next_state(cur[i], in_data, in_empty, out_full, arb_grant, frsp);
    assign oc[i]  = '{state: cur[i].state, mode: cur[i].mode, ack_byte: cur[i].ack_byte,
                      faddr: cur[i].faddr, sm_d: cur[i].sm_d, sm_write_n: cur[i].sm_write_n,
                      sm_cs_n: cur[i].sm_cs_n, sm_cclk: cur[i].sm_cclk,
                      abort_done: cur[i].abort_done};
  end

  tmr_state_reg #(.W($bits(st_t)), .RESET_VAL(ST_RESET)) u_state (
    .clk, .rst, .next0(nxt[0]), .next1(nxt[1]), .next2(nxt[2]),
    .cur0(cur[0]), .cur1(cur[1]), .cur2(cur[2])
  );
  tmr_voter #(.W($bits(out_t))) u_vote (.a(oc[0]), .b(oc[1]), .c(oc[2]), .y(v));

  assign fetching   = is_fetch(v.state);
  assign sm_d       = v.sm_d;
  assign sm_write_n = v.sm_write_n;
  assign sm_cs_n    = v.sm_cs_n;
  assign sm_cclk    = v.sm_cclk;
  assign abort_done = v.abort_done;
  assign scrubbing  = (v.mode == M_SCRUB);

  always_comb begin
    in_rd       = 1'b0;
    out_wr      = 1'b0;
    out_data    = v.ack_byte;
    arb_request = (v.state == S_FACQ) || (v.state == S_FISSUE) || (v.state == S_FWAIT) ||
                  (v.state == S_FBYTE) || (v.state == S_FCLK);
    freq        = FLASH_REQ_IDLE;
    freq.cmd    = FCMD_READ;
    freq.addr   = v.faddr;
    freq.cached = 1'b1;
    if (fetching) in_rd = !in_empty;
    else if (v.mode == M_SCRUB && v.state != S_CMD_W && v.state != S_ARG_W && v.state != S_EXEC)
      in_rd = !in_empty;
    if (v.state == S_ACK) out_wr = !out_full;
    if (v.state == S_FISSUE) freq.valid = arb_grant && !frsp.busy;
  end
endmodule
