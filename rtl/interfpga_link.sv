// Inter-FPGA byte link between the support FPGA and the co-processing FPGA.
//
// Gives a co-processing design in the second FPGA a path to and from the host:
// on the support side the link sits behind its own ISA bus interface, on the
// co-processing side it feeds the user design. The same module is used at
// both ends; it has no FIFO of its own, so it costs little on the
// co-processing FPGA.
//
// There are too few pins between the FPGAs to triplicate the data, so each
// direction carries a byte as a 12-bit (12,8) Hamming code word (24 data pins
// for both directions instead of 48 with triplication), while the single-bit
// strobes are sent on three pins each and majority-voted on arrival.
// Both FPGAs run from the same oscillator, but the pins add delay, so every
// transfer is a toggle handshake: the sender puts the code word on the pins,
// one clock later toggles its request lines, and waits until the acknowledge
// lines (voted) toggle back before sending the next byte. The receiver
// synchronises request and data through two registers, waits one more clock
// for the data to settle, corrects the byte, delivers it and toggles its
// acknowledge. Words with an uncorrectable syndrome are acknowledged but not
// delivered. A byte takes about 10 clocks end to end.
// Both control FSMs are triple-redundant in the style of a TMR state machine
// with voted next state; each strobe pin is driven by its own copy. The code
// word and synchroniser registers are single copies (the Hamming code covers
// the data). The handshake itself is this design's choice: the toolkit only
// says the link was changed for reliable transfers across the pin delays.
//
// Source side: src_rd pops a FIFO whose data are valid the next clock.
// Destination side: dst_wr pushes dst_data when dst_full is low.
module interfpga_link (
  input  logic        clk,
  input  logic        rst,
  // local source of bytes to send
  output logic        src_rd,
  input  logic [7:0]  src_data,
  input  logic        src_empty,
  // local sink of received bytes
  output logic        dst_wr,
  output logic [7:0]  dst_data,
  input  logic        dst_full,
  // pins: outgoing lane
  output logic [11:0] tx_code,
  output logic [2:0]  tx_req,
  input  logic [2:0]  tx_ack_i,
  // pins: incoming lane
  input  logic [11:0] rx_code_i,
  input  logic [2:0]  rx_req_i,
  output logic [2:0]  rx_ack,
  // status pulses
  output logic        ecc_corrected,
  output logic        ecc_error
);
  // The control state of each direction (FSM state and the request or
  // acknowledge toggle) is a TMR state machine: three copies of the
  // next-state logic, each copy of the state register loading the voted next
  // state (tmr_state_reg). Copy i drives strobe pin i, so the three strobe
  // pins come from three independent copies.

  // ---------------- transmitter ----------------
  typedef enum logic [1:0] {T_IDLE, T_LOAD, T_SEND, T_WAIT} tx_state_e;
  typedef struct packed {
    tx_state_e st;
    logic      req;
  } tx_ctl_t;

  tx_ctl_t     tcur [3], tnxt [3];
  logic [1:0]  tv;   // voted state (enum values)
  logic [2:0]  ack_s1, ack_s2;
  logic        ack_v;
  logic [11:0] enc_code;

  function automatic tx_ctl_t tx_next(input tx_ctl_t c, input logic empty, input logic ackv);
    tx_ctl_t n = c;
    unique case (c.st)
      T_IDLE: if (!empty) n.st = T_LOAD;
      T_LOAD: n.st = T_SEND;
      T_SEND: begin n.req = !c.req; n.st = T_WAIT; end
      T_WAIT: if (ackv == c.req) n.st = T_IDLE;
      default: n.st = T_IDLE;
    endcase
    return n;
  endfunction

  for (genvar i = 0; i < 3; i++) begin : g_tx_nsl
    assign tnxt[i] = tx_next(tcur[i], src_empty, ack_v);
    assign tx_req[i] = tcur[i].req;
  end

  tmr_state_reg #(.W($bits(tx_ctl_t)), .RESET_VAL('0)) u_tx_state (
    .clk, .rst, .next0(tnxt[0]), .next1(tnxt[1]), .next2(tnxt[2]),
    .cur0(tcur[0]), .cur1(tcur[1]), .cur2(tcur[2])
  );
  // only the state field is voted for the datapath; the toggles go to the pins
  tmr_voter #(.W($bits(tx_state_e))) u_tx_vote (.a(tcur[0].st), .b(tcur[1].st), .c(tcur[2].st), .y(tv));
  tmr_voter #(.W(1)) u_ack_vote (.a(ack_s2[0]), .b(ack_s2[1]), .c(ack_s2[2]), .y(ack_v));
  hamming_enc u_enc (.data(src_data), .code(enc_code));

  assign src_rd = (tv == T_IDLE) && !src_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_code <= '0;
      ack_s1  <= '0;
      ack_s2  <= '0;
    end else begin
      ack_s1 <= tx_ack_i;
      ack_s2 <= ack_s1;
      if (tv == T_LOAD) tx_code <= enc_code;
    end
  end

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {R_IDLE, R_SETTLE, R_DELIVER} rx_state_e;
  typedef struct packed {
    rx_state_e st;
    logic      ack;
  } rx_ctl_t;

  rx_ctl_t     rcur [3], rnxt [3];
  logic [1:0]  rv;   // voted state (enum values)
  logic [2:0]  req_s1, req_s2;
  logic        req_v;
  logic [11:0] code_s1, code_s2;
  logic [7:0]  dec_byte;
  logic        dec_corr, dec_unc;
  logic        done;

  function automatic rx_ctl_t rx_next(input rx_ctl_t c, input logic reqv, input logic full, input logic unc);
    rx_ctl_t n = c;
    unique case (c.st)
      R_IDLE:    if (reqv != c.ack) n.st = R_SETTLE;
      R_SETTLE:  n.st = R_DELIVER;
      R_DELIVER: if (!full || unc) begin n.ack = !c.ack; n.st = R_IDLE; end
      default:   n.st = R_IDLE;
    endcase
    return n;
  endfunction

  for (genvar i = 0; i < 3; i++) begin : g_rx_nsl
    assign rnxt[i] = rx_next(rcur[i], req_v, dst_full, dec_unc);
    assign rx_ack[i] = rcur[i].ack;
  end

  tmr_state_reg #(.W($bits(rx_ctl_t)), .RESET_VAL('0)) u_rx_state (
    .clk, .rst, .next0(rnxt[0]), .next1(rnxt[1]), .next2(rnxt[2]),
    .cur0(rcur[0]), .cur1(rcur[1]), .cur2(rcur[2])
  );
  tmr_voter #(.W($bits(rx_state_e))) u_rx_vote (.a(rcur[0].st), .b(rcur[1].st), .c(rcur[2].st), .y(rv));
  tmr_voter #(.W(1)) u_req_vote (.a(req_s2[0]), .b(req_s2[1]), .c(req_s2[2]), .y(req_v));
  hamming_dec u_dec (.code(code_s2), .data(dec_byte), .corrected(dec_corr), .uncorrectable(dec_unc));

  assign done     = (rv == R_DELIVER) && (!dst_full || dec_unc);
  assign dst_wr   = (rv == R_DELIVER) && !dst_full && !dec_unc;
  assign dst_data = dec_byte;

  always_ff @(posedge clk) begin
    if (rst) begin
      req_s1        <= '0;
      req_s2        <= '0;
      code_s1       <= '0;
      code_s2       <= '0;
      ecc_corrected <= 1'b0;
      ecc_error     <= 1'b0;
    end else begin
      req_s1        <= rx_req_i;
      req_s2        <= req_s1;
      code_s1       <= rx_code_i;
      code_s2       <= code_s1;
      ecc_corrected <= done && dec_corr;
      ecc_error     <= done && dec_unc;
    end
  end
endmodule
