// Flash command bus arbiter with a triple-redundant owner register.
//
// Several modules (flash control and the SelectMap interfaces) share the one
// flash interface. Each requester raises its request line and waits until the
// arbiter shows its identification number as the current owner; it then keeps
// the flash until it drops its request, so a SelectMap interface streaming a
// configuration cannot have the flash contents changed under it. When the
// flash is free, the pending request with the lowest index wins (index 0 has
// the highest priority; the priority order is this design's choice).
//
// Only the owner's command strobe is passed to the flash; the response is
// broadcast and each requester qualifies it with its grant.
//
// The owner register {owned, id} is a TMR state machine: three copies of the
// next-state logic feed tmr_state_reg, which loads each register copy with the
// voted next state. The outputs use copy 0 after a vote of all three.
// Timing: a request seen in cycle t is granted from cycle t+1.
module flash_arbiter
  import ftcp_pkg::*;
#(
  parameter int N = 3,
  localparam int IDW = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N-1:0]       request,
  input  flash_req_t         req_in [N],
  output flash_req_t         req_out,
  output logic [N-1:0]       grant,
  output logic               owned,     // someone holds the flash
  output logic [IDW-1:0]     owner_id   // "current flash owner"
);
  localparam int SW  = IDW + 1;

  logic [SW-1:0] cur [3];
  logic [SW-1:0] nxt [3];
  logic [SW-1:0] voted;

  function automatic logic [SW-1:0] next_owner(input logic [SW-1:0] s, input logic [N-1:0] r);
    logic [SW-1:0] n;
    if (s[SW-1] && int'(s[IDW-1:0]) < N && r[s[IDW-1:0]]) return s;  // hold
    n = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (r[i]) n = {1'b1, IDW'(i)};
    end
    return n;
  endfunction

  for (genvar i = 0; i < 3; i++) begin : g_nsl
    assign nxt[i] = next_owner(cur[i], request);
  end

  tmr_state_reg #(.W(SW), .RESET_VAL('0)) u_state (
    .clk, .rst,
    .next0(nxt[0]), .next1(nxt[1]), .next2(nxt[2]),
    .cur0(cur[0]), .cur1(cur[1]), .cur2(cur[2])
  );

  tmr_voter #(.W(SW)) u_out_vote (.a(cur[0]), .b(cur[1]), .c(cur[2]), .y(voted));

  assign owned    = voted[SW-1];
  assign owner_id = voted[IDW-1:0];

  always_comb begin
    req_out = FLASH_REQ_IDLE;
    grant   = '0;
    for (int i = 0; i < N; i++) begin
      if (owned && owner_id == IDW'(i)) begin
        grant[i] = 1'b1;
        req_out  = req_in[i];
      end
    end
  end
endmodule
