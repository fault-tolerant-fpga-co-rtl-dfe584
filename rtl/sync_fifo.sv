// Synchronous FIFO of the ISA bus interface (one block RAM deep).
//
// A circular buffer in an inferred RAM with separate read and write pointers
// and an occupancy count. Reads and writes may happen in the same cycle. A
// write while full is ignored, as is a read while empty. Read data is
// registered: dout holds the word one clock after rd. empty and full are
// combinational from the count. clr empties the FIFO synchronously (used by
// the bus interface's control-address reset). The default of 512 bytes is one
// 4 Kbit Virtex block RAM in its 512 x 8 shape, a size this design chose.
// Fault tolerance: the RAM is held three times and every copy is written;
// the read data of the three copies are voted. The pointers and the count
// are a TMR state machine (tmr_state_reg), each copy addressing its own RAM.
// Triplicating the block RAM follows the toolkit; the contents need no
// refresh because every entry is overwritten as the FIFO cycles (this
// design's choice, unlike tmr_bram which holds long-lived data).
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic [AW-1:0] wptr;
    logic [AW-1:0] rptr;
    logic [AW:0]   count;
  } ptr_t;

  ptr_t             cur [3], nxt [3];
  logic [AW:0]      vcount;   // voted count
  logic [WIDTH-1:0] q [3];
  logic             do_wr, do_rd;

  assign empty = (vcount == '0);
  assign full  = (vcount == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  function automatic ptr_t next_ptr(input ptr_t c, input logic clear, input logic w, input logic r);
    ptr_t n = c;
    if (clear) begin
      n = '0;
    end else begin
      if (w) n.wptr = incr(c.wptr);
      if (r) n.rptr = incr(c.rptr);
      case ({w, r})
        2'b10:   n.count = c.count + 1'b1;
        2'b01:   n.count = c.count - 1'b1;
        default: ;
      endcase
    end
    return n;
  endfunction

  for (genvar i = 0; i < 3; i++) begin : g_copy
    logic [WIDTH-1:0] mem [DEPTH];

    assign nxt[i] = next_ptr(cur[i], clr, do_wr, do_rd);

    always_ff @(posedge clk) begin
      if (do_wr) mem[cur[i].wptr] <= din;
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        q[i] <= '0;
      end else if (do_rd) begin
        q[i] <= mem[cur[i].rptr];
      end
    end
  end

  tmr_state_reg #(.W($bits(ptr_t)), .RESET_VAL('0)) u_ptr (
    .clk, .rst, .next0(nxt[0]), .next1(nxt[1]), .next2(nxt[2]),
    .cur0(cur[0]), .cur1(cur[1]), .cur2(cur[2])
  );
  tmr_voter #(.W(AW+1)) u_count_vote (.a(cur[0].count), .b(cur[1].count), .c(cur[2].count), .y(vcount));
  tmr_voter #(.W(WIDTH)) u_dout_vote (.a(q[0]), .b(q[1]), .c(q[2]), .y(dout));
endmodule
