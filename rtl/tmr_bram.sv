// Triple-redundant block RAM with background refresh ("scrubbing" of data).
//
// Three dual-port RAMs hold the same data. Port A of all three is the user
// port: a write goes to all copies, a read returns the bitwise majority of
// the three outputs, so an upset in one copy (or in its routing) is outvoted.
// Port B of each copy is used by a refresh engine that walks through every
// address, reads the three copies, votes, and writes the voted word back to
// all three, so upsets cannot pile up in one copy over time.
//
// The refresh engine follows the triplicated counter of the reference design:
// a counter of AW+3 bits whose bits [AW+2:3] are the port B address, bit 2 the
// port B enable and bit 1 the port B write enable; bit 0 splits each step into
// two clocks. So each address takes 8 clocks: read at count[2:0]=100, vote,
// write back at count[2:0]=110, and a full sweep takes 8*2^AW clocks. The
// counter itself is a TMR register (each copy loads the voted increment), and
// each RAM copy has its own counter copy and its own voter, as in the figure.
//
// Collision detection: if port A writes the address being refreshed between the
// refresh read and the write-back, the write-back is skipped so the new word is
// not replaced by the old one. (The reference checks only the cycle of the
// write-back; with a read and a write-back two clocks apart, this design
// watches the whole window.)
//
// Timing: rdata is valid one clock after a port A read (en=1, we=0).
// Defaults 256 x 16 match the RAMB4_S16 blocks of the reference figure.
module tmr_bram #(
  parameter int DW = 16,
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  output logic          refresh_wb,   // a refresh write-back happened (copy 0)
  output logic          refresh_skip  // a write-back was skipped by collision (copy 0)
);
  localparam int CW = AW + 3;

  logic [CW-1:0] cnt [3];
  logic [CW-1:0] cnt_nx [3];
  logic [DW-1:0] dout_a [3];
  logic [DW-1:0] dout_b [3];
  logic [DW-1:0] wb_data [3];
  logic          col [3];
  logic          wb_en [3];

  for (genvar i = 0; i < 3; i++) begin : g_cnt_nx
    assign cnt_nx[i] = cnt[i] + 1'b1;
  end

  tmr_state_reg #(.W(CW), .RESET_VAL('0)) u_cnt (
    .clk, .rst,
    .next0(cnt_nx[0]), .next1(cnt_nx[1]), .next2(cnt_nx[2]),
    .cur0(cnt[0]), .cur1(cnt[1]), .cur2(cnt[2])
  );

  for (genvar i = 0; i < 3; i++) begin : g_copy
    logic [AW-1:0] addr_b;
    logic          en_b, rd_phase, wb_phase;

    assign addr_b   = cnt[i][CW-1:3];
    assign en_b     = cnt[i][2] && !cnt[i][0];
    assign rd_phase = en_b && !cnt[i][1];
    assign wb_phase = en_b &&  cnt[i][1];
    assign wb_en[i] = wb_phase && !col[i] && !(en && we && addr == addr_b);

    // Collision window: from the refresh read up to the write-back.
    always_ff @(posedge clk) begin
      if (rst || cnt[i][2:0] == 3'b011) col[i] <= 1'b0;
      else if (cnt[i][2] && en && we && addr == addr_b) col[i] <= 1'b1;
    end

    tmr_voter #(.W(DW)) u_vote_b (.a(dout_b[0]), .b(dout_b[1]), .c(dout_b[2]), .y(wb_data[i]));

    dp_ram #(.DW(DW), .AW(AW)) u_ram (
      .clk,
      .en_a(en), .we_a(we), .addr_a(addr), .din_a(wdata), .dout_a(dout_a[i]),
      .en_b(rd_phase || wb_en[i]), .we_b(wb_en[i]), .addr_b(addr_b),
      .din_b(wb_data[i]), .dout_b(dout_b[i])
    );
  end

  tmr_voter #(.W(DW)) u_vote_a (.a(dout_a[0]), .b(dout_a[1]), .c(dout_a[2]), .y(rdata));

  assign refresh_wb   = wb_en[0];
  assign refresh_skip = g_copy[0].wb_phase && !wb_en[0];
endmodule
