// Simple true dual-port RAM, one block RAM of a triplicated memory.
//
// Two independent synchronous ports (A and B) on the same clock, each with an
// enable, a write enable, an address and registered read data (read-first:
// a read in the same cycle as a write to that address returns the old word).
// Helper of tmr_bram and flash_cache. Contents are not initialised.
module dp_ram #(
  parameter int DW = 16,
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          en_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [DW-1:0] din_a,
  output logic [DW-1:0] dout_a,
  input  logic          en_b,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [DW-1:0] din_b,
  output logic [DW-1:0] dout_b
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en_a) begin
      dout_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= din_a;
    end
    if (en_b) begin
      dout_b <= mem[addr_b];
      if (we_b) mem[addr_b] <= din_b;
    end
  end
endmodule
