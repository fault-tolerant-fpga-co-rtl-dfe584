// Behavioural model of an Intel 32 Mbit (2M x 16) boot-block flash, for
// testbenches only (not synthesizable logic of the design).
//
// Command interface: 0xFF read array, 0x70 read status, 0x50 clear status,
// 0x40/0x10 program (next write = address + data), 0x20 + 0xD0 block erase,
// 0x60 + 0x01 lock, 0x60 + 0xD0 unlock. Blocks: 63 x 32K words, then 8 x 4K
// boot blocks. Program and erase keep status bit 7 low for BUSY_CLKS clocks.
// Programming can only clear bits; a locked block refuses program and erase
// (status bit 1 set). Commands are taken on the rising edge of WE# with CE#
// low, sampled on the model's clock. The model also counts timing
// violations of the write cycle: WE# low for fewer than MIN_WP clocks, or
// data not driven while WE# is low. corrupt_mask is XORed onto every word read
// from the array (a stuck or upset pin between flash and FPGA).
module flash_model #(
  parameter int BUSY_CLKS = 20,
  parameter int MIN_WP    = 3
) (
  input  logic        clk,
  input  logic [20:0] addr,
  input  logic [15:0] dq_i,      // data driven by the FPGA
  input  logic        dq_oe,     // FPGA drives the data pins
  output logic [15:0] dq_o,      // data driven by the flash
  input  logic        ce_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        rp_n,
  input  logic [15:0] corrupt_mask
);
  typedef enum {M_ARRAY, M_STATUS, M_PROG, M_ERASE, M_LOCK} mode_e;

  logic [15:0] mem [2**21];
  logic        locked [71];
  mode_e       mode;
  logic [7:0]  sr;
  int          busy;
  logic        we_q;
  logic        armed;   // timing checks start after the first reset pulse on RP#
  int          wp_cnt;
  int          n_programs, n_erases, n_locks, n_unlocks, n_timing_viol, n_cmds;

  function automatic int block_of(input logic [20:0] a);
    if (a >= 21'h1F8000) return 63 + int'((a - 21'h1F8000) >> 12);
    return int'(a >> 15);
  endfunction

  initial begin
    for (int i = 0; i < 2**21; i++) mem[i] = 16'hFFFF;
    for (int i = 0; i < 71; i++) locked[i] = 1'b1;   // Intel parts power up locked
    armed = 0; mode = M_ARRAY; sr = 8'h80; busy = 0; we_q = 1; wp_cnt = 0;
    n_programs = 0; n_erases = 0; n_locks = 0; n_unlocks = 0; n_timing_viol = 0; n_cmds = 0;
  end

  always_comb begin
    if (mode == M_ARRAY) dq_o = mem[addr] ^ corrupt_mask;
    else                 dq_o = {8'h00, sr};
  end

  always @(posedge clk) begin
    we_q <= we_n;
    if (!rp_n) armed <= 1'b1;
    if (!we_n && !ce_n && rp_n && armed) begin
      wp_cnt <= wp_cnt + 1;
      if (!dq_oe) begin n_timing_viol <= n_timing_viol + 1; $display("flash_model: data not driven at %0t", $time); end
    end
    if (busy > 0) begin
      busy <= busy - 1;
      if (busy == 1) sr[7] <= 1'b1;
    end
    if (!rp_n) begin
      mode <= M_ARRAY;
    end else if (we_n && !we_q && !ce_n) begin
      // rising edge of WE#
      wp_cnt <= 0;
      if (wp_cnt < MIN_WP && armed) begin n_timing_viol <= n_timing_viol + 1; $display("flash_model: WE# low only %0d clocks at %0t", wp_cnt, $time); end
      n_cmds <= n_cmds + 1;
      case (mode)
        M_PROG: begin
          n_programs <= n_programs + 1;
          if (locked[block_of(addr)]) sr <= 8'h92;
          else begin mem[addr] <= mem[addr] & dq_i; sr <= 8'h00; busy <= BUSY_CLKS; end
          mode <= M_STATUS;
        end
        M_ERASE: begin
          if (dq_i[7:0] == 8'hD0) begin
            n_erases <= n_erases + 1;
            if (locked[block_of(addr)]) sr <= 8'hA2;
            else begin
              int b, lo, hi;
              b  = block_of(addr);
              lo = (b < 63) ? b * 32768 : 32'h1F8000 + (b - 63) * 4096;
              hi = lo + ((b < 63) ? 32768 : 4096);
              for (int i = lo; i < hi; i++) mem[i] <= 16'hFFFF;
              sr <= 8'h00; busy <= BUSY_CLKS;
            end
          end else sr <= 8'hB0;
          mode <= M_STATUS;
        end
        M_LOCK: begin
          if (dq_i[7:0] == 8'h01) begin locked[block_of(addr)] <= 1'b1; n_locks <= n_locks + 1; end
          if (dq_i[7:0] == 8'hD0) begin locked[block_of(addr)] <= 1'b0; n_unlocks <= n_unlocks + 1; end
          mode <= M_STATUS;
        end
        default: begin
          case (dq_i[7:0])
            8'hFF: mode <= M_ARRAY;
            8'h70: mode <= M_STATUS;
            8'h50: sr <= 8'h80;
            8'h40, 8'h10: mode <= M_PROG;
            8'h20: mode <= M_ERASE;
            8'h60: mode <= M_LOCK;
            default: ;
          endcase
        end
      endcase
    end
  end
endmodule
