// Self-checking test of flash_cache between a flash_if and the flash model.
// The flash is preloaded with records of 512 random words plus their CRC
// (computed here byte-wise, independently of crc16). Cached reads at random
// logical addresses must return the record data; a second read in the same
// record must hit the buffer in 3 clocks. With a pin fault injected
// (corrupt_mask) the CRC check must fail, the read must wait RETRY_WAIT clocks
// and then succeed once the fault is gone. Raw (uncached) reads must pass
// through and see the CRC words; a flash write must empty the buffer.
module tb_flash_cache;
  import ftcp_pkg::*;
  localparam int RETRY = 3000;
  localparam int NREC = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  flash_req_t up_req, dn_req;
  flash_rsp_t up_rsp, dn_rsp;
  logic crc_fail, buf_valid;
  logic [20:0] f_addr;
  logic [15:0] f_dq_o, f_dq_i, mask;
  logic f_dq_oe, f_ce_n, f_oe_n, f_we_n, f_rp_n;
  logic [15:0] data [NREC*512];
  logic [15:0] crcs [NREC];
  int fails_seen = 0;

  always #10 clk = ~clk;

  flash_cache #(.RETRY_WAIT(RETRY)) dut (.clk, .rst, .up_req, .up_rsp, .dn_req, .dn_rsp, .crc_fail, .buf_valid);
  flash_if u_fif (.clk, .rst, .req(dn_req), .rsp(dn_rsp), .f_addr, .f_dq_o, .f_dq_oe, .f_dq_i, .f_ce_n, .f_oe_n, .f_we_n, .f_rp_n);
  flash_model #(.BUSY_CLKS(10)) u_flash (.clk, .addr(f_addr), .dq_i(f_dq_o), .dq_oe(f_dq_oe), .dq_o(f_dq_i),
    .ce_n(f_ce_n), .oe_n(f_oe_n), .we_n(f_we_n), .rp_n(f_rp_n), .corrupt_mask(mask));

  always @(posedge clk) if (crc_fail) fails_seen++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [15:0] crc_byte(input logic [15:0] c, input logic [7:0] b);
    logic [15:0] r = c ^ {b, 8'h00};
    for (int i = 0; i < 8; i++) r = r[15] ? ((r << 1) ^ 16'h1021) : (r << 1);
    return r;
  endfunction

  task automatic cmd(input flash_cmd_e c, input logic [20:0] a, input logic [15:0] d, input logic cached,
                     output logic [15:0] rd, output int clks);
    rd = '0; clks = 0;
    while (up_rsp.busy) @(posedge clk);
    #1 up_req = '{valid: 1'b1, cmd: c, addr: a, wdata: d, cached: cached};
    @(posedge clk); #1 up_req.valid = 1'b0; clks = 1;
    while (up_rsp.busy) begin
      if (up_rsp.rvalid) rd = up_rsp.rdata;
      @(posedge clk); #1; clks++;
    end
  endtask

  logic [15:0] rd;
  int clks;

  initial begin
    up_req = FLASH_REQ_IDLE;
    mask = 16'h0000;
    #1;
    for (int r = 0; r < NREC; r++) begin
      logic [15:0] c;
      c = 16'hFFFF;
      for (int i = 0; i < 512; i++) begin
        data[r*512+i] = 16'($urandom);
        c = crc_byte(crc_byte(c, data[r*512+i][15:8]), data[r*512+i][7:0]);
        u_flash.mem[r*513+i] = data[r*512+i];
      end
      crcs[r] = c;
      u_flash.mem[r*513+512] = c;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // miss, then hits in record 1
    cmd(FCMD_READ, 21'(512 + 17), 16'h0, 1'b1, rd, clks);
    check(rd == data[512+17], "first cached read (fill)");
    check(buf_valid, "buffer valid after good CRC");
    check(clks > 513 * 10, "fill read the whole record");
    for (int k = 0; k < 30; k++) begin
      int a;
      a = 512 + $urandom_range(511);
      cmd(FCMD_READ, 21'(a), 16'h0, 1'b1, rd, clks);
      check(rd == data[a], $sformatf("hit %0d", a));
      check(clks == 3, $sformatf("hit takes 3 clocks (%0d)", clks));
    end
    // raw read passes through and sees the CRC word of record 0
    cmd(FCMD_READ, 21'(512), 16'h0, 1'b0, rd, clks);
    check(rd == crcs[0], "raw read of CRC word");
    check(buf_valid, "raw read keeps buffer");
    // pin fault during the fill of record 2 -> CRC failure and retry
    mask = 16'h0040;
    fork
      begin
        cmd(FCMD_READ, 21'(1024 + 5), 16'h0, 1'b1, rd, clks);
      end
      begin
        wait (fails_seen == 1);
        mask = 16'h0000;   // the fault is repaired (e.g. by scrubbing)
      end
    join
    check(fails_seen == 1, "CRC failure detected once");
    check(rd == data[1024 + 5], "data correct after retry");
    check(clks > RETRY + 2 * 513 * 10, "retry waited RETRY_WAIT and refilled");
    // write empties the buffer
    cmd(FCMD_WRITE, 21'h000000, 16'h0, 1'b0, rd, clks);
    check(!buf_valid, "write empties the buffer");
    cmd(FCMD_READ, 21'(2), 16'h0, 1'b1, rd, clks);
    check(rd == data[2], "record 0 read after invalidation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
