// Testbench model of the flash command bus seen from a flash user: answers
// each command strobe after a random latency, read data = the address mixed
// with a fixed pattern (see word_at), and gives the grant one clock after the
// request. Also counts strobes issued without a grant or while busy.
module flash_responder
  import ftcp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       request,
  output logic       grant,
  input  flash_req_t req,
  output flash_rsp_t rsp
);
  int  bad_strobes = 0;
  int  reads = 0;
  int  lat;
  logic [20:0] a;

  function automatic logic [15:0] word_at(input logic [20:0] addr);
    return addr[15:0] ^ {addr[7:0], addr[15:8]} ^ 16'h5A3C;
  endfunction

  initial begin
    rsp = '{busy: 1'b0, rvalid: 1'b0, rdata: '0};
    grant = 1'b0;
  end

  always @(posedge clk) grant <= request && !rst;

  always @(posedge clk) begin
    if (req.valid) begin
      if (!grant || rsp.busy) bad_strobes++;
      a   = req.addr;
      lat = 2 + $urandom_range(8);
      rsp.busy <= 1'b1;
      repeat (lat) @(posedge clk);
      rsp.rvalid <= (req.cmd == FCMD_READ);
      rsp.rdata  <= word_at(a);
      reads++;
      @(posedge clk);
      rsp.rvalid <= 1'b0;
      rsp.busy   <= 1'b0;
    end
  end
endmodule
