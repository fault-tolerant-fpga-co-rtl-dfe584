// Self-checking test of sync_fifo against a queue model: random pushes and
// pops (also simultaneous), writes while full must be dropped, reads while
// empty ignored, data one clock after rd, flags exact, clr empties.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clr = 0, wr = 0, rd = 0;
  logic [7:0] din, dout;
  logic empty, full;
  logic [7:0] model [$];
  logic       exp_valid;
  logic [7:0] exp_data;
  int         drops = 0, fills = 0;

  always #5 clk = ~clk;
  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.clk, .rst, .clr, .wr, .din, .rd, .dout, .empty, .full);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    exp_valid = 0;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      bias = (n / 500) % 2;   // alternate fill-heavy and drain-heavy phases
      wr  = ($urandom_range(9) < (bias ? 7 : 3));
      rd  = ($urandom_range(9) < (bias ? 3 : 7));
      din = 8'($urandom);
      #1;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      @(posedge clk);
      // full/empty as sampled before the edge decide what the FIFO accepts
      exp_valid = 0;
      if (rd && !empty) begin exp_data = model.pop_front(); exp_valid = 1; end
      if (wr && !full) model.push_back(din);
      else if (wr) drops++;
      if (full) fills++;
      #1;
      if (exp_valid) check(dout == exp_data, $sformatf("data %02x exp %02x", dout, exp_data));
    end
    wr = 0; rd = 0;
    clr = 1; @(posedge clk); #1 clr = 0; model.delete();
    check(empty && !full, "clr empties");
    check(drops > 0 && fills > 0, "full condition was reached and writes dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
