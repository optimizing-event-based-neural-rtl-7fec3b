// tb_sync_fifo: self-checking test of the FIFO used for tasks, events and NoC packets.
//
// Random pushes and pops (never a push when full or a pop when empty, which the FIFO
// asserts against) are compared with a queue model: head data, full, empty and count are
// checked every cycle, with the FIFO driven through wrap-around many times and filled up.
//
// The FIFO depths are this design's own; the source names the FIFOs but gives no size.
module tb_sync_fifo;
  localparam int unsigned WIDTH = 24;
  localparam int unsigned DEPTH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             push, pop, full, empty;
  logic [WIDTH-1:0] wdata, rdata;
  logic [3:0]       count;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] q [$];

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      checks++;
      if (count !== 4'(q.size()) || empty !== (q.size() == 0) || full !== (q.size() == DEPTH) ||
          (q.size() > 0 && rdata !== q[0])) begin
        failures++;
        $display("FAIL t=%0d count=%0d model=%0d", t, count, q.size());
      end
      bias = ((t / 500) % 2 == 0) ? 70 : 30;   // alternate filling and draining phases
      push = (q.size() < DEPTH) && (int'($urandom_range(0, 99)) < bias);
      pop  = (q.size() > 0) && (int'($urandom_range(0, 99)) >= bias);
      wdata = WIDTH'($urandom);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    @(negedge clk); push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
