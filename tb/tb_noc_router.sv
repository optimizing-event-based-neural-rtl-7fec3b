// tb_noc_router: self-checking test of a core's NoC interface.
//
// The routing table is filled with random destination masks (some empty), then random
// packets are sent while the fabric side accepts at random. Each sent packet must appear on
// the fabric side exactly once, in order, stamped with the core identifier and carrying the
// destination mask of its key, unless that mask is empty (then it is dropped). A table entry
// rewritten between packets must take effect for the next packet. On the receive side,
// packets pushed by the fabric must reach the controller in order, with in_ready falling
// when the FIFO is full and irq high while it is not empty.
//
// Routing by a table the controller rewrites follows the source; the mask format and the
// drop rule for empty entries are this design's own.
module tb_noc_router;
  import seneca_pkg::*;

  localparam int unsigned NC = 16;
  localparam int unsigned ID = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              rt_we, tx_valid, tx_ready, out_valid, out_ready, in_valid, in_ready;
  logic              rx_pop, rx_empty, irq;
  logic [KEY_W-1:0]  rt_waddr;
  logic [NC-1:0]     rt_wdata, out_dest;
  noc_tx_t           tx;
  noc_pkt_t          out_pkt, in_pkt, rx_pkt;
  logic [4:0]        rx_count;

  int checks = 0, failures = 0;

  noc_router #(.NUM_CORES(NC), .CORE_ID(ID), .RX_DEPTH(16)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NC-1:0] table_m [2**KEY_W];
  typedef struct { noc_pkt_t p; logic [NC-1:0] d; } out_t;
  out_t     exp_out [$];
  noc_pkt_t exp_rx  [$];
  int       dropped = 0, full_seen = 0;

  // fabric side: accepts at random and checks
  always @(negedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_out.size() == 0 || out_pkt !== exp_out[0].p || out_dest !== exp_out[0].d) begin
        failures++; $display("FAIL routed packet %h dest %h", out_pkt, out_dest);
      end
      if (exp_out.size()) void'(exp_out.pop_front());
    end
  end
  always @(posedge clk) out_ready <= ($urandom & 3) != 0;

  task automatic write_rt(int k, logic [NC-1:0] m);
    @(negedge clk);
    rt_we = 1; rt_waddr = KEY_W'(k); rt_wdata = m; table_m[k] = m;
    @(negedge clk);
    rt_we = 0;
  endtask

  task automatic send(logic [KEY_W-1:0] k, logic [31:0] pl);
    @(negedge clk);
    tx_valid = 1; tx.key = k; tx.payload = pl;
    #1;
    while (!tx_ready) begin @(negedge clk); #1; end
    if (table_m[k] != 0) exp_out.push_back('{p: '{src: CORE_ID_W'(ID), key: k, payload: pl}, d: table_m[k]});
    else dropped++;
    @(posedge clk);
    #1 tx_valid = 0;
  endtask

  initial begin
    rt_we = 0; rt_waddr = 0; rt_wdata = 0; tx_valid = 0; tx = '0; in_valid = 0; in_pkt = '0;
    rx_pop = 0; out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reset leaves an empty table: a packet is dropped
    for (int k = 0; k < 2**KEY_W; k++) table_m[k] = '0;
    send(8'd7, 32'hdead_beef);
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL packet with empty route left the router"); end
    for (int k = 0; k < 2**KEY_W; k++) write_rt(k, ($urandom_range(0, 9) == 0) ? '0 : NC'($urandom));
    for (int t = 0; t < 3000; t++) begin
      if (t % 100 == 50) write_rt(int'($urandom_range(0, 2**KEY_W - 1)), NC'($urandom));
      send(KEY_W'($urandom), $urandom);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_out.size() != 0) begin failures++; $display("FAIL %0d packets lost", exp_out.size()); end
    checks++;
    if (dropped < 2) begin failures++; $display("FAIL no dropped packets exercised"); end

    // receive path
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (irq !== !rx_empty || in_ready !== (rx_count != 5'd16)) begin failures++; $display("FAIL rx flags"); end
      if (rx_count == 5'd16) full_seen++;
      rx_pop = !rx_empty && (int'($urandom_range(0, 99)) < (((t / 200) % 2 == 0) ? 30 : 80));
      if (rx_pop) begin
        checks++;
        if (exp_rx.size() == 0 || rx_pkt !== exp_rx[0]) begin failures++; $display("FAIL rx packet"); end
        if (exp_rx.size()) void'(exp_rx.pop_front());
      end
      in_valid = in_ready && (($urandom & 1) != 0);
      in_pkt = noc_pkt_t'({$urandom, $urandom});
      if (in_valid) exp_rx.push_back(in_pkt);
    end
    @(negedge clk); in_valid = 0; rx_pop = 0;
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL receive FIFO never full"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
