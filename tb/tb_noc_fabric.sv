// tb_noc_fabric: self-checking test of the cluster NoC fabric with 16 cores.
//
// Every core offers a stream of packets with random multicast destination sets while the
// receivers accept at random. Checked each cycle: at most one packet is granted; it is
// delivered to exactly the cores of its destination set, all of which were ready; every
// packet reaches every destination exactly once and in its source's order. With all
// receivers ready, no pending offer waits longer than NUM_CORES cycles (round-robin), and
// an offer blocked by a full receiver does not block offers to other cores.
//
// The source shows the cores of a cluster connected but not how; the bus discipline
// checked here is this design's own.
module tb_noc_fabric;
  import seneca_pkg::*;

  localparam int unsigned NC = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          src_valid [NC], src_ready [NC], dst_valid [NC], dst_ready [NC];
  noc_pkt_t      src_pkt [NC], dst_pkt [NC];
  logic [NC-1:0] src_dest [NC];

  int checks = 0, failures = 0;

  noc_fabric #(.NUM_CORES(NC)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int       seq [NC];
  int       sent [NC];
  noc_pkt_t expq [NC][NC][$];   // [dest][src]
  int       wait_cyc [NC];
  int       rdy_pct = 60;
  int       n_pkts = 400;
  logic     all_ready = 0;

  function automatic void new_offer(int s);
    src_valid[s]   = 1;
    src_pkt[s]     = '{src: CORE_ID_W'(s), key: KEY_W'($urandom), payload: 32'(s * 65536 + seq[s])};
    src_dest[s]    = NC'($urandom);
    if (src_dest[s] == 0) src_dest[s] = NC'(1 << (s % NC));
    seq[s]++;
  endfunction

  // Each negedge: first retire the offers granted in the cycle that just ended and make new
  // offers, then let the fabric settle and record the transfer of the coming clock edge.
  logic granted [NC];
  initial for (int s = 0; s < int'(NC); s++) granted[s] = 0;

  always @(negedge clk) if (rst_n) begin
    int grants;
    for (int s = 0; s < int'(NC); s++) begin
      if (granted[s]) begin
        sent[s]++;
        src_valid[s] = 0;
        wait_cyc[s] = 0;
        granted[s] = 0;
      end else if (src_valid[s]) begin
        wait_cyc[s]++;
        if (all_ready && wait_cyc[s] > int'(NC)) begin
          checks++; failures++; $display("FAIL source %0d starved %0d", s, wait_cyc[s]);
        end
      end
      if (!src_valid[s] && sent[s] < n_pkts && ($urandom & 1)) begin
        new_offer(s);
        for (int d = 0; d < int'(NC); d++) if (src_dest[s][d]) expq[d][s].push_back(src_pkt[s]);
      end
    end
    for (int d = 0; d < int'(NC); d++)
      dst_ready[d] = all_ready || (int'($urandom_range(0, 99)) < rdy_pct);
    #1;
    grants = 0;
    for (int s = 0; s < int'(NC); s++) if (src_ready[s]) grants++;
    checks++;
    if (grants > 1) begin failures++; $display("FAIL %0d grants", grants); end
    for (int d = 0; d < int'(NC); d++) begin
      if (dst_valid[d]) begin
        int s;
        s = int'(dst_pkt[d].src);
        checks++;
        if (!dst_ready[d] || expq[d][s].size() == 0 || dst_pkt[d] !== expq[d][s][0]) begin
          failures++; $display("FAIL delivery to %0d from %0d", d, s);
        end
        if (expq[d][s].size()) void'(expq[d][s].pop_front());
      end
    end
    for (int s = 0; s < int'(NC); s++) begin
      if (src_valid[s] && src_ready[s]) begin
        for (int d = 0; d < int'(NC); d++) begin
          checks++;
          if (dst_valid[d] !== src_dest[s][d]) begin failures++; $display("FAIL dest set of %0d", s); end
        end
        granted[s] = 1;
      end
    end
  end

  initial begin
    int left;
    for (int s = 0; s < int'(NC); s++) begin
      src_valid[s] = 0; src_pkt[s] = '0; src_dest[s] = '0; dst_ready[s] = 0;
      seq[s] = 0; sent[s] = 0; wait_cyc[s] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20000) @(negedge clk);
    // second phase: all receivers ready, check round-robin service
    all_ready = 1;
    for (int s = 0; s < int'(NC); s++) wait_cyc[s] = 0;
    n_pkts = 800;
    repeat (20000) @(negedge clk);
    left = 0;
    for (int d = 0; d < int'(NC); d++) for (int s = 0; s < int'(NC); s++) left += expq[d][s].size();
    checks++;
    if (left != 0) begin failures++; $display("FAIL %0d deliveries missing", left); end
    for (int s = 0; s < int'(NC); s++) begin
      checks++;
      if (sent[s] != 800) begin failures++; $display("FAIL source %0d sent %0d", s, sent[s]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
