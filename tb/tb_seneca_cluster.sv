// tb_seneca_cluster: end-to-end test of a 16-core cluster running a two-layer network.
//
// Each core's controller is played by a process of this testbench on that core's data bus.
// The network and its mapping:
//   core 0: FC layer 1, 32 inputs -> 64 neurons; its input spikes come from the testbench;
//   cores 1 and 2: two FC layers of 64 -> 64 neurons fed by layer 1 (multicast);
//   core 3: output sink; it receives the events of cores 1 and 2.
// Weights are int4 with a power-of-two layer scale, states and spike values BF16. Inference
// follows the event-driven flow of the architecture: activation events are integrated as they
// arrive, grouped by up to four spikes per task (spike grouping); a synchronisation packet
// closes the time step, after which a core applies FATReLU, turns its firing neurons into AER
// events with the event generator and sends them over the NoC, routed by key through the
// routing tables. Cores 1 and 2 start integrating while core 0 is still producing events.
//
// Checked: the events reaching core 3 from each source equal a double-precision reference
// with BF16 truncation after every operation, in order; every core's micro-instruction count
// matches the task stream. Counted and required at least once: grouped tasks, single-spike
// tasks, a task FIFO full stall on the bus, an event-generator stall of the loop controller,
// a multicast transfer, a NoC transfer held back by a full receive FIFO, and a neuron held
// back by the FATReLU threshold.
module tb_seneca_cluster;
  import seneca_pkg::*;
  import tb_ref_pkg::*;

  localparam int NC      = 16;
  localparam int N_IN    = 32;
  localparam int N_OUT   = 64;
  localparam int ITERS   = N_OUT / 32;
  localparam int W_BASE  = 1024;
  localparam int S_BASE  = 64;
  localparam int N_SPK   = 64;
  localparam logic [15:0] SCALE1 = 16'h3d80;   // 2^-4
  localparam logic [15:0] SCALE2 = 16'h3d00;   // 2^-5
  localparam logic [15:0] THR    = 16'h3f00;   // 0.5
  localparam int K_L1 = 1, K_L1_SYNC = 2, K_L2 = 3, K_L2_SYNC = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bus_req [NC], bus_we [NC], bus_ready [NC], bus_rvalid [NC], irq_event [NC], irq_noc [NC];
  logic [3:0]  bus_be [NC];
  logic [31:0] bus_addr [NC], bus_wdata [NC], bus_rdata [NC];

  int checks = 0, failures = 0;

  seneca_cluster dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ mechanism counters
  int n_grouped = 0, n_single = 0, n_task_full = 0, n_evg_stall = 0, n_multicast = 0;
  int n_noc_blocked = 0, n_below_thr = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.g_core[0].u_core.u_lc.s1_stall && dut.g_core[0].u_core.u_lc.state == 1'b1) n_evg_stall++;
    if (dut.g_core[1].u_core.u_lc.s1_stall && dut.g_core[1].u_core.u_lc.state == 1'b1) n_evg_stall++;
    if (dut.g_core[2].u_core.u_lc.s1_stall && dut.g_core[2].u_core.u_lc.state == 1'b1) n_evg_stall++;
    for (int c = 0; c < NC; c++)
      if (dut.out_valid[c] && dut.out_ready[c] && $countones(dut.out_dest[c]) > 1) n_multicast++;
    for (int c = 0; c < NC; c++)
      if (dut.out_valid[c] && !dut.out_ready[c] && (dut.out_dest[c][3] && !dut.in_ready[3])) n_noc_blocked++;
  end

  int issued [NC];
  initial for (int c = 0; c < NC; c++) issued[c] = 0;
  always @(posedge clk) begin
    if (dut.g_core[0].u_core.npe_valid) issued[0]++;
    if (dut.g_core[1].u_core.npe_valid) issued[1]++;
    if (dut.g_core[2].u_core.npe_valid) issued[2]++;
  end

  // ------------------------------------------------------------------ bus helpers
  task automatic wr(int c, logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    bus_req[c] = 1; bus_we[c] = 1; bus_be[c] = 4'hF; bus_addr[c] = a; bus_wdata[c] = d;
    #1;
    if (!bus_ready[c] && a == 32'h0020_0100) n_task_full++;
    while (!bus_ready[c]) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    bus_req[c] = 0; bus_we[c] = 0;
  endtask

  task automatic rd(int c, logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_req[c] = 1; bus_we[c] = 0; bus_addr[c] = a;
    @(posedge clk); #1;
    bus_req[c] = 0;
    d = bus_rdata[c];
  endtask

  function automatic logic [31:0] ui(npe_op_e op, int rdr, int ra, int rb, int ag, int off);
    uinstr_t u;
    u.op = op; u.rd = RF_AW'(rdr); u.ra = RF_AW'(ra); u.rb = RF_AW'(rb);
    u.agen = 3'(ag); u.off = 7'(off);
    return 32'(u);
  endfunction

  // micro-code layout, identical on every core
  int grp_start [5], grp_len [5], evg_start, evg_len;

  task automatic load_microcode(int c);
    int n;
    n = 0;
    for (int G = 1; G <= 4; G += 3) begin
      grp_start[G] = n;
      for (int q = 0; q < 4; q++) begin wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_LD, q, 0, 0, 0, q)); n++; end
      for (int g = 0; g < G; g++) begin
        wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_SCL, 8, 0, g, 0, 0)); n++;
        wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_LD, 9, 0, 0, 1 + g, 0)); n++;
        for (int q = 0; q < 4; q++) begin
          wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_CVT4, 10, 9, q, 0, 0)); n++;
          wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_MAC, q, 8, 10, 0, 0)); n++;
        end
      end
      for (int q = 0; q < 4; q++) begin wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_ST, 0, q, 0, 0, q)); n++; end
      grp_len[G] = n - grp_start[G];
    end
    evg_start = n;
    wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_LD, 0, 0, 0, 0, 0));   n++;
    wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_SCL, 11, 0, 0, 0, 0)); n++;
    wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_THR, 1, 0, 11, 0, 0)); n++;
    wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_EVG, 0, 1, 0, 0, 0));  n++;
    wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_CLR, 2, 0, 0, 0, 0));  n++;
    wr(c, 32'h0010_0000 + 32'(4*n), ui(OP_ST, 0, 2, 0, 0, 0));   n++;
    evg_len = n - evg_start;
  endtask

  task automatic push_task(int c, int start, int len, int iters, logic [15:0] sc [4],
                           int base [5], int stride [5]);
    wr(c, 32'h0020_0000, {16'(iters), 8'(len), 1'b0, 7'(start)});
    wr(c, 32'h0020_0004, 32'd0);
    wr(c, 32'h0020_0008, {sc[1], sc[0]});
    wr(c, 32'h0020_000C, {sc[3], sc[2]});
    for (int g = 0; g < 5; g++) wr(c, 32'h0020_0010 + 32'(4*g), {16'(stride[g]), 16'(base[g])});
    wr(c, 32'h0020_0100, 32'd1);
  endtask

  // ------------------------------------------------------------------ network
  logic [3:0]  w1 [N_IN][N_OUT];
  logic [3:0]  w2 [3][N_OUT][N_OUT];     // [core][input][neuron], cores 1 and 2
  logic [15:0] b1 [N_OUT];
  logic [15:0] b2 [3][N_OUT];
  int          in_ch [N_SPK];
  logic [15:0] in_v  [N_SPK];

  task automatic store_layer(int c, int n_in, logic [15:0] bias [N_OUT], bit first);
    logic [15:0] lanes [8];
    for (int i = 0; i < n_in; i++)
      for (int it = 0; it < ITERS; it++) begin
        for (int l = 0; l < 8; l++)
          for (int q = 0; q < 4; q++)
            lanes[l][4*q +: 4] = first ? w1[i][(it*4+q)*8 + l] : w2[c][i][(it*4+q)*8 + l];
        for (int w = 0; w < 4; w++)
          wr(c, 32'((W_BASE + i*ITERS + it) * 16 + w*4), {lanes[2*w+1], lanes[2*w]});
      end
    for (int r = 0; r < N_OUT / 8; r++)
      for (int w = 0; w < 4; w++)
        wr(c, 32'((S_BASE + r) * 16 + w*4), {bias[r*8 + 2*w + 1], bias[r*8 + 2*w]});
  endtask

  // integrate a group of 1 or 4 spikes
  task automatic integrate(int c, int ch [$], logic [15:0] v [$], logic [15:0] scale);
    logic [15:0] sc [4];
    int base [5], stride [5];
    int n;
    n = ch.size();
    for (int s = 0; s < 4; s++) sc[s] = '0;
    base[0] = S_BASE; stride[0] = 4;
    for (int g = 1; g < 5; g++) begin base[g] = 0; stride[g] = 0; end
    for (int g = 0; g < n; g++) begin
      sc[g] = ref_mul(v[g], scale);
      base[1+g] = W_BASE + ch[g] * ITERS;
      stride[1+g] = 1;
    end
    if (n == 4) n_grouped++; else n_single++;
    push_task(c, grp_start[n], grp_len[n], ITERS, sc, base, stride);
  endtask

  // event generation; every event is forwarded over the NoC with key k, then a sync packet
  task automatic fire_and_send(int c, int k, int ksync, int slow);
    logic [15:0] sc [4];
    int base [5], stride [5];
    logic [31:0] st, ev;
    for (int s = 0; s < 4; s++) sc[s] = THR;
    base[0] = S_BASE; stride[0] = 1;
    for (int g = 1; g < 5; g++) begin base[g] = 0; stride[g] = 0; end
    push_task(c, evg_start, evg_len, N_OUT / 8, sc, base, stride);
    wr(c, 32'h0040_1000, 32'(k));
    forever begin
      rd(c, 32'h0030_0000, st);
      if (st[23:16] != 0) begin
        rd(c, 32'h0030_0004, ev);
        repeat (slow) @(negedge clk);
        wr(c, 32'h0040_1004, ev);
      end else if (!st[8] && st[3:0] == 0) break;
    end
    wr(c, 32'h0040_1000, 32'(ksync));
    wr(c, 32'h0040_1004, 32'd0);
  endtask

  // receive activation events until the sync packet, integrating groups of four as they come
  task automatic receive_layer(int c, int ksync, logic [15:0] scale, int slow);
    logic [31:0] st, p, h;
    int ch [$];
    logic [15:0] v [$];
    forever begin
      rd(c, 32'h0030_0000, st);
      if (st[31:24] != 0) begin
        rd(c, 32'h0040_100C, h);
        rd(c, 32'h0040_1008, p);
        repeat (slow) @(negedge clk);
        if (int'(h[7:0]) == ksync) break;
        ch.push_back(int'(p[31:16]));
        v.push_back(p[15:0]);
        if (ch.size() == 4) begin
          integrate(c, ch, v, scale);
          ch.delete(); v.delete();
        end
      end
    end
    while (ch.size() != 0) begin
      int c1 [$];
      logic [15:0] v1 [$];
      c1.push_back(ch.pop_front()); v1.push_back(v.pop_front());
      integrate(c, c1, v1, scale);
    end
  endtask

  // ------------------------------------------------------------------ reference
  logic [15:0] ref1 [N_OUT];
  logic [15:0] ref2 [3][N_OUT];
  logic [31:0] exp_out [3][$];
  int          exp_instr [3];

  task automatic reference();
    int ev_n [$];
    int groups;
    for (int n = 0; n < N_OUT; n++) ref1[n] = b1[n];
    for (int s = 0; s < N_SPK; s++)
      for (int n = 0; n < N_OUT; n++)
        ref1[n] = ref_add(ref1[n], ref_mul(ref_mul(in_v[s], SCALE1), ref_int4(w1[in_ch[s]][n])));
    for (int n = 0; n < N_OUT; n++)
      if (bf2r(ref1[n]) > bf2r(THR)) ev_n.push_back(n); else n_below_thr++;
    exp_instr[0] = ((N_SPK / 4) * grp_len[4] + (N_SPK % 4) * grp_len[1]) * ITERS + evg_len * N_OUT / 8;
    for (int c = 1; c <= 2; c++) begin
      for (int n = 0; n < N_OUT; n++) ref2[c][n] = b2[c][n];
      foreach (ev_n[e])
        for (int n = 0; n < N_OUT; n++)
          ref2[c][n] = ref_add(ref2[c][n], ref_mul(ref_mul(ref1[ev_n[e]], SCALE2), ref_int4(w2[c][ev_n[e]][n])));
      for (int n = 0; n < N_OUT; n++)
        if (bf2r(ref2[c][n]) > bf2r(THR)) exp_out[c].push_back({16'(n), ref2[c][n]}); else n_below_thr++;
      exp_instr[c] = ((ev_n.size() / 4) * grp_len[4] + (ev_n.size() % 4) * grp_len[1]) * ITERS
                     + evg_len * N_OUT / 8;
    end
    $display("layer 1: %0d input spikes, %0d events; layer 2: %0d and %0d events",
             N_SPK, ev_n.size(), exp_out[1].size(), exp_out[2].size());
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    logic [31:0] st, p, h;
    int n_sync, t0;
    for (int c = 0; c < NC; c++) begin
      bus_req[c] = 0; bus_we[c] = 0; bus_be[c] = 0; bus_addr[c] = 0; bus_wdata[c] = 0;
    end
    for (int i = 0; i < N_IN; i++) for (int n = 0; n < N_OUT; n++) w1[i][n] = 4'($urandom);
    for (int c = 1; c <= 2; c++)
      for (int i = 0; i < N_OUT; i++) for (int n = 0; n < N_OUT; n++) w2[c][i][n] = 4'($urandom);
    for (int n = 0; n < N_OUT; n++) begin
      b1[n] = rand_bf(-3, -1);
      b2[1][n] = rand_bf(-3, -1);
      b2[2][n] = rand_bf(-3, -1);
    end
    for (int s = 0; s < N_SPK; s++) begin
      in_ch[s] = int'($urandom_range(0, N_IN - 1));
      in_v[s]  = rand_bf(-1, 2) & 16'h7fff;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // configuration by each core's controller, in parallel
    fork
      begin
        load_microcode(0); store_layer(0, N_IN, b1, 1);
        wr(0, 32'h0040_0000 + 4*K_L1, 32'h0000_0006);        // layer-1 events -> cores 1, 2
        wr(0, 32'h0040_0000 + 4*K_L1_SYNC, 32'h0000_0006);
      end
      begin
        load_microcode(1); store_layer(1, N_OUT, b2[1], 0);
        wr(1, 32'h0040_0000 + 4*K_L2, 32'h0000_0008);        // layer-2 events -> core 3
        wr(1, 32'h0040_0000 + 4*K_L2_SYNC, 32'h0000_0008);
      end
      begin
        load_microcode(2); store_layer(2, N_OUT, b2[2], 0);
        wr(2, 32'h0040_0000 + 4*K_L2, 32'h0000_0008);
        wr(2, 32'h0040_0000 + 4*K_L2_SYNC, 32'h0000_0008);
      end
    join
    reference();
    for (int c = 0; c < 3; c++) issued[c] = 0;
    t0 = $time / 10;

    // one time step of inference
    fork
      begin   // core 0: input spikes arrive from the sensor side, grouped by four
        int ch [$];
        logic [15:0] v [$];
        for (int s = 0; s < N_SPK; s++) begin
          ch.push_back(in_ch[s]); v.push_back(in_v[s]);
          if (ch.size() == 4 || (s >= (N_SPK / 4) * 4)) begin
            integrate(0, ch, v, SCALE1);
            ch.delete(); v.delete();
          end
        end
        fire_and_send(0, K_L1, K_L1_SYNC, 12);
      end
      begin
        receive_layer(1, K_L1_SYNC, SCALE2, 0);
        fire_and_send(1, K_L2, K_L2_SYNC, 0);
      end
      begin
        receive_layer(2, K_L1_SYNC, SCALE2, 0);
        fire_and_send(2, K_L2, K_L2_SYNC, 0);
      end
      begin   // core 3: output sink, reads slowly at first so its receive FIFO fills up
        repeat (2500) @(negedge clk);
        n_sync = 0;
        while (n_sync < 2) begin
          rd(3, 32'h0030_0000, st);
          if (st[31:24] != 0) begin
            int src;
            rd(3, 32'h0040_100C, h);
            rd(3, 32'h0040_1008, p);
            src = int'(h[15:8]);
            if (int'(h[7:0]) == K_L2_SYNC) n_sync++;
            else begin
              checks++;
              if (src < 1 || src > 2 || exp_out[src].size() == 0 || p !== exp_out[src][0]) begin
                failures++; $display("FAIL output event %h from core %0d", p, src);
              end
              if (src >= 1 && src <= 2 && exp_out[src].size()) void'(exp_out[src].pop_front());
            end
          end
        end
      end
    join
    $display("inference: %0d cycles", $time / 10 - t0);

    for (int c = 1; c <= 2; c++) begin
      checks++;
      if (exp_out[c].size() != 0) begin failures++; $display("FAIL %0d events of core %0d missing", exp_out[c].size(), c); end
    end
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (issued[c] != exp_instr[c]) begin
        failures++; $display("FAIL core %0d issued %0d micro-instructions, expected %0d", c, issued[c], exp_instr[c]);
      end
    end
    $display("mechanisms: grouped tasks %0d, single-spike tasks %0d, task FIFO full %0d, event stall cycles %0d, multicast %0d, NoC blocked cycles %0d, below threshold %0d",
             n_grouped, n_single, n_task_full, n_evg_stall, n_multicast, n_noc_blocked, n_below_thr);
    checks++; if (n_grouped == 0)     begin failures++; $display("FAIL no grouped task"); end
    checks++; if (n_single == 0)      begin failures++; $display("FAIL no single-spike task"); end
    checks++; if (n_task_full == 0)   begin failures++; $display("FAIL task FIFO never full"); end
    checks++; if (n_evg_stall == 0)   begin failures++; $display("FAIL no event-generator stall"); end
    checks++; if (n_multicast == 0)   begin failures++; $display("FAIL no multicast"); end
    checks++; if (n_noc_blocked == 0) begin failures++; $display("FAIL no NoC back-pressure"); end
    checks++; if (n_below_thr == 0)   begin failures++; $display("FAIL no neuron below threshold"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
