// tb_seneca_core: one core running a fully connected layer, driven as its controller would.
//
// The testbench plays the RISC-V controller on the core's data bus. It stores int4 weights
// (four output neurons per 16-bit lane, one nibble each) and BF16 initial neuron states in
// the data memory, loads micro-code into the loop buffer, and processes a stream of input
// spikes with graded values in two ways:
//   * one task per spike (no grouping);
//   * spike groups of up to four spikes per task, so each neuron state is loaded and stored
//     once per group instead of once per spike.
// Then an event-generation task applies FATReLU (threshold) to all states, emits AER events
// for the neurons that fire and clears the states. The events read back over the bus must
// equal those of a reference model computed in double precision with BF16 truncation after
// every operation, in the same order as the hardware. Also checked: both passes give the same
// result, the grouped pass issues fewer micro-instructions and takes fewer cycles (the
// instruction counts are predicted exactly), the event interrupt, status registers, and a
// NoC packet sent to this core itself through the routing table (loopback over a
// testbench-side fabric) arriving with the receive interrupt.
//
// Int4 weights with a power-of-two scale, BF16 states, FATReLU and spike groups of up to
// four follow the source; the weight packing and the micro-code are this design's own.
module tb_seneca_core;
  import seneca_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_IN    = 32;
  localparam int N_OUT   = 64;
  localparam int ITERS   = N_OUT / 32;      // 32 neurons (4 rows) per iteration
  localparam int W_BASE  = 256;             // weight rows: W_BASE + in*ITERS + it
  localparam int S_BASE  = 64;              // state rows:  S_BASE + neuron/8
  localparam int N_SPK   = 14;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bus_req, bus_we, bus_ready, bus_rvalid, irq_event, irq_noc;
  logic [3:0]  bus_be;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic        noc_out_valid, noc_out_ready, noc_in_valid, noc_in_ready;
  noc_pkt_t    noc_out_pkt, noc_in_pkt;
  logic [15:0] noc_out_dest;

  int checks = 0, failures = 0;

  seneca_core #(.CORE_ID(3)) dut (.*);

  // testbench-side fabric: loops packets addressed to core 3 back into the core
  assign noc_out_ready = noc_in_ready;
  assign noc_in_valid  = noc_out_valid && noc_out_dest[3];
  assign noc_in_pkt    = noc_out_pkt;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- bus helpers
  task automatic wr(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    bus_req = 1; bus_we = 1; bus_be = 4'hF; bus_addr = a; bus_wdata = d;
    #1;
    while (!bus_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    bus_req = 0; bus_we = 0;
  endtask

  task automatic rd(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    bus_req = 1; bus_we = 0; bus_addr = a;
    @(posedge clk); #1;
    bus_req = 0;
    if (!bus_rvalid) begin checks++; failures++; $display("FAIL no rvalid"); end
    d = bus_rdata;
  endtask

  function automatic logic [31:0] ui(npe_op_e op, int rdr, int ra, int rb, int ag, int off);
    uinstr_t u;
    u.op = op; u.rd = RF_AW'(rdr); u.ra = RF_AW'(ra); u.rb = RF_AW'(rb);
    u.agen = 3'(ag); u.off = 7'(off);
    return 32'(u);
  endfunction

  // lane write helper: writes a 16-bit lane via two 32-bit port A words (read-modify-write free:
  // the testbench keeps a shadow of every row it writes)
  logic [15:0] shadow [int][8];
  task automatic write_row(int row, logic [15:0] lanes [8]);
    for (int w = 0; w < 4; w++) wr(32'((row * 16) + w * 4), {lanes[2*w+1], lanes[2*w]});
  endtask

  // ---------------------------------------------------------------- reference model
  logic [15:0] w4   [N_IN][N_OUT];     // int4 weights (low nibble used)
  logic [15:0] bias [N_OUT];
  logic [15:0] ref_s[N_OUT];
  int          spk_ch [N_SPK];
  logic [15:0] spk_v  [N_SPK];
  logic [15:0] thr;
  localparam logic [15:0] SCALE = 16'h3d80;   // 2^-4, the layer's power-of-two weight scale

  // micro-code
  int lb_n;
  int grp_start [GROUP_MAX+1];
  int grp_len   [GROUP_MAX+1];
  int evg_start, evg_len;

  task automatic put(logic [31:0] u);
    wr(32'h0010_0000 + 32'(4 * lb_n), u);
    lb_n++;
  endtask

  task automatic load_microcode();
    lb_n = 0;
    // integration task for a group of G spikes (G = 1 and 4 are used)
    foreach (grp_start[G]) if (G == 1 || G == 4) begin
      grp_start[G] = lb_n;
      for (int q = 0; q < 4; q++) put(ui(OP_LD, q, 0, 0, 0, q));            // states s0..s3
      for (int g = 0; g < G; g++) begin
        put(ui(OP_SCL, 8, 0, g, 0, 0));                                      // v = spike value*scale
        put(ui(OP_LD, 9, 0, 0, 1 + g, 0));                                   // packed weights
        for (int q = 0; q < 4; q++) begin
          put(ui(OP_CVT4, 10, 9, q, 0, 0));                                  // t = weight nibble q
          put(ui(OP_MAC, q, 8, 10, 0, 0));                                   // s_q += v * t
        end
      end
      for (int q = 0; q < 4; q++) put(ui(OP_ST, 0, q, 0, 0, q));
      grp_len[G] = lb_n - grp_start[G];
    end
    // event generation: FATReLU, emit, release the state
    evg_start = lb_n;
    put(ui(OP_LD, 0, 0, 0, 0, 0));
    put(ui(OP_SCL, 11, 0, 0, 0, 0));
    put(ui(OP_THR, 1, 0, 11, 0, 0));
    put(ui(OP_EVG, 0, 1, 0, 0, 0));
    put(ui(OP_CLR, 2, 0, 0, 0, 0));
    put(ui(OP_ST, 0, 2, 0, 0, 0));
    evg_len = lb_n - evg_start;
  endtask

  task automatic push_task(int start, int len, int iters, int nbase, logic [15:0] sc [4],
                           int base [5], int stride [5]);
    wr(32'h0020_0000, {16'(iters), 8'(len), 1'b0, 7'(start)});
    wr(32'h0020_0004, 32'(nbase));
    wr(32'h0020_0008, {sc[1], sc[0]});
    wr(32'h0020_000C, {sc[3], sc[2]});
    for (int g = 0; g < 5; g++) wr(32'h0020_0010 + 32'(4 * g), {16'(stride[g]), 16'(base[g])});
    wr(32'h0020_0100, 32'd1);
  endtask

  task automatic init_states();
    logic [15:0] lanes [8];
    for (int r = 0; r < N_OUT / 8; r++) begin
      for (int l = 0; l < 8; l++) lanes[l] = bias[r * 8 + l];
      write_row(S_BASE + r, lanes);
    end
  endtask

  task automatic wait_idle();
    logic [31:0] st;
    do rd(32'h0030_0000, st); while (st[8] || st[3:0] != 0);
  endtask

  int issued;   // micro-instructions reaching the NPEs
  always @(posedge clk) if (dut.npe_valid) issued++;

  task automatic run_layer(int G, output int cycles, output int n_instr);
    logic [15:0] sc [4];
    int base [5], stride [5];
    int t0, i0, k;
    t0 = $time / 10; i0 = issued;
    k = 0;
    while (k < N_SPK) begin
      int n;
      n = (N_SPK - k < G) ? N_SPK - k : G;
      // a partial last group uses the single-spike code repeatedly
      if (n != G) n = 1;
      for (int s = 0; s < 4; s++) sc[s] = 16'h0;
      base[0] = S_BASE; stride[0] = 4;
      for (int g = 0; g < 4; g++) begin base[1+g] = 0; stride[1+g] = 0; end
      for (int g = 0; g < n; g++) begin
        sc[g]       = ref_mul(spk_v[k + g], SCALE);
        base[1 + g] = W_BASE + spk_ch[k + g] * ITERS;
        stride[1 + g] = 1;
      end
      push_task(grp_start[n], grp_len[n], ITERS, 0, sc, base, stride);
      k += n;
    end
    wait_idle();
    cycles  = $time / 10 - t0;
    n_instr = issued - i0;
  endtask

  logic [31:0] exp_ev [$];
  task automatic check_events(string tag);
    logic [31:0] st, ev;
    logic [15:0] sc [4];
    int base [5], stride [5];
    int n_exp, n_got;
    for (int s = 0; s < 4; s++) sc[s] = thr;
    base[0] = S_BASE; stride[0] = 1;
    for (int g = 1; g < 5; g++) begin base[g] = 0; stride[g] = 0; end
    push_task(evg_start, evg_len, N_OUT / 8, 0, sc, base, stride);
    // the controller drains the event FIFO while the task runs (the FIFO holds 16 events,
    // fewer than the layer produces, so the loop controller stalls until it is read)
    n_exp = 0;
    for (int n = 0; n < N_OUT; n++) if (bf2r(ref_s[n]) > bf2r(thr)) exp_ev.push_back({16'(n), ref_s[n]});
    n_exp = exp_ev.size();
    n_got = 0;
    forever begin
      rd(32'h0030_0000, st);
      if (st[23:16] != 0) begin
        checks++;
        if (!irq_event) begin failures++; $display("FAIL %s: events queued without irq", tag); end
        rd(32'h0030_0004, ev);
        checks++;
        if (exp_ev.size() == 0 || ev !== exp_ev[0]) begin
          failures++; $display("FAIL %s: event %h expected %h", tag, ev, exp_ev.size() ? exp_ev[0] : 0);
        end
        if (exp_ev.size()) void'(exp_ev.pop_front());
        n_got++;
      end else if (!st[8] && st[3:0] == 0) begin
        break;
      end
    end
    checks++;
    if (n_got != n_exp) begin failures++; $display("FAIL %s: %0d events, expected %0d", tag, n_got, n_exp); end
    #1;
    checks++;
    if (irq_event) begin failures++; $display("FAIL %s: event irq still high", tag); end
  endtask

  initial begin
    logic [15:0] lanes [8];
    logic [31:0] d;
    int cyc1, ins1, cyc4, ins4, exp1, exp4, nfire;
    bus_req = 0; bus_we = 0; bus_be = 0; bus_addr = 0; bus_wdata = 0;
    issued = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // network
    for (int i = 0; i < N_IN; i++) for (int n = 0; n < N_OUT; n++) w4[i][n] = 16'($urandom_range(0, 15));
    for (int n = 0; n < N_OUT; n++) bias[n] = rand_bf(-3, 0);
    thr = 16'h3f00;   // 0.5
    for (int s = 0; s < N_SPK; s++) begin
      spk_ch[s] = int'($urandom_range(0, N_IN - 1));
      spk_v[s]  = rand_bf(-1, 2) & 16'h7fff;   // graded, positive
    end
    // weights: row W_BASE + i*ITERS + it, lane l, nibble q -> neuron (it*4+q)*8 + l
    for (int i = 0; i < N_IN; i++)
      for (int it = 0; it < ITERS; it++) begin
        for (int l = 0; l < 8; l++)
          for (int q = 0; q < 4; q++) lanes[l][4*q +: 4] = w4[i][(it*4+q)*8 + l][3:0];
        write_row(W_BASE + i * ITERS + it, lanes);
      end
    // a port A read-back
    rd(32'((W_BASE + 1) * 16), d);
    checks++;
    for (int l = 0; l < 8; l++) for (int q = 0; q < 4; q++) lanes[l][4*q +: 4] = w4[0][(1*4+q)*8 + l][3:0];
    if (d !== {lanes[1], lanes[0]}) begin failures++; $display("FAIL port A read-back"); end

    // reference
    for (int n = 0; n < N_OUT; n++) ref_s[n] = bias[n];
    for (int s = 0; s < N_SPK; s++)
      for (int n = 0; n < N_OUT; n++)
        ref_s[n] = ref_add(ref_s[n], ref_mul(ref_mul(spk_v[s], SCALE), ref_int4(w4[spk_ch[s]][n][3:0])));
    nfire = 0;
    for (int n = 0; n < N_OUT; n++) if (bf2r(ref_s[n]) > bf2r(thr)) nfire++;
    $display("layer: %0d spikes, %0d of %0d neurons fire", N_SPK, nfire, N_OUT);

    load_microcode();

    // pass 1: no grouping
    init_states();
    run_layer(1, cyc1, ins1);
    check_events("ungrouped");
    // pass 2: groups of four
    init_states();
    run_layer(4, cyc4, ins4);
    check_events("grouped");

    exp1 = N_SPK * grp_len[1] * ITERS;
    exp4 = (N_SPK / 4) * grp_len[4] * ITERS + (N_SPK % 4) * grp_len[1] * ITERS;
    checks++;
    if (ins1 != exp1 || ins4 != exp4) begin
      failures++; $display("FAIL instruction counts %0d/%0d expected %0d/%0d", ins1, ins4, exp1, exp4);
    end
    checks++;
    if (!(cyc4 < cyc1)) begin failures++; $display("FAIL grouping not faster: %0d vs %0d", cyc4, cyc1); end
    $display("spike grouping: %0d vs %0d micro-instructions, %0d vs %0d cycles", ins4, ins1, cyc4, cyc1);

    // tasks completed counter: 14 + 1 + (3 + 2) + 1
    rd(32'h0030_0008, d);
    checks++;
    if (d != 32'(N_SPK + 1 + N_SPK / 4 + N_SPK % 4 + 1)) begin failures++; $display("FAIL tasks_done %0d", d); end

    // NoC loopback through the routing table
    wr(32'h0040_0000 + 4 * 9, 32'h0000_0008);   // key 9 -> core 3
    wr(32'h0040_1000, 32'd9);
    wr(32'h0040_1004, 32'hcafe_f00d);
    repeat (4) @(negedge clk);
    checks++;
    if (!irq_noc) begin failures++; $display("FAIL no NoC irq"); end
    rd(32'h0040_100C, d);
    checks++;
    if (d !== {16'd0, 8'd3, 8'd9}) begin failures++; $display("FAIL rx head %h", d); end
    rd(32'h0040_1008, d);
    checks++;
    if (d !== 32'hcafe_f00d) begin failures++; $display("FAIL rx payload %h", d); end
    #1;
    checks++;
    if (irq_noc) begin failures++; $display("FAIL NoC irq stuck"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
