// tb_kws_workload: the keyword-spotting network 390-256-256-29 running on one core.
//
// A fully connected network with 390 inputs, two hidden layers of 256 neurons and 29 outputs
// is mapped on a single core at its default size. The testbench plays the controller. It
// writes all int4 weights (about 85 KB, four neurons per 16-bit lane) and the BF16 biases
// into the data memory, loads the micro-code, and runs one inference as the event-driven
// flow prescribes:
//   * the non-zero input features are the graded input spikes of layer 1;
//   * input spikes are integrated in groups of four (spike grouping), a remainder one by one;
//   * at the end of the time step a fire task applies FATReLU to the hidden layer, the event
//     generator turns the surviving neurons into AER events, and the controller reads them;
//   * those events are the input spikes of the next layer, processed in the same way;
//   * the 29 output states are read back through port A.
// Every event of both hidden layers and every output state must equal a double-precision
// reference with BF16 truncation after each operation, applied in the same order. The
// number of micro-instructions is predicted exactly from the spike counts. The cycle count
// of the inference is printed. Layer sizes, the 4-bit weights with a power-of-two layer
// scale, BF16 states and FATReLU follow the architecture; the input sparsity, weight values,
// thresholds and memory layout are this testbench's own.
module tb_kws_workload;
  import seneca_pkg::*;
  import tb_ref_pkg::*;

  localparam int NL = 3;
  localparam int N_IN  [NL] = '{390, 256, 256};
  localparam int N_OUT [NL] = '{256, 256, 29};
  localparam int N_PAD [NL] = '{256, 256, 32};       // padded to 32 neurons per iteration
  localparam int W_BASE[NL] = '{1024, 4200, 6300};   // weight rows: W_BASE + in*ITERS + it
  localparam int S_BASE[NL] = '{64, 128, 192};       // state rows:  S_BASE + neuron/8
  localparam logic [15:0] SCALE [NL] = '{16'h3d80, 16'h3d00, 16'h3d00};   // 2^-4, 2^-5, 2^-5
  localparam logic [15:0] THR   [NL] = '{16'h3f00, 16'h3f00, 16'h0000};   // 0.5 (hidden)

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bus_req, bus_we, bus_ready, bus_rvalid, irq_event, irq_noc;
  logic [3:0]  bus_be;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic        noc_out_valid, noc_out_ready, noc_in_valid, noc_in_ready;
  noc_pkt_t    noc_out_pkt, noc_in_pkt;
  logic [15:0] noc_out_dest;

  int checks = 0, failures = 0;

  seneca_core dut (.*);

  assign noc_out_ready = 1'b1;
  assign noc_in_valid  = 1'b0;
  assign noc_in_pkt    = '0;

  initial begin
    repeat (2000000) @(posedge clk);
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

  task automatic write_row(int row, logic [15:0] lanes [8]);
    for (int w = 0; w < 4; w++) wr(32'((row * 16) + w * 4), {lanes[2*w+1], lanes[2*w]});
  endtask

  task automatic push_task(int start, int len, int iters, logic [15:0] sc [4],
                           int base [5], int stride [5]);
    wr(32'h0020_0000, {16'(iters), 8'(len), 1'b0, 7'(start)});
    wr(32'h0020_0004, 32'd0);
    wr(32'h0020_0008, {sc[1], sc[0]});
    wr(32'h0020_000C, {sc[3], sc[2]});
    for (int g = 0; g < 5; g++) wr(32'h0020_0010 + 32'(4 * g), {16'(stride[g]), 16'(base[g])});
    wr(32'h0020_0100, 32'd1);
  endtask

  task automatic wait_idle();
    logic [31:0] st;
    do rd(32'h0030_0000, st); while (st[8] || st[3:0] != 0);
  endtask

  // ---------------------------------------------------------------- micro-code
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
    foreach (grp_start[G]) if (G == 1 || G == 4) begin
      grp_start[G] = lb_n;
      for (int q = 0; q < 4; q++) put(ui(OP_LD, q, 0, 0, 0, q));
      for (int g = 0; g < G; g++) begin
        put(ui(OP_SCL, 8, 0, g, 0, 0));
        put(ui(OP_LD, 9, 0, 0, 1 + g, 0));
        for (int q = 0; q < 4; q++) begin
          put(ui(OP_CVT4, 10, 9, q, 0, 0));
          put(ui(OP_MAC, q, 8, 10, 0, 0));
        end
      end
      for (int q = 0; q < 4; q++) put(ui(OP_ST, 0, q, 0, 0, q));
      grp_len[G] = lb_n - grp_start[G];
    end
    evg_start = lb_n;
    put(ui(OP_LD, 0, 0, 0, 0, 0));
    put(ui(OP_SCL, 11, 0, 0, 0, 0));
    put(ui(OP_THR, 1, 0, 11, 0, 0));
    put(ui(OP_EVG, 0, 1, 0, 0, 0));
    put(ui(OP_CLR, 2, 0, 0, 0, 0));
    put(ui(OP_ST, 0, 2, 0, 0, 0));
    evg_len = lb_n - evg_start;
  endtask

  // ---------------------------------------------------------------- network and reference
  logic [3:0]  w4   [NL][390][256];
  logic [15:0] bias [NL][256];
  logic [15:0] ref_s[256];
  int          spk_ch [$];
  logic [15:0] spk_v  [$];
  int          issued, exp_issued;
  always @(posedge clk) if (dut.npe_valid) issued++;

  // integrate the current spike list into layer l (hardware), and the reference
  task automatic integrate(int l);
    logic [15:0] sc [4];
    int base [5], stride [5];
    int iters, k, n;
    iters = N_PAD[l] / 32;
    for (int j = 0; j < N_PAD[l]; j++) ref_s[j] = (j < N_OUT[l]) ? bias[l][j] : 16'h0;
    foreach (spk_ch[s])
      for (int j = 0; j < N_OUT[l]; j++)
        ref_s[j] = ref_add(ref_s[j], ref_mul(ref_mul(spk_v[s], SCALE[l]), ref_int4(w4[l][spk_ch[s]][j])));
    k = 0;
    while (k < spk_ch.size()) begin
      n = (spk_ch.size() - k >= 4) ? 4 : 1;
      for (int s = 0; s < 4; s++) sc[s] = 16'h0;
      base[0] = S_BASE[l]; stride[0] = 4;
      for (int g = 0; g < 4; g++) begin base[1+g] = 0; stride[1+g] = 0; end
      for (int g = 0; g < n; g++) begin
        sc[g] = ref_mul(spk_v[k + g], SCALE[l]);
        base[1 + g] = W_BASE[l] + spk_ch[k + g] * iters;
        stride[1 + g] = 1;
      end
      push_task(grp_start[n], grp_len[n], iters, sc, base, stride);
      exp_issued += grp_len[n] * iters;
      k += n;
    end
    wait_idle();
  endtask

  // fire layer l: events become the next spike list
  task automatic fire(int l);
    logic [15:0] sc [4];
    int base [5], stride [5];
    logic [31:0] st, ev;
    int exp_n [$];
    for (int s = 0; s < 4; s++) sc[s] = THR[l];
    base[0] = S_BASE[l]; stride[0] = 1;
    for (int g = 1; g < 5; g++) begin base[g] = 0; stride[g] = 0; end
    for (int j = 0; j < N_OUT[l]; j++) if (bf2r(ref_s[j]) > bf2r(THR[l])) exp_n.push_back(j);
    push_task(evg_start, evg_len, N_PAD[l] / 8, sc, base, stride);
    exp_issued += evg_len * N_PAD[l] / 8;
    spk_ch.delete(); spk_v.delete();
    forever begin
      rd(32'h0030_0000, st);
      if (st[23:16] != 0) begin
        rd(32'h0030_0004, ev);
        checks++;
        if (exp_n.size() == 0 || ev !== {16'(exp_n[0]), ref_s[exp_n[0]]}) begin
          failures++;
          $display("FAIL layer %0d event %h expected %0d/%h", l + 1, ev,
                   exp_n.size() ? exp_n[0] : -1, exp_n.size() ? ref_s[exp_n[0]] : 16'h0);
        end
        if (exp_n.size()) void'(exp_n.pop_front());
        spk_ch.push_back(int'(ev[31:16]));
        spk_v.push_back(ev[15:0]);
      end else if (!st[8] && st[3:0] == 0) begin
        break;
      end
    end
    checks++;
    if (exp_n.size() != 0) begin failures++; $display("FAIL layer %0d: %0d events missing", l + 1, exp_n.size()); end
    $display("layer %0d: %0d of %0d neurons fire", l + 1, spk_ch.size(), N_OUT[l]);
  endtask

  initial begin
    logic [15:0] lanes [8];
    logic [31:0] d;
    int t0, nin, rows;
    bus_req = 0; bus_we = 0; bus_be = 0; bus_addr = 0; bus_wdata = 0;
    issued = 0; exp_issued = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // parameters: int4 weights, BF16 biases; padded neurons have zero weights
    rows = 0;
    for (int l = 0; l < NL; l++) begin
      for (int i = 0; i < N_IN[l]; i++)
        for (int j = 0; j < 256; j++) w4[l][i][j] = (j < N_OUT[l]) ? 4'($urandom_range(0, 15)) : 4'd0;
      for (int j = 0; j < 256; j++) bias[l][j] = (j < N_OUT[l]) ? rand_bf(-3, 0) : 16'h0;
      for (int i = 0; i < N_IN[l]; i++)
        for (int it = 0; it < N_PAD[l] / 32; it++) begin
          for (int ln = 0; ln < 8; ln++)
            for (int q = 0; q < 4; q++) lanes[ln][4*q +: 4] = w4[l][i][(it*4+q)*8 + ln];
          write_row(W_BASE[l] + i * (N_PAD[l] / 32) + it, lanes);
          rows++;
        end
      for (int r = 0; r < N_PAD[l] / 8; r++) begin
        for (int ln = 0; ln < 8; ln++) lanes[ln] = bias[l][r * 8 + ln];
        write_row(S_BASE[l] + r, lanes);
      end
    end
    $display("weights: %0d rows of 16 bytes = %0d bytes", rows, rows * 16);
    load_microcode();

    // input features: about 35 percent non-zero, graded
    for (int i = 0; i < 390; i++)
      if ($urandom_range(0, 99) < 35) begin spk_ch.push_back(i); spk_v.push_back(rand_bf(-1, 2)); end
    nin = spk_ch.size();
    $display("input: %0d of 390 features non-zero", nin);

    t0 = $time / 10;
    integrate(0);
    fire(0);
    integrate(1);
    fire(1);
    integrate(2);
    $display("inference: %0d cycles, %0d micro-instructions", $time / 10 - t0, issued);

    // output layer states through port A
    for (int j = 0; j < 29; j += 2) begin
      rd(32'((S_BASE[2] + j / 8) * 16 + (j % 8) * 2), d);
      checks++;
      if (d[15:0] !== ref_s[j]) begin failures++; $display("FAIL output %0d: %h expected %h", j, d[15:0], ref_s[j]); end
      if (j + 1 < 29) begin
        checks++;
        if (d[31:16] !== ref_s[j+1]) begin failures++; $display("FAIL output %0d: %h expected %h", j + 1, d[31:16], ref_s[j+1]); end
      end
    end
    checks++;
    if (issued != exp_issued) begin failures++; $display("FAIL %0d micro-instructions, expected %0d", issued, exp_issued); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
