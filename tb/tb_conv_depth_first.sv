// tb_conv_depth_first: an event-driven, depth-first 3x3 convolution layer on one core.
//
// The first layer of the gesture/digit CNN (CONV 8c3-2p: eight 3x3 kernels on a 40x40
// single-channel frame, stride 1, then 2x2 max pooling) runs as the architecture's
// depth-first scheme does. The eight output channels of one pixel fill the eight NPE lanes of
// one data memory row. The neuron states are kept for only K+1 = 4 output lines, used as a
// circular buffer, instead of for the whole 40x40x8 map:
//   * input events arrive row by row; before input row y is processed, the line slot of
//     output row y+1 is initialised with the channel biases (a copy task);
//   * each input event (x, y, value) becomes one task: the controller computes the row
//     addresses of the three output lines it touches and the task updates the 3x3
//     neighbourhood for all eight channels (LD state, LD weights, CVT4, MAC, ST);
//   * once output rows 2p and 2p+1 are complete (input row 2p+2 done, or the end of the
//     frame), a pooling task takes the 2x2 maximum, applies FATReLU and hands the pooled
//     vector to the event generator; the resulting AER events are the layer's output.
// A column of margin on both sides of each line absorbs the updates of the zero padding.
// Every output event must equal a double-precision reference with BF16 truncation after each
// operation, and every port B write must fall inside the four-line state buffer. The layer
// shape, int4 weights with a power-of-two scale and the K+1-line buffer follow the
// architecture; the padding, the thresholds, the input sparsity and the task layout are
// this testbench's own.
module tb_conv_depth_first;
  import seneca_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 40, H = 40, C = 8, PW = W / 2, PH = H / 2;
  localparam int LINES  = 4;                  // K + 1
  localparam int LW     = W + 2;              // line width with margins
  localparam int S_BASE = 64;                 // state row of (slot, col): S_BASE + slot*LW + col
  localparam int B_ROW  = 40;                 // channel biases
  localparam int W_ROW  = 48;                 // weights: row W_ROW + ky*3 + kx, lane = channel
  localparam logic [15:0] SCALE = 16'h3e00;   // 2^-3
  localparam logic [15:0] THR   = 16'h3f00;   // 0.5

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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every state write must stay inside the K+1 line buffer
  int bad_writes = 0, state_writes = 0;
  always @(posedge clk)
    if (rst_n && dut.lc_we) begin
      state_writes++;
      if (int'(dut.lc_waddr) < S_BASE || int'(dut.lc_waddr) >= S_BASE + LINES * LW) bad_writes++;
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

  task automatic push_task(int start, int len, int iters, int nbase, logic [15:0] sc [4],
                           int base [5], int stride [5]);
    wr(32'h0020_0000, {16'(iters), 8'(len), 1'b0, 7'(start)});
    wr(32'h0020_0004, 32'(nbase));
    wr(32'h0020_0008, {sc[1], sc[0]});
    wr(32'h0020_000C, {sc[3], sc[2]});
    for (int g = 0; g < 5; g++) wr(32'h0020_0010 + 32'(4 * g), {16'(stride[g]), 16'(base[g])});
    wr(32'h0020_0100, 32'd1);
  endtask

  // ---------------------------------------------------------------- micro-code
  int lb_n;
  int conv_start, conv_len, init_start, init_len, pool_start, pool_len;

  task automatic put(logic [31:0] u);
    wr(32'h0010_0000 + 32'(4 * lb_n), u);
    lb_n++;
  endtask

  // conv: agen0/1/2 = output lines y-1, y, y+1 at column x-1 (margin-shifted);
  // agen3 = weight rows. Output line y+1-ky, column x+1-kx takes weight (ky, kx).
  task automatic load_microcode();
    lb_n = 0;
    conv_start = lb_n;
    put(ui(OP_SCL, 8, 0, 0, 0, 0));                                   // v = value*scale
    for (int a = 0; a < 3; a++)
      for (int j = 0; j < 3; j++) begin
        put(ui(OP_LD, 0, 0, 0, a, j));                                // state
        put(ui(OP_LD, 9, 0, 0, 3, (2 - a) * 3 + (2 - j)));            // ky = 2-a, kx = 2-j
        put(ui(OP_CVT4, 10, 9, 0, 0, 0));
        put(ui(OP_MAC, 0, 8, 10, 0, 0));
        put(ui(OP_ST, 0, 0, 0, a, j));
      end
    conv_len = lb_n - conv_start;
    // line initialisation: copy the bias row into every column of a line slot
    init_start = lb_n;
    put(ui(OP_LD, 1, 0, 0, 1, 0));
    put(ui(OP_ST, 0, 1, 0, 0, 0));
    init_len = lb_n - init_start;
    // pooling: agen0 = upper line, agen1 = lower line, two columns per iteration
    pool_start = lb_n;
    put(ui(OP_LD, 0, 0, 0, 0, 0));
    put(ui(OP_LD, 1, 0, 0, 0, 1));
    put(ui(OP_LD, 2, 0, 0, 1, 0));
    put(ui(OP_LD, 3, 0, 0, 1, 1));
    put(ui(OP_MAX, 4, 0, 1, 0, 0));
    put(ui(OP_MAX, 5, 2, 3, 0, 0));
    put(ui(OP_MAX, 6, 4, 5, 0, 0));
    put(ui(OP_SCL, 7, 0, 0, 0, 0));
    put(ui(OP_THR, 11, 6, 7, 0, 0));
    put(ui(OP_EVG, 0, 11, 0, 0, 0));
    pool_len = lb_n - pool_start;
  endtask

  // ---------------------------------------------------------------- network and reference
  logic [3:0]  wk   [3][3][C];
  logic [15:0] bias [C];
  logic [15:0] img  [H][W];
  logic [15:0] ref_o [H][W][C];     // full reference map (the hardware keeps only 4 lines)
  logic [31:0] exp_ev [$];
  int n_events_in = 0, n_events_out = 0, n_tasks = 0, max_pool_hits = 0;

  function automatic int slot_row(int oy, int col);
    return S_BASE + (((oy % LINES) + LINES) % LINES) * LW + col;
  endfunction

  task automatic drain_events();
    logic [31:0] st, ev;
    forever begin
      rd(32'h0030_0000, st);
      if (st[23:16] != 0) begin
        rd(32'h0030_0004, ev);
        checks++;
        if (exp_ev.size() == 0 || ev !== exp_ev[0]) begin
          failures++; $display("FAIL event %h expected %h", ev, exp_ev.size() ? exp_ev[0] : 0);
        end
        if (exp_ev.size()) void'(exp_ev.pop_front());
        n_events_out++;
      end else if (!st[8] && st[3:0] == 0) begin
        break;
      end
    end
  endtask

  task automatic init_line(int oy);
    logic [15:0] sc [4];
    int base [5], stride [5];
    for (int s = 0; s < 4; s++) sc[s] = 16'h0;
    for (int g = 0; g < 5; g++) begin base[g] = 0; stride[g] = 0; end
    base[0] = slot_row(oy, 0); stride[0] = 1;
    base[1] = B_ROW;
    push_task(init_start, init_len, LW, 0, sc, base, stride);
    n_tasks++;
  endtask

  task automatic conv_event(int x, int y, logic [15:0] v);
    logic [15:0] sc [4];
    int base [5], stride [5];
    for (int s = 0; s < 4; s++) sc[s] = 16'h0;
    sc[0] = ref_mul(v, SCALE);
    for (int g = 0; g < 5; g++) stride[g] = 0;
    base[0] = slot_row(y - 1, x);       // column x-1 plus the margin
    base[1] = slot_row(y, x);
    base[2] = slot_row(y + 1, x);
    base[3] = W_ROW;
    base[4] = 0;
    push_task(conv_start, conv_len, 1, 0, sc, base, stride);
    n_tasks++;
    n_events_in++;
    // reference: the same updates in the same order
    for (int a = 0; a < 3; a++)
      for (int j = 0; j < 3; j++) begin
        int oy, ox;
        oy = y - 1 + a; ox = x - 1 + j;
        if (oy >= 0 && oy < H && ox >= 0 && ox < W)
          for (int c = 0; c < C; c++)
            ref_o[oy][ox][c] = ref_add(ref_o[oy][ox][c], ref_mul(sc[0], ref_int4(wk[2 - a][2 - j][c])));
      end
  endtask

  task automatic pool_pair(int p);
    logic [15:0] sc [4];
    int base [5], stride [5];
    for (int s = 0; s < 4; s++) sc[s] = THR;
    for (int g = 0; g < 5; g++) begin base[g] = 0; stride[g] = 0; end
    base[0] = slot_row(2 * p, 1);     stride[0] = 2;
    base[1] = slot_row(2 * p + 1, 1); stride[1] = 2;
    for (int px = 0; px < PW; px++)
      for (int c = 0; c < C; c++) begin
        logic [15:0] m, q [4];
        int k;
        q[0] = ref_o[2*p][2*px][c];   q[1] = ref_o[2*p][2*px+1][c];
        q[2] = ref_o[2*p+1][2*px][c]; q[3] = ref_o[2*p+1][2*px+1][c];
        m = q[0]; k = 0;
        for (int i = 1; i < 4; i++) if (bf2r(q[i]) > bf2r(m)) begin m = q[i]; k = i; end
        if (k != 0) max_pool_hits++;
        if (bf2r(m) > bf2r(THR)) exp_ev.push_back({16'((p * PW + px) * C + c), m});
      end
    push_task(pool_start, pool_len, PW, p * PW * C, sc, base, stride);
    n_tasks++;
    drain_events();
  endtask

  initial begin
    logic [15:0] lanes [8];
    int cyc0;
    bus_req = 0; bus_we = 0; bus_be = 0; bus_addr = 0; bus_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int ky = 0; ky < 3; ky++)
      for (int kx = 0; kx < 3; kx++) begin
        for (int c = 0; c < C; c++) begin
          wk[ky][kx][c] = 4'($urandom_range(0, 15));
          lanes[c] = {12'd0, wk[ky][kx][c]};
        end
        write_row(W_ROW + ky * 3 + kx, lanes);
      end
    for (int c = 0; c < C; c++) begin bias[c] = rand_bf(-2, 0); lanes[c] = bias[c]; end
    write_row(B_ROW, lanes);
    // a frame: pixels below a threshold are dropped, about 30 percent remain
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = ($urandom_range(0, 99) < 30) ? (rand_bf(-1, 2) & 16'h7fff) : 16'h0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) for (int c = 0; c < C; c++) ref_o[y][x][c] = bias[c];
    load_microcode();

    cyc0 = $time / 10;
    init_line(0);
    init_line(1);
    for (int y = 0; y < H; y++) begin
      if (y + 1 < H) init_line(y + 1);
      for (int x = 0; x < W; x++) if (img[y][x] != 16'h0) conv_event(x, y, img[y][x]);
      // output row y-1 is complete now; pool a finished pair of lines
      if (y >= 2 && (y - 1) % 2 == 1) pool_pair((y - 1) / 2);
    end
    pool_pair(PH - 1);
    $display("%0d input events, %0d output events, %0d tasks, %0d cycles",
             n_events_in, n_events_out, n_tasks, $time / 10 - cyc0);
    $display("state memory: %0d bytes in %0d lines (a full map would take %0d bytes)",
             LINES * LW * 16, LINES, H * W * C * 2);

    checks++;
    if (exp_ev.size() != 0) begin failures++; $display("FAIL %0d events missing", exp_ev.size()); end
    checks++;
    if (bad_writes != 0 || state_writes == 0) begin
      failures++; $display("FAIL %0d of %0d state writes outside the line buffer", bad_writes, state_writes);
    end
    checks++;
    if (n_events_out == 0 || max_pool_hits == 0) begin
      failures++; $display("FAIL no output events (%0d) or pooling never picked a later input", n_events_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
