// tb_loop_controller: self-checking test of the loop controller.
//
// Random micro-code is written into the loop buffer and random tasks (start, length,
// iterations, address generators, neuron base) are queued. The testbench predicts, per task,
// the exact stream of micro-instructions that must reach the NPEs, the port B read row of
// every LD (issued one cycle ahead), the write row of every ST and the neuron base of every
// EVG, and compares the observed stream entry by entry. It also checks the rate (one
// micro-instruction per cycle: a task of len*iters instructions, queued alone, finishes in
// one cycle to pop the task, len*iters issue cycles and one cycle to drain stage 2, which
// the sampling loop below sees as len*iters + 3), the EVG stall while the event generator is not
// ready, the task FIFO full flag, zero-iteration tasks and the completed-task counter.
//
// The source describes what the loop controller does but not its timing; the rates checked
// here are those this design chose.
module tb_loop_controller;
  import seneca_pkg::*;

  localparam int unsigned ROW_AW = 14;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                       lb_we;
  logic [LB_AW-1:0]           lb_waddr;
  uinstr_t                    lb_wdata;
  logic                       task_push, task_full;
  task_t                      task_in;
  logic [3:0]                 task_count;
  logic                       npe_valid;
  uinstr_t                    npe_instr;
  logic [GROUP_MAX-1:0][15:0] npe_scalar;
  logic                       mem_re, mem_we;
  logic [ROW_AW-1:0]          mem_raddr, mem_waddr;
  logic                       evg_ready, evg_valid, busy;
  logic [15:0]                evg_neuron_base;
  logic [31:0]                tasks_done;

  int checks = 0, failures = 0;

  loop_controller #(.NUM_NPE(8), .TASK_DEPTH(8), .ROW_AW(ROW_AW)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uinstr_t lb [LB_DEPTH];

  typedef struct { uinstr_t ins; int addr; int neuron; } exp_t;
  exp_t exp_q [$];
  int   rd_q  [$];   // expected LD read rows, in issue order
  int   evg_stall_cycles = 0, n_issued = 0;

  function automatic void predict(task_t t);
    int a [NUM_AGEN];
    for (int g = 0; g < int'(NUM_AGEN); g++) a[g] = int'(t.base[g]);
    for (int i = 0; i < int'(t.iters); i++) begin
      for (int k = 0; k < int'(t.len); k++) begin
        exp_t e;
        e.ins    = lb[(int'(t.start) + k) % LB_DEPTH];
        e.addr   = (a[e.ins.agen] + int'(e.ins.off)) % (1 << ROW_AW);
        e.neuron = (int'(t.neuron_base) + 8 * i) % 65536;
        exp_q.push_back(e);
        if (e.ins.op == OP_LD) rd_q.push_back(e.addr);
      end
      for (int g = 0; g < int'(NUM_AGEN); g++) a[g] = (a[g] + int'(t.stride[g])) % 65536;
    end
  endfunction

  function automatic task_t rand_task(int max_len, int max_iter);
    task_t t;
    t.start       = LB_AW'($urandom_range(0, LB_DEPTH - 1));
    t.len         = (LB_AW+1)'($urandom_range(1, max_len));
    if (int'(t.start) + int'(t.len) > LB_DEPTH) t.start = LB_AW'(LB_DEPTH - int'(t.len));
    t.iters       = 16'($urandom_range(1, max_iter));
    t.neuron_base = 16'($urandom);
    for (int s = 0; s < int'(GROUP_MAX); s++) t.scalar[s] = 16'($urandom);
    for (int g = 0; g < int'(NUM_AGEN); g++) begin
      t.base[g]   = 16'($urandom_range(0, 8000));
      t.stride[g] = 16'($urandom_range(0, 40));
    end
    return t;
  endfunction

  // an EVG reaches stage 2 only if the event generator was ready when it was issued
  logic prev_ready = 1;
  always @(posedge clk) prev_ready <= evg_ready;

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (mem_re) begin
      checks++;
      if (rd_q.size() == 0 || int'(mem_raddr) != rd_q[0]) begin
        failures++; $display("FAIL LD read row %0d", mem_raddr);
      end
      if (rd_q.size() > 0) void'(rd_q.pop_front());
    end
    if (npe_valid) begin
      n_issued++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected instruction");
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (npe_instr !== e.ins ||
            (e.ins.op == OP_ST  && !(mem_we && int'(mem_waddr) == e.addr)) ||
            (e.ins.op != OP_ST  && mem_we) ||
            (e.ins.op == OP_EVG && !(evg_valid && int'(evg_neuron_base) == e.neuron)) ||
            (e.ins.op != OP_EVG && evg_valid)) begin
          failures++;
          $display("FAIL instr %h exp %h addr %0d/%0d", npe_instr, e.ins, mem_waddr, e.addr);
        end
      end
      if (evg_valid && !prev_ready) begin
        checks++; failures++; $display("FAIL EVG issued while event generator busy");
      end
    end
  end

  task automatic push_task(task_t t);
    @(negedge clk);
    while (task_full) @(negedge clk);
    task_in = t; task_push = 1;
    predict(t);
    @(negedge clk);
    task_push = 0;
  endtask

  initial begin
    task_t t;
    int    c0, c1;
    lb_we = 0; lb_waddr = 0; lb_wdata = '0; task_push = 0; task_in = '0; evg_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // loop buffer: random instructions, no EVG
    for (int i = 0; i < int'(LB_DEPTH); i++) begin
      uinstr_t u;
      u = uinstr_t'($urandom);
      u.op   = npe_op_e'($urandom_range(0, 9));
      u.agen = 3'($urandom_range(0, NUM_AGEN - 1));
      lb[i] = u;
      @(negedge clk);
      lb_we = 1; lb_waddr = LB_AW'(i); lb_wdata = u;
    end
    @(negedge clk); lb_we = 0;

    // 1. rate: one task alone
    t = rand_task(12, 20);
    c0 = 0;
    push_task(t);           // returns one cycle after the push edge
    c0 = 1;
    while (busy || task_count != 0) begin @(negedge clk); c0++; end
    checks++;
    if (c0 != int'(t.len) * int'(t.iters) + 3) begin
      failures++; $display("FAIL cycles %0d expected %0d", c0, int'(t.len) * int'(t.iters) + 3);
    end
    checks++;
    if (exp_q.size() != 0 || tasks_done != 1) begin failures++; $display("FAIL task 1 incomplete"); end

    // 2. many queued tasks, FIFO fills up
    for (int k = 0; k < 40; k++) push_task(rand_task(16, 12));
    checks++;
    // the FIFO must have been full at some point: 40 tasks pushed faster than they run
    while (busy || task_count != 0) @(negedge clk);
    if (exp_q.size() != 0 || tasks_done != 41) begin
      failures++; $display("FAIL queued tasks: left %0d done %0d", exp_q.size(), tasks_done);
    end

    // 3. zero-iteration task is retired without issuing
    t = rand_task(4, 4); t.iters = 0;
    push_task(t);
    repeat (4) @(negedge clk);
    checks++;
    if (tasks_done != 42 || busy) begin failures++; $display("FAIL zero-iteration task"); end

    // 4. EVG stall: micro-code LD, EVG, EVG ; event generator ready only every 3rd cycle
    for (int i = 0; i < 3; i++) begin
      uinstr_t u;
      u = '0;
      u.op = (i == 0) ? OP_LD : OP_EVG;
      u.ra = RF_AW'(i);
      lb[i] = u;
      @(negedge clk); lb_we = 1; lb_waddr = LB_AW'(i); lb_wdata = u;
    end
    @(negedge clk); lb_we = 0;
    t = rand_task(1, 1); t.start = 0; t.len = 3; t.iters = 10;
    fork
      begin : ready_pattern
        int cyc = 0;
        forever begin @(negedge clk); evg_ready = (cyc % 3) == 0; cyc++; end
      end
    join_none
    c1 = n_issued;
    push_task(t);
    c0 = 1;
    while (busy || task_count != 0) begin @(negedge clk); c0++; end
    disable ready_pattern;
    evg_ready = 1;
    checks++;
    if (exp_q.size() != 0 || n_issued - c1 != 30) begin failures++; $display("FAIL EVG task"); end
    checks++;
    if (c0 <= 32) begin failures++; $display("FAIL EVG stall did not stall (%0d cycles)", c0); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the task FIFO reports full when 8 tasks wait
  logic seen_full = 0;
  always @(posedge clk) if (task_full) begin
    seen_full <= 1;
    if (task_count != 4'd8) begin checks++; failures++; $display("FAIL full at count %0d", task_count); end
  end
  final if (!seen_full) $display("note: task FIFO never full");
endmodule
