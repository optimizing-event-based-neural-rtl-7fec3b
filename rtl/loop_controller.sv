// loop_controller: the core's dedicated controller for the NPE array.
//
// The controller (a RISC-V core) writes micro-code into the loop buffer and queues tasks in
// the task FIFO. A task names a stretch of the loop buffer (start, len), a number of loop
// iterations, up to GROUP_MAX broadcast scalars (for example the graded values of a spike
// group) and NUM_AGEN address generators (base row, stride in rows). The loop controller
// pops a task, replays its micro-code once per iteration and, for every LD/ST, computes the
// data memory row as generator + offset, so the controller does no address arithmetic and
// runs in parallel with the neural processing. After each iteration every generator advances
// by its stride and the neuron index handed to the event generator advances by NUM_NPE.
//
// Pipeline: stage 1 issues one micro-instruction per cycle from the loop buffer and, for LD,
// starts the port B read; stage 2 presents the instruction to the NPEs together with the read
// data, and for ST drives the port B write. A task of len instructions and iters iterations
// therefore occupies stage 1 for len*iters cycles, plus one cycle to pop the task. Issue of
// an EVG instruction stalls until the event generator can take a vector. Tasks with len = 0
// or iters = 0 are retired without issuing anything.
//
// The loop buffer, task FIFO, address generation and micro-code dispatch are named by the
// source; the descriptor layout, pipeline and stall rule are this design's own.
module loop_controller
  import seneca_pkg::*;
#(
  parameter int unsigned NUM_NPE    = seneca_pkg::NUM_NPE,
  parameter int unsigned TASK_DEPTH = 8,
  parameter int unsigned ROW_AW     = 14,
  localparam int unsigned TCW       = $clog2(TASK_DEPTH) + 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // loop buffer write port (controller)
  input  logic                        lb_we,
  input  logic [LB_AW-1:0]            lb_waddr,
  input  uinstr_t                     lb_wdata,
  // task FIFO push (controller)
  input  logic                        task_push,
  input  task_t                       task_in,
  output logic                        task_full,
  output logic [TCW-1:0]              task_count,
  // NPE array (stage 2)
  output logic                        npe_valid,
  output uinstr_t                     npe_instr,
  output logic [GROUP_MAX-1:0][15:0]  npe_scalar,
  // data memory port B
  output logic                        mem_re,
  output logic [ROW_AW-1:0]           mem_raddr,
  output logic                        mem_we,
  output logic [ROW_AW-1:0]           mem_waddr,
  // event generator
  input  logic                        evg_ready,
  output logic                        evg_valid,
  output logic [15:0]                 evg_neuron_base,
  // status
  output logic                        busy,
  output logic [31:0]                 tasks_done
);

  uinstr_t loop_buf [LB_DEPTH];

  always_ff @(posedge clk) begin
    if (lb_we) loop_buf[lb_waddr] <= lb_wdata;
  end

  // ---------------------------------------------------------------- task FIFO
  logic  tf_pop, tf_empty;
  task_t tf_head;

  sync_fifo #(.WIDTH($bits(task_t)), .DEPTH(TASK_DEPTH)) u_task_fifo (
    .clk, .rst_n,
    .push(task_push), .wdata(task_in),
    .pop(tf_pop), .rdata(tf_head),
    .full(task_full), .empty(tf_empty), .count(task_count)
  );

  // ---------------------------------------------------------------- stage 1
  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state;

  task_t                            cur;
  logic [LB_AW-1:0]                 pc;
  logic [15:0]                      iter;
  logic [15:0]                      neuron;
  logic [NUM_AGEN-1:0][TADDR_W-1:0] agen;

  uinstr_t           s1_instr;
  logic [TADDR_W-1:0] s1_addr;
  logic              s1_issue, s1_stall, last_instr, last_iter;

  // stage 2 registers
  logic              s2_valid;
  uinstr_t           s2_instr;
  logic [TADDR_W-1:0] s2_addr;
  logic [15:0]       s2_neuron;

  assign s1_instr   = loop_buf[pc];
  assign s1_addr    = agen[s1_instr.agen] + TADDR_W'(s1_instr.off);
  assign s1_stall   = (s1_instr.op == OP_EVG) &&
                      (!evg_ready || (s2_valid && s2_instr.op == OP_EVG));
  assign s1_issue   = (state == S_RUN) && !s1_stall;
  assign last_instr = ({1'b0, pc} == {1'b0, cur.start} + cur.len - (LB_AW+1)'(1));
  assign last_iter  = (iter == cur.iters - 16'd1);
  assign tf_pop     = (state == S_IDLE) && !tf_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      pc         <= '0;
      iter       <= '0;
      neuron     <= '0;
      agen       <= '0;
      tasks_done <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!tf_empty) begin
          cur    <= tf_head;
          pc     <= tf_head.start;
          iter   <= '0;
          neuron <= tf_head.neuron_base;
          agen   <= tf_head.base;
          if (tf_head.len == '0 || tf_head.iters == '0) tasks_done <= tasks_done + 32'd1;
          else                                            state <= S_RUN;
        end
        S_RUN: if (s1_issue) begin
          if (last_instr) begin
            pc     <= cur.start;
            iter   <= iter + 16'd1;
            neuron <= neuron + 16'(NUM_NPE);
            for (int g = 0; g < int'(NUM_AGEN); g++) agen[g] <= agen[g] + cur.stride[g];
            if (last_iter) begin
              state      <= S_IDLE;
              tasks_done <= tasks_done + 32'd1;
            end
          end else begin
            pc <= pc + LB_AW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- stage 2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid  <= 1'b0;
      s2_instr  <= '0;
      s2_addr   <= '0;
      s2_neuron <= '0;
    end else begin
      s2_valid <= s1_issue;
      if (s1_issue) begin
        s2_instr  <= s1_instr;
        s2_addr   <= s1_addr;
        s2_neuron <= neuron;
      end
    end
  end

  assign mem_re          = s1_issue && (s1_instr.op == OP_LD);
  assign mem_raddr       = s1_addr[ROW_AW-1:0];
  assign mem_we          = s2_valid && (s2_instr.op == OP_ST);
  assign mem_waddr       = s2_addr[ROW_AW-1:0];
  assign npe_valid       = s2_valid;
  assign npe_instr       = s2_instr;
  assign npe_scalar      = cur.scalar;
  assign evg_valid       = s2_valid && (s2_instr.op == OP_EVG);
  assign evg_neuron_base = s2_neuron;
  assign busy            = (state == S_RUN) || s2_valid;

endmodule
