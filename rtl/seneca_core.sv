// seneca_core: one SENECA neuromorphic core, without its RISC-V controller.
//
// The core processes events in three overlapping phases. Event reception: a packet arrives
// from the NoC and wakes the controller (irq_noc), whose software decodes it and queues a
// task. Neural processing: the loop controller replays the task's micro-code over the NPE
// array in lock-step, moving neuron states and weights between the data memory and the NPE
// register files. Event transmission: non-zero NPE outputs become AER events in the event
// generator (irq_event), and the controller packs them into NoC packets which the router
// multicasts to the cores listed in its routing table. The controller and the loop
// controller run in parallel: queuing a task takes a few bus writes, its execution many
// cycles.
//
// The controller is not part of this module; its data bus is the bus_* port (one request per
// cycle, accepted while bus_ready; read data one cycle after acceptance on bus_rvalid). Map,
// byte addresses:
//   0x000000 + a         data memory, port A (32-bit words)
//   0x100000 + 4*i       loop buffer entry i (write)
//   0x200000 + 4*k       task descriptor staging word k, k = 0..8 (write):
//                          w0 = {iters[15:0], len[7:0], 1'b0, start[6:0]}
//                          w1 = {16'b0, neuron_base}
//                          w2 = {scalar1, scalar0}, w3 = {scalar3, scalar2}
//                          w4+g = {stride_g, base_g} for address generator g = 0..4
//   0x200100             push the staged descriptor into the task FIFO (write; waits if full)
//   0x300000             status (read): {rx_count, event_count, 7'b0, busy, task_count}
//   0x300004             pop one AER event (read): {neuron, value}
//   0x300008             number of tasks completed (read)
//   0x400000 + 4*key     routing table entry: destination core mask (write)
//   0x401000             NoC transmit key (write)
//   0x401004             NoC transmit payload (write; sends {key, payload}, waits if busy)
//   0x401008             pop one received packet (read): payload
//   0x40100C             received head packet (read, no pop): {16'b0, src, key}
// The block set, the port widths of the data memory and the interrupts follow the source; the
// address map and bus protocol are this design's own.
module seneca_core
  import seneca_pkg::*;
#(
  parameter int unsigned NUM_NPE   = seneca_pkg::NUM_NPE,
  parameter int unsigned MEM_BYTES = 262144,
  parameter int unsigned NUM_CORES = 16,
  parameter int unsigned CORE_ID   = 0,
  localparam int unsigned ROW_W    = NUM_NPE * 16,
  localparam int unsigned ROW_AW   = $clog2(MEM_BYTES * 8 / ROW_W),
  localparam int unsigned A_AW     = $clog2(MEM_BYTES / 4)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // controller data bus
  input  logic                  bus_req,
  input  logic                  bus_we,
  input  logic [3:0]            bus_be,
  input  logic [31:0]           bus_addr,
  input  logic [31:0]           bus_wdata,
  output logic                  bus_ready,
  output logic                  bus_rvalid,
  output logic [31:0]           bus_rdata,
  output logic                  irq_event,
  output logic                  irq_noc,
  // NoC fabric
  output logic                  noc_out_valid,
  output noc_pkt_t              noc_out_pkt,
  output logic [NUM_CORES-1:0]  noc_out_dest,
  input  logic                  noc_out_ready,
  input  logic                  noc_in_valid,
  input  noc_pkt_t              noc_in_pkt,
  output logic                  noc_in_ready
);

  localparam int unsigned TASK_WORDS = 4 + NUM_AGEN;

  // ------------------------------------------------------------------ bus decode
  logic [3:0]  region;
  logic [11:0] offs;
  logic        acc, acc_wr, acc_rd;
  logic        task_full, tx_ready;

  assign region = bus_addr[23:20];
  assign offs   = bus_addr[11:0];

  logic sel_mem, sel_lb, sel_task, sel_push, sel_stat, sel_rt, sel_txk, sel_txp, sel_rxp, sel_rxh;
  logic sel_evpop, sel_done;
  assign sel_mem   = (bus_addr[31:20] == 12'h000);
  assign sel_lb    = (region == 4'h1);
  assign sel_task  = (region == 4'h2) && !bus_addr[8];
  assign sel_push  = (region == 4'h2) &&  bus_addr[8];
  assign sel_stat  = (region == 4'h3) && (offs == 12'h000);
  assign sel_evpop = (region == 4'h3) && (offs == 12'h004);
  assign sel_done  = (region == 4'h3) && (offs == 12'h008);
  assign sel_rt    = (region == 4'h4) && !bus_addr[12];
  assign sel_txk   = (region == 4'h4) &&  bus_addr[12] && (offs == 12'h000);
  assign sel_txp   = (region == 4'h4) &&  bus_addr[12] && (offs == 12'h004);
  assign sel_rxp   = (region == 4'h4) &&  bus_addr[12] && (offs == 12'h008);
  assign sel_rxh   = (region == 4'h4) &&  bus_addr[12] && (offs == 12'h00C);

  assign bus_ready = !(bus_we && sel_push && task_full) && !(bus_we && sel_txp && !tx_ready);
  assign acc       = bus_req && bus_ready;
  assign acc_wr    = acc && bus_we;
  assign acc_rd    = acc && !bus_we;

  // ------------------------------------------------------------------ task staging
  logic [31:0] stage [TASK_WORDS];
  task_t       staged;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TASK_WORDS); k++) stage[k] <= '0;
    end else if (acc_wr && sel_task && (32'(bus_addr[7:2]) < TASK_WORDS)) begin
      stage[bus_addr[5:2]] <= bus_wdata;
    end
  end

  always_comb begin
    staged             = '0;
    staged.start       = stage[0][LB_AW-1:0];
    staged.len         = stage[0][8 +: LB_AW+1];
    staged.iters       = stage[0][31:16];
    staged.neuron_base = stage[1][15:0];
    staged.scalar[0]   = stage[2][15:0];
    staged.scalar[1]   = stage[2][31:16];
    staged.scalar[2]   = stage[3][15:0];
    staged.scalar[3]   = stage[3][31:16];
    for (int g = 0; g < int'(NUM_AGEN); g++) begin
      staged.base[g]   = stage[4+g][15:0];
      staged.stride[g] = stage[4+g][31:16];
    end
  end

  // ------------------------------------------------------------------ data memory
  logic                  lc_re, lc_we;
  logic [ROW_AW-1:0]     lc_raddr, lc_waddr;
  logic [ROW_W-1:0]      b_rdata, b_wdata;
  logic [31:0]           a_rdata;

  data_memory #(.NUM_NPE(NUM_NPE), .MEM_BYTES(MEM_BYTES)) u_dmem (
    .clk,
    .a_en(acc && sel_mem), .a_we(bus_we), .a_be(bus_be),
    .a_addr(bus_addr[A_AW+1:2]), .a_wdata(bus_wdata), .a_rdata(a_rdata),
    .b_re(lc_re), .b_raddr(lc_raddr), .b_rdata(b_rdata),
    .b_we(lc_we), .b_waddr(lc_waddr), .b_wmask({NUM_NPE{1'b1}}), .b_wdata(b_wdata)
  );

  // ------------------------------------------------------------------ loop controller
  logic                        npe_valid;
  uinstr_t                     npe_instr;
  logic [GROUP_MAX-1:0][15:0]  npe_scalar;
  logic                        evg_ready, evg_valid, lc_busy;
  logic [15:0]                 evg_base;
  logic [3:0]                  task_count;
  logic [31:0]                 tasks_done;

  loop_controller #(.NUM_NPE(NUM_NPE), .TASK_DEPTH(8), .ROW_AW(ROW_AW)) u_lc (
    .clk, .rst_n,
    .lb_we(acc_wr && sel_lb), .lb_waddr(bus_addr[LB_AW+1:2]), .lb_wdata(uinstr_t'(bus_wdata)),
    .task_push(acc_wr && sel_push), .task_in(staged),
    .task_full(task_full), .task_count(task_count),
    .npe_valid, .npe_instr, .npe_scalar,
    .mem_re(lc_re), .mem_raddr(lc_raddr), .mem_we(lc_we), .mem_waddr(lc_waddr),
    .evg_ready, .evg_valid, .evg_neuron_base(evg_base),
    .busy(lc_busy), .tasks_done
  );

  // ------------------------------------------------------------------ NPE array
  bf16_t evg_vals [NUM_NPE];

  for (genvar n = 0; n < int'(NUM_NPE); n++) begin : g_npe
    bf16_t st_data;
    logic  unused_evg_valid;
    npe u_npe (
      .clk, .rst_n,
      .instr_valid(npe_valid), .instr(npe_instr), .scalar(npe_scalar),
      .mem_rdata(b_rdata[16*n +: 16]), .st_data(st_data),
      .evg_valid(unused_evg_valid), .evg_value(evg_vals[n])
    );
    assign b_wdata[16*n +: 16] = st_data;
  end

  // ------------------------------------------------------------------ event generator
  aer_event_t ev_out;
  logic       ev_empty;
  logic [4:0] ev_count;

  event_generator #(.LANES(NUM_NPE), .FIFO_DEPTH(16)) u_evg (
    .clk, .rst_n,
    .in_valid(evg_valid), .in_values(evg_vals), .in_neuron_base(evg_base), .in_ready(evg_ready),
    .ev_pop(acc_rd && sel_evpop && !ev_empty), .ev_out(ev_out), .ev_empty(ev_empty),
    .ev_count(ev_count), .irq(irq_event)
  );

  // ------------------------------------------------------------------ NoC router
  logic [KEY_W-1:0] tx_key;
  noc_pkt_t         rx_pkt;
  logic             rx_empty;
  logic [4:0]       rx_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  tx_key <= '0;
    else if (acc_wr && sel_txk)  tx_key <= bus_wdata[KEY_W-1:0];
  end

  noc_router #(.NUM_CORES(NUM_CORES), .CORE_ID(CORE_ID), .RX_DEPTH(16)) u_noc (
    .clk, .rst_n,
    .rt_we(acc_wr && sel_rt), .rt_waddr(bus_addr[KEY_W+1:2]), .rt_wdata(bus_wdata[NUM_CORES-1:0]),
    .tx_valid(acc_wr && sel_txp), .tx('{key: tx_key, payload: bus_wdata}), .tx_ready(tx_ready),
    .out_valid(noc_out_valid), .out_pkt(noc_out_pkt), .out_dest(noc_out_dest),
    .out_ready(noc_out_ready),
    .in_valid(noc_in_valid), .in_pkt(noc_in_pkt), .in_ready(noc_in_ready),
    .rx_pop(acc_rd && sel_rxp && !rx_empty), .rx_pkt(rx_pkt), .rx_empty(rx_empty),
    .rx_count(rx_count), .irq(irq_noc)
  );

  // ------------------------------------------------------------------ read return
  logic        rd_mem;
  logic [31:0] rd_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rvalid <= 1'b0;
      rd_mem     <= 1'b0;
      rd_hold    <= '0;
    end else begin
      bus_rvalid <= acc_rd;
      rd_mem     <= acc_rd && sel_mem;
      if (acc_rd) begin
        unique case (1'b1)
          sel_stat:  rd_hold <= {3'b0, rx_count, 3'b0, ev_count, 7'b0, lc_busy, 4'b0, task_count};
          sel_evpop: rd_hold <= ev_out;
          sel_done:  rd_hold <= tasks_done;
          sel_rxp:   rd_hold <= rx_pkt.payload;
          sel_rxh:   rd_hold <= {16'b0, rx_pkt.src, rx_pkt.key};
          default:   rd_hold <= '0;
        endcase
      end
    end
  end

  assign bus_rdata = rd_mem ? a_rdata : rd_hold;

endmodule
