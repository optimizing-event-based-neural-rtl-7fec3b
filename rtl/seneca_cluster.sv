// seneca_cluster: a cluster of SENECA cores joined by the network-on-chip.
//
// NUM_CORES identical cores (16 by default, as in one cluster of the source's four-cluster
// system) share a NoC fabric. Each core's router looks up the destination cores of an
// outgoing event packet in its routing table and the fabric delivers the packet to all of
// them at once. A network is mapped layer by layer onto cores; events flow from core to core
// as each layer produces them, so later layers start before earlier ones finish.
//
// The RISC-V controller of every core is outside this module: each core's controller data
// bus and its two interrupt lines are ports of the cluster, indexed by core. See seneca_core
// for the bus protocol and address map. The cluster-shared memory with its arbiter and the
// shared-memory prefetch units are not modelled, and neither are the links between clusters.
//
// Sixteen cores per cluster and routing by table follow the source; the single shared
// multicast fabric and the port layout are this design's own choices.
module seneca_cluster
  import seneca_pkg::*;
#(
  parameter int unsigned NUM_CORES = 16,
  parameter int unsigned NUM_NPE   = seneca_pkg::NUM_NPE,
  parameter int unsigned MEM_BYTES = 262144
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bus_req    [NUM_CORES],
  input  logic         bus_we     [NUM_CORES],
  input  logic [3:0]   bus_be     [NUM_CORES],
  input  logic [31:0]  bus_addr   [NUM_CORES],
  input  logic [31:0]  bus_wdata  [NUM_CORES],
  output logic         bus_ready  [NUM_CORES],
  output logic         bus_rvalid [NUM_CORES],
  output logic [31:0]  bus_rdata  [NUM_CORES],
  output logic         irq_event  [NUM_CORES],
  output logic         irq_noc    [NUM_CORES]
);

  logic                  out_valid [NUM_CORES];
  noc_pkt_t              out_pkt   [NUM_CORES];
  logic [NUM_CORES-1:0]  out_dest  [NUM_CORES];
  logic                  out_ready [NUM_CORES];
  logic                  in_valid  [NUM_CORES];
  noc_pkt_t              in_pkt    [NUM_CORES];
  logic                  in_ready  [NUM_CORES];

  for (genvar c = 0; c < int'(NUM_CORES); c++) begin : g_core
    seneca_core #(
      .NUM_NPE(NUM_NPE), .MEM_BYTES(MEM_BYTES), .NUM_CORES(NUM_CORES), .CORE_ID(c)
    ) u_core (
      .clk, .rst_n,
      .bus_req(bus_req[c]), .bus_we(bus_we[c]), .bus_be(bus_be[c]), .bus_addr(bus_addr[c]),
      .bus_wdata(bus_wdata[c]), .bus_ready(bus_ready[c]), .bus_rvalid(bus_rvalid[c]),
      .bus_rdata(bus_rdata[c]), .irq_event(irq_event[c]), .irq_noc(irq_noc[c]),
      .noc_out_valid(out_valid[c]), .noc_out_pkt(out_pkt[c]), .noc_out_dest(out_dest[c]),
      .noc_out_ready(out_ready[c]),
      .noc_in_valid(in_valid[c]), .noc_in_pkt(in_pkt[c]), .noc_in_ready(in_ready[c])
    );
  end

  noc_fabric #(.NUM_CORES(NUM_CORES)) u_fabric (
    .clk, .rst_n,
    .src_valid(out_valid), .src_pkt(out_pkt), .src_dest(out_dest), .src_ready(out_ready),
    .dst_valid(in_valid), .dst_pkt(in_pkt), .dst_ready(in_ready)
  );

endmodule
