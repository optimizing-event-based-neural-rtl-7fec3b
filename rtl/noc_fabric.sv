// noc_fabric: the interconnect that joins the cores of a cluster.
//
// Each core's router offers at most one routed packet with its destination set. Every cycle
// the fabric grants one offer, chosen round-robin among the offers whose destinations can
// all accept a packet, and delivers it to every destination in that cycle (multicast in one
// transfer). An offer to a core whose receive FIFO is full waits, without blocking offers to
// other cores. Throughput is one packet per cycle for the whole cluster.
//
// The source shows the cores of a cluster connected through the NoC but not its topology;
// this shared, arbitrated multicast bus is the simplest structure that delivers events by
// destination and is this design's own.
module noc_fabric
  import seneca_pkg::*;
#(
  parameter int unsigned NUM_CORES = 16,
  localparam int unsigned IW       = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  src_valid [NUM_CORES],
  input  noc_pkt_t              src_pkt   [NUM_CORES],
  input  logic [NUM_CORES-1:0]  src_dest  [NUM_CORES],
  output logic                  src_ready [NUM_CORES],
  output logic                  dst_valid [NUM_CORES],
  output noc_pkt_t              dst_pkt   [NUM_CORES],
  input  logic                  dst_ready [NUM_CORES]
);

  logic [NUM_CORES-1:0] ready_mask, req;
  logic [IW-1:0]        ptr, gnt;
  logic                 any;

  always_comb begin
    for (int j = 0; j < int'(NUM_CORES); j++) ready_mask[j] = dst_ready[j];
    for (int i = 0; i < int'(NUM_CORES); i++)
      req[i] = src_valid[i] && ((src_dest[i] & ~ready_mask) == '0);
  end

  // round-robin: first request at or after ptr
  always_comb begin
    int idx;
    any = 1'b0;
    gnt = '0;
    for (int k = int'(NUM_CORES) - 1; k >= 0; k--) begin
      idx = (int'(ptr) + k) % int'(NUM_CORES);
      if (req[idx]) begin
        any = 1'b1;
        gnt = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ptr <= '0;
    else if (any) ptr <= (gnt == IW'(NUM_CORES - 1)) ? '0 : gnt + IW'(1);
  end

  always_comb begin
    for (int i = 0; i < int'(NUM_CORES); i++) src_ready[i] = any && (gnt == IW'(i));
    for (int j = 0; j < int'(NUM_CORES); j++) begin
      dst_valid[j] = any && src_dest[gnt][j];
      dst_pkt[j]   = src_pkt[gnt];
    end
  end

endmodule
