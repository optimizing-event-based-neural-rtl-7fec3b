// noc_router: a core's network-on-chip interface with its routing table.
//
// Outgoing: the controller hands over an event packet {key, 32-bit payload}. The routing
// table maps the key to the set of destination cores (a bit mask, so one packet can be
// multicast to several cores, including this core). The routed packet, stamped with this
// core's identifier, is held in an output register until the fabric takes it; a key whose
// destination set is empty drops the packet. The controller rewrites table entries at any
// time through rt_we, so routes can change while the network runs.
//
// Incoming: packets from the fabric enter a receive FIFO; irq is high while it holds a
// packet, waking the controller for event reception. in_ready is low while the FIFO is full,
// which back-pressures the fabric.
//
// Timing: tx is accepted when tx_ready; the routed packet is offered on out_* from the next
// cycle. The table lookup, multicast and the FIFO towards the controller follow the source;
// the key width, table size, mask format and drop rule are this design's own.
module noc_router
  import seneca_pkg::*;
#(
  parameter int unsigned NUM_CORES = 16,
  parameter int unsigned CORE_ID   = 0,
  parameter int unsigned RX_DEPTH  = 16,
  localparam int unsigned RT_ENTRIES = 2 ** KEY_W,
  localparam int unsigned CW         = $clog2(RX_DEPTH) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // routing table write (controller)
  input  logic                   rt_we,
  input  logic [KEY_W-1:0]       rt_waddr,
  input  logic [NUM_CORES-1:0]   rt_wdata,
  // transmit (controller)
  input  logic                   tx_valid,
  input  noc_tx_t                tx,
  output logic                   tx_ready,
  // to fabric
  output logic                   out_valid,
  output noc_pkt_t               out_pkt,
  output logic [NUM_CORES-1:0]   out_dest,
  input  logic                   out_ready,
  // from fabric
  input  logic                   in_valid,
  input  noc_pkt_t               in_pkt,
  output logic                   in_ready,
  // receive (controller)
  input  logic                   rx_pop,
  output noc_pkt_t               rx_pkt,
  output logic                   rx_empty,
  output logic [CW-1:0]          rx_count,
  output logic                   irq
);

  logic [NUM_CORES-1:0] rt [RT_ENTRIES];
  logic [NUM_CORES-1:0] dest;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(RT_ENTRIES); i++) rt[i] <= '0;
    end else if (rt_we) begin
      rt[rt_waddr] <= rt_wdata;
    end
  end

  assign dest     = rt[tx.key];
  assign tx_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pkt   <= '0;
      out_dest  <= '0;
    end else if (tx_ready) begin
      out_valid <= tx_valid && (dest != '0);
      if (tx_valid) begin
        out_pkt  <= '{src: CORE_ID_W'(CORE_ID), key: tx.key, payload: tx.payload};
        out_dest <= dest;
      end
    end
  end

  logic rx_full;

  sync_fifo #(.WIDTH($bits(noc_pkt_t)), .DEPTH(RX_DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .push(in_valid), .wdata(in_pkt),
    .pop(rx_pop), .rdata(rx_pkt),
    .full(rx_full), .empty(rx_empty), .count(rx_count)
  );

  assign in_ready = !rx_full;
  assign irq      = !rx_empty;

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $error("noc_router: packet delivered to a full receive FIFO");

endmodule
