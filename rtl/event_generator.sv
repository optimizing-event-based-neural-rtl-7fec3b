// event_generator: turns NPE outputs into address-event (AER) records.
//
// When the loop controller executes an EVG micro-instruction, every NPE presents one 16-bit
// value and the loop controller gives the neuron index of NPE 0. The event generator captures
// that vector, then emits one event per cycle for each non-zero lane, lowest lane first:
// {neuron = base + lane, value}. Zero lanes (+0 or -0) produce nothing, which is how
// activation sparsity removes work further down the network. Events wait in a FIFO for the
// controller; irq is high while the FIFO holds an event, which is the wake-up signal for
// the event-transmission software.
//
// Timing: in_ready is high when no captured vector is still being scanned; a vector with k
// non-zero lanes is drained in k cycles (fewer than NUM_NPE when sparse), stalling only while
// the FIFO is full. ev_pop removes the head event (show-ahead on ev_out).
//
// The conversion of non-zero NPE outputs to AER events and the interrupt follow the source;
// the scan order, rate and FIFO depth are this design's own.
module event_generator
  import seneca_pkg::*;
#(
  parameter int unsigned LANES      = seneca_pkg::NUM_NPE,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned LW        = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  bf16_t              in_values [LANES],
  input  logic [15:0]        in_neuron_base,
  output logic               in_ready,
  input  logic               ev_pop,
  output aer_event_t         ev_out,
  output logic               ev_empty,
  output logic [CW-1:0]      ev_count,
  output logic               irq
);

  bf16_t            vals [LANES];
  logic [LANES-1:0] pending;
  logic [15:0]      base;

  logic             found;
  logic [LW-1:0]    sel;
  logic             ff_full, push;
  aer_event_t       ev_new;

  // lowest pending lane
  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int l = int'(LANES) - 1; l >= 0; l--) begin
      if (pending[l]) begin
        found = 1'b1;
        sel   = LW'(l);
      end
    end
  end

  assign in_ready      = (pending == '0);
  assign push          = found && !ff_full;
  assign ev_new.neuron = base + 16'(sel);
  assign ev_new.value  = vals[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      base    <= '0;
      for (int l = 0; l < int'(LANES); l++) vals[l] <= BF16_ZERO;
    end else if (in_valid && in_ready) begin
      base <= in_neuron_base;
      for (int l = 0; l < int'(LANES); l++) begin
        vals[l]    <= in_values[l];
        pending[l] <= !bf16_is_zero(in_values[l]);
      end
    end else if (push) begin
      pending[sel] <= 1'b0;
    end
  end

  sync_fifo #(.WIDTH($bits(aer_event_t)), .DEPTH(FIFO_DEPTH)) u_ev_fifo (
    .clk, .rst_n,
    .push(push), .wdata(ev_new),
    .pop(ev_pop), .rdata(ev_out),
    .full(ff_full), .empty(ev_empty), .count(ev_count)
  );

  assign irq = !ev_empty;

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $error("event_generator: vector offered while busy");

endmodule
