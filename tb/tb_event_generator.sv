// tb_event_generator: self-checking test of the event generator.
//
// Random vectors of eight BF16 values, with a random share of zeros (+0 and -0) and of
// small non-zero values, are offered whenever in_ready is high. Every non-zero lane must
// come out as one AER event {base + lane, value}, lowest lane first, in vector order, and no
// zero lane may. The reader pops the FIFO at random, so the FIFO fills and the scan stalls.
// Checked as well: the interrupt follows the FIFO state, an all-zero vector is absorbed
// without an event, and a vector with k non-zero lanes takes k cycles when nothing stalls.
module tb_event_generator;
  import seneca_pkg::*;

  localparam int unsigned LANES = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, ev_pop, ev_empty, irq;
  bf16_t       in_values [LANES];
  logic [15:0] in_neuron_base;
  aer_event_t  ev_out;
  logic [4:0]  ev_count;

  int checks = 0, failures = 0;
  aer_event_t exp_q [$];

  event_generator #(.LANES(LANES), .FIFO_DEPTH(16)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pop_pct = 50;
  int full_seen = 0;

  // reader
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (irq !== !ev_empty) begin failures++; $display("FAIL irq"); end
    if (ev_count == 5'd16) full_seen++;
    ev_pop = !ev_empty && (int'($urandom_range(0, 99)) < pop_pct);
    if (ev_pop) begin
      checks++;
      if (exp_q.size() == 0 || ev_out !== exp_q[0]) begin
        failures++;
        $display("FAIL event %h expected %h", ev_out, exp_q.size() ? exp_q[0] : '0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  task automatic offer(int nz_pct);
    in_neuron_base = 16'($urandom);
    for (int l = 0; l < int'(LANES); l++) begin
      if (int'($urandom_range(0, 99)) < nz_pct)
        in_values[l] = {1'($urandom), 8'($urandom_range(1, 254)), 7'($urandom)};
      else
        in_values[l] = {1'($urandom), 8'd0, 7'($urandom)};   // zero, possibly with junk fraction
    end
    for (int l = 0; l < int'(LANES); l++)
      if (in_values[l][14:7] != 0) exp_q.push_back('{neuron: in_neuron_base + 16'(l), value: in_values[l]});
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int k, c;
    in_valid = 0; ev_pop = 0; in_neuron_base = 0;
    for (int l = 0; l < int'(LANES); l++) in_values[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      while (!in_ready) @(negedge clk);
      pop_pct = ((t / 300) % 2 == 0) ? 90 : 25;
      offer((t % 7 == 0) ? 0 : int'($urandom_range(10, 90)));
    end
    // rate: reader always pops, k non-zero lanes drain in k cycles
    pop_pct = 100;
    while (!ev_empty || exp_q.size() != 0) @(negedge clk);
    while (!in_ready) @(negedge clk);
    offer(100);
    k = exp_q.size();
    c = 0;
    while (!in_ready) begin @(negedge clk); c++; end
    checks++;
    if (c != k) begin failures++; $display("FAIL drain %0d cycles for %0d events", c, k); end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || !ev_empty) begin failures++; $display("FAIL events left %0d", exp_q.size()); end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
