// seneca_pkg: types, constants and BF16 arithmetic shared by the SENECA core blocks.
//
// The core computes on 16-bit BrainFloat (BF16) neuron states: 1 sign bit, 8 exponent bits
// (bias 127) and 7 fraction bits. The arithmetic functions here are the NPE datapath. They
// round toward zero (truncate), flush subnormal inputs and results to zero and turn exponent
// overflow into infinity; NaN is not distinguished from infinity. The rounding mode and the
// subnormal/NaN policy are this design's own choice: the source only states that BF16 is the
// format of neuron states and that weights are 4-bit integers with a per-layer power of two
// scale (8-bit in the larger object-detection network), which the int4 and int8 conversions
// below support.
//
// Also defined: the 32-bit micro-instruction the loop controller broadcasts to all NPEs, the
// task descriptor the controller queues for the loop controller, the address-event (AER)
// record produced by the event generator and the NoC packet.
package seneca_pkg;

  // Core shape. Eight NPEs per core, 16 bits of data memory per NPE, a 64-word register file.
  parameter int unsigned NUM_NPE   = 8;
  parameter int unsigned DATA_W    = 16;
  parameter int unsigned RF_WORDS  = 64;
  parameter int unsigned RF_AW     = 6;
  // Up to four spikes share one event (spike grouping), so a task carries up to four scalars
  // and one address generator per grouped weight row plus one for the neuron states.
  parameter int unsigned GROUP_MAX = 4;
  parameter int unsigned NUM_AGEN  = GROUP_MAX + 1;
  // Loop buffer size (micro-instructions) and width of task address fields.
  parameter int unsigned LB_DEPTH  = 128;
  parameter int unsigned LB_AW     = 7;
  parameter int unsigned TADDR_W   = 16;
  // Width of a core identifier in NoC packets and of a routing key.
  parameter int unsigned CORE_ID_W = 8;
  parameter int unsigned KEY_W     = 8;

  typedef logic [15:0] bf16_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // no operation
    OP_LD   = 4'd1,   // rf[rd] <= data memory lane at agen+off
    OP_ST   = 4'd2,   // data memory lane at agen+off <= rf[ra]
    OP_SCL  = 4'd3,   // rf[rd] <= task scalar[rb[1:0]] (broadcast operand)
    OP_ADD  = 4'd4,   // rf[rd] <= rf[ra] + rf[rb]
    OP_MUL  = 4'd5,   // rf[rd] <= rf[ra] * rf[rb]
    OP_MAC  = 4'd6,   // rf[rd] <= rf[rd] + rf[ra] * rf[rb]
    OP_MAX  = 4'd7,   // rf[rd] <= max(rf[ra], rf[rb])            (max pooling)
    OP_THR  = 4'd8,   // rf[rd] <= rf[ra] > rf[rb] ? rf[ra] : 0   (FATReLU, threshold in rb)
    OP_CVT4 = 4'd9,   // rf[rd] <= int4 nibble rb[1:0] of rf[ra] as BF16
    OP_EVG  = 4'd10,  // present rf[ra] to the event generator
    OP_MOV  = 4'd11,  // rf[rd] <= rf[ra]
    OP_CLR  = 4'd12,  // rf[rd] <= +0
    OP_CVT8 = 4'd13   // rf[rd] <= int8 byte rb[0] of rf[ra] as BF16
  } npe_op_e;

  typedef struct packed {
    npe_op_e           op;
    logic [RF_AW-1:0]  rd;
    logic [RF_AW-1:0]  ra;
    logic [RF_AW-1:0]  rb;
    logic [2:0]        agen;  // address generator used by LD/ST
    logic [6:0]        off;   // row offset added to that generator
  } uinstr_t;                 // 32 bits

  typedef struct packed {
    logic [LB_AW-1:0]                start;        // first loop buffer entry
    logic [LB_AW:0]                  len;          // micro-instructions per iteration
    logic [15:0]                     iters;        // loop iterations
    logic [15:0]                     neuron_base;  // neuron index of NPE 0 in iteration 0
    logic [GROUP_MAX-1:0][15:0]      scalar;       // broadcast operands (e.g. spike values)
    logic [NUM_AGEN-1:0][TADDR_W-1:0] base;        // address generator start rows
    logic [NUM_AGEN-1:0][TADDR_W-1:0] stride;      // address generator increments
  } task_t;

  typedef struct packed {
    logic [15:0] neuron;
    bf16_t       value;
  } aer_event_t;

  typedef struct packed {
    logic [KEY_W-1:0] key;
    logic [31:0]      payload;
  } noc_tx_t;

  typedef struct packed {
    logic [CORE_ID_W-1:0] src;
    logic [KEY_W-1:0]     key;
    logic [31:0]          payload;
  } noc_pkt_t;

  localparam bf16_t BF16_ZERO = 16'h0000;

  function automatic logic bf16_is_zero(bf16_t a);
    return a[14:7] == 8'd0;
  endfunction

  // Signed-magnitude to an unsigned key that orders like the real numbers.
  function automatic logic [15:0] bf16_key(bf16_t a);
    return a[15] ? ~a : (a | 16'h8000);
  endfunction

  function automatic logic bf16_gt(bf16_t a, bf16_t b);
    bf16_t fa, fb;
    fa = bf16_is_zero(a) ? {a[15], 15'd0} : a;
    fb = bf16_is_zero(b) ? {b[15], 15'd0} : b;
    return bf16_key(fa) > bf16_key(fb);
  endfunction

  function automatic bf16_t bf16_max(bf16_t a, bf16_t b);
    return bf16_gt(b, a) ? b : a;
  endfunction

  function automatic bf16_t bf16_mul(bf16_t a, bf16_t b);
    logic        s;
    logic [15:0] p;
    logic [6:0]  frac;
    logic [9:0]  e;
    s = a[15] ^ b[15];
    if (a[14:7] == 8'hFF || b[14:7] == 8'hFF) return {s, 8'hFF, 7'd0};
    if (a[14:7] == 8'd0 || b[14:7] == 8'd0) return {s, 15'd0};
    p = {8'd0, 1'b1, a[6:0]} * {8'd0, 1'b1, b[6:0]};
    e = {2'b00, a[14:7]} + {2'b00, b[14:7]} + {9'd0, p[15]};
    frac = p[15] ? p[14:8] : p[13:7];
    if (e <= 10'd127) return {s, 15'd0};           // underflow
    if (e >= 10'd382) return {s, 8'hFF, 7'd0};     // overflow
    e = e - 10'd127;
    return {s, e[7:0], frac};
  endfunction

  function automatic bf16_t bf16_add(bf16_t a, bf16_t b);
    bf16_t       x, y;
    logic [7:0]  d;
    logic [23:0] mx, my, sh, lost_mask;
    logic [24:0] r;
    logic        lost;
    int          p;
    logic [9:0]  e;
    logic [24:0] rn;
    if (a[14:7] == 8'hFF) return {a[15], 8'hFF, 7'd0};
    if (b[14:7] == 8'hFF) return {b[15], 8'hFF, 7'd0};
    if (bf16_is_zero(a) && bf16_is_zero(b)) return {a[15] & b[15], 15'd0};
    if (bf16_is_zero(a)) return b;
    if (bf16_is_zero(b)) return a;
    // x is the operand of larger magnitude
    if (a[14:0] >= b[14:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    d  = x[14:7] - y[14:7];
    mx = {1'b1, x[6:0], 16'd0};
    my = {1'b1, y[6:0], 16'd0};
    if (d >= 8'd24) begin
      sh   = 24'd0;
      lost = 1'b1;
    end else begin
      sh        = my >> d;
      lost_mask = (24'd1 << d) - 24'd1;
      lost      = |(my & lost_mask);
    end
    if (x[15] == y[15]) r = {1'b0, mx} + {1'b0, sh};
    else                r = {1'b0, mx} - {1'b0, sh} - {24'd0, lost};
    if (r == 25'd0) return BF16_ZERO;
    p = 0;
    for (int i = 0; i < 25; i++) if (r[i]) p = i;
    // the leading one of mx sits at bit 23
    rn = r << (24 - p);
    e  = {2'b00, x[14:7]} + 10'(p) - 10'd23;
    if (p < 23 && {2'b00, x[14:7]} <= 10'(23 - p)) return {x[15], 15'd0};  // underflow
    if (e >= 10'd255) return {x[15], 8'hFF, 7'd0};
    return {x[15], e[7:0], rn[23:17]};
  endfunction

  // Signed 4-bit integer weight to BF16 (exact).
  function automatic bf16_t int4_to_bf16(logic [3:0] n);
    logic [3:0] mag;
    logic [7:0] m;
    int         p;
    mag = n[3] ? (4'd0 - n) : n;
    if (mag == 4'd0) return BF16_ZERO;
    p = 0;
    for (int i = 0; i < 4; i++) if (mag[i]) p = i;
    m = {4'd0, mag} << (7 - p);
    return {n[3], 8'(127 + p), m[6:0]};
  endfunction

  // Signed 8-bit integer weight to BF16 (exact: |n| <= 128 fits the 8-bit significand).
  function automatic bf16_t int8_to_bf16(logic [7:0] n);
    logic [7:0] mag;
    logic [7:0] m;
    int         p;
    mag = n[7] ? (8'd0 - n) : n;
    if (mag == 8'd0) return BF16_ZERO;
    p = 0;
    for (int i = 0; i < 8; i++) if (mag[i]) p = i;
    m = mag << (7 - p);
    return {n[7], 8'(127 + p), m[6:0]};
  endfunction

endpackage
