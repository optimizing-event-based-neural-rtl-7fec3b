// npe: one Neuron Processing Element.
//
// An NPE holds a register file of 64 16-bit words and a BF16 datapath. All NPEs of a core
// work in lock-step: the loop controller presents the same micro-instruction to every NPE in
// the same cycle (SIMD), and each NPE applies it to its own register file and its own 16-bit
// lane of the data memory. Neuron states and weights are loaded into the register file,
// updated there as often as needed (this is what spike grouping exploits) and stored back.
//
// Interface and timing: the instruction on instr/instr_valid is executed in the cycle it is
// presented; the register write takes effect at the next rising clock edge, so the next
// instruction already sees it. For OP_LD the loop controller has started the memory read one
// cycle earlier and mem_rdata carries this NPE's lane. For OP_ST, st_data is rf[ra] and is
// written to memory by the loop controller's write port in the same cycle. For OP_EVG,
// evg_valid/evg_value hand rf[ra] to the event generator. scalar[] carries the broadcast
// operands of the current task.
//
// The register file size and the BF16 data type follow the source. The instruction set,
// the single-cycle execution and the rounding of the arithmetic are this design's own.
module npe
  import seneca_pkg::*;
#(
  parameter int unsigned RF_DEPTH = RF_WORDS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        instr_valid,
  input  uinstr_t                     instr,
  input  logic [GROUP_MAX-1:0][15:0]  scalar,
  input  bf16_t                       mem_rdata,
  output bf16_t                       st_data,
  output logic                        evg_valid,
  output bf16_t                       evg_value
);

  bf16_t rf [RF_DEPTH];

  bf16_t ra_v, rb_v, rd_v, result;
  logic  wr;

  assign ra_v = rf[instr.ra];
  assign rb_v = rf[instr.rb];
  assign rd_v = rf[instr.rd];

  always_comb begin
    wr     = instr_valid;
    result = BF16_ZERO;
    unique case (instr.op)
      OP_LD:   result = mem_rdata;
      OP_SCL:  result = scalar[instr.rb[1:0]];
      OP_ADD:  result = bf16_add(ra_v, rb_v);
      OP_MUL:  result = bf16_mul(ra_v, rb_v);
      OP_MAC:  result = bf16_add(rd_v, bf16_mul(ra_v, rb_v));
      OP_MAX:  result = bf16_max(ra_v, rb_v);
      OP_THR:  result = bf16_gt(ra_v, rb_v) ? ra_v : BF16_ZERO;
      OP_CVT4: result = int4_to_bf16(ra_v[4*instr.rb[1:0] +: 4]);
      OP_CVT8: result = int8_to_bf16(ra_v[8*instr.rb[0] +: 8]);
      OP_MOV:  result = ra_v;
      OP_CLR:  result = BF16_ZERO;
      default: wr = 1'b0;   // NOP, ST, EVG write no register
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(RF_DEPTH); i++) rf[i] <= BF16_ZERO;
    end else if (wr) begin
      rf[instr.rd] <= result;
    end
  end

  assign st_data   = ra_v;
  assign evg_valid = instr_valid && (instr.op == OP_EVG);
  assign evg_value = ra_v;

endmodule
