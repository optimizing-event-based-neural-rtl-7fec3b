// tb_npe: self-checking test of one NPE.
//
// Random BF16 operands are loaded through the memory lane (OP_LD); every arithmetic
// instruction is executed and its result read back with OP_ST and compared with the double
// precision reference of tb_ref_pkg. Also checked: broadcast scalars (OP_SCL), int4 and int8 weight
// conversion, FATReLU thresholding, max, move/clear and the event-generator output (OP_EVG).
// Every instruction completes in one cycle, so the next instruction sees its result.
//
// The 64-word register file and BF16 numbers follow the source; the instruction set and
// round-toward-zero arithmetic being checked are this design's own.
module tb_npe;
  import seneca_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                       instr_valid;
  uinstr_t                    instr;
  logic [GROUP_MAX-1:0][15:0] scalar;
  bf16_t                      mem_rdata, st_data, evg_value;
  logic                       evg_valid;

  int checks = 0, failures = 0;

  npe dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(npe_op_e op, int rd, int ra, int rb, bf16_t mdata = 0);
    instr       = '0;
    instr.op    = op;
    instr.rd    = RF_AW'(rd);
    instr.ra    = RF_AW'(ra);
    instr.rb    = RF_AW'(rb);
    mem_rdata   = mdata;
    instr_valid = 1'b1;
    @(posedge clk);
    #1;
    instr_valid = 1'b0;
  endtask

  task automatic expect_reg(int r, bf16_t exp, string what);
    instr       = '0;
    instr.op    = OP_ST;
    instr.ra    = RF_AW'(r);
    instr_valid = 1'b1;
    #1;
    checks++;
    if (st_data !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, st_data, exp);
    end
    @(posedge clk);
    #1;
    instr_valid = 1'b0;
  endtask

  initial begin
    bf16_t a, b, c, exp_mac;
    int    k;
    instr_valid = 0; instr = '0; mem_rdata = 0;
    for (int i = 0; i < GROUP_MAX; i++) scalar[i] = 16'(16'h3f80 + i * 16'h0080);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // reset clears the register file
    expect_reg(63, 16'h0000, "reset");

    for (int t = 0; t < 3000; t++) begin
      a = rand_bf(-20, 20);
      b = (t % 5 == 0) ? rand_bf(-2, 2) : rand_bf(-20, 20);
      if (t % 3 == 0) b = {~a[15], a[14:7], 7'($urandom)};      // near cancellation
      if (t % 17 == 0) b = {~a[15], a[14:0]};                   // exact cancellation
      if (t % 23 == 0) b = 16'h0000;
      c = rand_bf(-10, 10);
      exec(OP_LD, 1, 0, 0, a);
      exec(OP_LD, 2, 0, 0, b);
      exec(OP_LD, 3, 0, 0, c);
      exec(OP_ADD, 4, 1, 2);
      exec(OP_MUL, 5, 1, 2);
      exec(OP_MOV, 6, 3, 0);
      exec(OP_MAC, 6, 1, 2);
      exec(OP_MAX, 7, 1, 2);
      exec(OP_THR, 8, 1, 2);
      k = t % 4;
      exec(OP_CVT4, 9, 1, k);
      exec(OP_SCL, 10, 0, t % GROUP_MAX);
      expect_reg(1, a, "load");
      expect_reg(4, ref_add(a, b), "add");
      expect_reg(5, ref_mul(a, b), "mul");
      exp_mac = ref_add(c, ref_mul(a, b));
      expect_reg(6, exp_mac, "mac");
      expect_reg(7, (bf2r(b) > bf2r(a)) ? b : a, "max");
      expect_reg(8, (bf2r(a) > bf2r(b)) ? a : 16'h0000, "fatrelu");
      expect_reg(9, ref_int4(a[4*k +: 4]), "cvt4");
      expect_reg(10, scalar[t % GROUP_MAX], "scalar");
      exec(OP_CLR, 10, 0, 0);
      expect_reg(10, 16'h0000, "clear");
    end

    // int8 weight conversion, every byte value in both byte positions
    for (int v = 0; v < 256; v++) begin
      exec(OP_LD, 30, 0, 0, {8'(v), 8'(255 - v)});
      exec(OP_CVT8, 31, 30, 0);
      expect_reg(31, ref_int8(8'(255 - v)), "cvt8 low");
      exec(OP_CVT8, 31, 30, 1);
      expect_reg(31, ref_int8(8'(v)), "cvt8 high");
    end

    // event generator output is rf[ra], valid only for OP_EVG
    exec(OP_LD, 20, 0, 0, 16'h4040);
    instr = '0; instr.op = OP_EVG; instr.ra = 20; instr_valid = 1; #1;
    checks++;
    if (!(evg_valid && evg_value == 16'h4040)) begin
      failures++; $display("FAIL evg");
    end
    instr.op = OP_ADD; #1;
    checks++;
    if (evg_valid) begin failures++; $display("FAIL evg_valid on non-EVG"); end
    instr_valid = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
