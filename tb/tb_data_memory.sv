// tb_data_memory: self-checking test of the dual-port data memory at its full 256 KB size.
//
// Random byte-masked 32-bit writes on port A and lane-masked row writes on port B are
// mirrored in a byte-array model; random reads on both ports are compared with the model
// one cycle after they are issued (the read latency). Also checked: a row written through
// port B reads back through port A word by word, and a same-cycle write from both ports to
// the same bytes leaves port B's data.
//
// The 256 KB size and the 32-bit / 16-bit-per-NPE port widths follow the source; the
// one-cycle latency and the collision rule being checked are this design's own choices.
module tb_data_memory;
  localparam int unsigned NUM_NPE   = 8;
  localparam int unsigned MEM_BYTES = 262144;
  localparam int unsigned ROW_W     = NUM_NPE * 16;
  localparam int unsigned ROWS      = MEM_BYTES * 8 / ROW_W;
  localparam int unsigned RB        = ROW_W / 8;       // bytes per row

  logic clk = 0;
  always #5 clk = ~clk;

  logic                   a_en, a_we;
  logic [3:0]             a_be;
  logic [15:0]            a_addr;
  logic [31:0]            a_wdata, a_rdata;
  logic                   b_re, b_we;
  logic [13:0]            b_raddr, b_waddr;
  logic [ROW_W-1:0]       b_rdata, b_wdata;
  logic [NUM_NPE-1:0]     b_wmask;

  int checks = 0, failures = 0;
  logic [7:0] model [int];     // sparse byte model: only touched bytes are compared

  data_memory #(.NUM_NPE(NUM_NPE), .MEM_BYTES(MEM_BYTES)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // addresses are drawn from a small window so reads hit written data
  function automatic int pick_row();
    return int'($urandom_range(0, 31)) + ((($urandom & 1) != 0) ? int'(ROWS) - 32 : 0);
  endfunction

  initial begin
    int         row, word, prow, pword;
    logic       pa, pb;
    logic [31:0] expa;
    logic [ROW_W-1:0] expb;
    int         byte_a;
    a_en = 0; a_we = 0; a_be = 0; a_addr = 0; a_wdata = 0;
    b_re = 0; b_we = 0; b_raddr = 0; b_waddr = 0; b_wdata = 0; b_wmask = 0;
    // initialise the window through port B
    for (int r = 0; r < 32; r++) begin
      for (int h = 0; h < 2; h++) begin
        @(negedge clk);
        b_we = 1; b_wmask = '1;
        b_waddr = 14'(h ? int'(ROWS) - 32 + r : r);
        for (int i = 0; i < int'(ROW_W) / 32; i++) b_wdata[32*i +: 32] = $urandom;
        for (int by = 0; by < int'(RB); by++) model[int'(b_waddr) * int'(RB) + by] = b_wdata[8*by +: 8];
      end
    end
    @(negedge clk); b_we = 0;

    pa = 0; pb = 0; prow = 0; pword = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      // check reads issued in the previous cycle
      if (pa) begin
        for (int by = 0; by < 4; by++) expa[8*by +: 8] = model[prow * int'(RB) + pword * 4 + by];
        checks++;
        if (a_rdata !== expa) begin failures++; $display("FAIL port A read row %0d word %0d", prow, pword); end
      end
      if (pb) begin
        for (int by = 0; by < int'(RB); by++) expb[8*by +: 8] = model[int'(b_raddr) * int'(RB) + by];
        checks++;
        if (b_rdata !== expb) begin failures++; $display("FAIL port B read row %0d", b_raddr); end
      end
      // new operations; reads are issued in cycles without writes so the model is simple
      a_en = ($urandom % 3) != 0;
      a_we = a_en && (($urandom & 1) != 0);
      row  = pick_row();
      word = int'($urandom_range(0, ROW_W / 32 - 1));
      a_addr = 16'(row * int'(ROW_W / 32) + word);
      a_be = 4'($urandom);
      a_wdata = $urandom;
      b_we = ($urandom & 1) != 0;
      b_waddr = 14'(pick_row());
      b_wmask = NUM_NPE'($urandom);
      for (int i = 0; i < int'(ROW_W) / 32; i++) b_wdata[32*i +: 32] = $urandom;
      if (b_we) begin a_we = 0; a_en = 0; end
      b_re = !b_we && !a_we && (($urandom & 1) != 0);
      b_raddr = 14'(pick_row());
      if (a_en && a_we)
        for (int by = 0; by < 4; by++)
          if (a_be[by]) model[row * int'(RB) + word * 4 + by] = a_wdata[8*by +: 8];
      if (b_we)
        for (int l = 0; l < int'(NUM_NPE); l++)
          if (b_wmask[l]) begin
            model[int'(b_waddr) * int'(RB) + 2*l]     = b_wdata[16*l +: 8];
            model[int'(b_waddr) * int'(RB) + 2*l + 1] = b_wdata[16*l + 8 +: 8];
          end
      pa = a_en && !a_we;
      pb = b_re;
      prow = row; pword = word;
    end
    @(negedge clk); a_en = 0; b_we = 0; b_re = 0;

    // collision: both ports write the same bytes; port B wins
    @(negedge clk);
    a_en = 1; a_we = 1; a_be = 4'hF; a_addr = 16'd0; a_wdata = 32'h1111_1111;
    b_we = 1; b_waddr = 14'd0; b_wmask = '1; b_wdata = '0; b_wdata[31:0] = 32'h2222_2222;
    @(negedge clk);
    a_we = 0; a_en = 1; b_we = 0;
    @(negedge clk);
    a_en = 0;
    checks++;
    if (a_rdata !== 32'h2222_2222) begin failures++; $display("FAIL collision %h", a_rdata); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
