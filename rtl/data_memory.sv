// data_memory: the core's SRAM data memory, shared by the controller and the NPEs.
//
// The memory is organised in rows of NUM_NPE x 16 bits, so that one row gives every NPE its
// own 16-bit lane in one access. It has two ports:
//  * port A, 32 bits wide, for the controller: a_addr is a 32-bit word address; a_be selects
//    bytes on writes; reads return a_rdata one cycle after a_en.
//  * port B, NUM_NPE x 16 bits wide, for the NPEs under the loop controller: a row read
//    (b_re, b_raddr) returns b_rdata one cycle later, and a row write (b_we, b_waddr) writes
//    the lanes selected by b_wmask.
// Port B has a separate read and write address so that the loop controller can start a load
// while a store of an earlier instruction completes. A read returns the old contents if the
// same row is written in the same cycle. If both ports write the same bytes in one cycle,
// port B wins. The default size, 256 KB (2 Mb), and the two port widths follow the source;
// the separate port B read/write addresses and the collision rules are this design's choice.
module data_memory #(
  parameter int unsigned NUM_NPE   = 8,
  parameter int unsigned MEM_BYTES = 262144,
  localparam int unsigned ROW_W    = NUM_NPE * 16,
  localparam int unsigned ROWS     = MEM_BYTES * 8 / ROW_W,
  localparam int unsigned ROW_AW   = $clog2(ROWS),
  localparam int unsigned WPR      = ROW_W / 32,          // 32-bit words per row
  localparam int unsigned WSEL_W   = (WPR > 1) ? $clog2(WPR) : 1,
  localparam int unsigned A_AW     = $clog2(MEM_BYTES / 4)
) (
  input  logic                    clk,
  // port A (controller)
  input  logic                    a_en,
  input  logic                    a_we,
  input  logic [3:0]              a_be,
  input  logic [A_AW-1:0]         a_addr,
  input  logic [31:0]             a_wdata,
  output logic [31:0]             a_rdata,
  // port B (NPEs)
  input  logic                    b_re,
  input  logic [ROW_AW-1:0]       b_raddr,
  output logic [ROW_W-1:0]        b_rdata,
  input  logic                    b_we,
  input  logic [ROW_AW-1:0]       b_waddr,
  input  logic [NUM_NPE-1:0]      b_wmask,
  input  logic [ROW_W-1:0]        b_wdata
);

  logic [ROW_W-1:0] mem [ROWS];

  logic [ROW_AW-1:0] a_row;
  logic [WSEL_W-1:0] a_word;

  if (WPR > 1) begin : g_multi
    assign a_row  = a_addr[A_AW-1:WSEL_W];
    assign a_word = a_addr[WSEL_W-1:0];
  end else begin : g_single
    assign a_row  = a_addr[ROW_AW-1:0];
    assign a_word = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en && a_we) begin
      for (int i = 0; i < 4; i++)
        if (a_be[i]) mem[a_row][32*a_word + 8*i +: 8] <= a_wdata[8*i +: 8];
    end
    if (b_we) begin
      for (int l = 0; l < int'(NUM_NPE); l++)
        if (b_wmask[l]) mem[b_waddr][16*l +: 16] <= b_wdata[16*l +: 16];
    end
    if (a_en && !a_we) a_rdata <= mem[a_row][32*a_word +: 32];
    if (b_re)          b_rdata <= mem[b_raddr];
  end

endmodule
