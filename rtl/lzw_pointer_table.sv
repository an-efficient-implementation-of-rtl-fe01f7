// Pointer table p of the LZW dictionary, one dual-port block RAM.
//
// Word i holds the pointer (the prefix code) of dictionary entry 258+i;
// entries 0..257 are implicit and take no storage. Port B is write-only and
// is used by the dictionary updater to store each input code in turn. Port
// A is read-only and is used by the traversal unit to follow pointers. Both
// ports are synchronous: a read issued with a_en in cycle n shows on a_rdata
// in cycle n+1, and a_rdata holds its value while a_en is low, as a block
// RAM output latch does. The port split and depth follow the original
// design; the read-enable hold is this design's way of stalling a walk.
module lzw_pointer_table #(
  parameter int unsigned DEPTH = lzw_pkg::TABLE_DEPTH,
  parameter int unsigned AW    = lzw_pkg::TABLE_AW,
  parameter int unsigned W     = lzw_pkg::CODE_W
) (
  input  logic          clk,
  // port A: traversal read
  input  logic          a_en,
  input  logic [AW-1:0] a_addr,
  output logic [W-1:0]  a_rdata,
  // port B: update write
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
  end

endmodule
