// Character table C_f of the LZW dictionary, one dual-port block RAM.
//
// Word i holds the first character of the string of dictionary entry 258+i;
// for codes below 258 the first character is the code itself and is not
// stored. Port A is read/write and belongs to the dictionary updater, which
// reads C_f of a code and writes the new entry in the next cycle. Port B is
// read-only and belongs to the traversal unit. Reads are synchronous (one
// cycle) and the read registers hold while their enable is low. Port A is
// read-first: a write cycle also returns the old word. The port assignment
// follows the original design; read-first and the hold are this design's.
module lzw_char_table #(
  parameter int unsigned DEPTH = lzw_pkg::TABLE_DEPTH,
  parameter int unsigned AW    = lzw_pkg::TABLE_AW,
  parameter int unsigned W     = lzw_pkg::CHAR_W
) (
  input  logic          clk,
  // port A: update read/write
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // port B: traversal read
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
