// Output buffer b, one dual-port block RAM used as a circular buffer.
//
// The traversal unit writes each decoded string in reverse order (last
// character first) through port B, and the output reader reads it back in
// the right order through port A by walking the addresses downward. The
// two ports work at the same time, so writing the next string overlaps
// reading the previous one. Port A reads are synchronous: data issued with
// a_en in cycle n appears in cycle n+1 and holds while a_en is low. The depth
// of two maximal strings (2*3838 characters, 13-bit address) follows the
// original design.
module lzw_output_buffer #(
  parameter int unsigned DEPTH = lzw_pkg::OBUF_DEPTH,
  parameter int unsigned AW    = lzw_pkg::OBUF_AW,
  parameter int unsigned W     = lzw_pkg::CHAR_W
) (
  input  logic          clk,
  // port A: read-out
  input  logic          a_en,
  input  logic [AW-1:0] a_addr,
  output logic [W-1:0]  a_rdata,
  // port B: reversed-string write
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
