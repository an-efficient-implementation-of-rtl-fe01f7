// Block-RAM FIFO with a show-ahead output, used as the code buffer and as
// table t of the LZW decompressor.
//
// Words are stored in a simple dual-port memory of DEPTH words addressed by
// a write and a read pointer that wrap at DEPTH (DEPTH need not be a power of
// two). The head word is prefetched into an output register, so rd_valid and
// rd_data show the oldest word without a request, and rd_en (a pop) may be
// asserted every cycle. A word written in cycle n is visible at the output
// in cycle n+2. wr_en while full and rd_en while empty are ignored and are
// flagged by assertions. The total capacity is DEPTH+1 words (memory plus
// output register). The original design names the two FIFOs and their
// sizes; this organisation is this design's own.
module lzw_fifo #(
  parameter int unsigned W     = lzw_pkg::CODE_W,
  parameter int unsigned DEPTH = lzw_pkg::TABLE_DEPTH
) (
  input  logic         clk,
  input  logic         rst_n,
  // write side
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  // read side (show-ahead)
  input  logic         rd_en,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  // words held in total, output register included
  output logic [$clog2(DEPTH+2)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] mem_count;
  logic          push, pop, fetch;

  assign full  = (32'(mem_count) == DEPTH);
  assign push  = wr_en && !full;
  assign pop   = rd_en && rd_valid;
  // move the head word into the output register when it is free or leaving
  assign fetch = (mem_count != '0) && (!rd_valid || pop);
  assign level = ($clog2(DEPTH+2))'(mem_count) + ($clog2(DEPTH+2))'(rd_valid);

  function automatic logic [AW-1:0] ptr_inc(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : AW'(p + 1'b1);
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= wr_data;
    if (fetch) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      mem_count <= '0;
      rd_valid  <= 1'b0;
    end else begin
      if (push)  wr_ptr <= ptr_inc(wr_ptr);
      if (fetch) rd_ptr <= ptr_inc(rd_ptr);
      mem_count <= mem_count + CW'(push) - CW'(fetch);
      if (fetch)    rd_valid <= 1'b1;
      else if (pop) rd_valid <= 1'b0;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && !rd_valid));

endmodule
