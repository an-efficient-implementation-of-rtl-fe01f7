// One LZW decompression module.
//
// Fixed 12-bit LZW codes go in (codes 0..255 are characters, 256 is
// ClearCode, 257 is EndOfInformation, 258..4095 are dictionary entries) and
// 8-bit characters come out. Three parts run concurrently on block RAMs:
//   Part 1, lzw_dict_update: builds the dictionary, one entry per code every
//     2 cycles, as a pointer table p (the code) and a first-character table
//     C_f, and forwards each code to the code buffer.
//   Part 2, lzw_traverse: for each buffered code walks p and C_f and writes
//     the string backwards into the output buffer b, one character per
//     cycle, then stores {length, first-character address} in table t.
//   Part 3, lzw_output_reader: reads each string from b downwards, giving the
//     characters in order, one per cycle.
// The dictionary is never walked to build entries, so Part 1 runs ahead of
// Part 2, and Parts 2 and 3 overlap through the two ports of b. A counter of
// used output-buffer words stops Part 2 before it overwrites a string that
// Part 3 has not read; a string gives its words back when its last read is
// issued. At ClearCode, Part 1 waits until Part 2 has consumed every code of
// the segment before it reuses the tables; at EndOfInformation it waits until
// the module is empty, pulses done_o for one cycle and is ready for the next
// file. The partition, the memories and their sizes follow the original
// design; the space counter, the drain rules and the valid/ready handshakes
// are this design's.
module lzw_decomp
  import lzw_pkg::*;
#(
  parameter int unsigned TBL_DEPTH = TABLE_DEPTH,  // p, C_f and code buffer words
  parameter int unsigned OB_DEPTH  = OBUF_DEPTH,   // output buffer words
  parameter int unsigned TT_DEPTH  = T_DEPTH       // table t words
) (
  input  logic  clk,
  input  logic  rst_n,
  input  code_t code_i,
  input  logic  code_valid_i,
  output logic  code_ready_o,
  output char_t char_o,
  output logic  char_valid_o,
  input  logic  char_ready_i,
  output logic  done_o
);

  localparam int unsigned AW = TABLE_AW;
  localparam int unsigned UW = $clog2(OB_DEPTH + 1);

  // pointer table p
  logic          p_we;
  logic [AW-1:0] p_waddr;
  code_t         p_wdata;
  logic          p_en;
  logic [AW-1:0] p_raddr;
  code_t         p_rdata;
  // character table C_f
  logic          cfa_en, cfa_we;
  logic [AW-1:0] cfa_addr;
  char_t         cfa_wdata, cfa_rdata;
  logic          cfb_en;
  logic [AW-1:0] cfb_addr;
  char_t         cfb_rdata;
  // code buffer
  logic          cq_push, cq_full, cq_pop, cq_valid;
  code_t         cq_wdata, cq_rdata;
  logic [$clog2(TBL_DEPTH+2)-1:0] cq_level;
  // output buffer
  logic          ob_we, ob_ren;
  obuf_addr_t    ob_waddr, ob_raddr;
  char_t         ob_wdata, ob_rdata;
  logic          ob_rel;
  len_t          ob_rel_len;
  logic [UW-1:0] ob_used;
  logic          ob_space;
  // table t
  logic          t_push, t_full, t_pop, t_valid;
  t_entry_t      t_wdata, t_rdata;
  logic [$clog2(TT_DEPTH+2)-1:0] t_level;
  // status
  logic          trav_busy, rd_busy;
  logic          seg_drained, file_drained;

  lzw_pointer_table #(.DEPTH(TBL_DEPTH), .AW(AW), .W(CODE_W)) u_p (
    .clk, .a_en(p_en), .a_addr(p_raddr), .a_rdata(p_rdata),
    .b_we(p_we), .b_addr(p_waddr), .b_wdata(p_wdata)
  );

  lzw_char_table #(.DEPTH(TBL_DEPTH), .AW(AW), .W(CHAR_W)) u_cf (
    .clk,
    .a_en(cfa_en), .a_we(cfa_we), .a_addr(cfa_addr), .a_wdata(cfa_wdata), .a_rdata(cfa_rdata),
    .b_en(cfb_en), .b_addr(cfb_addr), .b_rdata(cfb_rdata)
  );

  lzw_fifo #(.W(CODE_W), .DEPTH(TBL_DEPTH)) u_code_buf (
    .clk, .rst_n,
    .wr_en(cq_push), .wr_data(cq_wdata), .full(cq_full),
    .rd_en(cq_pop), .rd_valid(cq_valid), .rd_data(cq_rdata), .level(cq_level)
  );

  lzw_output_buffer #(.DEPTH(OB_DEPTH), .AW(OBUF_AW), .W(CHAR_W)) u_ob (
    .clk, .a_en(ob_ren), .a_addr(ob_raddr), .a_rdata(ob_rdata),
    .b_we(ob_we), .b_addr(ob_waddr), .b_wdata(ob_wdata)
  );

  lzw_fifo #(.W(T_W), .DEPTH(TT_DEPTH)) u_t (
    .clk, .rst_n,
    .wr_en(t_push), .wr_data(t_wdata), .full(t_full),
    .rd_en(t_pop), .rd_valid(t_valid), .rd_data(t_rdata), .level(t_level)
  );

  lzw_dict_update #(.DEPTH(TBL_DEPTH), .AW(AW)) u_part1 (
    .clk, .rst_n,
    .code_i, .code_valid_i, .code_ready_o,
    .p_we_o(p_we), .p_addr_o(p_waddr), .p_wdata_o(p_wdata),
    .cf_en_o(cfa_en), .cf_we_o(cfa_we), .cf_addr_o(cfa_addr), .cf_wdata_o(cfa_wdata),
    .cf_rdata_i(cfa_rdata),
    .q_push_o(cq_push), .q_data_o(cq_wdata), .q_full_i(cq_full),
    .seg_drained_i(seg_drained), .file_drained_i(file_drained), .done_o
  );

  lzw_traverse #(.OB_DEPTH(OB_DEPTH), .AW(AW)) u_part2 (
    .clk, .rst_n,
    .code_valid_i(cq_valid), .code_i(cq_rdata), .code_pop_o(cq_pop),
    .p_en_o(p_en), .p_addr_o(p_raddr), .p_rdata_i(p_rdata),
    .cf_en_o(cfb_en), .cf_addr_o(cfb_addr), .cf_rdata_i(cfb_rdata),
    .ob_we_o(ob_we), .ob_addr_o(ob_waddr), .ob_wdata_o(ob_wdata), .ob_space_i(ob_space),
    .t_push_o(t_push), .t_data_o(t_wdata), .t_full_i(t_full),
    .busy_o(trav_busy)
  );

  lzw_output_reader #(.OB_DEPTH(OB_DEPTH)) u_part3 (
    .clk, .rst_n,
    .t_valid_i(t_valid), .t_data_i(t_rdata), .t_pop_o(t_pop),
    .ob_en_o(ob_ren), .ob_addr_o(ob_raddr), .ob_rdata_i(ob_rdata),
    .rel_o(ob_rel), .rel_len_o(ob_rel_len),
    .char_o, .char_valid_o, .char_ready_i,
    .busy_o(rd_busy)
  );

  // words of the output buffer written and not yet given back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ob_used <= '0;
    else        ob_used <= ob_used + UW'(ob_we) - (ob_rel ? UW'(ob_rel_len) : '0);
  end
  assign ob_space = (32'(ob_used) < OB_DEPTH);

  assign seg_drained  = (cq_level == '0) && !trav_busy;
  assign file_drained = seg_drained && (t_level == '0) && !rd_busy;

  a_used_bound: assert property (@(posedge clk) disable iff (!rst_n) 32'(ob_used) <= OB_DEPTH);

endmodule
