// Output reader of the LZW decompressor (Part 3).
//
// Table t holds, for every decoded string, its length L and the output
// buffer address of its first character, which the traversal unit wrote
// last. The reader pops one entry and reads port A of the output buffer at
// that address and then at the L-1 addresses below it (wrapping around the
// circular buffer), so the characters come out in their original order, one
// per cycle. The next entry is popped in the cycle the last address of a
// string is issued, so consecutive strings stream without a gap.
// When the last read of a string is issued, rel_o/rel_len_o return its L
// words to the output-buffer space counter. char_valid_o/char_o/char_ready_i
// is a valid/ready stream; the memory read register is the output register,
// so char_o is valid one cycle after its read is issued and is held, by not
// re-enabling the memory, while char_ready_i is low. The read order follows
// the original design; the handshake and the space release are this
// design's.
module lzw_output_reader
  import lzw_pkg::*;
#(
  parameter int unsigned OB_DEPTH = OBUF_DEPTH
) (
  input  logic       clk,
  input  logic       rst_n,
  // table t read side (show-ahead)
  input  logic       t_valid_i,
  input  t_entry_t   t_data_i,
  output logic       t_pop_o,
  // output buffer, port A
  output logic       ob_en_o,
  output obuf_addr_t ob_addr_o,
  input  char_t      ob_rdata_i,
  // space returned to the output buffer
  output logic       rel_o,
  output len_t       rel_len_o,
  // decompressed character stream
  output char_t      char_o,
  output logic       char_valid_o,
  input  logic       char_ready_i,
  output logic       busy_o
);

  obuf_addr_t rd_addr;   // next address to read
  len_t       left;      // characters of the current string still to read
  len_t       cur_len;   // length of the current string
  logic       adv;

  assign adv = !char_valid_o || char_ready_i;

  always_comb begin
    t_pop_o   = 1'b0;
    ob_en_o   = 1'b0;
    ob_addr_o = rd_addr;
    rel_o     = 1'b0;
    rel_len_o = cur_len;
    if (adv) begin
      if (left != '0) begin
        ob_en_o = 1'b1;
        rel_o   = (left == len_t'(1));
      end else if (t_valid_i) begin
        t_pop_o   = 1'b1;
        ob_en_o   = 1'b1;
        ob_addr_o = t_data_i.addr;
        rel_o     = (t_data_i.len == len_t'(1));
        rel_len_o = t_data_i.len;
      end
    end
  end

  assign char_o = ob_rdata_i;
  assign busy_o = (left != '0) || char_valid_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr      <= '0;
      left         <= '0;
      cur_len      <= '0;
      char_valid_o <= 1'b0;
    end else if (adv) begin
      char_valid_o <= ob_en_o;
      if (ob_en_o) rd_addr <= obuf_dec(ob_addr_o, OB_DEPTH);
      if (left != '0) begin
        left <= left - 1'b1;
      end else if (t_pop_o) begin
        left    <= t_data_i.len - 1'b1;
        cur_len <= t_data_i.len;
      end
    end
  end

  a_nonzero_len: assert property (@(posedge clk) disable iff (!rst_n)
    t_pop_o |-> (t_data_i.len != '0));

endmodule
