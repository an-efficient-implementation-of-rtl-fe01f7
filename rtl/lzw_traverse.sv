// Traversal unit of the LZW decompressor (Part 2).
//
// For each code taken from the code buffer it writes the string of the code
// into the output buffer in reverse order, one character per cycle, and then
// stores {length, address of the first character} into table t.
//   * A literal (code < 258) is a one-character string: it is written and
//     recorded in the cycle it is taken.
//   * For a code c >= 258 the unit presents c-258 to port A of p and c-257
//     to port B of C_f in the same cycle. One cycle later p(c) and
//     C_f(c+1) (the last character of C(c)) are available: the character is
//     written to the output buffer and, while the pointer is still a
//     dictionary code, it is fed back as the next read address. When the
//     pointer drops below 258 it is the first character of the string; it
//     is written in the following cycle together with the t entry, and the
//     next code is taken in that same cycle.
// A string of L characters thus takes L cycles. The walk pauses, with the
// memory outputs held, while the output buffer has no free word
// (ob_space_i low) or table t is full. The pointer walk, the C_f(j+1)
// trick and the length counter follow the original design; the overlap of
// the last write with the next lookup and the stall rules are this
// design's. Codes are expected to be valid (no reference past the newest
// entry); ClearCode and EndOfInformation never reach this unit.
module lzw_traverse
  import lzw_pkg::*;
#(
  parameter int unsigned OB_DEPTH = OBUF_DEPTH,
  parameter int unsigned AW       = TABLE_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  // code buffer read side (show-ahead)
  input  logic          code_valid_i,
  input  code_t         code_i,
  output logic          code_pop_o,
  // pointer table p, port A
  output logic          p_en_o,
  output logic [AW-1:0] p_addr_o,
  input  code_t         p_rdata_i,
  // character table C_f, port B
  output logic          cf_en_o,
  output logic [AW-1:0] cf_addr_o,
  input  char_t         cf_rdata_i,
  // output buffer, port B
  output logic          ob_we_o,
  output obuf_addr_t    ob_addr_o,
  output char_t         ob_wdata_o,
  input  logic          ob_space_i,
  // table t write side
  output logic          t_push_o,
  output t_entry_t      t_data_o,
  input  logic          t_full_i,
  output logic          busy_o
);

  typedef enum logic [1:0] {S_IDLE, S_WALK, S_ROOT} state_t;

  state_t     state;
  obuf_addr_t wr_addr;   // next free output-buffer word
  len_t       len;       // characters of the current string written so far
  char_t      root_q;    // first character of the current string

  logic  can_finish;     // a string may be closed this cycle
  logic  dispatch;       // the unit may look at the next code this cycle
  logic  is_lit;
  logic  start_walk;
  logic  walk_step;
  logic  walk_more;
  code_t walk_ptr;

  assign can_finish = ob_space_i && !t_full_i;
  assign is_lit     = (code_i < code_t'(FIRST_CODE));
  // a new code is looked at from idle, or right after a root is written
  assign dispatch   = (state == S_IDLE) || (state == S_ROOT && can_finish);
  assign start_walk = dispatch && code_valid_i && !is_lit;
  assign walk_step  = (state == S_WALK) && ob_space_i;
  assign walk_more  = walk_step && (p_rdata_i >= code_t'(FIRST_CODE));
  assign walk_ptr   = start_walk ? code_i : p_rdata_i;

  always_comb begin
    code_pop_o = 1'b0;
    ob_we_o    = 1'b0;
    ob_wdata_o = root_q;
    t_push_o   = 1'b0;
    t_data_o   = '{len: len + 1'b1, addr: wr_addr};
    unique case (state)
      S_IDLE: if (code_valid_i) begin
        if (!is_lit) begin
          code_pop_o = 1'b1;
        end else if (can_finish) begin
          code_pop_o = 1'b1;
          ob_we_o    = 1'b1;
          ob_wdata_o = code_i[CHAR_W-1:0];
          t_push_o   = 1'b1;
          t_data_o   = '{len: len_t'(1), addr: wr_addr};
        end
      end
      S_WALK: if (ob_space_i) begin
        ob_we_o    = 1'b1;
        ob_wdata_o = cf_rdata_i;
      end
      S_ROOT: if (can_finish) begin
        ob_we_o    = 1'b1;
        t_push_o   = 1'b1;
        code_pop_o = start_walk;
      end
      default: ;
    endcase
  end

  assign ob_addr_o = wr_addr;

  // the address multiplexer in front of port A of p and port B of C_f
  assign p_en_o    = start_walk || walk_more;
  assign cf_en_o   = p_en_o;
  assign p_addr_o  = AW'(walk_ptr - code_t'(FIRST_CODE));
  assign cf_addr_o = AW'(walk_ptr - code_t'(FIRST_CODE - 1));

  assign busy_o = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      wr_addr <= '0;
      len     <= '0;
      root_q  <= '0;
    end else begin
      if (ob_we_o) wr_addr <= obuf_inc(wr_addr, OB_DEPTH);
      unique case (state)
        S_IDLE: if (start_walk) begin
          len   <= '0;
          state <= S_WALK;
        end
        S_WALK: if (walk_step) begin
          len <= len + 1'b1;
          if (!walk_more) begin
            root_q <= p_rdata_i[CHAR_W-1:0];
            state  <= S_ROOT;
          end
        end
        S_ROOT: if (can_finish) begin
          len   <= '0;
          state <= start_walk ? S_WALK : S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_ctrl_code: assert property (@(posedge clk) disable iff (!rst_n)
    code_pop_o |-> (code_i != code_t'(CLEAR_CODE) && code_i != code_t'(EOI_CODE)));

endmodule
