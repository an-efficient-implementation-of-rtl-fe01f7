// Dictionary updater of the LZW decompressor (Part 1).
//
// Every input code y_j of a code segment defines dictionary entry 258+j:
// its pointer is y_j and its first character is C_f(y_j), which is y_j
// itself for a literal (y_j < 258) and is read back from the character
// table otherwise. The updater takes one code every 2 cycles:
//   cycle 1  accept y, write y into p[j] (port B of p), read C_f[y-258]
//            (port A of C_f) when y >= 258;
//   cycle 2  write the selected first character into C_f[j] (port A),
//            push y into the code buffer, j <= j+1.
// Because the entry is complete before the code enters the code buffer,
// the traversal of a code never reads an entry that is not yet written.
// This cadence and the multiplexer in front of C_f follow the original
// design. The handling of the two control codes is this design's: on
// ClearCode the updater waits until the traversal unit has used up every
// code of the segment (seg_drained_i) and then restarts at entry 0; on
// EndOfInformation it waits until the whole module is empty
// (file_drained_i), pulses done_o and restarts for the next file. When
// more codes arrive than the table has entries, the table stops growing.
// p_wdata_o is code_i itself: the pointer of a new entry is the code.
module lzw_dict_update
  import lzw_pkg::*;
#(
  parameter int unsigned DEPTH = TABLE_DEPTH,
  parameter int unsigned AW    = TABLE_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  // code input stream
  input  code_t         code_i,
  input  logic          code_valid_i,
  output logic          code_ready_o,
  // pointer table p, port B
  output logic          p_we_o,
  output logic [AW-1:0] p_addr_o,
  output code_t         p_wdata_o,
  // character table C_f, port A
  output logic          cf_en_o,
  output logic          cf_we_o,
  output logic [AW-1:0] cf_addr_o,
  output char_t         cf_wdata_o,
  input  char_t         cf_rdata_i,
  // code buffer write side
  output logic          q_push_o,
  output code_t         q_data_o,
  input  logic          q_full_i,
  // drain status from the rest of the module
  input  logic          seg_drained_i,
  input  logic          file_drained_i,
  output logic          done_o
);

  typedef enum logic [1:0] {S_ACCEPT, S_UPDATE, S_WAIT_SEG, S_WAIT_EOI} state_t;

  state_t        state;
  code_t         y_q;        // code being entered
  logic [AW-1:0] idx;        // physical index of the next entry (code-258)
  logic          take;
  logic          room;       // the table still has a free entry

  assign room         = (32'(idx) < DEPTH);
  assign code_ready_o = (state == S_ACCEPT) && !q_full_i;
  assign take         = code_valid_i && code_ready_o;

  // cycle 1: store the pointer, look up C_f of the code
  assign p_we_o    = take && (code_i < code_t'(CLEAR_CODE) || code_i >= code_t'(FIRST_CODE)) && room;
  assign p_addr_o  = idx;
  assign p_wdata_o = code_i;

  // C_f port A: read in cycle 1, write in cycle 2
  always_comb begin
    cf_en_o    = 1'b0;
    cf_we_o    = 1'b0;
    cf_addr_o  = idx;
    cf_wdata_o = (y_q >= code_t'(FIRST_CODE)) ? cf_rdata_i : y_q[CHAR_W-1:0];
    if (state == S_UPDATE) begin
      cf_en_o = room;
      cf_we_o = room;
    end else if (take && code_i >= code_t'(FIRST_CODE)) begin
      cf_en_o   = 1'b1;
      cf_addr_o = AW'(code_i - code_t'(FIRST_CODE));
    end
  end

  assign q_push_o = (state == S_UPDATE);
  assign q_data_o = y_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_ACCEPT;
      y_q    <= '0;
      idx    <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_ACCEPT: if (take) begin
          y_q <= code_i;
          if (code_i == code_t'(CLEAR_CODE))    state <= S_WAIT_SEG;
          else if (code_i == code_t'(EOI_CODE)) state <= S_WAIT_EOI;
          else                                  state <= S_UPDATE;
        end
        S_UPDATE: begin
          if (room) idx <= idx + 1'b1;
          state <= S_ACCEPT;
        end
        S_WAIT_SEG: if (seg_drained_i) begin
          idx   <= '0;
          state <= S_ACCEPT;
        end
        S_WAIT_EOI: if (file_drained_i) begin
          idx    <= '0;
          done_o <= 1'b1;
          state  <= S_ACCEPT;
        end
      endcase
    end
  end

  // the code buffer is never full when a code is pushed: cycle 1 checked it
  a_push_room: assert property (@(posedge clk) disable iff (!rst_n) q_push_o |-> !q_full_i);

endmodule
