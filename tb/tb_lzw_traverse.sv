// Testbench of the traversal unit (lzw_traverse, Part 2).
//
// One code segment of a compressed file is decoded by the reference decoder
// of tb_lzw_pkg; the testbench fills models of p (p[j] = code j) and C_f
// (C_f[j] = first character of the string of code j), offers the codes as a
// show-ahead code buffer and models the output buffer. At every table-t
// push it checks the length against the reference and reads the string back
// from the output buffer model, downwards from the pushed address, against
// the reference string. In a first pass without stalls it checks the cycle
// count: the next code is taken L cycles after a code of length L >= 2 (L+1
// when the next code is a literal) and 1 cycle after a literal. A second
// pass stalls the unit at random with ob_space_i and t_full_i.
module tb_lzw_traverse;
  import lzw_pkg::*;
  import tb_lzw_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        code_valid;
  code_t       code;
  logic        code_pop;
  logic        p_en, cf_en;
  logic [11:0] p_addr, cf_addr;
  code_t       p_rdata;
  char_t       cf_rdata;
  logic        ob_we;
  obuf_addr_t  ob_addr;
  char_t       ob_wdata;
  logic        ob_space = 1'b1;
  logic        t_push;
  t_entry_t    t_data;
  logic        t_full = 1'b0;
  logic        busy;

  int checks = 0, failures = 0;
  longint cycle = 0;

  lzw_traverse dut (
    .clk, .rst_n, .code_valid_i(code_valid), .code_i(code), .code_pop_o(code_pop),
    .p_en_o(p_en), .p_addr_o(p_addr), .p_rdata_i(p_rdata),
    .cf_en_o(cf_en), .cf_addr_o(cf_addr), .cf_rdata_i(cf_rdata),
    .ob_we_o(ob_we), .ob_addr_o(ob_addr), .ob_wdata_o(ob_wdata), .ob_space_i(ob_space),
    .t_push_o(t_push), .t_data_o(t_data), .t_full_i(t_full), .busy_o(busy)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // table and buffer models
  code_t p_mem  [TABLE_DEPTH + 1];
  char_t cf_mem [TABLE_DEPTH + 1];
  char_t ob_mem [OBUF_DEPTH];
  always @(posedge clk) begin
    if (p_en)  p_rdata  <= p_mem[p_addr];
    if (cf_en) cf_rdata <= cf_mem[cf_addr];
    if (ob_we) ob_mem[ob_addr] <= ob_wdata;
  end

  // code buffer model
  int_q_t cq;
  bit     gaps = 1'b0;
  logic   offer;
  always @(posedge clk) offer <= !gaps || ($urandom % 3 != 0);
  assign code_valid = (cq.size() > 0) && offer;
  assign code       = code_valid ? code_t'(cq[0]) : '0;

  // reference of the current segment
  int_q_t  seg_codes, seg_lens, seg_pos;
  byte_q_t chars;
  int      n_push = 0, n_pop = 0, n_writes = 0;
  bit      timing = 1'b1;
  bit      stalls = 1'b0;
  longint  last_pop = -1;
  int      n_timing = 0;

  always @(posedge clk) if (rst_n) begin
    if (stalls) begin
      ob_space <= ($urandom % 5) != 0;
      t_full   <= ($urandom % 7) == 0;
    end else begin
      ob_space <= 1'b1;
      t_full   <= 1'b0;
    end
    if (ob_we) n_writes++;
    if (code_pop) begin
      if (timing && n_pop > 0) begin
        int lp, exp_gap;
        lp = seg_lens[n_pop - 1];
        exp_gap = (lp == 1) ? 1 : (seg_codes[n_pop] < FIRST) ? lp + 1 : lp;
        checks++;
        n_timing++;
        if (cycle - last_pop != longint'(exp_gap)) begin
          failures++;
          if (failures < 10) $display("FAIL code %0d taken %0d cycles after the previous one (L=%0d), expected %0d",
                                      n_pop, cycle - last_pop, lp, exp_gap);
        end
      end
      last_pop = cycle;
      void'(cq.pop_front());
      n_pop++;
    end
    if (t_push) begin
      int L;
      L = seg_lens[n_push];
      checks++;
      if (32'(t_data.len) != L || t_full) begin
        failures++;
        if (failures < 10) $display("FAIL t push %0d: length %0d expected %0d", n_push, t_data.len, L);
      end
    end
  end

  // string check one cycle after the push, when the last write has landed
  logic     chk_q = 1'b0;
  t_entry_t chk_e;
  int       chk_k;
  always @(posedge clk) begin
    chk_q <= t_push;
    chk_e <= t_data;
    if (t_push) chk_k <= n_push;
    if (t_push) n_push++;
    if (chk_q) begin
      obuf_addr_t a;
      a = chk_e.addr;
      for (int i = 0; i < int'(chk_e.len); i++) begin
        checks++;
        if (ob_mem[a] != chars[seg_pos[chk_k] + i]) begin
          failures++;
          if (failures < 10) $display("FAIL string %0d char %0d: %0d expected %0d", chk_k, i, ob_mem[a],
                                      chars[seg_pos[chk_k] + i]);
        end
        a = obuf_dec(a, OBUF_DEPTH);
      end
    end
  end

  task automatic run_segment(int kind, int n, bit with_stalls);
    byte_q_t data;
    int_q_t  codes, lens;
    int      j, pos;
    gen_data(kind, n, data);
    lzw_compress(data, codes);
    lzw_decode(codes, chars, lens);
    seg_codes.delete(); seg_lens.delete(); seg_pos.delete();
    // first segment only: codes after the leading ClearCode up to the next control code
    j = 0; pos = 0;
    for (int i = 1; i < codes.size() && codes[i] != CLEAR && codes[i] != EOI; i++) begin
      seg_codes.push_back(codes[i]);
      seg_lens.push_back(lens[j]);
      seg_pos.push_back(pos);
      p_mem[j] = code_t'(codes[i]);
      cf_mem[j] = chars[pos];
      pos += lens[j];
      j++;
    end
    n_push = 0; n_pop = 0;
    timing = !with_stalls;
    stalls = with_stalls;
    gaps   = with_stalls;
    foreach (seg_codes[i]) cq.push_back(seg_codes[i]);
    while (n_push < seg_codes.size()) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (busy || cq.size() != 0) begin failures++; $display("FAIL unit not idle at the end"); end
  endtask

  initial begin
    int stall_cycles;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_segment(1, 30000, 1'b0);   // long strings, no stalls, exact timing
    run_segment(0, 3000, 1'b0);    // mostly literals and short strings
    run_segment(3, 20000, 1'b0);   // very long strings and self-referencing codes
    run_segment(1, 30000, 1'b1);   // random stalls
    run_segment(0, 3000, 1'b1);
    checks++;
    if (n_timing < 1000) begin failures++; $display("FAIL too few timing checks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
