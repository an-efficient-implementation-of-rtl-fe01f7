// Testbench of the dictionary updater (lzw_dict_update, Part 1).
//
// A compressed file of more than one code segment is fed as codes. The
// testbench models the character table (synchronous, read-first port A) and
// the code buffer, and checks against the reference decoder of tb_lzw_pkg:
// data code j of a segment is written to p[j], the first character of its
// string is written to C_f[j], and the codes reach the code buffer in order.
// It also checks the 2-cycle cadence, that no code is taken while the code
// buffer is full, that after ClearCode no code is taken until seg_drained_i
// is raised and the next segment starts at entry 0, and that done_o pulses
// only after file_drained_i at EndOfInformation.
module tb_lzw_dict_update;
  import lzw_pkg::*;
  import tb_lzw_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  code_t       code = '0;
  logic        code_valid = 1'b0, code_ready;
  logic        p_we;
  logic [11:0] p_addr;
  code_t       p_wdata;
  logic        cf_en, cf_we;
  logic [11:0] cf_addr;
  char_t       cf_wdata, cf_rdata;
  logic        q_push;
  code_t       q_data;
  logic        q_full = 1'b0;
  logic        seg_drained = 1'b0, file_drained = 1'b0;
  logic        done;

  int checks = 0, failures = 0;
  longint cycle = 0;

  lzw_dict_update dut (
    .clk, .rst_n, .code_i(code), .code_valid_i(code_valid), .code_ready_o(code_ready),
    .p_we_o(p_we), .p_addr_o(p_addr), .p_wdata_o(p_wdata),
    .cf_en_o(cf_en), .cf_we_o(cf_we), .cf_addr_o(cf_addr), .cf_wdata_o(cf_wdata), .cf_rdata_i(cf_rdata),
    .q_push_o(q_push), .q_data_o(q_data), .q_full_i(q_full),
    .seg_drained_i(seg_drained), .file_drained_i(file_drained), .done_o(done)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // character table model, read-first port A
  char_t cf_mem [TABLE_DEPTH];
  always @(posedge clk) if (cf_en) begin
    cf_rdata <= cf_mem[cf_addr];
    if (cf_we) cf_mem[cf_addr] <= cf_wdata;
  end

  // expected values, one per data code
  int_q_t  codes;
  int_q_t  exp_idx, exp_code, exp_first;
  int      pw = 0, cw = 0, qp = 0;
  int      n_done = 0;
  bit      in_clear_wait = 1'b0;
  longint  last_take = -1;
  int      gaps_bad = 0, gaps_two = 0, gaps_all = 0;

  always @(posedge clk) if (rst_n) begin
    if (p_we) begin
      checks++;
      if (pw >= exp_idx.size() || 32'(p_addr) != exp_idx[pw] || 32'(p_wdata) != exp_code[pw]) begin
        failures++;
        if (failures < 10) $display("FAIL p write %0d: [%0d]=%0d", pw, p_addr, p_wdata);
      end
      pw++;
    end
    if (cf_en && cf_we) begin
      checks++;
      if (cw >= exp_idx.size() || 32'(cf_addr) != exp_idx[cw] || 32'(cf_wdata) != exp_first[cw]) begin
        failures++;
        if (failures < 10) $display("FAIL C_f write %0d: [%0d]=%0d expected [%0d]=%0d", cw, cf_addr,
                                    cf_wdata, exp_idx[cw], exp_first[cw]);
      end
      cw++;
    end
    if (q_push) begin
      checks++;
      if (qp >= exp_code.size() || 32'(q_data) != exp_code[qp]) begin
        failures++;
        if (failures < 10) $display("FAIL code buffer push %0d: %0d", qp, q_data);
      end
      qp++;
    end
    if (code_valid && code_ready) begin
      if (last_take >= 0 && cycle - last_take < 2) gaps_bad++;
      if (last_take >= 0 && cycle - last_take == 2) gaps_two++;
      if (last_take >= 0) gaps_all++;
      last_take = cycle;
      checks++;
      if (q_full || in_clear_wait) begin
        failures++;
        $display("FAIL code taken while code buffer full or segment not drained");
      end
    end
    if (done) n_done++;
  end

  initial begin
    byte_q_t data, chars;
    int_q_t  lens;
    int      pos, seg_idx, n_stall_full;
    gen_data(0, 5200, data);
    lzw_compress(data, codes);
    lzw_decode(codes, chars, lens);
    // expected table writes: entry index within the segment, code, first char
    pos = 0; seg_idx = 0;
    foreach (codes[i]) begin
      if (codes[i] == CLEAR) begin seg_idx = 0; continue; end
      if (codes[i] == EOI) break;
      exp_idx.push_back(seg_idx);
      exp_code.push_back(codes[i]);
      exp_first.push_back(int'(chars[pos]));
      pos += lens[exp_code.size() - 1];
      seg_idx++;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    n_stall_full = 0;
    foreach (codes[i]) begin
      code       <= code_t'(codes[i]);
      code_valid <= 1'b1;
      // now and then the code buffer reports full
      q_full <= ($urandom % 16) == 0;
      @(posedge clk);
      while (!(code_valid && code_ready)) begin
        if (q_full) n_stall_full++;
        q_full <= q_full ? (($urandom % 2) == 0) : (($urandom % 16) == 0);
        @(posedge clk);
      end
      q_full <= 1'b0;
      if (codes[i] == CLEAR || codes[i] == EOI) begin
        int wait_cycles;
        code_valid    <= 1'b0;
        in_clear_wait <= 1'b1;
        wait_cycles   = 5 + int'($urandom % 20);
        repeat (wait_cycles) begin
          @(posedge clk);
          checks++;
          if (done) begin failures++; $display("FAIL done before drained"); end
        end
        if (codes[i] == CLEAR) seg_drained <= 1'b1;
        else                   file_drained <= 1'b1;
        @(posedge clk);
        seg_drained   <= 1'b0;
        file_drained  <= 1'b0;
        in_clear_wait <= 1'b0;
      end
    end
    code_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks += 6;
    if (pw != exp_idx.size() || cw != exp_idx.size() || qp != exp_idx.size()) begin
      failures++;
      $display("FAIL counts: p %0d C_f %0d pushes %0d expected %0d", pw, cw, qp, exp_idx.size());
    end
    if (n_done != 1) begin failures++; $display("FAIL %0d done pulses", n_done); end
    if (gaps_bad != 0) begin failures++; $display("FAIL %0d codes taken less than 2 cycles apart", gaps_bad); end
    if (n_stall_full == 0) begin failures++; $display("FAIL code buffer full never seen"); end
    // with the input always valid most codes follow the previous one after 2 cycles
    if (gaps_two < gaps_all * 3 / 4) begin failures++; $display("FAIL only %0d of %0d gaps are 2 cycles", gaps_two, gaps_all); end
    if (exp_idx.size() < 3838) begin failures++; $display("FAIL data has no second segment"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
