// Testbench of the output reader (lzw_output_reader, Part 3).
//
// Random strings (lengths 1..60, crossing the end of the circular buffer)
// are laid out in a model of the output buffer the way the traversal unit
// writes them, last character first, and their {length, address} entries
// are offered by a show-ahead table-t model. The character stream must be
// the strings in their original order. With the output always ready it
// checks one character per cycle with no gap between strings; with random
// back-pressure it checks that a stalled character is held. Each string
// must be released exactly once, with its length, in the cycle its last
// read is issued.
module tb_lzw_output_reader;
  import lzw_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       t_valid;
  t_entry_t   t_data;
  logic       t_pop;
  logic       ob_en;
  obuf_addr_t ob_addr;
  char_t      ob_rdata;
  logic       rel;
  len_t       rel_len;
  char_t      ch;
  logic       ch_valid;
  logic       ch_ready = 1'b1;
  logic       busy;

  int checks = 0, failures = 0;

  lzw_output_reader dut (
    .clk, .rst_n, .t_valid_i(t_valid), .t_data_i(t_data), .t_pop_o(t_pop),
    .ob_en_o(ob_en), .ob_addr_o(ob_addr), .ob_rdata_i(ob_rdata),
    .rel_o(rel), .rel_len_o(rel_len),
    .char_o(ch), .char_valid_o(ch_valid), .char_ready_i(ch_ready), .busy_o(busy)
  );

  always #5 clk = ~clk;

  char_t    ob_mem [OBUF_DEPTH];
  t_entry_t tq [$];
  // the memory read and the table-t pop are ordered in one process, as the
  // read address may come from the head of table t
  always @(posedge clk) begin
    if (ob_en) ob_rdata <= ob_mem[ob_addr];
    if (rst_n && t_pop) void'(tq.pop_front());
  end

  assign t_valid = tq.size() > 0;
  assign t_data  = t_valid ? tq[0] : '0;

  char_t    exp_q [$];
  int       exp_rel [$];
  int       n_out = 0, n_gap = 0, n_rel = 0;
  bit       rate_check = 1'b0;
  logic     stalled = 1'b0;
  char_t    stalled_ch;

  always @(posedge clk) if (rst_n) begin
    if (rel) begin
      checks++;
      if (exp_rel.size() == 0 || 32'(rel_len) != exp_rel[0]) begin
        failures++;
        if (failures < 10) $display("FAIL release of %0d", rel_len);
      end
      if (exp_rel.size() > 0) void'(exp_rel.pop_front());
      n_rel++;
    end
    if (stalled) begin
      checks++;
      if (!ch_valid || ch != stalled_ch) begin failures++; $display("FAIL stalled character changed"); end
    end
    stalled    <= ch_valid && !ch_ready;
    stalled_ch <= ch;
    if (ch_valid && ch_ready) begin
      checks++;
      if (exp_q.size() == 0 || ch != exp_q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL char %0d: %0d expected %0d", n_out, ch, exp_q.size() ? exp_q[0] : 0);
      end
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      n_out++;
    end else if (rate_check && exp_q.size() > 0) begin
      n_gap++;
    end
  end

  // lay out 'n' random strings, last character first, from address 'start'
  task automatic load(int n, int start);
    obuf_addr_t a;
    a = obuf_addr_t'(start);
    for (int k = 0; k < n; k++) begin
      int    L;
      char_t s [$];
      L = 1 + int'($urandom % 60);
      if (k % 5 == 0) L = 1;
      s.delete();
      for (int i = 0; i < L; i++) s.push_back(8'($urandom));
      for (int i = L - 1; i >= 0; i--) begin
        ob_mem[a] = s[i];
        if (i == 0) tq.push_back('{len: len_t'(L), addr: a});
        a = obuf_inc(a, OBUF_DEPTH);
      end
      foreach (s[i]) exp_q.push_back(s[i]);
      exp_rel.push_back(L);
    end
  endtask

  initial begin
    int n_first;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // pass 1: always ready, 1 char per cycle, wrapping at the buffer end
    load(200, OBUF_DEPTH - 3000);
    @(posedge clk);
    rate_check = 1'b1;
    while (exp_q.size() > 0) @(posedge clk);
    rate_check = 1'b0;
    checks++;
    if (n_gap > 1) begin failures++; $display("FAIL %0d idle cycles while characters were pending", n_gap); end
    // pass 2: random back-pressure
    n_first = n_out;
    fork
      forever @(posedge clk) ch_ready <= ($urandom % 3) != 0;
    join_none
    load(200, 17);
    while (exp_q.size() > 0) @(posedge clk);
    disable fork;
    ch_ready <= 1'b1;
    repeat (4) @(posedge clk);
    checks += 2;
    if (n_rel != 400) begin failures++; $display("FAIL %0d releases, expected 400", n_rel); end
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
