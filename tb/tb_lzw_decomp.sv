// Self-checking testbench of one LZW decompression module (lzw_decomp).
//
// Files of several kinds are compressed by the reference compressor of
// tb_lzw_pkg and fed back to back, without reset, as 12-bit codes; the
// character stream must equal the original data and done_o must pulse once
// per file. Output back-pressure patterns make the output buffer and table t
// fill up. The testbench also checks the timing of the architecture: the
// dictionary takes a new code every 2 cycles, and on well compressible data
// the module delivers close to one character per cycle. It counts how often
// each mechanism occurred (segment restart at ClearCode, end of file, a code
// that names the entry defined by itself, output-buffer-full stall, table-t
// full stall, output back-pressure, code-buffer backlog) and fails if one
// never did.
module tb_lzw_decomp;
  import lzw_pkg::*;
  import tb_lzw_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  code_t code;
  logic  code_valid = 1'b0;
  logic  code_ready;
  char_t ch;
  logic  ch_valid;
  logic  ch_ready = 1'b1;
  logic  done;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  lzw_decomp dut (
    .clk, .rst_n,
    .code_i(code), .code_valid_i(code_valid), .code_ready_o(code_ready),
    .char_o(ch), .char_valid_o(ch_valid), .char_ready_i(ch_ready),
    .done_o(done)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---- mechanism counters ----
  int n_clear = 0, n_done = 0, n_self = 0, n_ob_full = 0, n_t_full = 0;
  int n_backpressure = 0, max_backlog = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_part1.take && dut.code_i == code_t'(CLEAR_CODE)) n_clear++;
    if (done) n_done++;
    if (dut.u_part1.take && dut.u_part1.idx != '0 &&
        32'(dut.code_i) == FIRST + 32'(dut.u_part1.idx) - 1) n_self++;
    if (dut.trav_busy && !dut.ob_space) n_ob_full++;
    if (dut.t_full && (dut.trav_busy || dut.cq_valid)) n_t_full++;
    if (ch_valid && !ch_ready) n_backpressure++;
    if (int'(dut.cq_level) > max_backlog) max_backlog = int'(dut.cq_level);
  end

  // ---- code input cadence: gaps between accepted codes ----
  longint last_take = -1;
  int gaps_2 = 0, gaps_lt2 = 0, gaps_all = 0;
  always @(posedge clk) if (rst_n && code_valid && code_ready) begin
    if (last_take >= 0) begin
      gaps_all++;
      if (cycle - last_take == 2) gaps_2++;
      if (cycle - last_take < 2) gaps_lt2++;
    end
    last_take = cycle;
  end

  // ---- output collection ----
  byte_q_t got;
  always @(posedge clk) if (rst_n && ch_valid && ch_ready) got.push_back(ch);

  int ready_mode = 0;   // 0 always, 1 random, 2 long stalls
  always @(posedge clk) begin
    unique case (ready_mode)
      0: ch_ready <= 1'b1;
      1: ch_ready <= ($urandom % 4) != 0;
      default: ch_ready <= ((cycle / 15000) % 2) == 1;
    endcase
  end

  task automatic run_file(int kind, int n, int rmode, real min_rate, string name);
    byte_q_t data;
    int_q_t  codes;
    longint  t0, t1;
    int      done_before;
    real     rate;
    gen_data(kind, n, data);
    lzw_compress(data, codes);
    got.delete();
    ready_mode  = rmode;
    done_before = n_done;
    t0 = cycle;
    foreach (codes[i]) begin
      code       <= code_t'(codes[i]);
      code_valid <= 1'b1;
      @(posedge clk);
      while (!code_ready) @(posedge clk);
    end
    code_valid <= 1'b0;
    while (n_done == done_before) @(posedge clk);
    t1 = cycle;
    checks++;
    if (got.size() != data.size()) begin
      failures++;
      $display("FAIL %s: %0d chars out, %0d expected", name, got.size(), data.size());
    end
    for (int i = 0; i < data.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != data[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: char %0d is %0d, expected %0d", name, i, got[i], data[i]);
      end
    end
    rate = real'(data.size()) / real'(t1 - t0);
    $display("%s: %0d bytes, %0d codes, %0d cycles, %f bytes/cycle", name, data.size(),
             codes.size(), t1 - t0, rate);
    if (min_rate > 0.0) begin
      checks++;
      if (rate < min_rate) begin
        failures++;
        $display("FAIL %s: %f bytes/cycle, expected at least %f", name, rate, min_rate);
      end
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    byte_q_t ex;
    int_q_t  exc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // long strings, full speed output: about one character per cycle
    run_file(3, 30000, 0, 0.95, "constant");
    run_file(1, 40000, 0, 0.90, "runs");
    run_file(0, 12000, 0, 0.0,  "random");
    run_file(2, 20000, 1, 0.0,  "pattern/random-ready");
    run_file(0, 9000, 2, 0.0,   "random/long-stalls");
    run_file(1, 60000, 2, 0.0,  "runs/long-stalls");
    run_file(0, 1, 0, 0.0,      "single");
    // the textbook example string "cbcbcbcda"
    run_file(4, 9, 0, 0.0,      "cbcbcbcda");

    // dictionary cadence: an accepted code every 2 cycles when not waiting
    checks++;
    if (gaps_lt2 != 0 || gaps_2 < gaps_all * 9 / 10) begin
      failures++;
      $display("FAIL cadence: %0d gaps of 2 cycles, %0d shorter, %0d in all", gaps_2, gaps_lt2, gaps_all);
    end
    $display("mechanisms: clear=%0d done=%0d self-ref=%0d ob_full=%0d t_full=%0d backpressure=%0d max_backlog=%0d",
             n_clear, n_done, n_self, n_ob_full, n_t_full, n_backpressure, max_backlog);
    checks += 7;
    if (n_clear == 0)        begin failures++; $display("FAIL no ClearCode restart"); end
    if (n_done != 8)         begin failures++; $display("FAIL done pulses %0d", n_done); end
    if (n_self == 0)         begin failures++; $display("FAIL no self-referencing code"); end
    if (n_ob_full == 0)      begin failures++; $display("FAIL output buffer never full"); end
    if (n_t_full == 0)       begin failures++; $display("FAIL table t never full"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL no output back-pressure"); end
    if (max_backlog < 100)   begin failures++; $display("FAIL code buffer backlog only %0d", max_backlog); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 3_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
