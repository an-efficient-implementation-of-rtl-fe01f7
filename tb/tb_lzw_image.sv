// Workload testbench: three synthetic 4096 x 3072 8-bit grayscale images
// through one LZW decompression module (lzw_decomp at its default sizes).
//
// The images stand in for three photographs of different detail, from a
// fine-grained, hard to compress one to a mostly flat chart-like one:
//   detailed : pixel = (x/2 + y/8 + n) mod 256, n a hashed 0/1 noise bit
//   medium   : pixel = (x/24 + y/16 + n) mod 256
//   flat     : two-level checkerboard of 512 x 384 tiles with a slow ramp
//              and black grid lines (very long LZW strings)
// Each image is compressed by the reference compressor (ClearCode after
// entry 4095), fed back to back without reset, and every output byte is
// compared with the pixel function. The testbench prints the compression
// ratio (12-bit codes counted as 1.5 bytes), the cycles from the first code
// to done_o and the bytes per cycle, and checks that the flat image runs at
// 0.9 bytes per cycle or more and needs fewer cycles than the detailed one.
module tb_lzw_image;
  import lzw_pkg::*;
  import tb_lzw_pkg::*;

  localparam int W = 4096;
  localparam int H = 3072;
  localparam int N = W * H;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  code_t code = '0;
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

  function automatic int unsigned mix(int unsigned i);
    int unsigned v;
    v = i * 32'd2654435761;
    v ^= v >> 15;
    v *= 32'd2246822519;
    v ^= v >> 13;
    return v;
  endfunction

  function automatic byte unsigned pixel(int kind, int i);
    int x, y, v;
    x = i % W;
    y = i / W;
    unique case (kind)
      0: v = x / 2 + y / 8 + int'(mix(i) % 2);
      1: v = x / 24 + y / 16 + int'(mix(i) % 2);
      default: begin
        v = ((((x / 512) + (y / 384)) % 2) != 0 ? 200 : 240) - (x / 112) % 8;
        if (x % 600 < 2 || y % 450 < 2) v = 0;
      end
    endcase
    return 8'(v);
  endfunction

  int cur_kind = 0;
  int n_out = 0;
  int n_bad = 0;
  int n_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (ch_valid && ch_ready) begin
      if (n_out >= N || ch != pixel(cur_kind, n_out)) begin
        n_bad++;
        if (n_bad < 10) $display("FAIL image %0d byte %0d: %0d expected %0d", cur_kind, n_out, ch,
                                 pixel(cur_kind, n_out));
      end
      n_out++;
    end
    if (done) n_done++;
  end

  function automatic void compress_image(int kind, ref int_q_t codes);
    int dict [int];
    int next, omega;
    codes.delete();
    codes.push_back(CLEAR);
    next  = FIRST;
    omega = int'(pixel(kind, 0));
    for (int i = 1; i < N; i++) begin
      int x, key;
      x   = int'(pixel(kind, i));
      key = omega * 256 + x;
      if (dict.exists(key)) begin
        omega = dict[key];
      end else begin
        codes.push_back(omega);
        dict[key] = next;
        next++;
        if (next == SIZE) begin
          codes.push_back(CLEAR);
          dict.delete();
          next = FIRST;
        end
        omega = x;
      end
    end
    codes.push_back(omega);
    codes.push_back(EOI);
  endfunction

  longint cyc [3];

  task automatic run_image(int kind, string name);
    int_q_t codes;
    longint t0;
    int     d0;
    real    ratio, rate;
    compress_image(kind, codes);
    ratio = real'(N) / (real'(codes.size()) * 1.5);
    cur_kind = kind;
    n_out    = 0;
    n_bad    = 0;
    d0       = n_done;
    t0       = cycle;
    foreach (codes[i]) begin
      code       <= code_t'(codes[i]);
      code_valid <= 1'b1;
      @(posedge clk);
      while (!code_ready) @(posedge clk);
    end
    code_valid <= 1'b0;
    while (n_done == d0) @(posedge clk);
    cyc[kind] = cycle - t0;
    rate = real'(N) / real'(cyc[kind]);
    $display("%s: ratio %.2f:1, %0d codes, %0d cycles, %.3f bytes/cycle, %.3f ms at 300 MHz",
             name, ratio, codes.size(), cyc[kind], rate, real'(cyc[kind]) / 300.0e3);
    checks += 2;
    if (n_out != N) begin failures++; $display("FAIL %s: %0d bytes out", name, n_out); end
    if (n_bad != 0) begin failures++; end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_image(0, "detailed");
    run_image(1, "medium");
    run_image(2, "flat");
    checks += 2;
    if (real'(N) / real'(cyc[2]) < 0.9) begin failures++; $display("FAIL flat image below 0.9 bytes/cycle"); end
    if (cyc[2] >= cyc[0]) begin failures++; $display("FAIL flat image not faster than detailed one"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 120_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
