// Testbench helpers: a reference LZW compressor, a reference LZW decoder
// and data generators.
//
// The compressor uses the code assignment of the decompressor: 0..255 are
// characters, 256 ClearCode, 257 EndOfInformation, new entries from 258. It
// starts the stream with ClearCode, emits ClearCode right after entry 4095
// has been added (so every full code segment holds 3838 codes) and ends with
// EndOfInformation. The reference decoder is the textbook one (entries hold
// a prefix code and a last character), independent of the hardware's
// first-character table; it returns the string of every data code.
package tb_lzw_pkg;

  typedef byte unsigned byte_q_t [$];
  typedef int           int_q_t  [$];

  localparam int CLEAR = 256;
  localparam int EOI   = 257;
  localparam int FIRST = 258;
  localparam int SIZE  = 4096;

  function automatic void lzw_compress(ref byte_q_t data, ref int_q_t codes);
    int dict [int];
    int next;
    int omega;
    codes.delete();
    codes.push_back(CLEAR);
    next  = FIRST;
    omega = -1;
    foreach (data[i]) begin
      int x;
      int key;
      x = int'(data[i]);
      if (omega < 0) begin
        omega = x;
        continue;
      end
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
    if (omega >= 0) codes.push_back(omega);
    codes.push_back(EOI);
  endfunction

  // Decode 'codes'; 'chars' gets the whole output, 'lens' the string length
  // of each data code (ClearCode and EndOfInformation excluded).
  function automatic void lzw_decode(ref int_q_t codes, ref byte_q_t chars, ref int_q_t lens);
    int          prefix [SIZE];
    byte unsigned last  [SIZE];
    int          next;
    int          prev;
    byte unsigned s [$];
    chars.delete();
    lens.delete();
    next = FIRST;
    prev = -1;
    foreach (codes[i]) begin
      int c;
      c = codes[i];
      if (c == CLEAR) begin
        next = FIRST;
        prev = -1;
        continue;
      end
      if (c == EOI) break;
      s.delete();
      if (c < next) begin
        int j;
        j = c;
        while (j >= FIRST) begin
          s.push_front(last[j]);
          j = prefix[j];
        end
        s.push_front(byte'(j));
      end else begin
        // code defined by this very step: string of prev plus its first char
        int j;
        j = prev;
        while (j >= FIRST) begin
          s.push_front(last[j]);
          j = prefix[j];
        end
        s.push_front(byte'(j));
        s.push_back(s[0]);
      end
      if (prev >= 0 && next < SIZE) begin
        prefix[next] = prev;
        last[next]   = s[0];
        next++;
      end
      prev = c;
      foreach (s[k]) chars.push_back(s[k]);
      lens.push_back(s.size());
    end
  endfunction

  // kind 0: random bytes (hard to compress); 1: runs of similar values
  // (image-like, well compressible); 2: repeats of a short pattern; 3: one
  // constant value (very long strings); 4: the string "cbcbcbcda" repeated.
  function automatic void gen_data(int kind, int n, ref byte_q_t data);
    byte unsigned v;
    int run;
    data.delete();
    v   = 8'($urandom);
    run = 0;
    for (int i = 0; i < n; i++) begin
      unique case (kind)
        0: data.push_back(8'($urandom));
        1: begin
          if (run == 0) begin
            run = 1 + int'($urandom % 40);
            v   = 8'(int'(v) + int'($urandom % 5) - 2);
          end
          run--;
          data.push_back(v);
        end
        2: data.push_back(8'((i % 7) * 13 + (i / 500)));
        4: data.push_back(byte'("cbcbcbcda" >> (8 * (8 - i % 9))));
        default: data.push_back(8'd77);
      endcase
    end
  endfunction

endpackage
