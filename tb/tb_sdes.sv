// tb_sdes: exhaustive check of the S-DES block against a bit-list model.
//
// The model keeps every value as a list of bits numbered from 1 at the left, applies the
// permutation tables written out again here, looks the S-boxes up from their printed rows, and
// runs the two rounds of the design (no swap before the final permutation). All 2^10 keys are
// combined with all 2^8 blocks. Two round-function vectors are also checked on sdes_f: with
// R = 0010 and K = 11011100 the S-boxes give 1101, and with R = 1101 and K = 00011011 they
// give 0000, so f is P4(1101) = 1101 and 0000.
module tb_sdes;
  logic [9:0] key;
  logic [7:0] din, dout;
  logic [3:0] fr, fo;
  logic [7:0] fk;
  int unsigned checks = 0, failures = 0;

  sdes   dut (.key(key), .din(din), .dout(dout));
  sdes_f uf  (.r(fr), .k(fk), .f(fo));

  typedef int bits_t [];

  int s0_rows [4][4] = '{'{1, 0, 2, 3}, '{3, 1, 0, 2}, '{2, 0, 3, 1}, '{1, 3, 2, 0}};
  int s1_rows [4][4] = '{'{0, 3, 1, 2}, '{3, 2, 0, 1}, '{1, 0, 3, 2}, '{2, 1, 3, 0}};

  function automatic bits_t to_bits(int v, int n);
    bits_t b = new[n];
    for (int i = 0; i < n; i++) b[i] = (v >> (n - 1 - i)) & 1;
    return b;
  endfunction

  function automatic int from_bits(bits_t b);
    int v = 0;
    foreach (b[i]) v = (v << 1) | b[i];
    return v;
  endfunction

  function automatic bits_t perm(bits_t b, int tbl []);
    bits_t o = new[tbl.size()];
    foreach (tbl[i]) o[i] = b[tbl[i] - 1];
    return o;
  endfunction

  function automatic bits_t rotl(bits_t b, int n);
    bits_t o = new[b.size()];
    foreach (b[i]) o[i] = b[(i + n) % b.size()];
    return o;
  endfunction

  function automatic int model_f(int r, int k);
    int ep [] = '{4, 1, 2, 3, 2, 3, 4, 1};
    int p4 [] = '{2, 4, 3, 1};
    bits_t x, s;
    int a, b;
    x = to_bits(from_bits(perm(to_bits(r, 4), ep)) ^ k, 8);
    a = s0_rows[x[0] * 2 + x[3]][x[1] * 2 + x[2]];
    b = s1_rows[x[4] * 2 + x[7]][x[5] * 2 + x[6]];
    s = to_bits(a * 4 + b, 4);
    return from_bits(perm(s, p4));
  endfunction

  function automatic int model(int k, int p);
    int p10 [] = '{3, 5, 2, 7, 4, 10, 1, 9, 8, 6};
    int p8  [] = '{6, 3, 7, 4, 8, 5, 10, 9};
    int ip  [] = '{2, 6, 3, 1, 4, 8, 5, 7};
    int ipi [] = '{4, 1, 3, 5, 7, 2, 8, 6};
    bits_t kb, c, d, c1, d1, c2, d2, cd;
    int k1, k2, v, l, r, l1, r1, l2, r2;
    kb = perm(to_bits(k, 10), p10);
    c = new[5]; d = new[5];
    for (int i = 0; i < 5; i++) begin c[i] = kb[i]; d[i] = kb[i + 5]; end
    c1 = rotl(c, 1); d1 = rotl(d, 1);
    c2 = rotl(c1, 2); d2 = rotl(d1, 2);
    k1 = from_bits(perm(to_bits((from_bits(c1) << 5) | from_bits(d1), 10), p8));
    k2 = from_bits(perm(to_bits((from_bits(c2) << 5) | from_bits(d2), 10), p8));
    v = from_bits(perm(to_bits(p, 8), ip));
    l = v >> 4; r = v & 15;
    l1 = r;  r1 = l ^ model_f(r, k1);
    l2 = r1; r2 = l1 ^ model_f(r1, k2);
    return from_bits(perm(to_bits((l2 << 4) | r2, 8), ipi));
  endfunction

  initial begin
    fr = 4'b0010; fk = 8'b11011100;
    #1; checks++;
    if (fo !== 4'b1101) begin failures++; $display("f(0010,11011100) = %b", fo); end
    fr = 4'b1101; fk = 8'b00011011;
    #1; checks++;
    if (fo !== 4'b0000) begin failures++; $display("f(1101,00011011) = %b", fo); end
    for (int k = 0; k < 1024; k++) begin
      for (int p = 0; p < 256; p++) begin
        int exp_c;
        key = 10'(k); din = 8'(p);
        #1;
        exp_c = model(k, p);
        checks++;
        if (int'(dout) != exp_c) begin
          failures++;
          if (failures < 10) $display("key %b block %b: got %b expected %b", key, din, dout, 8'(exp_c));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
