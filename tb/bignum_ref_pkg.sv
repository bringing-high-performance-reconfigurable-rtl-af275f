// Reference arithmetic on 64-bit-word big integers (least significant word
// first) for the testbenches. The product is computed row by row with a
// running carry, independent of the column-wise convolve-and-merge order of
// the hardware.
package bignum_ref_pkg;
  typedef logic [63:0] word_t;
  typedef word_t       num_t[];

  function automatic num_t mul_ref(num_t a, num_t b);
    num_t r = new[a.size() + b.size() + 1];
    foreach (r[i]) r[i] = '0;
    foreach (a[i]) begin
      logic [127:0] carry = '0;
      foreach (b[j]) begin
        logic [127:0] t = {64'd0, a[i]} * {64'd0, b[j]} + {64'd0, r[i+j]} + carry;
        r[i+j] = t[63:0];
        carry  = {64'd0, t[127:64]};
      end
      for (int k = i + b.size(); carry != 0; k++) begin
        logic [127:0] t = {64'd0, r[k]} + carry;
        r[k]  = t[63:0];
        carry = {64'd0, t[127:64]};
      end
    end
    return r;
  endfunction

  // A + B (sub = 0) or A - B in two's complement (sub = 1), max(n1,n2)+1 words.
  function automatic num_t addsub_ref(num_t a, num_t b, bit sub);
    int n = (a.size() > b.size()) ? a.size() : b.size();
    num_t r = new[n + 1];
    logic [64:0] acc;
    logic        c = sub;
    for (int i = 0; i <= n; i++) begin
      word_t x = (i < a.size()) ? a[i] : '0;
      word_t y = (i < b.size()) ? b[i] : '0;
      if (sub) y = ~y;
      acc  = {1'b0, x} + {1'b0, y} + {64'd0, c};
      r[i] = acc[63:0];
      c    = acc[64];
    end
    return r;
  endfunction

  // Convolution coefficient i, 192 bits.
  function automatic logic [191:0] conv_ref(num_t a, num_t b, int i);
    logic [191:0] s = '0;
    foreach (a[k]) if (i - k >= 0 && i - k < b.size())
      s += {128'd0, a[k]} * {128'd0, b[i-k]};
    return s;
  endfunction

  function automatic word_t rand_word(int mode);
    case (mode)
      0: return {$urandom, $urandom};
      1: return '1;                              // all ones: maximal carries
      default: return ($urandom_range(3) == 0) ? '1 : {$urandom, $urandom};
    endcase
  endfunction
endpackage
