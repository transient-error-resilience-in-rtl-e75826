// tb_ref_pkg -- reference models shared by the testbenches, written
// independently of the RTL.
//
// ref_ham_enc builds the (38,32) positional Hamming word from its parity-check
// matrix: check bit j (at position 2^j) is the XOR of every other position
// whose index has bit j set. ref_ham_data reads the data bits back.
package tb_ref_pkg;

  function automatic logic [37:0] ref_ham_enc(logic [31:0] d);
    logic [37:0] c = '0;
    int k = 0;
    for (int p = 1; p <= 38; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16 && p != 32) begin
        c[p-1] = d[k];
        k++;
      end
    for (int j = 0; j < 6; j++) begin
      logic par = 1'b0;
      for (int p = 1; p <= 38; p++)
        if (((p >> j) & 1) == 1 && p != (1 << j)) par ^= c[p-1];
      c[(1 << j) - 1] = par;
    end
    return c;
  endfunction

  function automatic int popcount64(logic [127:0] v);
    int n = 0;
    for (int i = 0; i < 128; i++) n += int'(v[i]);
    return n;
  endfunction

  // Random mask with exactly n distinct set bits among the low w bits.
  function automatic logic [127:0] rand_mask(int w, int n);
    logic [127:0] m = '0;
    while (popcount64(m) < n) m[$urandom_range(w-1, 0)] = 1'b1;
    return m;
  endfunction

endpackage
