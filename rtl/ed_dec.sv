// ed_dec -- error-detection (ED) decoder of the detect-and-retransmit scheme.
//
// The link carries a plain (38,32) Hamming word. The receiver computes its
// syndrome; any non-zero syndrome (every one- and two-bit error, minimum
// distance 3) raises 'error', which the link turns into an automatic repeat
// request. No correction is attempted: data is the raw data bits.
// Follows the document's ED scheme. Combinational.
module ed_dec
  import noc_code_pkg::*;
(
  input  logic [HAM_N-1:0]  c,
  output logic [FLIT_W-1:0] d,
  output logic              error
);
  logic [HAM_R-1:0] s;

  hamming_syndrome u_syn (.c(c), .s(s));

  assign error = (s != '0);

  always_comb begin
    int k;
    d = '0;
    k = 0;
    for (int p = 1; p <= HAM_N; p++) begin
      if ((p & (p - 1)) != 0) begin
        d[k] = c[p-1];
        k++;
      end
    end
  end
endmodule
