// bsc_enc -- Boundary Shift Code (BSC) encoder.
//
// The DAP word (flit bit d[i] twice, plus parity) is shifted by one wire on
// every other flit: in phase 0 the duplicated pairs occupy wires 0..63 and the
// parity is on wire 64; in phase 1 the pairs occupy wires 1..64 and the parity
// is on wire 0. Consecutive codewords therefore never share a pair boundary.
// 'phase' starts at 0 after reset and toggles on each clock edge at which
// 'valid' is high (one flit sent). The coding is the document's; advancing
// per flit rather than per clock is this design's choice so that an idle link
// keeps sender and receiver aligned. 'y' is combinational from d and phase.
module bsc_enc
  import noc_code_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic [FLIT_W-1:0] d,
  output logic [2*FLIT_W:0] y,
  output logic              phase
);
  logic [2*FLIT_W-1:0] dup;

  always_comb begin
    for (int i = 0; i < FLIT_W; i++) begin
      dup[2*i]   = d[i];
      dup[2*i+1] = d[i];
    end
    if (!phase) y = {^d, dup};
    else        y = {dup, ^d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     phase <= 1'b0;
    else if (valid) phase <= ~phase;
  end
endmodule
