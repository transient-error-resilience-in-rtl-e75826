// noc_code_pkg -- shared constants, types and small code functions for the
// coded network-on-chip link.
//
// The link carries 32-bit flits. Every scheme maps a flit onto a wider set of
// link wires; the widths below follow from each code's construction:
//   CADEC  (38,32) Hamming word, each bit duplicated, plus one parity wire = 77
//   ED     (38,32) Hamming word only                                      = 38
//   DAP    32 bits duplicated plus one parity wire                         = 65
//   BSC    as DAP, parity wire alternates between the two ends             = 65
//   MDR    as DAP with two adjacent copies of the parity wire              = 66
//   FOC    eight 4->5 sub-channels side by side                            = 40
//   FTC    eleven 3->4 sub-channels, a grounded shield wire between each   = 54
//   FPC    eleven 4->5 sub-channels; each sub-channel re-uses the top data
//          bit of its lower neighbour as its own bottom data bit           = 55
// The sub-channel mappings of FOC, FTC and FPC are kept here as functions so
// that encoder, decoder and any checker share one definition. Decoders invert
// the mapping by searching the (small) code table, so a decoder can never
// disagree with its encoder. The codes, the flit width and the code widths
// are the document's (MDR counted with both its parity copies); the
// positional Hamming layout, the wire orders, the header-only path's hop
// count and its packet-id placement are this design's choices.
package noc_code_pkg;

  localparam int FLIT_W = 32;          // flit width
  localparam int HAM_N  = 38;          // shortened Hamming codeword length
  localparam int HAM_R  = 6;           // Hamming check bits

  typedef enum logic [2:0] {
    SCH_CADEC = 3'd0,
    SCH_ED    = 3'd1,
    SCH_DAP   = 3'd2,
    SCH_BSC   = 3'd3,
    SCH_MDR   = 3'd4,
    SCH_FOC   = 3'd5,
    SCH_FTC   = 3'd6,
    SCH_FPC   = 3'd7
  } scheme_e;

  localparam int NUM_SCHEMES = 8;
  localparam int MAX_CODED_W = 77;
  localparam int PATH_HOPS   = 3;    // intermediate switches on the header-only coded path

  localparam int FOC_SUBCH = 8;        // 32 / 4
  localparam int FTC_SUBCH = 11;       // ceil(32 / 3)
  localparam int FPC_SUBCH = 11;       // 4 + 3*10 >= 32

  function automatic int coded_width(scheme_e s);
    case (s)
      SCH_CADEC: return 2*HAM_N + 1;
      SCH_ED:    return HAM_N;
      SCH_DAP:   return 2*FLIT_W + 1;
      SCH_BSC:   return 2*FLIT_W + 1;
      SCH_MDR:   return 2*FLIT_W + 2;
      SCH_FOC:   return 5*FOC_SUBCH;
      SCH_FTC:   return 4*FTC_SUBCH + (FTC_SUBCH - 1);
      default:   return 5*FPC_SUBCH;   // SCH_FPC
    endcase
  endfunction

  // Schemes whose decoder can flag a flit it cannot repair, and which
  // therefore run the switch-to-switch retransmission protocol.
  function automatic bit uses_arq(scheme_e s);
    return (s == SCH_CADEC) || (s == SCH_ED);
  endfunction

  // Header-only coding: the packet id sits in flit bits pid_width(s)-1:0 of
  // every flit, exactly the data bits of the crosstalk code's sub-channel 0.
  // Its coded form is then wires pid_wires(s)-1:0, which depend on the id
  // alone, so a switch can compare ids without decoding the flit.
  function automatic int pid_width(scheme_e s);
    return (s == SCH_FTC) ? 3 : 4;
  endfunction

  function automatic int pid_wires(scheme_e s);
    return (s == SCH_FTC) ? 4 : 5;
  endfunction

  // ---- Forbidden overlap condition, 4 data bits -> 5 wires --------------
  function automatic logic [4:0] foc_map(logic [3:0] d);
    logic [4:0] c;
    c[0] = d[1] | (d[2] & ~d[3]);
    c[1] = d[2] & ~d[3];
    c[2] = d[0];
    c[3] = d[2] & d[3];
    c[4] = (d[1] & d[2]) | d[3];
    return c;
  endfunction

  // ---- Forbidden transition condition, 3 data bits -> 4 wires -----------
  function automatic logic [3:0] ftc_map(logic [2:0] d);
    logic [3:0] c;
    c[0] = d[1] | (d[2] & ~d[0]);
    c[1] = (d[0] & d[1] & d[2]) | (~d[0] & ~d[1] & d[2]);
    c[2] = d[0] | d[2];
    c[3] = (d[0] & d[2]) | (d[1] & d[2]);
    return c;
  endfunction

  // ---- Forbidden pattern condition, 4 data bits -> 5 wires --------------
  function automatic logic [4:0] fpc_map(logic [3:0] d);
    logic [4:0] c;
    c[0] = d[0];
    c[1] = (d[0] & d[1]) | (d[2] & d[1]) | (d[1] & ~d[3]) | (d[0] & d[2] & ~d[3]);
    c[2] = (d[2] & ~d[3]) | (d[1] & d[2]) | (~d[0] & d[2]) | (d[1] & ~d[0] & ~d[3]);
    c[3] = (d[2] & d[3]) | (~d[0] & d[2]) | (d[2] & d[1]) | (d[1] & d[3] & ~d[0]);
    c[4] = d[3];
    return c;
  endfunction

  // Inverse mappings: search the 8- or 16-entry table. A word that is not a
  // codeword (only possible after a wire error) decodes to zero.
  function automatic logic [3:0] foc_unmap(logic [4:0] c);
    logic [3:0] d = '0;
    for (int v = 0; v < 16; v++)
      if (foc_map(4'(v)) == c) d = 4'(v);
    return d;
  endfunction

  function automatic logic [2:0] ftc_unmap(logic [3:0] c);
    logic [2:0] d = '0;
    for (int v = 0; v < 8; v++)
      if (ftc_map(3'(v)) == c) d = 3'(v);
    return d;
  endfunction

  function automatic logic [3:0] fpc_unmap(logic [4:0] c);
    logic [3:0] d = '0;
    for (int v = 0; v < 16; v++)
      if (fpc_map(4'(v)) == c) d = 4'(v);
    return d;
  endfunction

endpackage
