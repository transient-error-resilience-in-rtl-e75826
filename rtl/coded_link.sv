// coded_link -- one coded, pipelined switch-to-switch link.
//
// Pipeline: [sender: encoder -> register] -> link wires -> [receiver: decoder
// -> register]. The encoder and decoder each occupy one pipeline stage, so a
// flit accepted at the input appears at the output two clock edges later and
// the link still takes one flit per cycle. 'err_i' is XORed onto the wires
// between the two registers and models transient wire errors; 'link_o' shows
// the wires as driven, before errors.
// SCHEME selects the code (noc_code_pkg::scheme_e) and thereby W, the number
// of link wires. CADEC and ED add switch-to-switch retransmission: an
// rtx_sender keeps the flits in flight and an arq_receiver raises ARQ for a
// flit its decoder cannot repair (CADEC: beyond two errors as far as
// detected; ED: any detected error). DAP, BSC and MDR correct one error and
// never retransmit; FOC, FTC and FPC only shape transitions against
// crosstalk. 'corr_o' pulses with a delivered flit whose decoder repaired an
// error. The valid and ARQ wires are modelled as error free and the
// downstream switch is assumed always to accept a flit; both are this
// design's assumptions.
module coded_link
  import noc_code_pkg::*;
#(
  parameter scheme_e SCHEME = SCH_CADEC,
  parameter int      W      = coded_width(SCHEME),
  parameter int      RTT    = 2
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [FLIT_W-1:0] in_data,
  output logic              in_ready,
  input  logic [W-1:0]      err_i,
  output logic [W-1:0]      link_o,
  output logic              out_valid,
  output logic [FLIT_W-1:0] out_data,
  output logic              arq_o,
  output logic              corr_o,
  output logic              replay_o
);
  logic              tx_valid;
  logic [FLIT_W-1:0] tx_data;
  logic [W-1:0]      enc_word, tx_q, rx_word;
  logic              tx_q_valid;
  logic [FLIT_W-1:0] dec_data;
  logic              dec_bad, dec_corr;
  logic              arq;

  // ---------------- sender side ----------------
  if (uses_arq(SCHEME)) begin : g_rtx
    rtx_sender #(.RTT(RTT)) u_rtx (
      .clk, .rst_n, .in_valid, .in_data, .in_ready,
      .arq_i(arq), .tx_valid, .tx_data, .replaying(replay_o)
    );
  end else begin : g_nortx
    assign in_ready = 1'b1;
    assign tx_valid = in_valid;
    assign tx_data  = in_data;
    assign replay_o = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_q_valid <= 1'b0;
      tx_q       <= '0;
    end else begin
      tx_q_valid <= tx_valid;
      if (tx_valid) tx_q <= enc_word;
    end
  end

  assign link_o  = tx_q;
  assign rx_word = tx_q ^ err_i;

  // ---------------- codec ----------------
  if (SCHEME == SCH_CADEC) begin : g_cadec
    cadec_enc u_enc (.d(tx_data), .y(enc_word));
    cadec_dec u_dec (.y(rx_word), .d(dec_data), .corrected(dec_corr),
                     .uncorrectable(dec_bad), .sel_b(), .ded_used());
  end else if (SCHEME == SCH_ED) begin : g_ed
    hamming_enc u_enc (.d(tx_data), .c(enc_word));
    ed_dec      u_dec (.c(rx_word), .d(dec_data), .error(dec_bad));
    assign dec_corr = 1'b0;
  end else if (SCHEME == SCH_DAP) begin : g_dap
    dap_enc u_enc (.d(tx_data), .y(enc_word));
    dap_dec u_dec (.y(rx_word), .d(dec_data), .sel_even(dec_corr));
    assign dec_bad = 1'b0;
  end else if (SCHEME == SCH_BSC) begin : g_bsc
    bsc_enc u_enc (.clk, .rst_n, .valid(tx_valid), .d(tx_data), .y(enc_word), .phase());
    bsc_dec u_dec (.clk, .rst_n, .valid(tx_q_valid), .y(rx_word), .d(dec_data), .sel_even(dec_corr));
    assign dec_bad = 1'b0;
  end else if (SCHEME == SCH_MDR) begin : g_mdr
    logic sel_even;
    mdr_enc u_enc (.d(tx_data), .y(enc_word));
    mdr_dec u_dec (.y(rx_word), .d(dec_data), .sel_even);
    assign dec_corr = sel_even || (rx_word[W-1] != rx_word[W-2]);
    assign dec_bad  = 1'b0;
  end else if (SCHEME == SCH_FOC) begin : g_foc
    foc_enc u_enc (.d(tx_data), .c(enc_word));
    foc_dec u_dec (.c(rx_word), .d(dec_data));
    assign dec_bad  = 1'b0;
    assign dec_corr = 1'b0;
  end else if (SCHEME == SCH_FTC) begin : g_ftc
    ftc_enc u_enc (.d(tx_data), .c(enc_word));
    ftc_dec u_dec (.c(rx_word), .d(dec_data));
    assign dec_bad  = 1'b0;
    assign dec_corr = 1'b0;
  end else begin : g_fpc
    fpc_enc u_enc (.d(tx_data), .c(enc_word));
    fpc_dec u_dec (.c(rx_word), .d(dec_data));
    assign dec_bad  = 1'b0;
    assign dec_corr = 1'b0;
  end

  // ---------------- receiver side ----------------
  if (uses_arq(SCHEME)) begin : g_arq
    arq_receiver #(.RTT(RTT)) u_arq (
      .clk, .rst_n, .rx_valid(tx_q_valid), .rx_data(dec_data), .rx_bad(dec_bad),
      .out_valid, .out_data, .arq_o(arq)
    );
  end else begin : g_noarq
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        out_data  <= '0;
      end else begin
        out_valid <= tx_q_valid;
        out_data  <= dec_data;
      end
    end
    assign arq = 1'b0;
  end

  assign arq_o = arq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) corr_o <= 1'b0;
    else        corr_o <= tx_q_valid && dec_corr && !dec_bad;
  end
endmodule
