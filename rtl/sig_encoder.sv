// Sig-NoC source encoder (network-interface side of the sending node).
//
// A packet from the core is collected whole, because its head flit, which
// leaves first, must carry the signature of the flits that follow. While the
// body and tail flits arrive, a signature_gen bank counts the 1s in each of
// the eight bit positions over their 68 bytes (64 data bytes, 4 address
// bytes). The packet is then sent: the head flit unchanged except that the
// 8-bit signature is written into its reserved bits, and every byte of every
// body and tail flit XORed with the signature. The majority rule makes each
// bit position at most half 1s, and with transition signaling on the links
// fewer 1s means fewer wire transitions on every hop.
//
// In the cycle the head flit leaves (est_valid) the encoder reports est_ones, the number of 1s
// in the packet as sent (all 34 bits of every flit). Under transition
// signaling this is the number of wire transitions per hop, i.e. the link
// energy of the packet, known at the source.
//
// Following the scheme, only data packets (those with body flits) are
// encoded; message packets (head + tail) leave with a zero signature, which
// the decoder's XOR leaves unchanged. Collecting before sending, one packet
// at a time, is this design's choice.
//
// Interface: in_* is a valid/ready flit stream from the core, out_* a
// valid/ready flit stream to the network. Timing: a data packet offered
// without gaps is taken in 18 cycles; its head flit is offered on the next
// cycle, and the packet leaves in 18 cycles when out_ready stays high.
module sig_encoder
  import signoc_pkg::*;
#(
  parameter int unsigned MAX_WORDS = BODY_FLITS + 1,   // body flits + tail flit
  localparam int unsigned EST_W = $clog2((MAX_WORDS + 1) * FLIT_W + 1)
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the core
  input  flit_t in_flit,
  input  logic  in_valid,
  output logic  in_ready,
  // to the network
  output flit_t out_flit,
  output logic  out_valid,
  input  logic  out_ready,
  // link-energy estimate of the packet being sent
  output logic [EST_W-1:0] est_ones,
  output logic             est_valid,
  output logic [SIG_W-1:0] sig_used
);

  localparam int unsigned IDX_W = $clog2(MAX_WORDS + 1);
  localparam int unsigned UNITS = MAX_WORDS * (PAYLOAD_W / SIG_W);
  localparam int unsigned CNT_W = $clog2(UNITS + 1);

  typedef enum logic {S_COLLECT, S_SEND} state_e;
  state_e state;

  logic [PAYLOAD_W-1:0] head_q;
  logic [PAYLOAD_W-1:0] words_q [MAX_WORDS];
  logic [IDX_W-1:0]     nwords_q;   // body + tail flits collected
  logic [IDX_W-1:0]     idx_q;      // 0 = head, k = words_q[k-1]
  logic                 in_pkt_q;   // a head has been taken

  logic [SIG_W-1:0]            gen_sig;
  logic [SIG_W-1:0][CNT_W-1:0] gen_cnt;
  logic [CNT_W-1:0]            gen_units;
  logic                        take, is_data;

  assign in_ready = (state == S_COLLECT);
  assign take     = in_valid && in_ready;

  signature_gen #(
    .SIG_W(SIG_W), .WORD_W(PAYLOAD_W), .MAX_UNITS(UNITS)
  ) u_gen (
    .clk, .rst_n,
    .clear (take && in_flit.ftype == FLIT_HEAD),
    .add_en(take && in_flit.ftype != FLIT_HEAD && in_pkt_q),
    .word  (in_flit.payload),
    .sig   (gen_sig),
    .cnt   (gen_cnt),
    .units (gen_units)
  );

  // data packets have body flits, so more than one word after the head
  assign is_data  = (nwords_q > IDX_W'(1));
  assign sig_used = is_data ? gen_sig : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_COLLECT;
      nwords_q <= '0;
      idx_q    <= '0;
      in_pkt_q <= 1'b0;
      head_q   <= '0;
    end else begin
      case (state)
        S_COLLECT: if (take) begin
          if (in_flit.ftype == FLIT_HEAD) begin
            head_q   <= in_flit.payload;
            nwords_q <= '0;
            in_pkt_q <= 1'b1;
          end else if (in_pkt_q && nwords_q < IDX_W'(MAX_WORDS)) begin
            nwords_q <= nwords_q + 1'b1;
            if (in_flit.ftype == FLIT_TAIL) begin
              state    <= S_SEND;
              idx_q    <= '0;
              in_pkt_q <= 1'b0;
            end
          end
        end
        S_SEND: if (out_ready) begin
          if (idx_q == nwords_q) state <= S_COLLECT;
          else                   idx_q <= idx_q + 1'b1;
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (take && in_flit.ftype != FLIT_HEAD && in_pkt_q && nwords_q < IDX_W'(MAX_WORDS))
      words_q[nwords_q] <= in_flit.payload;
  end

  // outgoing flit
  always_comb begin
    out_valid = (state == S_SEND);
    if (idx_q == '0) begin
      out_flit.ftype   = FLIT_HEAD;
      out_flit.payload = head_q;
      out_flit.payload[SIG_LSB +: SIG_W] = sig_used;
    end else begin
      out_flit.ftype   = (idx_q == nwords_q) ? FLIT_TAIL : FLIT_BODY;
      out_flit.payload = xor_sig(words_q[idx_q - 1'b1], sig_used);
    end
  end

  // energy estimate: 1s of the coded head, of the type fields (one per body
  // flit, one for the head) and of the coded payload. Per bit position the
  // coded payload holds min(cnt, units - cnt) 1s for a data packet.
  logic [PAYLOAD_W-1:0] head_coded;
  always_comb begin
    head_coded = head_q;
    head_coded[SIG_LSB +: SIG_W] = sig_used;
    est_ones = EST_W'($countones(head_coded)) + EST_W'(1) + EST_W'(nwords_q - 1'b1);
    if (is_data) begin
      for (int i = 0; i < SIG_W; i++)
        est_ones += gen_sig[i] ? EST_W'(gen_units - gen_cnt[i]) : EST_W'(gen_cnt[i]);
    end else begin
      for (int i = 0; i < SIG_W; i++) est_ones += EST_W'(gen_cnt[i]);
    end
  end
  assign est_valid = (state == S_SEND) && (idx_q == '0) && out_ready;

  // a packet sent must end with a tail flit
  a_tail_last: assert property (@(posedge clk) disable iff (!rst_n)
                                (out_valid && out_ready && idx_q == nwords_q) |-> out_flit.ftype == FLIT_TAIL)
    else $error("packet not closed by a tail flit");

endmodule
