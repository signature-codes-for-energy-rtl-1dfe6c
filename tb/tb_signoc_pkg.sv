// Reference models shared by the Sig-NoC testbenches.
//
// The functions here compute, independently of the RTL, what the signature
// of a packet is (per bit position: more than half of the bytes have a 1),
// what the coded packet looks like, and how many 1s it carries. Packets are
// held as queues of flits; generators build random data and message packets
// with a chosen density of 1s.
package tb_signoc_pkg;
  import signoc_pkg::*;

  typedef flit_t pkt_t[$];

  // random 32-bit word whose bits are 1 with probability pct/100
  function automatic logic [31:0] rand_word(int pct);
    logic [31:0] w;
    for (int b = 0; b < 32; b++) w[b] = ($urandom_range(99) < pct);
    return w;
  endfunction

  function automatic flit_t mk_head(int src, int dest, int mode);
    flit_t f;
    f.ftype   = FLIT_HEAD;
    f.payload = '0;
    f.payload[DEST_LSB +: NODE_W] = NODE_W'(dest);
    f.payload[SRC_LSB  +: NODE_W] = NODE_W'(src);
    f.payload[MODE_LSB +: MODE_W] = MODE_W'(mode);
    return f;
  endfunction

  // data packet: head, 16 body flits, tail with the address
  function automatic pkt_t mk_data(int src, int dest, int pct);
    pkt_t p;
    flit_t f;
    p.push_back(mk_head(src, dest, 1));
    for (int i = 0; i < int'(BODY_FLITS); i++) begin
      f.ftype = FLIT_BODY; f.payload = rand_word(pct); p.push_back(f);
    end
    f.ftype = FLIT_TAIL; f.payload = rand_word(pct); p.push_back(f);
    return p;
  endfunction

  // message packet: head and tail with metadata
  function automatic pkt_t mk_msg(int src, int dest, int pct);
    pkt_t p;
    flit_t f;
    p.push_back(mk_head(src, dest, 2));
    f.ftype = FLIT_TAIL; f.payload = rand_word(pct); p.push_back(f);
    return p;
  endfunction

  // signature of a packet: majority of 1s per bit position over all bytes
  // of the body and tail flits; zero for message packets
  function automatic logic [7:0] ref_sig(pkt_t p);
    int cnt[8];
    int nbytes;
    logic [7:0] s;
    if (p.size() <= 2) return '0;
    nbytes = 0;
    foreach (cnt[i]) cnt[i] = 0;
    for (int k = 1; k < p.size(); k++)
      for (int j = 0; j < 4; j++) begin
        nbytes++;
        for (int i = 0; i < 8; i++) cnt[i] += p[k].payload[8*j + i];
      end
    for (int i = 0; i < 8; i++) s[i] = (2 * cnt[i] > nbytes);
    return s;
  endfunction

  function automatic pkt_t ref_encode(pkt_t p);
    pkt_t c;
    flit_t f;
    logic [7:0] s;
    s = ref_sig(p);
    c = p;
    c[0].payload[SIG_LSB +: 8] = s;
    for (int k = 1; k < c.size(); k++) begin
      f = c[k];
      for (int j = 0; j < 4; j++) f.payload[8*j +: 8] = f.payload[8*j +: 8] ^ s;
      c[k] = f;
    end
    return c;
  endfunction

  function automatic int ones(pkt_t p);
    int n = 0;
    foreach (p[k]) n += $countones(p[k]);
    return n;
  endfunction

  function automatic string fstr(flit_t f);
    return $sformatf("%0d:%08h", f.ftype, f.payload);
  endfunction

endpackage
