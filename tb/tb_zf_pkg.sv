// tb_zf_pkg: packet construction and reference forwarding decision for the
// zFilter node testbenches.
//
// A packet is built as the node expects it: module header word (ctrl 0xFF,
// source port in [31:16]), an Ethernet word, the header word with ethertype,
// d and TTL, the zFilter in 64-bit words (most significant first, 248 used
// bits padded with zeros to 256) and payload words; the last word has
// ctrl 0x01. The reference decision re-does the zFilter test on the whole
// 256-bit vectors, independently of the chunked hardware.
package tb_zf_pkg;

  typedef struct packed {
    logic [7:0]  ctrl;
    logic [63:0] data;
  } tword_t;

  localparam int unsigned LIT_BITS = 248;
  localparam logic [255:0] VALID_BITS = {256{1'b1}} << (256 - LIT_BITS);

  // random LIT of LIT_BITS bits with k ones
  function automatic logic [255:0] rand_lit(int k);
    logic [255:0] v = '0;
    while ($countones(v) < k) v[255 - ($urandom % LIT_BITS)] = 1'b1;
    return v;
  endfunction

  // zFilter test of one LIT (empty LITs never match)
  function automatic logic lit_match(logic [255:0] zf, logic [255:0] lit);
    logic [255:0] l;
    l = lit & VALID_BITS;
    return (l != '0) && ((zf & l) == l);
  endfunction

  function automatic int zf_ones(logic [255:0] zf);
    return $countones(zf & VALID_BITS);
  endfunction

  // Build a packet; nwords limits its length (0 = full header + payload).
  function automatic void build(ref tword_t q[$], input logic [15:0] src,
                                input logic [15:0] etype, input logic [7:0] d,
                                input logic [7:0] ttl, input logic [255:0] zf,
                                input int payload, input int nwords);
    int total;
    q.delete();
    q.push_back('{ctrl: 8'hFF, data: {16'h0, 16'(7 + payload), src, 16'((6 + payload) * 8)}});
    q.push_back('{ctrl: 8'h00, data: {$urandom, $urandom}});
    q.push_back('{ctrl: 8'h00, data: {$urandom, etype, d, ttl}});
    for (int c = 0; c < 4; c++) q.push_back('{ctrl: 8'h00, data: zf[255 - 64*c -: 64]});
    for (int i = 0; i < payload; i++) q.push_back('{ctrl: 8'h00, data: {$urandom, $urandom}});
    total = (nwords > 0 && nwords < q.size()) ? nwords : q.size();
    while (q.size() > total) void'(q.pop_back());
    q[q.size() - 1].ctrl = 8'h01;
  endfunction

endpackage
