// zf_pkg: types and constants shared by the zFilter forwarding node.
//
// The node works on the NetFPGA packet stream: 64-bit data words with an
// 8-bit control byte, one word per clock. A packet starts with one module
// header word (ctrl = 8'hFF), followed by the Ethernet frame; its last word
// carries a non-zero ctrl byte. The zFilter header sits at fixed word
// positions (see HDR_WORD / ZF_FIRST_WORD below): this placement, the d and
// TTL byte positions and the register map are this design's own choices;
// the 64-bit word, the ethertype 0xacdc and the 8-cycle decision latency
// follow the published implementation.
package zf_pkg;

  localparam int unsigned DATA_W = 64;
  localparam int unsigned CTRL_W = 8;
  localparam logic [CTRL_W-1:0] CTRL_MODULE_HDR = 8'hFF;

  // Word positions inside a packet (word 0 = module header).
  localparam int unsigned HDR_WORD      = 2;  // holds ethertype, d and TTL
  localparam int unsigned ZF_FIRST_WORD = 3;  // first zFilter chunk

  // Fields of word HDR_WORD.
  localparam int unsigned ETYPE_LSB = 16;     // ethertype in [31:16]
  localparam int unsigned D_LSB     = 8;      // d index in [15:8]
  localparam int unsigned TTL_LSB   = 0;      // TTL in [7:0]

  // Fields of the module header word.
  localparam int unsigned MH_DST_LSB = 48;    // one-hot destination ports [63:48]
  localparam int unsigned MH_SRC_LSB = 16;    // source port number [31:16]

  localparam logic [15:0] ZF_ETHERTYPE = 16'hACDC;

  // Why a packet was not forwarded (all zero: the checks passed).
  typedef struct packed {
    logic bad_ethertype;  // ethertype is not the zFilter one
    logic ttl_expired;    // TTL reached zero
    logic too_many_ones;  // zFilter has more ones than allowed
    logic bad_d;          // d index beyond the configured LIT count
    logic truncated;      // packet ended before the zFilter did
  } drop_t;

  // Per-packet information kept for the status registers.
  typedef struct packed {
    logic [15:0] ones;     // ones counted in the zFilter
    logic [7:0]  d;        // LIT table index
    logic [7:0]  ttl;      // TTL as received
    logic [15:0] src_port; // source port from the module header
  } pkt_info_t;

  // Number of 64-bit chunks that hold a zFilter of lit_bits bits.
  function automatic int unsigned num_chunks(int unsigned lit_bits);
    return (lit_bits + DATA_W - 1) / DATA_W;
  endfunction

  // Valid bits of chunk c: the filter fills the chunks from the most
  // significant bit down, so a short last chunk is padded at its bottom.
  function automatic logic [DATA_W-1:0] chunk_mask(int unsigned lit_bits, int unsigned c);
    int unsigned used;
    logic [DATA_W-1:0] m;
    used = (lit_bits > c * DATA_W) ? lit_bits - c * DATA_W : 0;
    if (used >= DATA_W) m = '1;
    else m = ~({DATA_W{1'b1}} >> used);
    return m;
  endfunction

  // Width of an index over n items, at least one bit.
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
