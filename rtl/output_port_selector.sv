// output_port_selector: per-packet forwarding decision of the zFilter node.
//
// The selector watches every word that enters the node (`in_valid` marks an
// accepted word) and, in parallel:
//   - counts the ones in the zFilter (bit_counter per 64-bit chunk, summed in
//     a register) so that filters with too many ones can be refused;
//   - checks the ethertype (ethertype_check) and the TTL (ttl_check);
//   - runs one zfilter_match per Link ID, NUM_PORTS real links and
//     NUM_PORTS * NUM_VLINKS virtual links, each reading the LIT chosen by the
//     packet's d index from its own id_store, so every matcher gets its LIT
//     chunk at line rate.
// An interface's bit in the forwarding bit-vector is the OR of its real and
// virtual link matchers. A further 1 + NUM_VLINKS matchers hold the node's
// local Link IDs, which name the path to the control processor;
// slow_path_select turns them into the `dec_cpu` bit and, for local Link IDs
// configured to block, clears the interface bits. combine_results then
// issues one decision per packet: the bit-vector and CPU bit if all checks
// pass, otherwise nothing.
//
// Packet layout (word 0 = NetFPGA module header): word 2 holds the ethertype
// [31:16], d [15:8] and TTL [7:0]; the zFilter fills words 3.. (LIT_BITS bits,
// most significant first, 4 words for 248 bits). The id_store read address is
// issued one word ahead: d is taken straight from word 2 as it arrives, so the
// LIT chunk for zFilter word j is ready when that word is.
//
// Timing: with back-to-back words the decision (`dec_valid`) comes 8 cycles
// after the module header word, matching the 64 ns at 125 MHz of the published
// node. A packet that ends before its zFilter is complete is dropped at once.
// Words after the zFilter are ignored. The 64-bit datapath, the checks, the
// per-link matchers and id_stores and the 4 ports x 4 real + 4 virtual LITs
// follow the published node; field positions, the register map and the
// handling of bad d values and short packets are this design's choices.
//
// Register bus: reg_addr[15] = 1 selects the LIT tables (lit_regs, ack after
// two cycles; set field NUM_PORTS addresses the local Link IDs), 0 the
// status registers (status_regs, low 4 address bits, ack after one cycle). The host waits for reg_ack before the next request.
module output_port_selector
  import zf_pkg::*;
#(
  parameter int unsigned NUM_PORTS  = 4,
  parameter int unsigned NUM_LITS   = 4,
  parameter int unsigned NUM_VLINKS = 1,
  parameter int unsigned LIT_BITS   = 248,
  parameter logic [15:0] ETHERTYPE  = ZF_ETHERTYPE
) (
  input  logic                 clk,
  input  logic                 reset,
  // accepted words of the incoming packet stream
  input  logic                 in_valid,
  input  logic [DATA_W-1:0]    in_data,
  input  logic [CTRL_W-1:0]    in_ctrl,
  // decision, one per packet, in packet order
  output logic                 dec_valid,
  output logic [NUM_PORTS-1:0] dec_ports,
  output logic                 dec_cpu,    // copy to the control processor
  output drop_t                dec_drop,
  output pkt_info_t            dec_info,
  // host register bus
  input  logic                 reg_req,
  input  logic                 reg_wr,
  input  logic [15:0]          reg_addr,
  input  logic [31:0]          reg_wdata,
  output logic                 reg_ack,
  output logic [31:0]          reg_rdata
);

  localparam int unsigned CHUNKS    = num_chunks(LIT_BITS);
  localparam int unsigned ZF_LAST   = ZF_FIRST_WORD + CHUNKS - 1;
  localparam int unsigned WIDX_W    = idx_w(ZF_LAST + 2);
  localparam int unsigned D_W       = idx_w(NUM_LITS);
  localparam int unsigned CH_W      = idx_w(CHUNKS);
  localparam int unsigned LIT_AW    = D_W + CH_W;
  localparam int unsigned LINKS_PP  = 1 + NUM_VLINKS;
  // Link ID sets: interfaces 0..NUM_PORTS-1, then the local (slow path) set.
  localparam int unsigned NUM_SETS  = NUM_PORTS + 1;
  localparam int unsigned NUM_LINKS = NUM_SETS * LINKS_PP;
  localparam int unsigned REG_AW    = idx_w(NUM_SETS) + idx_w(LINKS_PP) + LIT_AW + 1;

  // ---------------------------------------------------------------- parsing
  logic [WIDX_W-1:0] widx;          // index of the next word of the packet
  logic              sop, eop, hdr, zf, last_chunk;
  logic [CH_W-1:0]   cidx;          // zFilter chunk index of this word
  logic [DATA_W-1:0] cmask;         // valid filter bits of this chunk

  assign sop        = in_valid && (widx == '0);
  assign eop        = in_valid && (widx != '0) && (in_ctrl != '0);
  assign hdr        = in_valid && (widx == WIDX_W'(HDR_WORD));
  assign zf         = in_valid && (widx >= WIDX_W'(ZF_FIRST_WORD)) && (widx <= WIDX_W'(ZF_LAST));
  assign last_chunk = zf && (widx == WIDX_W'(ZF_LAST));

  always_comb begin
    cidx  = '0;
    cmask = '0;
    for (int c = 0; c < CHUNKS; c++)
      if (widx == WIDX_W'(ZF_FIRST_WORD + c)) begin
        cidx  = CH_W'(c);
        cmask = chunk_mask(LIT_BITS, c);
      end
  end

  always_ff @(posedge clk) begin
    if (reset) widx <= '0;
    else if (in_valid) begin
      if (eop)                              widx <= '0;
      else if (widx != WIDX_W'(ZF_LAST + 1)) widx <= widx + 1'b1;
    end
  end

  // Per-packet fields.
  logic [7:0]  d_in, d_q;
  logic [15:0] src_q;
  logic [15:0] ones_acc;
  logic [6:0]  chunk_ones;
  logic        eval_q, trunc_q;

  assign d_in = in_data[D_LSB +: 8];

  bit_counter #(.WIDTH(DATA_W)) u_bit_counter (
    .data  (in_data & cmask),
    .count (chunk_ones)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      d_q      <= '0;
      src_q    <= '0;
      ones_acc <= '0;
      eval_q   <= 1'b0;
      trunc_q  <= 1'b0;
    end else begin
      if (hdr) d_q   <= d_in;
      if (sop) src_q <= in_data[MH_SRC_LSB +: 16];
      if (sop)     ones_acc <= '0;
      else if (zf) ones_acc <= ones_acc + 16'(chunk_ones);
      // all results of the packet are final in the cycle after its last
      // zFilter word, or after an early end of packet
      eval_q  <= last_chunk || (eop && widx < WIDX_W'(ZF_LAST));
      trunc_q <= eop && widx < WIDX_W'(ZF_LAST);
    end
  end

  // ------------------------------------------------------------ the checks
  logic       eth_ok, ttl_ok;
  logic [7:0] ttl_q;

  ethertype_check #(.ETHERTYPE(ETHERTYPE)) u_ethertype (
    .clk, .reset, .capture(hdr), .ethertype(in_data[ETYPE_LSB +: 16]), .ok(eth_ok)
  );

  ttl_check u_ttl (
    .clk, .reset, .capture(hdr), .ttl(in_data[TTL_LSB +: 8]), .ok(ttl_ok), .ttl_q
  );

  // ------------------------------------------------- LIT stores + matchers
  // Read address one word ahead of the zFilter word that will use it.
  logic [LIT_AW-1:0] a_addr;
  always_comb begin
    if (hdr)
      a_addr = {d_in[D_W-1:0], CH_W'(0)};
    else if (zf && !last_chunk)
      a_addr = {d_q[D_W-1:0], CH_W'(cidx + 1'b1)};
    else
      a_addr = {d_q[D_W-1:0], cidx};
  end

  logic [LIT_AW:0]        st_addr;
  logic [NUM_LINKS-1:0]   st_we;
  logic [31:0]            st_wdata;
  logic [31:0]            st_rdata [NUM_LINKS];
  logic [NUM_LINKS-1:0]   link_match;

  for (genvar l = 0; l < NUM_LINKS; l++) begin : g_link
    logic [DATA_W-1:0] lit_chunk;

    id_store #(.DEPTH(1 << LIT_AW), .ADDR_W(LIT_AW)) u_id_store (
      .clk,
      .a_addr  (a_addr),
      .a_rdata (lit_chunk),
      .b_addr  (st_addr),
      .b_we    (st_we[l]),
      .b_wdata (st_wdata),
      .b_rdata (st_rdata[l])
    );

    zfilter_match #(.W(DATA_W)) u_match (
      .clk, .reset,
      .start       (sop),
      .chunk_valid (zf),
      .zf_chunk    (in_data),
      .lit_chunk   (lit_chunk),
      .chunk_mask  (cmask),
      .match       (link_match[l])
    );
  end

  // Forwarding bit-vector: real or any virtual link of the interface.
  logic [NUM_PORTS-1:0] port_match, sp_ports;
  logic [LINKS_PP-1:0]  block_mask;
  logic                 sp_cpu;
  always_comb
    for (int p = 0; p < NUM_PORTS; p++)
      port_match[p] = |link_match[p*LINKS_PP +: LINKS_PP];

  slow_path_select #(.NUM_PORTS(NUM_PORTS), .NUM_LOCAL(LINKS_PP)) u_slow_path (
    .port_match  (port_match),
    .local_match (link_match[NUM_PORTS*LINKS_PP +: LINKS_PP]),
    .block_mask  (block_mask),
    .ports       (sp_ports),
    .cpu         (sp_cpu)
  );

  // ---------------------------------------------------------- the decision
  logic [15:0] max_ones;
  pkt_info_t   info;

  assign info = '{ones: ones_acc, d: d_q, ttl: ttl_q, src_port: src_q};

  logic [NUM_PORTS:0] dec_vec;     // {CPU, interfaces}

  combine_results #(.NUM_PORTS(NUM_PORTS + 1)) u_combine (
    .clk, .reset,
    .eval      (eval_q),
    .match_vec ({sp_cpu, sp_ports}),
    .eth_ok    (eth_ok),
    .ttl_ok    (ttl_ok),
    .d_ok      (int'(d_q) < NUM_LITS),
    .truncated (trunc_q),
    .max_ones  (max_ones),
    .info      (info),
    .dec_valid,
    .dec_ports (dec_vec),
    .dec_drop, .dec_info
  );

  assign dec_ports = dec_vec[NUM_PORTS-1:0];
  assign dec_cpu   = dec_vec[NUM_PORTS];

  // ------------------------------------------------------- register blocks
  logic        lit_sel;
  logic        lit_ack, st_ack;
  logic [31:0] lit_rdata, st_rdata_reg;

  assign lit_sel = reg_addr[15];

  lit_regs #(
    .NUM_SETS(NUM_SETS), .NUM_LITS(NUM_LITS), .NUM_VLINKS(NUM_VLINKS), .LIT_BITS(LIT_BITS)
  ) u_lit_regs (
    .clk, .reset,
    .reg_req   (reg_req && lit_sel),
    .reg_wr    (reg_wr),
    .reg_addr  (reg_addr[REG_AW-1:0]),
    .reg_wdata (reg_wdata),
    .reg_ack   (lit_ack),
    .reg_rdata (lit_rdata),
    .st_addr, .st_we, .st_wdata, .st_rdata
  );

  status_regs #(
    .NUM_PORTS(NUM_PORTS), .NUM_LITS(NUM_LITS), .NUM_VLINKS(NUM_VLINKS), .LIT_BITS(LIT_BITS)
  ) u_status_regs (
    .clk, .reset,
    .reg_req   (reg_req && !lit_sel),
    .reg_wr    (reg_wr),
    .reg_addr  (reg_addr[3:0]),
    .reg_wdata (reg_wdata),
    .reg_ack   (st_ack),
    .reg_rdata (st_rdata_reg),
    .dec_valid,
    .dec_ports (dec_vec),
    .dec_info,
    .max_ones, .block_mask
  );

  assign reg_ack   = lit_ack | st_ack;
  assign reg_rdata = lit_ack ? lit_rdata : st_rdata_reg;

  // LIT register addresses must fit below the block-select bit.
  if (REG_AW > 15) begin : g_bad_cfg
    $error("output_port_selector: LIT register address does not fit in 15 bits");
  end

endmodule
