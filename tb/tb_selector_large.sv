// tb_selector_large: the output port selector at the forwarding table size
// used for the memory estimate of a larger node: d = 8 LIT tables and 128
// interface Link IDs (8 interfaces, each with one real and 15 virtual Link
// IDs), plus the 16 local Link IDs of the slow path, 144 id_stores in all.
// Every LIT (5 random ones in 248 bits) is written through the register bus
// and a sample is read back. Random delivery trees over these links, with
// some wrong ethertypes, zero TTLs and out-of-range d values mixed in, are
// then sent with and without gaps. Each decision is compared with a reference
// computed on whole filters, and back-to-back packets must still be decided
// 8 cycles after their first word: the matchers work in parallel, so the
// decision time does not grow with the number of links. The cases (many
// links matched at once, virtual-only matches, CPU copies, blocking by a
// local virtual Link ID, each drop reason) are counted and must all occur.
module tb_selector_large;
  import zf_pkg::*;
  import tb_zf_pkg::*;

  localparam int NP = 8, NL = 8, NV = 15, LINKS_PP = 1 + NV;

  logic clk = 0, reset = 1;
  logic in_valid = 0;
  logic [63:0] in_data = '0;
  logic [7:0]  in_ctrl = '0;
  logic dec_valid;
  logic [NP-1:0] dec_ports;
  logic dec_cpu;
  drop_t dec_drop;
  pkt_info_t dec_info;
  logic reg_req = 0, reg_wr = 0, reg_ack;
  logic [15:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;

  output_port_selector #(.NUM_PORTS(NP), .NUM_LITS(NL), .NUM_VLINKS(NV)) dut (.*);

  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  logic [255:0] tbl [NP+1][LINKS_PP][NL];    // set NP: local Link IDs
  logic [LINKS_PP-1:0] blk_mask = '0;

  // ------------------------------------------------------------ register bus
  task automatic reg_access(logic wr, logic [15:0] a, logic [31:0] v, output logic [31:0] rd);
    int n = 0;
    @(negedge clk);
    reg_req = 1; reg_wr = wr; reg_addr = a; reg_wdata = v;
    @(negedge clk);
    reg_req = 0;
    while (!reg_ack && n < 20) begin n++; @(negedge clk); end
    rd = reg_rdata;
    if (!reg_ack) begin failures++; $display("FAIL no register ack"); end
  endtask

  // {1, pad, set(4), link(4), d(3), chunk(2), half(1)}
  function automatic logic [15:0] lit_addr(int p, int l, int d, int c, int h);
    return {1'b1, 1'b0, 4'(p), 4'(l), 3'(d), 2'(c), 1'(h)};
  endfunction

  task automatic write_lit(int p, int l, int d, logic [255:0] v);
    logic [31:0] rd;
    for (int c = 0; c < 4; c++) begin
      reg_access(1, lit_addr(p, l, d, c, 1), v[255 - 64*c -: 32], rd);
      reg_access(1, lit_addr(p, l, d, c, 0), v[223 - 64*c -: 32], rd);
    end
  endtask

  // ------------------------------------------------------ expected decisions
  typedef struct {
    logic [NP:0] ports;     // {CPU, interfaces}
    drop_t       drop;
    bit          timed;
  } exp_t;
  exp_t expq[$];
  int n_dec = 0, n_timed = 0, n_fwd = 0, n_wide = 0, n_virt = 0, n_cpu = 0, n_blocked = 0;
  int n_drop[5] = '{default: 0};

  function automatic logic [NP:0] ref_ports(logic [255:0] zf, int d, output bit via_virtual,
                                            output bit blocked);
    logic [NP:0] r = '0;
    via_virtual = 0;
    blocked = 0;
    for (int p = 0; p < NP; p++)
      for (int l = 0; l < LINKS_PP; l++)
        if (lit_match(zf, tbl[p][l][d])) begin
          r[p] = 1'b1;
          if (l > 0 && !lit_match(zf, tbl[p][0][d])) via_virtual = 1;
        end
    for (int l = 0; l < LINKS_PP; l++)
      if (lit_match(zf, tbl[NP][l][d])) begin
        r[NP] = 1'b1;
        if (blk_mask[l]) blocked = 1;
      end
    if (blocked) r[NP-1:0] = '0;
    return r;
  endfunction

  // ---------------------------------------------------------------- driver
  task automatic send(tword_t q[$], int gap_max);
    foreach (q[i]) begin
      @(negedge clk);
      if (gap_max > 0) begin
        in_valid = 0;
        repeat ($urandom % (gap_max + 1)) @(negedge clk);
      end
      in_valid = 1; in_data = q[i].data; in_ctrl = q[i].ctrl;
    end
    @(negedge clk);
    in_valid = 0; in_data = '1; in_ctrl = '0;
  endtask

  // kind 0: good packet, 1: wrong ethertype, 2: TTL 0, 3: d out of range
  task automatic one_packet(int kind, int gap_max);
    tword_t q[$];
    logic [255:0] zf;
    logic [15:0] etype = 16'hACDC;
    logic [7:0] ttl, d;
    int ntree;
    exp_t e;
    bit vv, bl;
    d   = 8'($urandom % NL);
    ttl = 8'(1 + $urandom % 64);
    zf  = '0;
    ntree = 1 + $urandom % 8;
    for (int i = 0; i < ntree; i++) begin
      int tp, tl;
      tp = ($urandom % 8 == 0) ? NP : $urandom % NP;
      tl = ($urandom % 2 == 0) ? 0 : 1 + $urandom % NV;
      zf |= tbl[tp][tl][d];
    end
    if (blk_mask != 0 && $urandom % 4 == 0) zf |= tbl[NP][7][d];   // the blocking one
    case (kind)
      1: etype = 16'h86DD;
      2: ttl = 8'd0;
      3: d = 8'(NL + $urandom % 100);
      default: ;
    endcase
    build(q, 16'd0, etype, d, ttl, zf, $urandom % 3, 0);
    e.drop = '{bad_ethertype: etype != 16'hACDC, ttl_expired: ttl == 0,
               too_many_ones: zf_ones(zf) > 124, bad_d: d >= NL, truncated: 0};
    e.ports = (e.drop == '0) ? ref_ports(zf, int'(d), vv, bl) : '0;
    if (e.drop == '0 && vv) n_virt++;
    if (e.ports[NP]) n_cpu++;
    if (e.drop == '0 && bl) n_blocked++;
    if ($countones(e.ports[NP-1:0]) > 3) n_wide++;
    e.timed = (gap_max == 0);
    expq.push_back(e);
    send(q, gap_max);
  endtask

  // --------------------------------------------------------------- monitor
  longint sop_q[$];
  always @(posedge clk) if (!reset && in_valid && dut.widx == '0) sop_q.push_back(cyc);

  always @(posedge clk) begin
    if (!reset && dec_valid) begin
      exp_t e;
      longint s;
      n_dec++;
      checks++;
      if (expq.size() == 0 || sop_q.size() == 0) begin
        failures++; $display("FAIL unexpected decision");
      end else begin
        e = expq.pop_front();
        s = sop_q.pop_front();
        if ({dec_cpu, dec_ports} !== e.ports || dec_drop !== e.drop) begin
          failures++;
          $display("FAIL decision %0d: ports %b%b exp %b drop %b exp %b",
                   n_dec, dec_cpu, dec_ports, e.ports, dec_drop, e.drop);
        end
        if (dec_ports != 0) n_fwd++;
        for (int k = 0; k < 5; k++) if (e.drop[4-k]) n_drop[k]++;
        if (e.timed) begin
          n_timed++;
          checks++;
          if (cyc - s != 8) begin
            failures++; $display("FAIL latency %0d cycles, expected 8", cyc - s);
          end
        end
      end
    end
  end

  // ----------------------------------------------------------------- test
  initial begin
    logic [31:0] rd;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int p = 0; p <= NP; p++)
      for (int l = 0; l < LINKS_PP; l++)
        for (int d = 0; d < NL; d++) begin
          tbl[p][l][d] = rand_lit(5);
          write_lit(p, l, d, tbl[p][l][d]);
        end
    for (int i = 0; i < 40; i++) begin
      int p, l, d, c, h;
      p = $urandom % (NP + 1); l = $urandom % LINKS_PP; d = $urandom % NL;
      c = $urandom % 4; h = $urandom % 2;
      reg_access(0, lit_addr(p, l, d, c, h), 0, rd);
      checks++;
      if (rd !== tbl[p][l][d][255 - 64*c - 32*(1-h) -: 32]) begin
        failures++; $display("FAIL LIT readback set %0d link %0d d %0d", p, l, d);
      end
    end
    // constants in the status registers
    reg_access(0, 16'd0, 0, rd); checks++; if (rd != NP) begin failures++; $display("FAIL links"); end
    reg_access(0, 16'd1, 0, rd); checks++; if (rd != NL) begin failures++; $display("FAIL LITs"); end
    reg_access(0, 16'd10, 0, rd); checks++; if (rd != NV) begin failures++; $display("FAIL vlinks"); end
    for (int i = 0; i < 300; i++) one_packet(($urandom % 4 == 0) ? 1 + $urandom % 3 : 0, 2);
    for (int i = 0; i < 300; i++) one_packet(($urandom % 6 == 0) ? 1 + $urandom % 3 : 0, 0);
    // local virtual Link ID 7 now blocks forwarding
    reg_access(1, 16'd11, 32'h80, rd);
    blk_mask = 16'h0080;
    for (int i = 0; i < 300; i++) one_packet(0, $urandom % 2);
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d decisions missing", expq.size()); end
    $display("decisions=%0d forwarded=%0d wide=%0d virtual=%0d cpu=%0d blocked=%0d timed=%0d drops eth/ttl/d=%0d/%0d/%0d",
             n_dec, n_fwd, n_wide, n_virt, n_cpu, n_blocked, n_timed, n_drop[0], n_drop[1], n_drop[3]);
    checks++;
    if (n_fwd == 0 || n_wide == 0 || n_virt == 0 || n_cpu == 0 || n_blocked == 0 || n_timed == 0 ||
        n_drop[0] == 0 || n_drop[1] == 0 || n_drop[3] == 0) begin
      failures++; $display("FAIL some case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
