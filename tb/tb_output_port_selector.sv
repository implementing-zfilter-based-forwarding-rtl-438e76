// tb_output_port_selector: the decision logic with its LIT stores and
// register blocks. LITs (4 interfaces x real + virtual link x 4 d values,
// 5 ones each) are written through the register bus, then random packets
// are sent: delivery trees over random links, plus packets with a wrong
// ethertype, TTL 0, too many ones, a d index out of range, or cut short.
// Each decision is compared with a reference computed on whole 256-bit
// filters. Packets sent back to back must be decided exactly 8 cycles after
// their first word. While traffic runs, the d = 3 tables are rewritten
// through the register bus; later packets must use the new LITs. Finally
// the status registers are read back. Some trees include the node's local
// (slow path) Link IDs: those packets must be marked for the control
// processor, and, once the virtual local Link ID is set to block, must not be
// forwarded on any interface.
module tb_output_port_selector;
  import zf_pkg::*;
  import tb_zf_pkg::*;

  localparam int NP = 4, NL = 4, NV = 1, LINKS_PP = 1 + NV;

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

  output_port_selector dut (.*);

  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  logic [255:0] tbl [NP+1][LINKS_PP][NL];    // set NP: local Link IDs
  logic [1:0] blk_mask = '0;

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

  function automatic logic [15:0] lit_addr(int p, int l, int d, int c, int h);
    return {1'b1, 6'd0, 3'(p), 1'(l), 2'(d), 2'(c), 1'(h)};
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
    logic [NP:0]   ports;     // {CPU, interfaces}
    drop_t         drop;
    longint        sop_cycle;
    bit            timed;
    pkt_info_t     info;
  } exp_t;
  exp_t expq[$];
  int n_cpu = 0, n_blocked = 0, n_dec = 0, n_timed = 0, n_fwd = 0, n_multi = 0, n_virt = 0;
  int n_drop[5] = '{default: 0};

  // {CPU, interfaces} for a zFilter, with the slow path blocking rule
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
  logic pending_sop_cycle_valid = 0;
  longint last_sop;

  task automatic send(tword_t q[$], int gap_max);
    foreach (q[i]) begin
      @(negedge clk);
      if (gap_max > 0) begin
        in_valid = 0;
        repeat ($urandom % (gap_max + 1)) @(negedge clk);
      end
      in_valid = 1; in_data = q[i].data; in_ctrl = q[i].ctrl;
      if (i == 0) last_sop = cyc;
    end
    @(negedge clk);
    in_valid = 0; in_data = '1; in_ctrl = '0;
  endtask

  // Build and send one packet of a random kind; returns nothing, queues exp.
  task automatic one_packet(int kind, int gap_max, int d_max);
    tword_t q[$];
    logic [255:0] zf;
    logic [15:0] etype = 16'hACDC, src;
    logic [7:0] ttl, d;
    int nwords = 0, ntree;
    exp_t e;
    bit vv, bl;
    d   = 8'($urandom % d_max);
    ttl = 8'(1 + $urandom % 64);
    src = 16'(2 * ($urandom % 4));
    zf  = '0;
    ntree = 1 + $urandom % 4;
    for (int i = 0; i < ntree; i++) begin
      int tp, tl;
      tp = ($urandom % 6 == 0) ? NP : $urandom % NP;
      tl = ($urandom % 3 == 0) ? 1 : 0;
      zf |= tbl[tp][tl][d];
    end
    if ($urandom % 3 == 0) zf |= rand_lit(5);          // links of other nodes
    case (kind)
      1: etype = 16'h0800;
      2: ttl = 8'd0;
      3: zf |= rand_lit(140);
      4: d = 8'(NL + $urandom % 200);
      5: nwords = 2 + $urandom % 5;
      default: ;
    endcase
    build(q, src, etype, d, ttl, zf, $urandom % 4, nwords);
    e.drop = '{bad_ethertype: etype != 16'hACDC, ttl_expired: ttl == 0,
               too_many_ones: zf_ones(zf) > 124, bad_d: d >= NL, truncated: nwords != 0};
    if (nwords != 0) e.drop = '{default: 0, truncated: 1};   // other checks may be stale
    e.ports = (e.drop == '0) ? ref_ports(zf, int'(d), vv, bl) : '0;
    if (e.ports[NP]) n_cpu++;
    if (e.drop == '0 && bl) n_blocked++;
    e.timed = (gap_max == 0) && (nwords == 0);
    e.info  = '{ones: 16'(zf_ones(zf)), d: d, ttl: ttl, src_port: src};
    if (e.drop == '0 && vv) n_virt++;
    if ($countones(e.ports[NP-1:0]) > 1) n_multi++;
    e.sop_cycle = 0;
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
        if ({dec_cpu, dec_ports} !== e.ports ||
            (e.drop.truncated ? !dec_drop.truncated : dec_drop !== e.drop)) begin
          failures++;
          $display("FAIL decision %0d: ports %b%b exp %b drop %b exp %b", n_dec, dec_cpu, dec_ports, e.ports, dec_drop, e.drop);
        end
        if (e.drop == '0 && dec_info !== e.info) begin
          failures++; $display("FAIL info %p exp %p", dec_info, e.info);
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
    // read back some LIT words
    for (int i = 0; i < 20; i++) begin
      int p, l, d, c;
      p = $urandom % (NP + 1); l = $urandom % 2; d = $urandom % NL; c = $urandom % 4;
      reg_access(0, lit_addr(p, l, d, c, 1), 0, rd);
      checks++;
      if (rd !== tbl[p][l][d][255 - 64*c -: 32]) begin failures++; $display("FAIL LIT readback"); end
    end
    // phase 1: random gaps, all kinds
    for (int i = 0; i < 300; i++) one_packet(($urandom % 3 == 0) ? 1 + $urandom % 5 : 0, 2, NL);
    // phase 2: back to back, timed
    for (int i = 0; i < 200; i++) one_packet(($urandom % 4 == 0) ? 1 + $urandom % 5 : 0, 0, NL);
    // phase 3: rewrite the d = 3 tables while d < 3 traffic flows
    fork
      for (int i = 0; i < 150; i++) one_packet(0, 0, 3);
      for (int p = 0; p < NP; p++)
        for (int l = 0; l < LINKS_PP; l++) begin
          logic [255:0] v;
          v = rand_lit(5);
          write_lit(p, l, 3, v);
          tbl[p][l][3] = v;
        end
    join
    for (int i = 0; i < 100; i++) one_packet(0, 1, NL);
    // the virtual local Link ID now stops packets at this node
    reg_access(1, 16'd11, 2, rd);
    blk_mask = 2'b10;
    for (int i = 0; i < 150; i++) one_packet(0, $urandom % 2, NL);
    reg_access(1, 16'd11, 0, rd);
    blk_mask = 2'b00;
    // last forwarded packet in the status registers
    begin
      tword_t q[$];
      logic [255:0] zf;
      zf = tbl[2][0][1] | tbl[3][1][1];
      build(q, 16'd6, 16'hACDC, 8'd1, 8'd9, zf, 2, 0);
      expq.push_back('{ports: 5'b01100, drop: '0, sop_cycle: 0, timed: 1,
                       info: '{ones: 16'(zf_ones(zf)), d: 8'd1, ttl: 8'd9, src_port: 16'd6}});
      send(q, 0);
      repeat (12) @(negedge clk);
      reg_access(0, 16'd5, 0, rd); checks++; if (rd != 32'(zf_ones(zf))) begin failures++; $display("FAIL status ones %0d", rd); end
      reg_access(0, 16'd6, 0, rd); checks++; if (rd != 1) begin failures++; $display("FAIL status d"); end
      reg_access(0, 16'd7, 0, rd); checks++; if (rd != 9) begin failures++; $display("FAIL status ttl"); end
      reg_access(0, 16'd8, 0, rd); checks++; if (rd != 6) begin failures++; $display("FAIL status src"); end
      reg_access(0, 16'd9, 0, rd); checks++; if (rd != 32'hC) begin failures++; $display("FAIL status ports"); end
    end
    // a lower limit on the ones count
    begin
      tword_t q[$];
      logic [255:0] zf;
      zf = tbl[0][0][0] | tbl[1][0][0];
      reg_access(1, 16'd4, 32'(zf_ones(zf) - 1), rd);    // one fewer than it has
      build(q, 16'd0, 16'hACDC, 8'd0, 8'd5, zf, 0, 0);
      expq.push_back('{ports: '0, drop: '{default: 0, too_many_ones: 1}, sop_cycle: 0, timed: 1,
                       info: '0});
      send(q, 0);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d decisions missing", expq.size()); end
    $display("cpu=%0d blocked=%0d", n_cpu, n_blocked);
    $display("decisions=%0d forwarded=%0d multicast=%0d virtual=%0d timed=%0d drops eth/ttl/ones/d/short=%0d/%0d/%0d/%0d/%0d",
             n_dec, n_fwd, n_multi, n_virt, n_timed, n_drop[0], n_drop[1], n_drop[2], n_drop[3], n_drop[4]);
    checks++;
    if (n_cpu == 0 || n_blocked == 0 || n_fwd == 0 || n_multi == 0 || n_virt == 0 || n_timed == 0 ||
        n_drop[0] == 0 || n_drop[1] == 0 || n_drop[2] == 0 || n_drop[3] == 0 || n_drop[4] == 0) begin
      failures++; $display("FAIL some case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
