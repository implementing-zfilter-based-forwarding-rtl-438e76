// tb_zfilter_node: end-to-end test of the forwarding node at its default
// configuration (4 interfaces, 4 real + 4 virtual LITs of 248 bits each,
// 512-word buffer). All 40 LITs (4 interfaces and the local set) are
// written through the register bus, then random packets run through: delivery trees over real and virtual links,
// multicast, and packets to be dropped for each reason (ethertype, TTL 0,
// too many ones, d out of range, cut short). The output stream is compared
// word by word with a reference: forwarded packets in order, port bit-vector
// and header destination bits set, TTL decremented, payload unchanged.
// Decisions of back-to-back packets must come 8 cycles after the first word.
// The output is stalled for a while so that the buffer fills (in_rdy falls,
// both by word count and by packet count), and LITs are rewritten while
// traffic flows. Some trees include the node's local (slow path) Link IDs:
// those packets must come out marked for the control processor, and while
// the virtual local Link ID is set to block they must reach no interface.
// Every one of these events is counted and must occur.
module tb_zfilter_node;
  import zf_pkg::*;
  import tb_zf_pkg::*;

  localparam int NP = 4, NL = 4, LINKS_PP = 2;

  logic clk = 0, reset = 1;
  logic [63:0] in_data = '0;
  logic [7:0]  in_ctrl = '0;
  logic in_wr = 0, in_rdy;
  logic [63:0] out_data;
  logic [7:0]  out_ctrl;
  logic out_wr, out_rdy = 0;
  logic [NP-1:0] out_ports;
  logic out_cpu;
  logic reg_req = 0, reg_wr = 0, reg_ack;
  logic [15:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic dec_valid;
  logic [NP-1:0] dec_ports;
  logic dec_cpu;
  drop_t dec_drop;

  zfilter_node dut (.*);

  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
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

  task automatic write_lit(int p, int l, int d, logic [255:0] v);
    logic [31:0] rd;
    for (int c = 0; c < 4; c++)
      for (int h = 0; h < 2; h++)
        reg_access(1, {1'b1, 6'd0, 3'(p), 1'(l), 2'(d), 2'(c), 1'(h)},
                   h ? v[255 - 64*c -: 32] : v[223 - 64*c -: 32], rd);
  endtask

  // ------------------------------------------------------------- reference
  tword_t exp_words[$];
  logic [NP:0] exp_ports[$];      // {CPU, interfaces}
  drop_t exp_drop[$];
  bit exp_timed[$];
  int n_cpu = 0, n_blocked = 0, n_pkt = 0, n_fwd = 0, n_multi = 0, n_virt = 0, n_timed = 0;
  int n_drop[5] = '{default: 0};
  int n_full = 0, n_pktlimit = 0, n_outstall = 0, n_rewrite = 0;

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

  // --------------------------------------------------------------- driver
  task automatic send(tword_t q[$], int gap_max);
    foreach (q[i]) begin
      @(negedge clk);
      in_wr = 0;
      if (gap_max > 0) repeat ($urandom % (gap_max + 1)) @(negedge clk);
      in_wr = 1; in_data = q[i].data; in_ctrl = q[i].ctrl;
      @(posedge clk);
      while (!in_rdy) @(posedge clk);
    end
    @(negedge clk);
    in_wr = 0; in_data = '1; in_ctrl = '0;
  endtask

  task automatic one_packet(int kind, int gap_max, int d_max, int payload_max);
    tword_t q[$];
    logic [255:0] zf;
    logic [15:0] etype, src;
    logic [7:0] ttl, d;
    logic [NP:0] ports;
    drop_t drop;
    int nwords, ntree;
    bit vv, bl;
    etype = 16'hACDC;
    nwords = 0;
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
    if ($urandom % 3 == 0) zf |= rand_lit(5);
    case (kind)
      1: etype = 16'h86DD;
      2: ttl = 8'd0;
      3: zf |= rand_lit(140);
      4: d = 8'(NL + $urandom % 200);
      5: nwords = 2 + $urandom % 5;
      default: ;
    endcase
    build(q, src, etype, d, ttl, zf, fixed_len ? payload_max : $urandom % (payload_max + 1), nwords);
    drop = '{bad_ethertype: etype != 16'hACDC, ttl_expired: ttl == 0,
             too_many_ones: zf_ones(zf) > 124, bad_d: d >= NL, truncated: 0};
    if (nwords != 0) drop = '{default: 0, truncated: 1};
    ports = (drop == '0) ? ref_ports(zf, int'(d), vv, bl) : '0;
    if (ports[NP]) n_cpu++;
    if (drop == '0 && bl) n_blocked++;
    n_pkt++;
    exp_ports.push_back(ports);
    exp_drop.push_back(drop);
    exp_timed.push_back(gap_max == 0 && nwords == 0);
    if (ports != 0) begin
      n_fwd++;
      if ($countones(ports[NP-1:0]) > 1) n_multi++;
      if (vv) n_virt++;
      foreach (q[i]) begin
        tword_t w;
        w = q[i];
        if (i == 0) begin
          w.data[63:48] = '0;
          for (int p = 0; p < NP; p++) w.data[48 + 2*p] = ports[p];
          w.data[49] = ports[NP];
        end
        if (i == 2) w.data[7:0] = q[i].data[7:0] - 8'd1;
        exp_words.push_back(w);
      end
    end
    for (int k = 0; k < 5; k++) if (drop[4-k]) n_drop[k]++;
    send(q, gap_max);
  endtask

  // -------------------------------------------------------------- monitors
  longint sop_q[$];
  int widx = 0;
  longint cur_sop = 0;
  bit cur_consec = 0;
  bit phase_stall = 0;
  bit fixed_len = 0;     // payload of exactly payload_max words
  logic [NP:0] out_ports_q[$];

  always @(negedge clk) out_rdy = phase_stall ? 1'b0 : ($urandom % 5 != 0);

  always @(posedge clk) begin
    if (!reset) begin
      if (in_wr && in_rdy) begin
        // decision latency is only defined when words 0..6 came back to back
        if (widx == 0) begin cur_sop = cyc; cur_consec = 1; end
        else if (widx <= 6 && cyc != cur_sop + widx) cur_consec = 0;
        if (widx == 6 || (widx > 0 && widx < 6 && in_ctrl != 0))
          sop_q.push_back(cur_consec ? cur_sop : -1);
        widx = (widx > 0 && in_ctrl != 0) ? 0 : widx + 1;
      end
      if (in_wr && !in_rdy) begin
        if (dut.u_store.in_first && dut.u_store.pkts >= 16) n_pktlimit++; else n_full++;
      end
      if (out_wr && !out_rdy) n_outstall++;
    end
  end

  int dec_n = 0;
  always @(posedge clk) begin
    if (!reset && dec_valid) begin
      logic [NP:0] ep;
      drop_t ed;
      bit et;
      longint s;
      dec_n++;
      checks++;
      if (exp_ports.size() == 0) begin
        failures++; $display("FAIL unexpected decision");
      end else begin
        ep = exp_ports.pop_front(); ed = exp_drop.pop_front(); et = exp_timed.pop_front();
        s = sop_q.pop_front();
        if ({dec_cpu, dec_ports} !== ep || (ed.truncated ? !dec_drop.truncated : dec_drop !== ed)) begin
          failures++;
          $display("FAIL decision %0d: ports %b%b exp %b drop %b exp %b", dec_n, dec_cpu, dec_ports, ep, dec_drop, ed);
        end
        if (ep != 0) out_ports_q.push_back(ep);
        if (et && s >= 0) begin
          n_timed++;
          checks++;
          if (cyc - s != 8) begin failures++; $display("FAIL decision latency %0d", cyc - s); end
        end
      end
    end
  end

  int oidx = 0;
  always @(posedge clk) begin
    if (!reset && out_wr && out_rdy) begin
      tword_t e;
      checks++;
      if (exp_words.size() == 0 || out_ports_q.size() == 0) begin
        failures++; $display("FAIL unexpected output word");
      end else begin
        e = exp_words.pop_front();
        if (out_data !== e.data || out_ctrl !== e.ctrl || {out_cpu, out_ports} !== out_ports_q[0]) begin
          failures++;
          $display("FAIL out word %0d: %h/%h exp %h/%h ports %b exp %b", oidx, out_data, out_ctrl,
                   e.data, e.ctrl, out_ports, out_ports_q[0]);
        end
        if (oidx > 0 && out_ctrl != 0) begin
          void'(out_ports_q.pop_front());
          oidx = 0;
        end else oidx++;
      end
    end
  end

  // ----------------------------------------------------------------- test
  initial begin
    logic [31:0] rd;
    repeat (3) @(negedge clk);
    reset = 0;
    reg_access(0, 16'd0, 0, rd); checks++; if (rd != 4)   begin failures++; $display("FAIL ports reg"); end
    reg_access(0, 16'd3, 0, rd); checks++; if (rd != 248) begin failures++; $display("FAIL LIT length reg"); end
    for (int p = 0; p <= NP; p++)
      for (int l = 0; l < LINKS_PP; l++)
        for (int d = 0; d < NL; d++) begin
          tbl[p][l][d] = rand_lit(5);
          write_lit(p, l, d, tbl[p][l][d]);
        end
    // mixed traffic with gaps, then back to back
    for (int i = 0; i < 200; i++) one_packet(($urandom % 3 == 0) ? 1 + $urandom % 5 : 0, 2, NL, 20);
    for (int i = 0; i < 200; i++) one_packet(($urandom % 4 == 0) ? 1 + $urandom % 5 : 0, 0, NL, 20);
    // LIT rewrite of the d = 3 tables while d < 3 traffic flows
    fork
      for (int i = 0; i < 100; i++) one_packet(0, 0, 3, 10);
      for (int p = 0; p < NP; p++)
        for (int l = 0; l < LINKS_PP; l++) begin
          logic [255:0] v;
          v = rand_lit(5);
          write_lit(p, l, 3, v);
          tbl[p][l][3] = v;
          n_rewrite++;
        end
    join
    for (int i = 0; i < 50; i++) one_packet(0, 0, NL, 10);
    // the virtual local Link ID now stops packets at this node
    reg_access(1, 16'd11, 2, rd);
    blk_mask = 2'b10;
    for (int i = 0; i < 100; i++) one_packet(0, $urandom % 2, NL, 10);
    reg_access(1, 16'd11, 0, rd);
    blk_mask = 2'b00;
    // output stalled: small packets hit the packet limit
    phase_stall = 1;
    fork
      for (int i = 0; i < 24; i++) one_packet(0, 0, NL, 0);
      begin repeat (300) @(negedge clk); phase_stall = 0; end
    join
    // output stalled: large packets fill the buffer
    repeat (200) @(negedge clk);
    phase_stall = 1;
    fixed_len = 1;
    fork
      for (int i = 0; i < 14; i++) one_packet(0, 0, NL, 60);
      begin repeat (700) @(negedge clk); phase_stall = 0; end
    join
    fixed_len = 0;
    repeat (3000) @(negedge clk);
    checks++;
    if (exp_words.size() != 0 || exp_ports.size() != 0) begin
      failures++; $display("FAIL %0d words / %0d decisions outstanding", exp_words.size(), exp_ports.size());
    end
    $display("packets=%0d forwarded=%0d multicast=%0d virtual=%0d timed=%0d drops eth/ttl/ones/d/short=%0d/%0d/%0d/%0d/%0d",
             n_pkt, n_fwd, n_multi, n_virt, n_timed, n_drop[0], n_drop[1], n_drop[2], n_drop[3], n_drop[4]);
    $display("cpu=%0d blocked=%0d", n_cpu, n_blocked);
    $display("buffer-full=%0d packet-limit=%0d out-stalls=%0d LIT-rewrites=%0d",
             n_full, n_pktlimit, n_outstall, n_rewrite);
    checks++;
    if (n_cpu == 0 || n_blocked == 0 || n_fwd == 0 || n_multi == 0 || n_virt == 0 || n_timed == 0 || n_full == 0 ||
        n_pktlimit == 0 || n_outstall == 0 || n_rewrite == 0 ||
        n_drop[0] == 0 || n_drop[1] == 0 || n_drop[2] == 0 || n_drop[3] == 0 || n_drop[4] == 0) begin
      failures++; $display("FAIL some mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
