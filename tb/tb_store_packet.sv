// tb_store_packet: the packet buffer with a small buffer (64 words, at most
// 4 packets waiting) so that both stall conditions happen. Packets of random
// length enter with random gaps; the testbench issues each packet's decision
// (random port set, empty = drop) once its seventh word or its last word is
// in, as the port selector would. The output, taken with random out_rdy, must
// carry exactly the forwarded packets, in order, with the port bit-vector
// and CPU bit, the module header destination bits and a decremented TTL.
module tb_store_packet;
  import tb_zf_pkg::*;
  localparam int NP = 4;

  logic clk = 0, reset = 1;
  logic [63:0] in_data = '0;
  logic [7:0]  in_ctrl = '0;
  logic in_wr = 0, in_rdy;
  logic dec_valid = 0;
  logic [NP-1:0] dec_ports = '0;
  logic dec_cpu = 0, out_cpu;
  logic [63:0] out_data;
  logic [7:0]  out_ctrl;
  logic out_wr, out_rdy = 0;
  logic [NP-1:0] out_ports;

  store_packet #(.NUM_PORTS(NP), .BUF_WORDS(64), .DEC_DEPTH(4)) dut (.*);

  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cpu = 0, n_fwd = 0, n_drop = 0, n_full = 0, n_pktlimit = 0, n_outstall = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // expected output words and ports, and decisions to issue
  tword_t exp_words[$];
  logic [NP:0] exp_ports[$];
  logic [NP:0] dec_plan[$];       // {CPU, ports} of each packet, in order
  logic [NP:0] dec_ready[$];      // decisions whose trigger word is in
  int widx = 0;

  // decision trigger: seventh word or end of packet, whichever comes first
  always @(posedge clk) begin
    if (in_wr && in_rdy) begin
      if ((widx == 6) || (widx < 6 && widx > 0 && in_ctrl != 0)) dec_ready.push_back(dec_plan.pop_front());
      widx = (widx > 0 && in_ctrl != 0) ? 0 : widx + 1;
    end
  end

  always @(negedge clk) begin
    dec_valid = 0;
    if (dec_ready.size() > 0 && ($urandom % 2 == 0)) begin
      dec_valid = 1;
      {dec_cpu, dec_ports} = dec_ready.pop_front();
    end
  end

  // output checker
  int oidx = 0;
  always @(posedge clk) begin
    if (!reset) begin
      if (in_wr && !in_rdy) begin
        if (dut.in_first && dut.pkts >= 4) n_pktlimit++; else n_full++;
      end
      if (out_wr && !out_rdy) n_outstall++;
      if (out_wr && out_rdy) begin
        tword_t e;
        checks++;
        if (exp_words.size() == 0) begin
          failures++; $display("FAIL unexpected output word");
        end else begin
          e = exp_words.pop_front();
          if (out_data !== e.data || out_ctrl !== e.ctrl || {out_cpu, out_ports} !== exp_ports[0]) begin
            failures++;
            $display("FAIL word %0d: %h/%h exp %h/%h ports %b exp %b", oidx, out_data, out_ctrl,
                     e.data, e.ctrl, out_ports, exp_ports[0]);
          end
          if (oidx > 0 && out_ctrl != 0) begin
            void'(exp_ports.pop_front());
            oidx = 0;
          end else oidx++;
        end
      end
    end
  end

  bit phase_stall = 0;
  always @(negedge clk) out_rdy = (phase_stall) ? 1'b0 : ($urandom % 4 != 0);

  task automatic send_packet(int gap_max);
    tword_t q[$];
    logic [NP:0] ports;
    int nw;
    nw = ($urandom % 5 == 0) ? 2 + $urandom % 5 : 0;
    build(q, 16'(2 * ($urandom % 4)), 16'hACDC, 8'($urandom % 4), 8'(1 + $urandom % 200),
          {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
          $urandom % 30, nw);
    ports = (nw != 0 || $urandom % 4 == 0) ? '0 : (NP+1)'(1 + $urandom % 31);
    if (ports[NP]) n_cpu++;
    dec_plan.push_back(ports);
    if (ports != 0) begin
      n_fwd++;
      exp_ports.push_back(ports);
      foreach (q[i]) begin
        tword_t w = q[i];
        if (i == 0) begin
          w.data[63:48] = '0;
          for (int p = 0; p < NP; p++) w.data[48 + 2*p] = ports[p];
          w.data[49] = ports[NP];
        end
        if (i == 2) w.data[7:0] = q[i].data[7:0] - 8'd1;
        exp_words.push_back(w);
      end
    end else n_drop++;
    foreach (q[i]) begin
      @(negedge clk);
      in_wr = 0;
      if (gap_max > 0) repeat ($urandom % (gap_max + 1)) @(negedge clk);
      in_wr = 1; in_data = q[i].data; in_ctrl = q[i].ctrl;
      @(posedge clk);
      while (!in_rdy) @(posedge clk);
    end
    @(negedge clk);
    in_wr = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 300; i++) send_packet(i < 150 ? 2 : 0);
    // hold the output to fill the buffer with small packets, then large ones
    phase_stall = 1;
    fork
      for (int i = 0; i < 12; i++) send_packet(0);
      begin repeat (400) @(negedge clk); phase_stall = 0; end
    join
    repeat (2000) @(negedge clk);
    checks++;
    if (exp_words.size() != 0 || dut.wcount != 0) begin
      failures++; $display("FAIL %0d words not delivered", exp_words.size());
    end
    $display("cpu=%0d forwarded=%0d dropped=%0d buffer-full=%0d packet-limit=%0d out-stalls=%0d",
             n_cpu, n_fwd, n_drop, n_full, n_pktlimit, n_outstall);
    checks++;
    if (n_cpu == 0 || n_fwd == 0 || n_drop == 0 || n_full == 0 || n_pktlimit == 0 || n_outstall == 0) begin
      failures++; $display("FAIL some case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
