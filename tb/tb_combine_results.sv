// tb_combine_results: random combinations of check results. The decision
// must carry the bit-vector only when every check passes (ones equal to the
// limit still passes), report each failed check, and pulse one cycle after
// the evaluation strobe.
module tb_combine_results;
  import zf_pkg::*;
  localparam int NP = 4;
  logic clk = 0, reset = 1, eval = 0;
  logic [NP-1:0] match_vec = '0;
  logic eth_ok = 0, ttl_ok = 0, d_ok = 0, truncated = 0;
  logic [15:0] max_ones = '0;
  pkt_info_t info = '0;
  logic dec_valid;
  logic [NP-1:0] dec_ports;
  drop_t dec_drop;
  pkt_info_t dec_info;
  int checks = 0, failures = 0;

  combine_results #(.NUM_PORTS(NP)) dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 1000; i++) begin
      logic pass;
      logic [NP-1:0] exp_ports;
      drop_t exp_drop;
      match_vec = NP'($urandom);
      eth_ok    = ($urandom % 6) != 0;
      ttl_ok    = ($urandom % 6) != 0;
      d_ok      = ($urandom % 6) != 0;
      truncated = ($urandom % 8) == 0;
      max_ones  = 16'(60 + $urandom % 10);
      info      = '{ones: 16'(55 + $urandom % 20), d: 8'($urandom), ttl: 8'($urandom),
                    src_port: 16'($urandom)};
      exp_drop  = '{bad_ethertype: !eth_ok, ttl_expired: !ttl_ok,
                    too_many_ones: info.ones > max_ones, bad_d: !d_ok, truncated: truncated};
      pass      = (exp_drop == '0);
      exp_ports = pass ? match_vec : '0;
      eval = 1;
      @(negedge clk);
      eval = 0;
      match_vec = ~match_vec;              // inputs change after eval
      checks++;
      if (!dec_valid || dec_ports !== exp_ports || dec_drop !== exp_drop || dec_info !== info) begin
        failures++;
        $display("FAIL i=%0d valid=%b ports=%b exp=%b drop=%b exp=%b", i, dec_valid,
                 dec_ports, exp_ports, dec_drop, exp_drop);
      end
      @(negedge clk);
      checks++;
      if (dec_valid) begin failures++; $display("FAIL valid longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
