// tb_slow_path_select: every combination of interface matches, local Link ID
// matches and blocking configuration for 4 interfaces and 2 local Link IDs.
// Expected: CPU copy when any local Link ID matches; interface bits cleared
// only when a matching local Link ID is configured to block.
module tb_slow_path_select;
  logic [3:0] port_match, ports;
  logic [1:0] local_match, block_mask;
  logic cpu;
  int checks = 0, failures = 0;

  slow_path_select #(.NUM_PORTS(4), .NUM_LOCAL(2)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pm = 0; pm < 16; pm++)
      for (int lm = 0; lm < 4; lm++)
        for (int bm = 0; bm < 4; bm++) begin
          logic exp_cpu, blocked;
          port_match = 4'(pm); local_match = 2'(lm); block_mask = 2'(bm);
          #1;
          exp_cpu = (lm != 0);
          blocked = (lm & bm) != 0;
          checks++;
          if (cpu !== exp_cpu || ports !== (blocked ? 4'b0 : 4'(pm))) begin
            failures++;
            $display("FAIL pm=%b lm=%b bm=%b: cpu=%b ports=%b", 4'(pm), 2'(lm), 2'(bm), cpu, ports);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
