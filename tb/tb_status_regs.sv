// tb_status_regs: constants read back as configured, the zFilter ones limit
// resets to LIT_BITS/2 and is writable, and the last-forwarded-packet
// registers follow forwarded decisions only (dropped ones leave them alone),
// and the slow path blocking mask is writable and given out.
module tb_status_regs;
  import zf_pkg::*;
  localparam int NP = 4;
  logic clk = 0, reset = 1;
  logic reg_req = 0, reg_wr = 0, reg_ack;
  logic [3:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic dec_valid = 0;
  logic [NP:0] dec_ports = '0;
  pkt_info_t dec_info = '0;
  logic [15:0] max_ones;
  logic [1:0] block_mask;
  int checks = 0, failures = 0;

  status_regs #(.NUM_PORTS(NP), .NUM_LITS(4), .NUM_VLINKS(1), .LIT_BITS(248)) dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_check(int a, logic [31:0] exp, string what);
    @(negedge clk);
    reg_req = 1; reg_wr = 0; reg_addr = 4'(a);
    @(negedge clk);
    reg_req = 0;
    checks++;
    if (!reg_ack || reg_rdata !== exp) begin
      failures++;
      $display("FAIL %s: ack=%b data=%0d exp %0d", what, reg_ack, reg_rdata, exp);
    end
  endtask

  task automatic wr(int a, logic [31:0] v);
    @(negedge clk);
    reg_req = 1; reg_wr = 1; reg_addr = 4'(a); reg_wdata = v;
    @(negedge clk);
    reg_req = 0; reg_wr = 0;
  endtask

  task automatic decide(logic [NP:0] ports, pkt_info_t info);
    @(negedge clk);
    dec_valid = 1; dec_ports = ports; dec_info = info;
    @(negedge clk);
    dec_valid = 0; dec_info = '1; dec_ports = '1;
  endtask

  initial begin
    pkt_info_t a, b;
    repeat (2) @(negedge clk);
    reset = 0;
    rd_check(0, 4, "ports");
    rd_check(1, 4, "LITs per link");
    rd_check(2, 4, "virtual LITs");
    rd_check(3, 248, "LIT length");
    rd_check(4, 124, "max ones reset");
    rd_check(10, 1, "virtual links");
    rd_check(15, 0, "unused");
    rd_check(11, 0, "block mask reset");
    wr(11, 32'h2);
    rd_check(11, 2, "block mask written");
    checks++;
    if (block_mask !== 2'b10) begin failures++; $display("FAIL block_mask out"); end
    checks++;
    if (max_ones !== 16'd124) begin failures++; $display("FAIL max_ones out"); end
    wr(4, 37);
    rd_check(4, 37, "max ones written");
    checks++;
    if (max_ones !== 16'd37) begin failures++; $display("FAIL max_ones out after write"); end
    wr(0, 99);                                 // read-only
    rd_check(0, 4, "ports read-only");
    for (int i = 0; i < 50; i++) begin
      a = '{ones: 16'($urandom), d: 8'($urandom), ttl: 8'($urandom), src_port: 16'($urandom)};
      b = '{ones: 16'($urandom), d: 8'($urandom), ttl: 8'($urandom), src_port: 16'($urandom)};
      decide(5'b00101 | 5'(i), a);
      decide(5'b00000, b);                      // dropped: ignored
      rd_check(5, 32'(a.ones), "last ones");
      rd_check(6, 32'(a.d), "last d");
      rd_check(7, 32'(a.ttl), "last ttl");
      rd_check(8, 32'(a.src_port), "last src");
      rd_check(9, 32'(5'b00101 | 5'(i)), "last ports");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
