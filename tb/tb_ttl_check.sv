// tb_ttl_check: a captured TTL of zero is refused, any other value accepted,
// and the captured value is given out unchanged.
module tb_ttl_check;
  logic clk = 0, reset = 1, capture = 0, ok;
  logic [7:0] ttl = '0, ttl_q;
  int checks = 0, failures = 0;

  ttl_check dut (.clk, .reset, .capture, .ttl, .ok, .ttl_q);

  always #4 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic present(logic [7:0] t);
    @(negedge clk);
    capture = 1; ttl = t;
    @(negedge clk);
    capture = 0; ttl = 8'h5A;
    checks++;
    if (ok !== (t != 0) || ttl_q !== t) begin
      failures++;
      $display("FAIL ttl=%0d ok=%b ttl_q=%0d", t, ok, ttl_q);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    present(8'd0);
    present(8'd1);
    present(8'd255);
    present(8'd0);
    for (int i = 0; i < 100; i++) present((i % 5 == 0) ? 8'd0 : 8'($urandom));
    // value holds without capture
    present(8'd7);
    repeat (3) @(negedge clk);
    checks++;
    if (ttl_q !== 8'd7 || !ok) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
