// tb_ethertype_check: the zFilter ethertype 0xacdc is accepted, others are
// refused, and the verdict holds while no new header word is captured.
module tb_ethertype_check;
  logic clk = 0, reset = 1, capture = 0, ok;
  logic [15:0] ethertype = '0;
  int checks = 0, failures = 0;

  ethertype_check dut (.clk, .reset, .capture, .ethertype, .ok);

  always #4 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ok(logic exp, string what);
    checks++;
    if (ok !== exp) begin
      failures++;
      $display("FAIL %s: ok=%b expected %b", what, ok, exp);
    end
  endtask

  task automatic present(logic [15:0] et);
    @(negedge clk);
    capture = 1; ethertype = et;
    @(negedge clk);
    capture = 0; ethertype = ~et;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    expect_ok(1'b0, "after reset");
    present(16'hACDC); expect_ok(1'b1, "0xacdc");
    repeat (3) @(negedge clk);
    expect_ok(1'b1, "held");
    present(16'h0800); expect_ok(1'b0, "IPv4");
    present(16'hACDD); expect_ok(1'b0, "0xacdd");
    present(16'h12DC); expect_ok(1'b0, "0x12dc");
    present(16'hACDC); expect_ok(1'b1, "0xacdc again");
    for (int i = 0; i < 100; i++) begin
      logic [15:0] et;
      et = (i % 4 == 0) ? 16'hACDC : 16'($urandom);
      present(et);
      expect_ok(et == 16'hACDC, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
