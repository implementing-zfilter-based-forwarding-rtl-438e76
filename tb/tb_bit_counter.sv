// tb_bit_counter: checks the 64-bit ones counter against a reference loop
// for fixed corner words and random words of varying density.
module tb_bit_counter;
  logic [63:0] data;
  logic [6:0]  count;
  int checks = 0, failures = 0;

  bit_counter dut (.data, .count);

  function automatic int ref_count(logic [63:0] w);
    int n = 0;
    for (int i = 0; i < 64; i++) n += int'(w[i]);
    return n;
  endfunction

  task automatic check(logic [63:0] w);
    data = w;
    #1;
    checks++;
    if (int'(count) != ref_count(w)) begin
      failures++;
      $display("FAIL data=%h count=%0d expected=%0d", w, count, ref_count(w));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    check(64'h8000_0000_0000_0001);
    check(64'hAAAA_AAAA_AAAA_AAAA);
    for (int i = 0; i < 64; i++) check(64'd1 << i);
    for (int i = 0; i < 500; i++) begin
      logic [63:0] a, b;
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      check((i % 3 == 0) ? (a & b) : (i % 3 == 1) ? (a | b) : a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
