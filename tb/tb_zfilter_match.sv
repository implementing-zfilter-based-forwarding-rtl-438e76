// tb_zfilter_match: one Link ID matcher fed a 248-bit zFilter in four
// 64-bit chunks (with random idle cycles between chunks). The expected
// result is computed on the whole 256-bit vectors: forward when every valid
// LIT bit is also set in the zFilter and the LIT is not empty.
module tb_zfilter_match;
  import zf_pkg::*;
  localparam int unsigned LIT_BITS = 248;
  localparam int unsigned CHUNKS   = 4;

  logic clk = 0, reset = 1, start = 0, chunk_valid = 0, match;
  logic [63:0] zf_chunk = '0, lit_chunk = '0, chunk_mask_s = '0;
  int checks = 0, failures = 0;
  int n_match = 0, n_miss = 0;

  zfilter_match dut (.clk, .reset, .start, .chunk_valid, .zf_chunk, .lit_chunk,
                     .chunk_mask(chunk_mask_s), .match);

  always #4 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random Link ID tag with k ones in the first LIT_BITS bits
  function automatic logic [255:0] rand_lit(int k);
    logic [255:0] v = '0;
    while ($countones(v) < k) v[255 - ($urandom % LIT_BITS)] = 1'b1;
    return v;
  endfunction

  task automatic run(logic [255:0] zf, logic [255:0] lit);
    logic exp;
    logic [255:0] valid_bits;
    valid_bits = '1 << (256 - LIT_BITS);
    exp = ((zf & lit & valid_bits) == (lit & valid_bits)) && ((lit & valid_bits) != '0);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int c = 0; c < CHUNKS; c++) begin
      repeat ($urandom % 3) @(negedge clk);
      chunk_valid  = 1;
      zf_chunk     = zf[255 - 64*c -: 64];
      lit_chunk    = lit[255 - 64*c -: 64];
      chunk_mask_s = chunk_mask(LIT_BITS, c);
      @(negedge clk);
      chunk_valid  = 0;
      zf_chunk     = '1;      // garbage while idle
      lit_chunk    = '1;
    end
    checks++;
    if (match !== exp) begin
      failures++;
      $display("FAIL zf=%h lit=%h match=%b exp=%b", zf, lit, match, exp);
    end
    if (exp) n_match++; else n_miss++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 300; i++) begin
      logic [255:0] lit, zf;
      lit = rand_lit(5);
      zf  = lit | rand_lit(5) | rand_lit(5);       // tree with 3 links
      case (i % 4)
        0, 1: ;                                    // contained: forward
        2: begin                                   // one LIT bit missing
             int b;
             do b = $urandom % 256; while (!lit[b]);
             zf[b] = 1'b0;
           end
        3: zf = rand_lit(15);                      // unrelated filter
      endcase
      run(zf, lit);
    end
    run('1, '0);                                   // empty LIT never matches
    run('1, 256'hFF);                              // only padding bits set
    run(256'hFF, 256'hFF);
    run('0, rand_lit(5));
    if (n_match == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL coverage match=%0d miss=%0d", n_match, n_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
