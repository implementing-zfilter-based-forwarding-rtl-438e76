// tb_id_store: writes random 32-bit halves through the management port,
// reads them back on both ports (64-bit port A, 32-bit port B) and checks
// that both ports work in the same cycle, against a reference array.
module tb_id_store;
  localparam int DEPTH = 16;
  logic clk = 0;
  logic [3:0]  a_addr = '0;
  logic [63:0] a_rdata;
  logic [4:0]  b_addr = '0;
  logic        b_we = 0;
  logic [31:0] b_wdata = '0, b_rdata;
  logic [63:0] model [DEPTH];
  int checks = 0, failures = 0;

  id_store #(.DEPTH(DEPTH)) dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_half(int w, int h, logic [31:0] v);
    @(negedge clk);
    b_addr = 5'({w, h[0]}); b_we = 1; b_wdata = v;
    if (h) model[w][63:32] = v; else model[w][31:0] = v;
    @(negedge clk);
    b_we = 0;
  endtask

  initial begin
    for (int w = 0; w < DEPTH; w++)
      for (int h = 0; h < 2; h++) write_half(w, h, $urandom);
    for (int i = 0; i < 2000; i++) begin
      int wa, wb, hb;
      logic do_wr;
      logic [31:0] v;
      logic [63:0] exp_a;
      logic [31:0] exp_b;
      wa = $urandom % DEPTH; wb = $urandom % DEPTH; hb = $urandom % 2;
      do_wr = ($urandom % 3) == 0;
      v = $urandom;
      @(negedge clk);
      a_addr = 4'(wa);
      b_addr = 5'({wb[3:0], hb[0]});
      b_we = do_wr; b_wdata = v;
      exp_a = model[wa];                     // read-before-write on port A
      exp_b = hb ? model[wb][63:32] : model[wb][31:0];
      if (do_wr) begin
        if (hb) model[wb][63:32] = v; else model[wb][31:0] = v;
      end
      @(negedge clk);
      b_we = 0;
      checks++;
      if (a_rdata !== exp_a) begin failures++; $display("FAIL A w=%0d %h exp %h", wa, a_rdata, exp_a); end
      if (!do_wr) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; $display("FAIL B w=%0d h=%0d %h exp %h", wb, hb, b_rdata, exp_b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
