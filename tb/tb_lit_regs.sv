// tb_lit_regs: the LIT register block in front of a behavioural model of
// ten id_store management ports (4 interfaces + the local set, each with a
// real and a virtual Link ID). Set numbers 5..7 do not exist.
// Random writes and reads over the whole address space; checks that each
// write reaches exactly the addressed store word, that reads return the
// stored data, and that the acknowledge comes two cycles after the request.
module tb_lit_regs;
  localparam int NS = 5, NL = 4, NV = 1, LB = 248;
  localparam int LINKS = NS * (1 + NV);
  localparam int LIT_AW = 4;          // d (2 bits) + chunk (2 bits)
  localparam int REG_AW = 9;          // set 3 + link 1 + LIT_AW + half 1

  logic clk = 0, reset = 1;
  logic reg_req = 0, reg_wr = 0, reg_ack;
  logic [REG_AW-1:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [LIT_AW:0] st_addr;
  logic [LINKS-1:0] st_we;
  logic [31:0] st_wdata;
  logic [31:0] st_rdata [LINKS];

  // store model: LINKS x 2^(LIT_AW+1) 32-bit words, one-cycle read
  logic [31:0] mem [LINKS][2**(LIT_AW+1)];
  logic [31:0] model [LINKS][2**(LIT_AW+1)];
  int checks = 0, failures = 0;

  lit_regs #(.NUM_SETS(NS), .NUM_LITS(NL), .NUM_VLINKS(NV), .LIT_BITS(LB)) dut (.*);

  always #4 clk = ~clk;

  always_ff @(posedge clk)
    for (int l = 0; l < LINKS; l++) begin
      if (st_we[l]) mem[l][st_addr] <= st_wdata;
      st_rdata[l] <= mem[l][st_addr];
    end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic wr, logic [REG_AW-1:0] a, logic [31:0] v, output logic [31:0] rd);
    int lat = 0;
    @(negedge clk);
    reg_req = 1; reg_wr = wr; reg_addr = a; reg_wdata = v;
    @(negedge clk);
    reg_req = 0;
    reg_addr = '1; reg_wdata = '0;
    while (!reg_ack && lat < 10) begin lat++; @(negedge clk); end
    rd = reg_rdata;
    checks++;
    if (lat != 1) begin failures++; $display("FAIL ack latency %0d", lat + 1); end
  endtask

  initial begin
    logic [31:0] rd;
    for (int l = 0; l < LINKS; l++)
      for (int w = 0; w < 2**(LIT_AW+1); w++) begin
        mem[l][w] = 32'hDEAD_0000 + 32'(l * 64 + w);
        model[l][w] = mem[l][w];
      end
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 1500; i++) begin
      logic [REG_AW-1:0] a;
      int port, link, word;
      logic [31:0] v;
      a = REG_AW'($urandom);
      port = int'(a[8:6]); link = int'(a[5]); word = int'(a[4:0]);
      v = $urandom;
      if ($urandom % 2) begin
        access(1'b1, a, v, rd);
        if (port < NS) model[port * 2 + link][word] = v;
      end else begin
        access(1'b0, a, '0, rd);
        checks++;
        if (rd !== ((port < NS) ? model[port * 2 + link][word] : 32'd0)) begin
          failures++;
          $display("FAIL read p=%0d l=%0d w=%0d got %h", port, link, word, rd);
        end
      end
    end
    // every store word equals the model: no stray writes
    for (int l = 0; l < LINKS; l++)
      for (int w = 0; w < 2**(LIT_AW+1); w++) begin
        checks++;
        if (mem[l][w] !== model[l][w]) begin failures++; $display("FAIL store %0d word %0d", l, w); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
