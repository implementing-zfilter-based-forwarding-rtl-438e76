// id_store: dual-port LIT memory of one Link ID.
//
// Holds the NUM_LITS Link ID Tags of one link (real or virtual), each split
// into 64-bit chunks, DEPTH words in all, word address {d, chunk}.
//   Port A: 64-bit, read only, used by the zFilter matcher at line rate.
//   Port B: 32-bit, read/write, used by the management registers; address
//           {word, half}, half 1 = bits 63:32.
// The two ports work at the same time, so LITs can be rewritten without
// stopping forwarding. The memory is kept as two 32-bit halves so that port B
// writes one half without a read-modify-write. Both ports read synchronously
// (data one cycle after the address), which maps onto block RAM or onto
// distributed RAM alike. A write on B and a read of the same word on A in the
// same cycle return the old contents on A. Contents are not reset.
module id_store #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned ADDR_W = zf_pkg::idx_w(DEPTH)
) (
  input  logic              clk,
  // port A: matcher
  input  logic [ADDR_W-1:0] a_addr,
  output logic [63:0]       a_rdata,
  // port B: management
  input  logic [ADDR_W:0]   b_addr,
  input  logic              b_we,
  input  logic [31:0]       b_wdata,
  output logic [31:0]       b_rdata
);

  logic [31:0] mem_lo [DEPTH];
  logic [31:0] mem_hi [DEPTH];

  logic [ADDR_W-1:0] b_word;
  logic              b_half;
  assign b_word = b_addr[ADDR_W:1];
  assign b_half = b_addr[0];

  always_ff @(posedge clk) begin
    a_rdata <= {mem_hi[a_addr], mem_lo[a_addr]};
  end

  always_ff @(posedge clk) begin
    if (b_we && !b_half) mem_lo[b_word] <= b_wdata;
    if (b_we &&  b_half) mem_hi[b_word] <= b_wdata;
    b_rdata <= b_half ? mem_hi[b_word] : mem_lo[b_word];
  end

endmodule
