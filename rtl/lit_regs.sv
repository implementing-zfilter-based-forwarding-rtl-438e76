// lit_regs: host register block for the LIT tables.
//
// Gives the management software 32-bit access to every id_store. The word
// address on the register bus is split as
//     {set, link, d, chunk, half}
// where `set` runs over the Link ID sets (sets 0..NUM_SETS-2 are the
// interfaces, the last set holds the node's local, slow path Link IDs),
// `link` 0 is the set's real Link ID and 1..NUM_VLINKS its
// virtual Link IDs, `d` the LIT table index, `chunk` the 64-bit piece of the
// LIT (chunk 0 holds the most significant bits) and `half` the 32-bit half of
// that piece (1 = upper). Addresses beyond the configured sets or links read
// as zero and ignore writes. This layout is this design's own choice.
//
// Bus timing: `reg_req` is a one-cycle strobe with reg_wr/reg_addr/reg_wdata;
// `reg_ack` pulses two cycles later, with `reg_rdata` valid for reads. The
// id_store management port is driven straight from the bus in the request
// cycle; its registered read data is latched one cycle later.
module lit_regs
  import zf_pkg::*;
#(
  parameter int unsigned NUM_SETS   = 5,
  parameter int unsigned NUM_LITS   = 4,
  parameter int unsigned NUM_VLINKS = 1,
  parameter int unsigned LIT_BITS   = 248,
  // derived
  parameter int unsigned NUM_LINKS  = NUM_SETS * (1 + NUM_VLINKS),
  parameter int unsigned LIT_AW     = idx_w(NUM_LITS) + idx_w(num_chunks(LIT_BITS)),
  parameter int unsigned REG_AW     = idx_w(NUM_SETS) + idx_w(1 + NUM_VLINKS) + LIT_AW + 1
) (
  input  logic              clk,
  input  logic              reset,
  // host register bus
  input  logic              reg_req,
  input  logic              reg_wr,
  input  logic [REG_AW-1:0] reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic              reg_ack,
  output logic [31:0]       reg_rdata,
  // management ports of the id_store instances (index set*(1+NUM_VLINKS)+link)
  output logic [LIT_AW:0]   st_addr,
  output logic [NUM_LINKS-1:0] st_we,
  output logic [31:0]       st_wdata,
  input  logic [31:0]       st_rdata [NUM_LINKS]
);

  localparam int unsigned SET_W  = idx_w(NUM_SETS);
  localparam int unsigned LINK_W = idx_w(1 + NUM_VLINKS);

  logic [SET_W-1:0] a_set;
  logic [LINK_W-1:0] a_link;
  logic              a_valid;
  int unsigned       a_idx;

  assign {a_set, a_link, st_addr} = reg_addr;
  assign a_valid  = (int'(a_set) < NUM_SETS) && (int'(a_link) < 1 + NUM_VLINKS);
  assign a_idx    = int'(a_set) * (1 + NUM_VLINKS) + int'(a_link);
  assign st_wdata = reg_wdata;

  always_comb begin
    st_we = '0;
    if (reg_req && reg_wr && a_valid) st_we[a_idx] = 1'b1;
  end

  // Two-stage acknowledge pipeline; stage 1 remembers which store to read.
  logic        p1_req, p1_rd, p1_valid;
  int unsigned p1_idx;

  always_ff @(posedge clk) begin
    if (reset) begin
      p1_req    <= 1'b0;
      p1_rd     <= 1'b0;
      p1_valid  <= 1'b0;
      p1_idx    <= 0;
      reg_ack   <= 1'b0;
      reg_rdata <= '0;
    end else begin
      p1_req   <= reg_req;
      p1_rd    <= reg_req && !reg_wr;
      p1_valid <= a_valid;
      p1_idx   <= a_valid ? a_idx : 0;
      reg_ack  <= p1_req;
      if (p1_req) reg_rdata <= (p1_rd && p1_valid) ? st_rdata[p1_idx] : 32'd0;
    end
  end

endmodule
