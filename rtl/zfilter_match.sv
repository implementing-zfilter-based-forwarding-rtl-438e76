// zfilter_match: the zFilter test for one Link ID ("do zFiltering").
//
// For each outgoing link the node checks zFilter & LIT == LIT. The filter
// arrives 64 bits at a time, so the test is done per chunk: a forwarding bit
// is set to one when a packet starts (`start`) and cleared as soon as one
// chunk of (zFilter AND LIT) differs from the LIT chunk. After the last chunk
// the bit says whether the packet goes out on this link. `chunk_mask` marks
// the chunk bits that belong to the filter; padding bits are ignored.
//
// This design adds one rule: a LIT with no bit set never matches, so a link
// whose table entry was never written forwards nothing (a real LIT always has
// k bits set).
//
// Timing: `match` reflects every chunk accepted up to the previous clock edge.
module zfilter_match #(
  parameter int unsigned W = zf_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,       // first word of a packet
  input  logic         chunk_valid, // zf_chunk/lit_chunk hold a filter chunk
  input  logic [W-1:0] zf_chunk,
  input  logic [W-1:0] lit_chunk,
  input  logic [W-1:0] chunk_mask,
  output logic         match
);

  logic         fwd_bit;   // the interface's bit of the forwarding bit-vector
  logic         lit_seen;  // some LIT bit was set in the chunks so far
  logic [W-1:0] lit_m;

  assign lit_m = lit_chunk & chunk_mask;

  always_ff @(posedge clk) begin
    if (reset || start) begin
      fwd_bit  <= 1'b1;
      lit_seen <= 1'b0;
    end else if (chunk_valid) begin
      if ((zf_chunk & lit_m) != lit_m) fwd_bit <= 1'b0;
      if (lit_m != '0) lit_seen <= 1'b1;
    end
  end

  assign match = fwd_bit && lit_seen;

endmodule
