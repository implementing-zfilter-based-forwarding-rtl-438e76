// ttl_check: loop guard of the forwarding node.
//
// When `capture` is high the TTL byte of the current header word is stored.
// `ok` is high while the stored TTL is above zero; a packet that arrives with
// TTL 0 has run out of hops and is dropped. The stored value is also given out
// (`ttl_q`) for the status registers. Decrementing the TTL of a forwarded
// packet is done where the packet leaves the node. Timing: one cycle from the
// capture word to `ok`/`ttl_q`. The 8-bit field width is this design's choice.
module ttl_check (
  input  logic       clk,
  input  logic       reset,
  input  logic       capture,
  input  logic [7:0] ttl,
  output logic       ok,
  output logic [7:0] ttl_q
);

  always_ff @(posedge clk) begin
    if (reset)        ttl_q <= '0;
    else if (capture) ttl_q <= ttl;
  end

  assign ok = (ttl_q != 8'd0);

endmodule
