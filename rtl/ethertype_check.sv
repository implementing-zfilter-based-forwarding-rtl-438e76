// ethertype_check: tells whether a packet carries the zFilter ethertype.
//
// When `capture` is high the ethertype field of the current header word is
// compared with ETHERTYPE (0xacdc, the value the published node uses) and the
// verdict is registered; `ok` then holds until the next packet's header word.
// Timing: one cycle from the capture word to `ok`.
module ethertype_check #(
  parameter logic [15:0] ETHERTYPE = zf_pkg::ZF_ETHERTYPE
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        capture,
  input  logic [15:0] ethertype,
  output logic        ok
);

  always_ff @(posedge clk) begin
    if (reset)        ok <= 1'b0;
    else if (capture) ok <= (ethertype == ETHERTYPE);
  end

endmodule
