// combine_results: final forwarding decision of the output port selector.
//
// When `eval` is high all per-packet results are final: the zFilter
// bit-vector (one bit per output interface, from the matchers), the
// ethertype and TTL verdicts, the d range check, the ones count of the
// zFilter against the configured maximum, and whether the packet was cut
// short. If every check passes the decision carries the bit-vector;
// otherwise it carries no port and says which checks failed. A count equal
// to the maximum is allowed; only more ones than the maximum drops.
// Timing: the decision and the packet information are registered, so
// `dec_valid` pulses one cycle after `eval`.
module combine_results
  import zf_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 4
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 eval,
  input  logic [NUM_PORTS-1:0] match_vec,
  input  logic                 eth_ok,
  input  logic                 ttl_ok,
  input  logic                 d_ok,
  input  logic                 truncated,
  input  logic [15:0]          max_ones,
  input  pkt_info_t            info,
  output logic                 dec_valid,
  output logic [NUM_PORTS-1:0] dec_ports,
  output drop_t                dec_drop,
  output pkt_info_t            dec_info
);

  drop_t drop;

  always_comb begin
    drop.bad_ethertype = !eth_ok;
    drop.ttl_expired   = !ttl_ok;
    drop.too_many_ones = info.ones > max_ones;
    drop.bad_d         = !d_ok;
    drop.truncated     = truncated;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      dec_valid <= 1'b0;
      dec_ports <= '0;
      dec_drop  <= '0;
      dec_info  <= '0;
    end else begin
      dec_valid <= eval;
      if (eval) begin
        dec_ports <= (drop == '0) ? match_vec : '0;
        dec_drop  <= drop;
        dec_info  <= info;
      end
    end
  end

endmodule
