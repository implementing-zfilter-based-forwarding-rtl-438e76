// status_regs: control and debug register block of the forwarding node.
//
// Word addresses (32-bit registers):
//   0  RO  number of interfaces (NUM_PORTS)
//   1  RO  LITs per link, i.e. the number of d tables (NUM_LITS)
//   2  RO  virtual LITs per interface (NUM_VLINKS * NUM_LITS)
//   3  RO  LIT length in bits (LIT_BITS)
//   4  RW  maximum number of ones allowed in a zFilter
//   5  RO  last forwarded packet: ones counted in its zFilter
//   6  RO  last forwarded packet: d
//   7  RO  last forwarded packet: TTL as received
//   8  RO  last forwarded packet: incoming port (module header source field)
//   9  RO  last forwarded packet: output port bit-vector, bit NUM_PORTS =
//          copied to the control processor
//   10 RO  virtual links per interface (NUM_VLINKS)
//   11 RW  slow path blocking: bit 0 the node's local Link ID, bit v its
//          virtual local Link ID v; a set bit stops matching packets at this
//          node (reset 0: copy to the processor and keep forwarding)
// other addresses read as zero. The contents follow the published node's
// status registers; the addresses, the reset value of the limit
// (MAX_ONES_INIT) and registers 9 to 11 are this design's choices.
//
// Bus timing: `reg_ack` pulses one cycle after the `reg_req` strobe. The
// "last packet" registers load when a decision with at least one output port
// or the CPU bit arrives (`dec_valid`).
module status_regs
  import zf_pkg::*;
#(
  parameter int unsigned NUM_PORTS     = 4,
  parameter int unsigned NUM_LITS      = 4,
  parameter int unsigned NUM_VLINKS    = 1,
  parameter int unsigned LIT_BITS      = 248,
  parameter int unsigned MAX_ONES_INIT = LIT_BITS / 2
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 reg_req,
  input  logic                 reg_wr,
  input  logic [3:0]           reg_addr,
  input  logic [31:0]          reg_wdata,
  output logic                 reg_ack,
  output logic [31:0]          reg_rdata,
  // decision of the port selector
  input  logic                 dec_valid,
  input  logic [NUM_PORTS:0]   dec_ports,   // {CPU, interfaces}
  input  pkt_info_t            dec_info,
  // configuration
  output logic [15:0]          max_ones,
  output logic [NUM_VLINKS:0]  block_mask   // local Link IDs that block forwarding
);

  pkt_info_t            last_info;
  logic [NUM_PORTS:0]   last_ports;
  logic [31:0]          rd_mux;

  always_ff @(posedge clk) begin
    if (reset) begin
      last_info  <= '0;
      last_ports <= '0;
    end else if (dec_valid && dec_ports != '0) begin
      last_info  <= dec_info;
      last_ports <= dec_ports;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) max_ones <= 16'(MAX_ONES_INIT);
    else if (reg_req && reg_wr && reg_addr == 4'd4) max_ones <= reg_wdata[15:0];
  end

  always_ff @(posedge clk) begin
    if (reset) block_mask <= '0;
    else if (reg_req && reg_wr && reg_addr == 4'd11) block_mask <= reg_wdata[NUM_VLINKS:0];
  end

  always_comb begin
    unique case (reg_addr)
      4'd0:    rd_mux = 32'(NUM_PORTS);
      4'd1:    rd_mux = 32'(NUM_LITS);
      4'd2:    rd_mux = 32'(NUM_VLINKS * NUM_LITS);
      4'd3:    rd_mux = 32'(LIT_BITS);
      4'd4:    rd_mux = 32'(max_ones);
      4'd5:    rd_mux = 32'(last_info.ones);
      4'd6:    rd_mux = 32'(last_info.d);
      4'd7:    rd_mux = 32'(last_info.ttl);
      4'd8:    rd_mux = 32'(last_info.src_port);
      4'd9:    rd_mux = 32'(last_ports);
      4'd10:   rd_mux = 32'(NUM_VLINKS);
      4'd11:   rd_mux = 32'(block_mask);
      default: rd_mux = 32'd0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      reg_ack   <= 1'b0;
      reg_rdata <= '0;
    end else begin
      reg_ack <= reg_req;
      if (reg_req) reg_rdata <= reg_wr ? 32'd0 : rd_mux;
    end
  end

endmodule
