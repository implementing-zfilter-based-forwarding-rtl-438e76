// zfilter_node: zFilter (in-packet Bloom filter) forwarding node.
//
// Packets carry a zFilter: the OR of the Link ID Tags (LITs) of every link of
// their delivery tree. The node forwards a packet on each outgoing interface
// whose LIT is contained in the zFilter (zFilter & LIT == LIT). Each interface
// has NUM_LITS alternative LITs, one per table index d carried in the packet,
// and NUM_VLINKS virtual links (tree identifiers configured by management)
// that are matched the same way.
//
// Words from the input arbiter enter store_packet and, at the same time, the
// output_port_selector. The selector checks the ethertype (0xacdc), the TTL
// and the number of ones in the zFilter, matches all Link IDs in parallel and
// hands a port bit-vector (or a drop) to store_packet, which then sends the
// packet towards the output queues on out_* with `out_ports`, or discards it.
// The node also has local Link IDs for its own control processor (the slow
// path): a packet matching one is marked with `out_cpu`, and a local Link ID
// can be configured to stop the packet from being forwarded any further.
//
// Interface: NetFPGA-style 64-bit data + 8-bit ctrl stream in and out, with
// valid/ready handshakes (in_wr/in_rdy, out_wr/out_rdy), and a 32-bit host
// register bus (see output_port_selector for the address map). Clock 125 MHz
// on the NetFPGA; reset synchronous, active high.
// Timing: the decision is ready 8 cycles after a packet's first word; the first
// word of a forwarded packet leaves on the cycle after that at the earliest.
// The defaults are the published configuration: 4 interfaces, each with 4 real
// and 4 virtual LITs of 248 bits. Buffer sizes are this design's choice.
module zfilter_node
  import zf_pkg::*;
#(
  parameter int unsigned NUM_PORTS  = 4,
  parameter int unsigned NUM_LITS   = 4,
  parameter int unsigned NUM_VLINKS = 1,
  parameter int unsigned LIT_BITS   = 248,
  parameter logic [15:0] ETHERTYPE  = ZF_ETHERTYPE,
  parameter int unsigned BUF_WORDS  = 512,
  parameter int unsigned DEC_DEPTH  = 16
) (
  input  logic                 clk,
  input  logic                 reset,
  // from the input arbiter
  input  logic [DATA_W-1:0]    in_data,
  input  logic [CTRL_W-1:0]    in_ctrl,
  input  logic                 in_wr,
  output logic                 in_rdy,
  // to the output queues
  output logic [DATA_W-1:0]    out_data,
  output logic [CTRL_W-1:0]    out_ctrl,
  output logic                 out_wr,
  input  logic                 out_rdy,
  output logic [NUM_PORTS-1:0] out_ports,
  output logic                 out_cpu,     // packet goes to the control processor
  // host register bus
  input  logic                 reg_req,
  input  logic                 reg_wr,
  input  logic [15:0]          reg_addr,
  input  logic [31:0]          reg_wdata,
  output logic                 reg_ack,
  output logic [31:0]          reg_rdata,
  // decision of every packet, for monitoring
  output logic                 dec_valid,
  output logic [NUM_PORTS-1:0] dec_ports,
  output logic                 dec_cpu,
  output drop_t                dec_drop
);

  pkt_info_t dec_info;

  output_port_selector #(
    .NUM_PORTS(NUM_PORTS), .NUM_LITS(NUM_LITS), .NUM_VLINKS(NUM_VLINKS),
    .LIT_BITS(LIT_BITS), .ETHERTYPE(ETHERTYPE)
  ) u_selector (
    .clk, .reset,
    .in_valid (in_wr && in_rdy),
    .in_data, .in_ctrl,
    .dec_valid, .dec_ports, .dec_cpu, .dec_drop, .dec_info,
    .reg_req, .reg_wr, .reg_addr, .reg_wdata, .reg_ack, .reg_rdata
  );

  store_packet #(
    .NUM_PORTS(NUM_PORTS), .BUF_WORDS(BUF_WORDS), .DEC_DEPTH(DEC_DEPTH)
  ) u_store (
    .clk, .reset,
    .in_data, .in_ctrl, .in_wr, .in_rdy,
    .dec_valid, .dec_ports, .dec_cpu,
    .out_data, .out_ctrl, .out_wr, .out_rdy, .out_ports, .out_cpu
  );

endmodule
