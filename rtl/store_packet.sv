// store_packet: packet buffer of the forwarding node.
//
// Every word entering the node is written here while the output port
// selector works out where the packet goes. Packets leave in arrival order:
// the head packet waits until its decision is in the decision FIFO, then
//   - with at least one port or the CPU bit, it is sent on out_* with the
//     bit-vector on `out_ports` and the CPU bit on `out_cpu` for the whole
//     packet, the module header's destination field [63:48] set to the
//     matching NetFPGA queue bits (bit 2p for interface p, bit 1 for the
//     control processor queue) and the TTL byte of the zFilter header
//     decremented;
//   - with neither, its words are discarded at one word per cycle.
// The published node stores packets in the board SRAM; here the buffer is an
// on-chip FIFO of BUF_WORDS words, and up to DEC_DEPTH packets may be in it
// (a new packet is held back at in_rdy when that many are waiting, so the
// decision FIFO can never overflow). Sizes and the header rewrite are this
// design's choices.
//
// Handshakes: a word moves in when in_wr && in_rdy, out when out_wr && out_rdy.
// A packet is a module header word, then words with ctrl 0, ended by a word
// with non-zero ctrl. Decisions (`dec_valid`/`dec_ports`) must come in packet
// order and not before the packet's first word is in.
module store_packet
  import zf_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 4,
  parameter int unsigned BUF_WORDS = 512,
  parameter int unsigned DEC_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 reset,
  // packet input
  input  logic [DATA_W-1:0]    in_data,
  input  logic [CTRL_W-1:0]    in_ctrl,
  input  logic                 in_wr,
  output logic                 in_rdy,
  // decisions
  input  logic                 dec_valid,
  input  logic [NUM_PORTS-1:0] dec_ports,
  input  logic                 dec_cpu,
  // packet output towards the output queues
  output logic [DATA_W-1:0]    out_data,
  output logic [CTRL_W-1:0]    out_ctrl,
  output logic                 out_wr,
  input  logic                 out_rdy,
  output logic [NUM_PORTS-1:0] out_ports,
  output logic                 out_cpu
);

  localparam int unsigned BA_W = idx_w(BUF_WORDS);
  localparam int unsigned DA_W = idx_w(DEC_DEPTH);
  localparam int unsigned OW_W = idx_w(HDR_WORD + 2);

  typedef struct packed {
    logic [CTRL_W-1:0] ctrl;
    logic [DATA_W-1:0] data;
  } word_t;

  // ------------------------------------------------------------ word FIFO
  word_t            buf_mem [BUF_WORDS];
  logic [BA_W-1:0]  wr_ptr, rd_ptr;
  logic [BA_W:0]    wcount;
  logic             push, pop;
  logic             in_first;        // next input word starts a packet
  logic [DA_W:0]    pkts;            // packets (partly) in the buffer

  assign in_rdy = (wcount < (BA_W+1)'(BUF_WORDS)) &&
                  !(in_first && pkts >= (DA_W+1)'(DEC_DEPTH));
  assign push   = in_wr && in_rdy;

  always_ff @(posedge clk) begin
    if (push) buf_mem[wr_ptr] <= '{ctrl: in_ctrl, data: in_data};
  end

  // -------------------------------------------------------- decision FIFO
  logic [NUM_PORTS:0]   dec_mem [DEC_DEPTH];   // {CPU, interfaces}
  logic [DA_W-1:0]      dwr_ptr, drd_ptr;
  logic [DA_W:0]        dcount;
  logic                 dpop;

  always_ff @(posedge clk) begin
    if (dec_valid) dec_mem[dwr_ptr] <= {dec_cpu, dec_ports};
  end

  // --------------------------------------------------------------- output
  word_t                head;
  logic [NUM_PORTS:0]   head_ports;
  logic                 can_go, drop, head_eop, in_eop;
  logic [OW_W-1:0]      oidx;        // word index in the outgoing packet

  assign head       = buf_mem[rd_ptr];
  assign head_ports = dec_mem[drd_ptr];
  assign can_go     = (wcount != '0) && (dcount != '0);
  assign drop       = (head_ports == '0);
  assign out_wr     = can_go && !drop;
  assign pop        = can_go && (drop || out_rdy);
  assign head_eop   = (oidx != '0) && (head.ctrl != '0);
  assign dpop       = pop && head_eop;
  assign in_eop     = push && !in_first && (in_ctrl != '0);
  assign out_ports  = head_ports[NUM_PORTS-1:0];
  assign out_cpu    = head_ports[NUM_PORTS];

  always_comb begin
    out_data = head.data;
    out_ctrl = head.ctrl;
    if (oidx == '0) begin
      out_data[MH_DST_LSB +: 16] = '0;
      for (int p = 0; p < NUM_PORTS && 2*p < 16; p++)
        out_data[MH_DST_LSB + 2*p] = head_ports[p];
      out_data[MH_DST_LSB + 1] = head_ports[NUM_PORTS];
    end else if (oidx == OW_W'(HDR_WORD)) begin
      out_data[TTL_LSB +: 8] = head.data[TTL_LSB +: 8] - 8'd1;
    end
  end

  // ------------------------------------------------------------ pointers
  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      wcount   <= '0;
      dwr_ptr  <= '0;
      drd_ptr  <= '0;
      dcount   <= '0;
      in_first <= 1'b1;
      pkts     <= '0;
      oidx     <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == BA_W'(BUF_WORDS - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == BA_W'(BUF_WORDS - 1)) ? '0 : rd_ptr + 1'b1;
      wcount <= wcount + (BA_W+1)'(push) - (BA_W+1)'(pop);

      if (dec_valid) dwr_ptr <= (dwr_ptr == DA_W'(DEC_DEPTH - 1)) ? '0 : dwr_ptr + 1'b1;
      if (dpop)      drd_ptr <= (drd_ptr == DA_W'(DEC_DEPTH - 1)) ? '0 : drd_ptr + 1'b1;
      dcount <= dcount + (DA_W+1)'(dec_valid) - (DA_W+1)'(dpop);

      if (push) in_first <= in_eop;
      pkts <= pkts + (DA_W+1)'(push && in_first) - (DA_W+1)'(dpop);

      if (pop) oidx <= head_eop ? '0 : (oidx == OW_W'(HDR_WORD + 1)) ? oidx : oidx + 1'b1;
    end
  end

  // ---------------------------------------------------------- assertions
  always_ff @(posedge clk) begin
    if (!reset) begin
      assert (!(dec_valid && dcount == (DA_W+1)'(DEC_DEPTH)))
        else $error("store_packet: decision FIFO overflow");
      assert (!(dec_valid && pkts == '0))
        else $error("store_packet: decision without a packet");
    end
  end

endmodule
