// flitizer: splits a packet into wormhole flits.
//
// A packet is a destination port, a lane (virtual channel) and a PKT_W-bit
// payload; every flit of the packet is tagged with that lane. It is sent as one
// head flit, whose data field carries the destination port in its low bits,
// followed by PKT_W / FLIT_DATA_W payload flits, least significant word first.
// All payload flits but the last are body flits; the last is the tail flit
// that closes the path through the network. A packet therefore takes
// 1 + PKT_W / FLIT_DATA_W flits.
//
// Interface: packet side pkt_valid / pkt_ready / pkt_dest / pkt_vc /
// pkt_payload, flit
// side flit_valid / flit_ready / flit, both valid/ready handshakes.
// Timing: a packet is taken on a rising edge when pkt_valid and pkt_ready are
// high; its head flit is shown from the next cycle and one flit leaves per
// cycle while flit_ready is high. pkt_ready is high when idle and also in the
// cycle the tail flit leaves, so back-to-back packets leave no gap. rst_n is
// active-low synchronous. The head/body/tail split follows the flitization
// description; the widths and the word order are this design's choice.
module flitizer
  import noc_alloc_pkg::*;
#(
  parameter int PKT_W = 64,
  localparam int NWORDS = PKT_W / FLIT_DATA_W,
  localparam int CNT_W  = $clog2(NWORDS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pkt_valid,
  output logic                     pkt_ready,
  input  port_e                    pkt_dest,
  input  logic [VC_W-1:0]          pkt_vc,
  input  logic [PKT_W-1:0]         pkt_payload,
  output logic                     flit_valid,
  input  logic                     flit_ready,
  output flit_t                    flit
);

  logic                     busy;
  logic [CNT_W-1:0]         sent;      // 0 = head next, k = payload word k-1 next
  port_e                    dest_q;
  logic [VC_W-1:0]          vc_q;
  logic [NWORDS-1:0][FLIT_DATA_W-1:0] words_q;
  logic                     last_flit;

  assign flit_valid = busy;
  assign last_flit  = (int'(sent) == NWORDS);
  assign pkt_ready  = !busy || (flit_ready && last_flit);

  always_comb begin
    flit.vc = vc_q;
    if (sent == '0) begin
      flit.ftype = FLIT_HEAD;
      flit.data  = FLIT_DATA_W'(dest_q);
    end else begin
      flit.ftype = last_flit ? FLIT_TAIL : FLIT_BODY;
      flit.data  = words_q[sent - 1'b1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      sent    <= '0;
      dest_q  <= PORT_NORTH;
      vc_q    <= '0;
      words_q <= '0;
    end else begin
      if (busy && flit_ready) begin
        sent <= sent + 1'b1;
        if (last_flit) busy <= 1'b0;
      end
      if (pkt_valid && pkt_ready) begin
        busy    <= 1'b1;
        sent    <= '0;
        dest_q  <= pkt_dest;
        vc_q    <= pkt_vc;
        words_q <= pkt_payload;
      end
    end
  end

endmodule
