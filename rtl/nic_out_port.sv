// nic_out_port: network output port of the NIC (PaRC link transmitter).
//
// Takes the head message of the output queue and sends it into the network
// as a 12-word packet on the 16-bit nodata bus, one word per clock:
// the header {1, CSP, 1, type, o0[31:24]}, ten words carrying o0..o4 in the
// PaRC/I-structure byte arrangement (nic_pkg::msg_to_word), and a final
// 0x5555 word. Between packets nodata carries the idle pattern 0x5555, whose
// bit 15 is 0; the header always has bit 15 set, which is how the receiver
// finds the start of a packet.
//
// A packet may start only while nowait is low. The port looks at nowait
// when it is idle or in the last word of a packet, so packets can follow
// each other with no idle word in between. When it starts, the head message
// is copied into a holding register and popped from the queue in the same
// cycle.
//
// Timing: nodata is registered. If the queue is non-empty and nowait is
// low in cycle t, the header is on nodata in cycle t+1 and the last word in
// cycle t+12.
//
// Clocking: clk is the output-link clock (netclk at the chip level), which
// the document lets run faster than the P bus clock; the output queue
// crosses between the two. noclk is clk inverted (this design's choice), so
// each rising edge of noclk falls in the middle of a stable nodata word.
// nowait is taken to be synchronous to clk.
module nic_out_port
  import nic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // output queue head
  input  logic        q_empty,
  input  nic_msg_t    q_head,
  output logic        q_pop,
  // PaRC output link
  input  logic        nowait,
  output logic [15:0] nodata,
  output logic        noclk,
  // status
  output logic        busy,      // a packet is on nodata this cycle
  output logic        pkt_start  // pulse: a header goes out next cycle
);

  nic_msg_t   msg_q;
  logic [3:0] idx_q;      // index of the word on nodata while busy
  logic       last_word;

  assign last_word = busy && (idx_q == 4'(PKT_WORDS - 1));
  assign pkt_start = (!busy || last_word) && !q_empty && !nowait;
  assign q_pop     = pkt_start;
  assign noclk     = ~clk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      idx_q  <= '0;
      nodata <= IDLE_PATTERN;
      msg_q  <= '0;
    end else if (pkt_start) begin
      busy   <= 1'b1;
      idx_q  <= '0;
      msg_q  <= q_head;
      nodata <= msg_to_word(q_head, 4'd0);
    end else if (busy && !last_word) begin
      idx_q  <= idx_q + 1'b1;
      nodata <= msg_to_word(msg_q, idx_q + 1'b1);
    end else begin
      busy   <= 1'b0;
      nodata <= IDLE_PATTERN;
    end
  end

  // The start-of-packet bit is set in every header.
  a_header_sop: assert property (@(posedge clk) disable iff (!rst_n)
                                 pkt_start |=> nodata[15]);
  a_idle_low:   assert property (@(posedge clk) disable iff (!rst_n)
                                 !busy |-> nodata == IDLE_PATTERN);

endmodule
