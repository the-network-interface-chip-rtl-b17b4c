// nic_in_port: network input port of the NIC (PaRC link receiver).
//
// Watches bit 15 of nidata while no packet is being received. A word with
// bit 15 set is a packet header; the next eleven words are the rest of the
// packet and are taken unconditionally, whatever their bit 15 is. Words 0 to
// 10 are collected in a buffer; on word 11 (the trailing pad word, ignored)
// the buffer is unpacked with nic_pkg::words_to_msg and pushed onto the
// input queue. After word 11 the port watches for a header again, so a
// packet may follow the previous one with no idle word in between.
//
// Flow control: niwait tells the sender not to begin another packet. It is
// high while the queued messages, plus the one being received, plus SLACK
// packets that may still start before the sender sees niwait, would fill the
// queue. With SLACK = 1 a sender that starts a packet one cycle after it
// sampled niwait low can never overflow the queue. The document requires
// only that niwait be raised early enough; the formula and SLACK are this
// design's.
//
// Timing: nidata is sampled on the rising clock edge. The message is pushed
// at the end of the cycle that carries word 11, i.e. 12 cycles after the
// header. clk is the input-link clock (niclk at the chip level), which comes
// with the data from the sender and may be unrelated to the P bus clock; the
// input queue crosses between the two. q_count is the queue's write-side
// count, which may still include messages already taken by the reader, so
// niwait errs on the safe side.
module nic_in_port
  import nic_pkg::*;
#(
  parameter int unsigned DEPTH = 15,   // depth of the queue it feeds
  parameter int unsigned SLACK = 1,    // packets that may start after niwait rises
  parameter int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // PaRC input link
  input  logic [15:0]      nidata,
  output logic             niwait,
  // input queue tail
  input  logic [CNT_W-1:0] q_count,
  input  logic             q_full,
  output logic             q_push,
  output nic_msg_t         q_din,
  // status
  output logic             busy,      // receiving a packet
  output logic             dropped    // pulse: packet lost, queue was full
);

  pkt_t       buf_q;
  logic [3:0] idx_q;     // index of the word expected on nidata while busy

  assign q_push  = busy && (idx_q == 4'(PKT_WORDS - 1));
  assign q_din   = words_to_msg(buf_q);
  assign dropped = q_push && q_full;
  assign niwait  = (32'(q_count) + 32'(busy) + SLACK) >= DEPTH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx_q <= '0;
      buf_q <= '0;
    end else if (!busy) begin
      if (nidata[15]) begin
        busy     <= 1'b1;
        idx_q    <= 4'd1;
        buf_q[0] <= nidata;
      end
    end else begin
      if (q_push) begin
        busy <= 1'b0;
      end else begin
        buf_q[idx_q] <= nidata;
        idx_q        <= idx_q + 1'b1;
      end
    end
  end

  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) !dropped);

endmodule
