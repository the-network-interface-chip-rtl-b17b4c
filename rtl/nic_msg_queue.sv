// nic_msg_queue: dual-clock first-in first-out queue of whole NIC messages.
//
// The NIC has two of these. The input queue is written by the network input
// port in the input-link clock domain and read by the P bus interface. The
// output queue is written by the P bus interface and read by the network
// output port in the output-link clock domain. An entry is one nic_msg_t
// (five 32-bit words, the 5-bit type and the circuit-switch bit), so a
// message enters or leaves in a single cycle of its side's clock.
//
// How it works: a register array of 2^AW entries, written on wclk and read
// combinationally from the read side. Each side keeps a binary pointer of
// AW+1 bits and publishes it Gray coded. The other side brings it in
// through a two-flop synchroniser (nic_sync) and decodes it. Each side thus
// sees the other's pointer a few cycles late, and its count errs on the
// safe side: wcount (write side) may still include messages already popped,
// and rcount (read side) may not yet include messages just pushed. full is
// wcount >= DEPTH, empty is rcount == 0. DEPTH may be less than 2^AW.
//
// Timing: a push becomes visible on the read side (empty low, dout valid)
// three rclk edges after the wclk edge that wrote it; a pop frees its slot
// for the write side three wclk edges later. With wclk and rclk tied
// together the queue is an ordinary synchronous FIFO with that latency.
//
// DEPTH defaults to 15 messages. The document's queue picture shows up to
// 15 queued messages besides the message held in the interface registers,
// and the 4-bit oLENGTH/iLENGTH status fields count up to 15; its "16
// messages" is read as those 15 plus the register set. The dual-clock
// structure is this design's: the document allows the input link clock to
// be fully asynchronous to the P bus clock.
module nic_msg_queue
  import nic_pkg::*;
#(
  parameter int unsigned DEPTH = 15,
  parameter int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  // write side
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             push,
  input  nic_msg_t         din,
  output logic             full,
  output logic [CNT_W-1:0] wcount,
  // read side
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             pop,
  output nic_msg_t         dout,
  output logic             empty,
  output logic [CNT_W-1:0] rcount
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;   // address bits
  localparam int unsigned PW = AW + 1;                            // pointer bits

  function automatic logic [PW-1:0] bin2gray(logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [PW-1:0] gray2bin(logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = PW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  nic_msg_t      mem [2**AW];

  // ---------------------------------------------------------- write side
  logic [PW-1:0] wbin, wgray, rgray_w, rbin_w, wdiff;
  logic          do_push;

  assign wdiff   = wbin - rbin_w;
  assign wcount  = CNT_W'(wdiff);
  assign full    = wdiff >= PW'(DEPTH);
  assign do_push = push && !full;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (do_push) begin
      wbin  <= wbin + 1'b1;
      wgray <= bin2gray(wbin + 1'b1);
    end
  end

  always_ff @(posedge wclk) begin
    if (do_push) mem[wbin[AW-1:0]] <= din;
  end

  // ---------------------------------------------------------- read side
  logic [PW-1:0] rbin, rgray, wgray_r, wbin_r, rdiff;
  logic          do_pop;

  assign rdiff  = wbin_r - rbin;
  assign rcount = CNT_W'(rdiff);
  assign empty  = (rdiff == '0);
  assign do_pop = pop && !empty;
  assign dout   = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (do_pop) begin
      rbin  <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
    end
  end

  // ---------------------------------------------------------- crossings
  nic_sync #(.WIDTH(PW)) u_sync_r2w (.clk(wclk), .rst_n(wrst_n), .din(rgray), .dout(rgray_w));
  nic_sync #(.WIDTH(PW)) u_sync_w2r (.clk(rclk), .rst_n(rrst_n), .din(wgray), .dout(wgray_r));

  assign rbin_w = gray2bin(rgray_w);
  assign wbin_r = gray2bin(wgray_r);

  // Users must respect full and empty.
  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(push && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(pop && empty));

endmodule
