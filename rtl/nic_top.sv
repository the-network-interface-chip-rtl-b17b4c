// nic_top: the Network Interface Chip (NIC) for an 88100 node of a
// PaRC-switched multiprocessor.
//
// Five sections, as in the document's overview:
//   P bus interface  (nic_pbus_if)   memory-mapped command/register interface
//   output queue     (nic_msg_queue) messages posted by NSEND, awaiting the net
//   output port      (nic_out_port)  sends the head message as a 12-word packet
//   input port       (nic_in_port)   receives packets, raises niwait when full
//   input queue      (nic_msg_queue) received messages, awaiting NNEXT
//
// External interface:
//   P bus   da[13:0] (address bits 15:2), r_w, ncs, dbe; the bidirectional
//           d[31:0] and dr[1:0] are brought out as separate in, out and
//           output-enable signals, to be joined by the pad ring.
//   PaRC    nodata[15:0], noclk, nowait (output link);
//           nidata[15:0], niclk, niwait (input link).
//
// Clock domains:
//   clk     P bus clock: P bus interface, read side of the input queue,
//           write side of the output queue.
//   netclk  output-link clock: output port and read side of the output
//           queue; noclk is derived from it. nowait is taken as synchronous
//           to netclk.
//   niclk   input-link clock, sent along with nidata by the sender and
//           possibly unrelated to clk: input port and write side of the
//           input queue. niwait is produced in this domain.
// The two queues are the only crossings (Gray-coded pointers). rst_n is an
// asynchronous active-low reset; each domain releases it synchronously
// through its own nic_reset_sync. The separate network clocks follow the
// document; their handling is this design's.
//
// QDEPTH sets both queues. The STATUS length fields are four bits wide, so
// QDEPTH may not exceed 15.
module nic_top
  import nic_pkg::*;
#(
  parameter int unsigned QDEPTH = 15,
  parameter int unsigned SLACK  = 1
) (
  input  logic        clk,
  input  logic        netclk,
  input  logic        niclk,
  input  logic        rst_n,
  // P bus
  input  logic [13:0] da,
  input  logic        r_w,
  input  logic        ncs,
  input  logic        dbe,
  input  logic [31:0] d_in,
  output logic [31:0] d_out,
  output logic        d_oe,
  input  logic [1:0]  dr_in,
  output logic [1:0]  dr_out,
  output logic        dr_oe,
  // PaRC output link
  output logic [15:0] nodata,
  output logic        noclk,
  input  logic        nowait,
  // PaRC input link
  input  logic [15:0] nidata,
  output logic        niwait
);

  localparam int unsigned CNT_W = $clog2(QDEPTH + 1);

  // per-domain resets
  logic prst_n, orst_n, irst_n;
  nic_reset_sync u_rst_p (.clk(clk),    .rst_in_n(rst_n), .rst_out_n(prst_n));
  nic_reset_sync u_rst_o (.clk(netclk), .rst_in_n(rst_n), .rst_out_n(orst_n));
  nic_reset_sync u_rst_i (.clk(niclk),  .rst_in_n(rst_n), .rst_out_n(irst_n));

  // output queue
  logic             oq_push, oq_pop, oq_full, oq_empty;
  nic_msg_t         oq_din, oq_head;
  logic [CNT_W-1:0] oq_count;
  // input queue
  logic             iq_push, iq_pop, iq_full, iq_empty;
  nic_msg_t         iq_din, iq_head;
  logic [CNT_W-1:0] iq_count, iq_wcount;

  nic_pbus_if u_pbus (
    .clk, .rst_n (prst_n),
    .da, .r_w, .ncs, .dbe, .d_in, .d_out, .d_oe, .dr_in, .dr_out, .dr_oe,
    .oq_full  (oq_full),
    .oq_count (4'(oq_count)),
    .oq_push  (oq_push),
    .oq_din   (oq_din),
    .iq_empty (iq_empty),
    .iq_count (4'(iq_count)),
    .iq_head  (iq_head),
    .iq_pop   (iq_pop)
  );

  nic_msg_queue #(.DEPTH(QDEPTH)) u_oq (
    .wclk (clk),     .wrst_n (prst_n),
    .push (oq_push), .din    (oq_din),  .full  (oq_full),  .wcount (oq_count),
    .rclk (netclk),  .rrst_n (orst_n),
    .pop  (oq_pop),  .dout   (oq_head), .empty (oq_empty), .rcount ()
  );

  nic_out_port u_out (
    .clk (netclk), .rst_n (orst_n),
    .q_empty   (oq_empty),
    .q_head    (oq_head),
    .q_pop     (oq_pop),
    .nowait    (nowait),
    .nodata    (nodata),
    .noclk     (noclk),
    .busy      (),
    .pkt_start ()
  );

  nic_in_port #(.DEPTH(QDEPTH), .SLACK(SLACK)) u_in (
    .clk (niclk), .rst_n (irst_n),
    .nidata  (nidata),
    .niwait  (niwait),
    .q_count (iq_wcount),
    .q_full  (iq_full),
    .q_push  (iq_push),
    .q_din   (iq_din),
    .busy    (),
    .dropped ()
  );

  nic_msg_queue #(.DEPTH(QDEPTH)) u_iq (
    .wclk (niclk),   .wrst_n (irst_n),
    .push (iq_push), .din    (iq_din),  .full  (iq_full),  .wcount (iq_wcount),
    .rclk (clk),     .rrst_n (prst_n),
    .pop  (iq_pop),  .dout   (iq_head), .empty (iq_empty), .rcount (iq_count)
  );

  if (QDEPTH > 15 || QDEPTH < 1) begin : g_bad_depth
    $error("nic_top: QDEPTH must be 1..15 to fit the 4-bit STATUS length fields");
  end

endmodule
