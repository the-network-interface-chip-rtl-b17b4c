// nic_pbus_if: P bus slave interface of the NIC, with its interface locations.
//
// The 88100 talks to the NIC with ordinary loads and stores. External
// address decoding selects the chip (ncs low); the low address bits da[13:0]
// then carry a command: LOC (which location is read or written), OTYPE,
// NEXT, SEND (none / send / reply / forward) and CSP. One transaction can
// thus read or write one location, advance to the next incoming message and
// post an outgoing message, all at once.
//
// Locations: o0..o4 (outgoing message being composed), i0..i4 (current
// incoming message), CONTROL {oTHRESH, iTHRESH, F/W}, STATUS {oLENGTH,
// iLENGTH, oaFULL, iaFULL, VALID, iTYPE} (read only), CODE-BASE (bits 31:10
// stored, 9:0 read as zero) and INST (read only, from nic_inst_calc).
// Writes to read-only or reserved locations are ignored; reserved locations
// read as zero.
//
// Bus timing (a simplified P bus, as the document intends):
//   cycle t   address phase: ncs, dbe, r_w, da are sampled. The transaction
//             is taken only if the previous cycle was NULL (dbe low) or the
//             reply now on dr is SUCCESS; otherwise the processor will
//             present it again.
//   cycle t+1 reply phase: the NIC drives dr with SUCCESS, WAIT or FAULT.
//             A read drives d with the location's value as it stands in
//             this cycle; a write takes d. All effects of the command take
//             place at the clock edge that ends this cycle.
// A send into a full output queue is handled as CONTROL[F/W] says:
//   F/W = 1  reply FAULT; the send and any NEXT of the same transaction are
//            dropped, a load or store is still done.
//   F/W = 0  reply WAIT, cycle after cycle, until the output queue holds no
//            more than oTHRESH messages (oaFULL low); then the whole
//            transaction executes and SUCCESS is replied.
//
// Message composition: a send uses o0..o4 with a value being written in the
// same transaction already in place. REPLY uses i1, i2 for o0, o1 and
// FORWARD uses i3, i4 for o3, o4; incoming values are those before any write
// or NEXT of the same transaction. OTYPE becomes the type, CSP the
// circuit-switch bit. The outgoing registers are left unchanged.
//
// Incoming registers: NEXT clears VALID; whenever VALID is low (or NEXT is
// executing) and the input queue is not empty, the head message is moved
// into i0..i4/iTYPE at the same edge and VALID is set, so the transaction
// right after a NEXT already sees the new message. A store to an incoming
// register in the cycle of such a reload is lost.
//
// The command fields, locations, status bits and the fault/wait rules are
// the document's. This design's choices: the reply-line encoding
// (nic_pkg::dreply_e), the split of the bidirectional d and dr buses into
// in/out/enable signals, the "oaFULL low" release rule for WAIT, and reset.
module nic_pbus_if
  import nic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // P bus
  input  logic [13:0] da,
  input  logic        r_w,      // 1 read, 0 write
  input  logic        ncs,
  input  logic        dbe,
  input  logic [31:0] d_in,
  output logic [31:0] d_out,
  output logic        d_oe,
  input  logic [1:0]  dr_in,
  output logic [1:0]  dr_out,
  output logic        dr_oe,
  // output queue tail
  input  logic        oq_full,
  input  logic [3:0]  oq_count,
  output logic        oq_push,
  output nic_msg_t    oq_din,
  // input queue head
  input  logic        iq_empty,
  input  logic [3:0]  iq_count,
  input  nic_msg_t    iq_head,
  output logic        iq_pop
);

  // ---------------------------------------------------------------- state
  logic [4:0][31:0] o_q, i_q;
  logic [4:0]       itype_q;
  logic             valid_q;
  logic             fw_q;
  logic [3:0]       ithresh_q, othresh_q;
  logic [31:10]     cbase_q;

  logic             pend_q;        // a transaction is in its reply phase
  pcmd_t            cmd_q;
  logic             rd_q;          // it is a read
  logic             waiting_q;     // it has already been answered WAIT
  logic             prev_dbe_q;    // previous cycle was a non-NULL transaction

  // ---------------------------------------------------------------- status
  status_t     status;
  control_t    control;
  logic [31:0] inst;

  always_comb begin
    status         = '0;
    status.olength = oq_count;
    status.ilength = iq_count;
    status.oafull  = oq_count > othresh_q;
    status.iafull  = iq_count > ithresh_q;
    status.valid   = valid_q;
    status.itype   = itype_q;

    control         = '0;
    control.othresh = othresh_q;
    control.ithresh = ithresh_q;
    control.fw      = fw_q;
  end

  nic_inst_calc u_inst (
    .status   (status),
    .code_base({cbase_q, 10'b0}),
    .i1       (i_q[1]),
    .inst     (inst)
  );

  // ---------------------------------------------------------------- execute
  logic is_send, stall, fault, exec;
  logic do_send, do_next, do_write, do_load;

  assign is_send  = pend_q && (cmd_q.send != SEND_NONE);
  assign stall    = is_send && !fw_q && (oq_full || (waiting_q && status.oafull));
  assign fault    = is_send &&  fw_q && oq_full;
  assign exec     = pend_q && !stall;
  assign do_send  = exec && is_send && !fault;
  assign do_next  = exec && cmd_q.next && !fault;
  assign do_write = exec && !rd_q;
  assign do_load  = !iq_empty && (!valid_q || do_next);

  assign iq_pop   = do_load;
  assign oq_push  = do_send;

  // Outgoing message as composed this cycle
  always_comb begin
    logic [4:0][31:0] o_eff;
    o_eff = o_q;
    if (do_write && cmd_q.loc <= LOC_O4) o_eff[cmd_q.loc] = d_in;

    oq_din       = '0;
    oq_din.csp   = cmd_q.csp;
    oq_din.mtype = cmd_q.otype;
    oq_din.w     = o_eff;
    case (cmd_q.send)
      SEND_REPLY: begin
        oq_din.w[0] = i_q[1];
        oq_din.w[1] = i_q[2];
      end
      SEND_FORWARD: begin
        oq_din.w[3] = i_q[3];
        oq_din.w[4] = i_q[4];
      end
      default: ;
    endcase
  end

  // Read data
  always_comb begin
    unique case (cmd_q.loc)
      LOC_O0, LOC_O1, LOC_O2, LOC_O3, LOC_O4: d_out = o_q[cmd_q.loc];
      LOC_I0:       d_out = i_q[0];
      LOC_I1:       d_out = i_q[1];
      LOC_I2:       d_out = i_q[2];
      LOC_I3:       d_out = i_q[3];
      LOC_I4:       d_out = i_q[4];
      LOC_CONTROL:  d_out = control;
      LOC_STATUS:   d_out = status;
      LOC_CODEBASE: d_out = {cbase_q, 10'b0};
      LOC_INST:     d_out = inst;
      default:      d_out = '0;
    endcase
  end

  assign d_oe   = pend_q && rd_q && !stall;
  assign dr_oe  = pend_q;
  assign dr_out = !pend_q ? DR_IDLE : stall ? DR_WAIT : fault ? DR_FAULT : DR_SUCCESS;

  // ---------------------------------------------------------------- accept
  logic [1:0] dr_bus;
  logic       accept;

  assign dr_bus = dr_oe ? dr_out : dr_in;
  assign accept = !ncs && dbe && (!prev_dbe_q || dr_bus == DR_SUCCESS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q     <= 1'b0;
      cmd_q      <= '0;
      rd_q       <= 1'b0;
      waiting_q  <= 1'b0;
      prev_dbe_q <= 1'b0;
    end else begin
      prev_dbe_q <= dbe;
      waiting_q  <= stall;
      if (!stall) begin
        pend_q <= accept;
        if (accept) begin
          cmd_q <= pcmd_t'(da);
          rd_q  <= r_w;
        end
      end
    end
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_q       <= '0;
      i_q       <= '0;
      itype_q   <= '0;
      valid_q   <= 1'b0;
      fw_q      <= 1'b0;
      ithresh_q <= 4'hF;
      othresh_q <= 4'hF;
      cbase_q   <= '0;
    end else begin
      if (do_write) begin
        unique case (cmd_q.loc)
          LOC_O0, LOC_O1, LOC_O2, LOC_O3, LOC_O4: o_q[cmd_q.loc] <= d_in;
          LOC_I0:  if (!do_load) i_q[0] <= d_in;
          LOC_I1:  if (!do_load) i_q[1] <= d_in;
          LOC_I2:  if (!do_load) i_q[2] <= d_in;
          LOC_I3:  if (!do_load) i_q[3] <= d_in;
          LOC_I4:  if (!do_load) i_q[4] <= d_in;
          LOC_CONTROL: begin
            othresh_q <= d_in[8:5];
            ithresh_q <= d_in[4:1];
            fw_q      <= d_in[0];
          end
          LOC_CODEBASE: cbase_q <= d_in[31:10];
          default: ;   // STATUS, INST, reserved: read only
        endcase
      end
      if (do_load) begin
        i_q     <= iq_head.w;
        itype_q <= iq_head.mtype;
        valid_q <= 1'b1;
      end else if (do_next) begin
        valid_q <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- checks
  a_read_has_reply: assert property (@(posedge clk) disable iff (!rst_n) d_oe |-> dr_oe);
  a_no_push_full:   assert property (@(posedge clk) disable iff (!rst_n) !(oq_push && oq_full));
  a_no_pop_empty:   assert property (@(posedge clk) disable iff (!rst_n) !(iq_pop && iq_empty));

endmodule
