// nic_top_tb: end-to-end test of the NIC at its default sizes.
//
// The PaRC output link is looped back to the input link, so every message
// the processor sends comes back to the same NIC (its destination byte is
// ignored; a switch would route on it). The P bus clock has a 10 ns period,
// the output-link clock netclk 6 ns, and the input link is clocked by the
// looped-back noclk, as a real link delivers its clock with its data; so
// both queues cross between unrelated clocks. A processor model drives the P bus
// the way the 88100 would run the document's code sequences: NSTORE (and
// NSTORE.d as two stores) of o0..o4 with SEND on the last store, polling
// STATUS and INST, NLOAD of i0..i4 with NEXT on the last load.
//
// The run:
//   1. program CONTROL and CODE-BASE;
//   2. hold the link (nowait forced high) and send 15 messages: the output
//      queue fills and STATUS shows oLENGTH = 15 and oaFULL;
//   3. with F/W = 1 one more send is answered FAULT and dropped;
//   4. with F/W = 0 a send waits (WAIT replies) until the link is released
//      and the queue has drained to oTHRESH;
//   5. the 16 messages loop back; the input queue fills, niwait rises and
//      stalls the output port; packets go back to back otherwise;
//   6. the processor receives every message, checks its words, type and
//      INST (type 0: i1, others: CODE-BASE + type, almost-full bits), and
//      answers some with REPLY and FORWARD, with and without CSP;
//   7. a double-word store with SEND posts two messages, and a double-word
//      load with NEXT advances twice, as the 88100's ld.d/st.d repeat the
//      command in two back-to-back transactions;
//   8. NEXT on an empty queue leaves VALID low.
// A monitor on nodata checks every packet word against the expected
// message. Each mechanism is counted and a failure is counted for any that
// never happened.
module nic_top_tb;
  import nic_pkg::*;
  import nic_tb_pkg::*;

  logic        clk = 1'b0;
  logic        netclk = 1'b0;
  logic        niclk;
  logic        rst_n = 1'b0;
  logic [13:0] da;
  logic        r_w, ncs, dbe;
  logic [31:0] d_in, d_out;
  logic        d_oe, dr_oe;
  logic [1:0]  dr_in, dr_out;
  logic [15:0] nodata, nidata;
  logic        noclk, nowait, niwait;
  logic        hold_link = 1'b1;

  assign nidata = nodata;                 // loopback in place of the switch
  assign niclk  = noclk;
  assign nowait = niwait || hold_link;

  nic_top dut (.*);

  always #5 clk = ~clk;
  always #3 netclk = ~netclk;

  int checks = 0, failures = 0;
  int n_send = 0, n_reply = 0, n_fwd = 0, n_csp = 0, n_wait = 0, n_fault = 0;
  int n_niwait = 0, n_b2b = 0, n_pkts = 0, n_inst0 = 0, n_instb = 0, n_oaf = 0, n_iaf = 0;
  int n_next_empty = 0, n_rx = 0, n_double = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  nic_msg_t exp_net[$];   // expected packets on nodata, in order
  nic_msg_t exp_rx[$];    // expected messages at the processor, in order

  // ------------------------------------------------------------ link monitor
  int       widx = -1;
  nic_msg_t cur;
  always @(posedge netclk) begin
    if (rst_n) begin
      if (niwait) n_niwait++;
      if (widx < 0 || widx == 11) begin
        if (nodata[15]) begin
          if (widx == 11) n_b2b++;
          check(exp_net.size() != 0, "packet expected");
          if (exp_net.size() != 0) cur = exp_net.pop_front();
          check(nodata == ref_word(cur, 0), "packet header");
          n_pkts++;
          widx = 0;
        end else begin
          check(nodata == 16'h5555, "idle pattern");
          widx = -1;
        end
      end else begin
        widx++;
        check(nodata == ref_word(cur, widx), "packet word");
      end
    end
  end

  // ------------------------------------------------------------ processor model
  function automatic logic [13:0] mk(logic [3:0] loc, logic next = 0, logic [1:0] snd = 0,
                                     logic [4:0] ot = 0, logic csp = 0);
    return {csp, 1'b0, snd, next, ot, loc};
  endfunction

  task automatic xact(input logic [13:0] cmd, input logic rd, input logic [31:0] wd,
                      output dreply_e rep, output logic [31:0] rdata);
    @(negedge clk);
    ncs = 0; dbe = 1; da = cmd; r_w = rd;
    @(negedge clk);
    ncs = 1; dbe = 0; d_in = wd;
    forever begin
      #4;
      rep   = dreply_e'(dr_out);
      rdata = d_out;
      check(dr_oe && rep != DR_IDLE, "NIC replies");
      if (rd && rep != DR_WAIT) check(d_oe, "NIC drives read data");
      if (rep != DR_WAIT) break;
      n_wait++;
      @(negedge clk);
    end
  endtask

  task automatic wr(logic [3:0] loc, logic [31:0] v);
    dreply_e r; logic [31:0] x;
    xact(mk(loc), 0, v, r, x);
    check(r == DR_SUCCESS, "store succeeds");
  endtask

  task automatic rd(logic [3:0] loc, output logic [31:0] v, input logic next = 0);
    dreply_e r;
    xact(mk(loc, next), 1, 0, r, v);
    check(r == DR_SUCCESS, "load succeeds");
  endtask

  // Double-word access (NLOAD.d / NSTORE.d): the 88100 issues two
  // transactions back to back, to LOC and LOC+1, with the same command bits;
  // the second address is on the bus during the first one's reply cycle.
  task automatic xact_d(input logic [13:0] cmd, input logic rd, input logic [31:0] wd0,
                        input logic [31:0] wd1, output logic [31:0] rd0, output logic [31:0] rd1);
    @(negedge clk);
    ncs = 0; dbe = 1; da = cmd; r_w = rd;
    @(negedge clk);
    da = cmd + 14'd1; d_in = wd0;
    #4;
    check(dr_oe && dr_out == DR_SUCCESS, "double access, first reply");
    rd0 = d_out;
    @(negedge clk);
    ncs = 1; dbe = 0; d_in = wd1;
    #4;
    check(dr_oe && dr_out == DR_SUCCESS, "double access, second reply");
    rd1 = d_out;
    n_double++;
  endtask

  logic [31:0] o_shadow[5];
  logic [31:0] i_shadow[5];

  // Compose and send: stores o0..o4 (o0,o1 and o2,o3 as store pairs, as
  // NSTORE.d does), the last store carrying the SEND command.
  task automatic send_msg(input nic_msg_t m, input logic [1:0] snd, output dreply_e r,
                         input logic next = 0);
    logic [31:0] x;
    nic_msg_t e;
    for (int k = 0; k < 4; k++) wr(4'(k), m.w[k]);
    xact(mk(LOC_O4, next, snd, m.mtype, m.csp), 0, m.w[4], r, x);
    if (r == DR_SUCCESS) begin
      e = m;
      if (snd == SEND_REPLY)   begin e.w[0] = i_shadow[1]; e.w[1] = i_shadow[2]; n_reply++; end
      if (snd == SEND_FORWARD) begin e.w[3] = i_shadow[3]; e.w[4] = i_shadow[4]; n_fwd++; end
      if (m.csp) n_csp++;
      exp_net.push_back(e);
      exp_rx.push_back(e);
      n_send++;
    end
    if (r == DR_FAULT) n_fault++;
  endtask

  localparam logic [31:0] CB = 32'h0040_0000;

  // Receive one message: poll STATUS, check INST, load i0..i4, NEXT on the last.
  task automatic recv_msg(input logic [3:0] oth, input logic [3:0] ith, input logic next = 1);
    logic [31:0] st, inst, v;
    nic_msg_t e;
    int guard = 0;
    do begin
      rd(LOC_STATUS, st);
      guard++;
    end while (!st[5] && guard < 500);
    check(st[5], "message arrives");
    e = exp_rx.pop_front();
    check(st[4:0] == e.mtype, "iTYPE");
    check(st[7] == (st[15:12] > oth) && st[6] == (st[11:8] > ith), "almost-full flags");
    rd(LOC_INST, inst);
    // INST may see queue lengths one transaction later than STATUS; recompute
    rd(LOC_STATUS, st);
    if (st[7]) n_oaf++;
    if (st[6]) n_iaf++;
    if (e.mtype == 0 && !st[7] && !st[6]) begin
      check(inst == e.w[1], "INST = i1 for type 0");
      n_inst0++;
    end else if (!st[7] && !st[6]) begin
      check(inst == CB + (32'(e.mtype) << 8), "INST = CODE-BASE + 2^8 * type");
      n_instb++;
    end
    for (int k = 0; k < 5; k++) begin
      rd(4'(5 + k), v, next && k == 4);
      i_shadow[k] = v;
      check(v == e.w[k], $sformatf("received word i%0d", k));
    end
    n_rx++;
  endtask

  // ------------------------------------------------------------ test
  initial begin
    dreply_e     r;
    logic [31:0] st, v;
    nic_msg_t    m;
    ncs = 1; dbe = 0; da = 0; r_w = 1; d_in = 0; dr_in = DR_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // 1. oTHRESH = 4, iTHRESH = 12, F/W = 0
    wr(LOC_CONTROL, {23'b0, 4'd4, 4'd12, 1'b0});
    wr(LOC_CODEBASE, CB);
    rd(LOC_CONTROL, v);
    check(v == {23'b0, 4'd4, 4'd12, 1'b0}, "CONTROL readback");

    // 2. fill the output queue with the link held
    for (int n = 0; n < 15; n++) begin
      m = rand_msg();
      m.mtype = (n % 4 == 0) ? 5'd0 : 5'(n);
      send_msg(m, SEND_PLAIN, r);
      check(r == DR_SUCCESS, "send accepted");
    end
    rd(LOC_STATUS, st);
    check(st[15:12] == 4'd15 && st[7], "output queue full and almost full");

    // 3. FAULT
    wr(LOC_CONTROL, {23'b0, 4'd4, 4'd12, 1'b1});
    m = rand_msg();
    send_msg(m, SEND_PLAIN, r);
    check(r == DR_FAULT, "send into full queue faults with F/W = 1");
    rd(LOC_STATUS, st);
    check(st[15:12] == 4'd15, "faulted send dropped");

    // 4. WAIT: release the link while the send is stalled
    wr(LOC_CONTROL, {23'b0, 4'd4, 4'd12, 1'b0});
    fork
      begin
        repeat (40) @(posedge clk);
        hold_link = 1'b0;
      end
    join_none
    m = rand_msg();
    m.mtype = 5'd9;
    begin
      int w0;
      w0 = n_wait;
      send_msg(m, SEND_PLAIN, r);
      check(r == DR_SUCCESS && n_wait - w0 > 40, "send waits, then succeeds");
    end
    rd(LOC_STATUS, st);
    check(st[15:12] <= 4'd5, "released at oTHRESH, plus the message just posted");

    // 5/6. let the input queue fill, then receive everything
    repeat (400) @(posedge clk);
    rd(LOC_STATUS, st);
    check(st[11:8] >= 4'd14 && st[6], "input queue fills, almost full");
    while (exp_rx.size() != 0) begin
      int k;
      k = n_rx;
      if (k % 5 == 1) begin
        // answer with REPLY/FORWARD; NEXT in the same transaction, so the
        // bypassed words still come from this message
        recv_msg(4'd4, 4'd12, 1'b0);
        m = rand_msg();
        m.csp = k[1];
        send_msg(m, (k % 2 == 0) ? SEND_REPLY : SEND_FORWARD, r, 1'b1);
        check(r == DR_SUCCESS, "reply/forward accepted");
      end else begin
        recv_msg(4'd4, 4'd12);
      end
    end

    // 6b. double-word accesses carry their command twice
    begin
      nic_msg_t a, b, c, e1, e2;
      logic [31:0] r0, r1;
      // NSTORE.d o0 with SEND: two messages, the second with both new words
      a = rand_msg();
      for (int k = 2; k < 5; k++) wr(4'(k), a.w[k]);
      wr(LOC_O1, 32'h0101_0101);
      a.mtype = 5'd7; a.csp = 1'b0;
      xact_d(mk(LOC_O0, 0, SEND_PLAIN, a.mtype), 0, a.w[0], a.w[1], r0, r1);
      e1 = a; e1.w[1] = 32'h0101_0101;
      e2 = a;
      exp_net.push_back(e1); exp_rx.push_back(e1);
      exp_net.push_back(e2); exp_rx.push_back(e2);
      n_send += 2;
      // third message, then receive with NLOAD.d i0 plus NEXT: two NEXTs
      c = rand_msg();
      c.mtype = 5'd3;
      send_msg(c, SEND_PLAIN, r);
      repeat (200) @(posedge clk);
      rd(LOC_STATUS, st);
      check(st[5] && st[11:8] == 4'd2, "three messages back: one loaded, two queued");
      xact_d(mk(LOC_I0, 1), 1, 0, 0, r0, r1);
      check(r0 == exp_rx[0].w[0], "NLOAD.d first word from the first message");
      check(r1 == exp_rx[1].w[1], "NLOAD.d second word already from the next message");
      void'(exp_rx.pop_front());
      void'(exp_rx.pop_front());
      recv_msg(4'd4, 4'd12);
    end

    // 7. NEXT with nothing queued
    rd(LOC_STATUS, st);
    check(!st[5], "VALID low with no message left");
    rd(LOC_I0, v, 1'b1);
    rd(LOC_STATUS, st);
    if (!st[5]) n_next_empty++;
    repeat (20) @(posedge clk);
    check(exp_net.size() == 0, "all packets seen on the link");

    $display("send=%0d reply=%0d forward=%0d csp=%0d wait_cycles=%0d fault=%0d niwait_cycles=%0d",
             n_send, n_reply, n_fwd, n_csp, n_wait, n_fault, n_niwait);
    $display("packets=%0d back_to_back=%0d inst_type0=%0d inst_base=%0d oaFULL=%0d iaFULL=%0d next_empty=%0d rx=%0d",
             n_pkts, n_b2b, n_inst0, n_instb, n_oaf, n_iaf, n_next_empty, n_rx);
    check(n_send > 0, "mechanism: send");
    check(n_reply > 0, "mechanism: reply bypass");
    check(n_fwd > 0, "mechanism: forward bypass");
    check(n_csp > 0, "mechanism: circuit-switch bit");
    check(n_wait > 0, "mechanism: WAIT");
    check(n_fault > 0, "mechanism: FAULT");
    check(n_niwait > 0, "mechanism: niwait");
    check(n_b2b > 0, "mechanism: back-to-back packets");
    check(n_inst0 > 0 && n_instb > 0, "mechanism: INST both ways");
    check(n_iaf > 0, "mechanism: iaFULL");
    check(n_next_empty > 0, "mechanism: NEXT on empty queue");
    check(n_double > 0, "mechanism: double-word access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
