// nic_pbus_if_tb: self-checking test of the P bus interface.
//
// A processor model issues P bus transactions (address cycle, then reply
// cycles until the reply is not WAIT). The testbench also plays the two
// message queues. A cycle-level reference model, written from the command
// rules, predicts every cycle's reply code, read data, output-queue push
// (with the composed message) and input-queue pop, and the testbench
// compares them with the block. Random traffic mixes loads, stores, NEXT and
// SEND/REPLY/FORWARD with CSP, CONTROL changes (thresholds and F/W),
// message arrivals and output-queue draining in phases that let the queue
// fill, so that WAIT and FAULT both occur. Scripted checks cover a read of
// an incoming register together with NEXT, a store together with a send,
// a transaction after another slave's WAIT (ignored), back-to-back
// transactions, and reads of STATUS, CODE-BASE and INST.
module nic_pbus_if_tb;
  import nic_pkg::*;
  import nic_tb_pkg::*;

  localparam int QD = 15;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [13:0] da;
  logic        r_w, ncs, dbe;
  logic [31:0] d_in, d_out;
  logic        d_oe, dr_oe;
  logic [1:0]  dr_in, dr_out;
  logic        oq_full, oq_push, iq_empty, iq_pop;
  logic [3:0]  oq_count, iq_count;
  nic_msg_t    oq_din, iq_head;

  nic_pbus_if dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wait = 0, n_fault = 0, n_send = 0, n_reply = 0, n_fwd = 0, n_csp = 0;
  int n_reload = 0, n_next_empty = 0, n_ignored = 0, n_b2b = 0, n_reads = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  // ------------------------------------------------------------ queues
  nic_msg_t oq[$], iq[$];
  bit       drain_oq = 1'b1;
  int       arrive_pct = 5;

  always @(negedge clk) begin
    oq_full  = (oq.size() >= QD);
    oq_count = 4'(oq.size());
    iq_empty = (iq.size() == 0);
    iq_count = 4'(iq.size());
    iq_head  = (iq.size() != 0) ? iq[0] : '0;
  end

  // ------------------------------------------------------------ reference model
  logic [31:0] m_o[5], m_i[5];
  logic [4:0]  m_itype;
  logic        m_valid, m_fw;
  logic [3:0]  m_ith, m_oth;
  logic [31:0] m_cb;
  logic        m_pend, m_rd, m_waiting, m_prev_dbe;
  logic [13:0] m_cmd;
  dreply_e     last_reply;       // reply of the cycle that just ended
  logic [31:0] last_rdata;

  function automatic logic [31:0] m_status();
    logic oaf, iaf;
    oaf = oq.size() > m_oth;
    iaf = iq.size() > m_ith;
    return {16'b0, 4'(oq.size()), 4'(iq.size()), oaf, iaf, m_valid, m_itype};
  endfunction

  function automatic logic [31:0] m_inst();
    logic [31:0] st;
    st = m_status();
    if (m_valid && !st[7] && !st[6] && m_itype == 0) return m_i[1];
    return {m_cb[31:15], st[7], st[6], (m_valid ? m_itype : 5'd0), 8'b0};
  endfunction

  function automatic logic [31:0] m_read(logic [3:0] loc);
    case (loc)
      0, 1, 2, 3, 4: return m_o[loc];
      5, 6, 7, 8, 9: return m_i[loc - 5];
      10:            return {23'b0, m_oth, m_ith, m_fw};
      11:            return m_status();
      12:            return {m_cb[31:10], 10'b0};
      13:            return m_inst();
      default:       return 32'b0;
    endcase
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      foreach (m_o[k]) m_o[k] = '0;
      foreach (m_i[k]) m_i[k] = '0;
      m_itype = 0; m_valid = 0; m_fw = 0; m_ith = 4'hF; m_oth = 4'hF; m_cb = 0;
      m_pend = 0; m_rd = 0; m_waiting = 0; m_prev_dbe = 0; m_cmd = 0;
      last_reply = DR_IDLE;
    end else begin
      logic        is_send, stall, fault, exec, do_send, do_next, do_write, do_load, accept;
      logic [1:0]  snd;
      logic [3:0]  loc;
      dreply_e     rep, busrep;
      nic_msg_t    exp_msg;
      logic [31:0] rdata;

      loc     = m_cmd[3:0];
      snd     = m_cmd[11:10];
      is_send = m_pend && snd != 0;
      stall   = is_send && !m_fw && (oq.size() >= QD || (m_waiting && oq.size() > m_oth));
      fault   = is_send && m_fw && oq.size() >= QD;
      exec    = m_pend && !stall;
      do_send = exec && is_send && !fault;
      do_next = exec && m_cmd[9] && !fault;
      do_write = exec && !m_rd;
      do_load = iq.size() != 0 && (!m_valid || do_next);
      rep     = !m_pend ? DR_IDLE : stall ? DR_WAIT : fault ? DR_FAULT : DR_SUCCESS;
      rdata   = m_read(loc);

      // compare with the block
      check(dr_oe == m_pend, "dr_oe");
      if (m_pend) check(dr_out == rep, $sformatf("reply exp %0d got %0d", rep, dr_out));
      check(d_oe == (m_pend && m_rd && !stall), "d_oe");
      if (m_pend && m_rd && !stall) begin
        check(d_out == rdata, $sformatf("read loc %0d exp %h got %h", loc, rdata, d_out));
        n_reads++;
      end
      check(oq_push == do_send, "oq_push");
      check(iq_pop == do_load, "iq_pop");
      if (do_send) begin
        exp_msg.csp   = m_cmd[13];
        exp_msg.mtype = m_cmd[8:4];
        for (int k = 0; k < 5; k++)
          exp_msg.w[k] = (do_write && loc == 4'(k)) ? d_in : m_o[k];
        if (snd == 2) begin exp_msg.w[0] = m_i[1]; exp_msg.w[1] = m_i[2]; n_reply++; end
        if (snd == 3) begin exp_msg.w[3] = m_i[3]; exp_msg.w[4] = m_i[4]; n_fwd++; end
        if (m_cmd[13]) n_csp++;
        check(oq_din == exp_msg, "composed message");
        n_send++;
      end
      if (stall && !m_waiting) n_wait++;
      if (fault) n_fault++;
      if (do_next && do_load) n_reload++;
      if (do_next && !do_load) n_next_empty++;

      // state update
      if (do_write) begin
        case (loc)
          0, 1, 2, 3, 4: m_o[loc] = d_in;
          5, 6, 7, 8, 9: if (!do_load) m_i[loc - 5] = d_in;
          10: begin m_oth = d_in[8:5]; m_ith = d_in[4:1]; m_fw = d_in[0]; end
          12: m_cb = d_in;
          default: ;
        endcase
      end
      if (do_load) begin
        for (int k = 0; k < 5; k++) m_i[k] = iq[0].w[k];
        m_itype = iq[0].mtype;
        m_valid = 1;
      end else if (do_next) m_valid = 0;

      busrep = m_pend ? rep : dreply_e'(dr_in);
      accept = !ncs && dbe && (!m_prev_dbe || busrep == DR_SUCCESS);
      if (!ncs && dbe && !accept) n_ignored++;
      if (accept && m_pend && !stall) n_b2b++;
      m_prev_dbe = dbe;
      m_waiting  = stall;
      if (!stall) begin
        m_pend = accept;
        if (accept) begin m_cmd = da; m_rd = r_w; end
      end
      last_reply = rep;
      last_rdata = rdata;

      // queues
      if (do_send) oq.push_back(oq_din);
      if (do_load) void'(iq.pop_front());
      if ((drain_oq || stall) && oq.size() != 0 && $urandom_range(0, 99) < 15) void'(oq.pop_front());
      if (iq.size() < QD && $urandom_range(0, 99) < arrive_pct) iq.push_back(rand_msg());
    end
  end

  // ------------------------------------------------------------ processor model
  function automatic logic [13:0] mk(logic [3:0] loc, logic next = 0, logic [1:0] snd = 0,
                                     logic [4:0] ot = 0, logic csp = 0);
    return {csp, 1'b0, snd, next, ot, loc};
  endfunction

  // One transaction: address cycle, then reply cycles until not WAIT.
  task automatic xact(input logic [13:0] cmd, input logic rd, input logic [31:0] wd,
                      output dreply_e rep, output logic [31:0] rdata);
    @(negedge clk);
    ncs = 0; dbe = 1; da = cmd; r_w = rd; d_in = $urandom;
    @(negedge clk);
    ncs = 1; dbe = 0; da = $urandom; d_in = wd;
    forever begin
      @(posedge clk); #1;
      if (last_reply != DR_WAIT) break;
    end
    rep   = last_reply;
    rdata = last_rdata;
    if (rep == DR_FAULT) @(negedge clk);   // the trap: one NULL cycle
  endtask

  task automatic wr(logic [3:0] loc, logic [31:0] v);
    dreply_e r; logic [31:0] x;
    xact(mk(loc), 0, v, r, x);
  endtask

  task automatic rd(logic [3:0] loc, output logic [31:0] v);
    dreply_e r;
    xact(mk(loc), 1, 0, r, v);
  endtask

  // ------------------------------------------------------------ stimulus
  initial begin
    dreply_e     r;
    logic [31:0] v, v2;
    ncs = 1; dbe = 0; da = 0; r_w = 1; d_in = 0; dr_in = DR_IDLE;
    oq_full = 0; oq_count = 0; iq_empty = 1; iq_count = 0; iq_head = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    arrive_pct = 0;

    // registers and read-only locations
    for (int k = 0; k < 5; k++) wr(4'(k), 32'h1000_0000 + k);
    wr(LOC_CODEBASE, 32'hABCD_E3FF);
    rd(LOC_CODEBASE, v);
    check(v == 32'hABCD_E000, "CODE-BASE low 10 bits read as zero");
    wr(LOC_STATUS, 32'hFFFF_FFFF);
    rd(LOC_STATUS, v);
    check(v == 32'h0, "STATUS ignores writes, empty queues, no message");
    rd(LOC_INST, v);
    check(v == 32'hABCD_8000, "INST with no message");

    // a message arrives and is loaded without NEXT
    iq.push_back(rand_msg());
    v2 = iq[0].w[2];
    repeat (3) @(posedge clk);
    rd(LOC_I2, v);
    check(v == v2, "first message loaded into i-registers");
    // read with NEXT returns old value, next read sees new message
    iq.push_back(rand_msg());
    xact(mk(LOC_I2, 1), 1, 0, r, v);
    check(v == v2, "read with NEXT returns the old message");
    v2 = m_i[2];
    rd(LOC_I2, v);
    check(v == v2 && v != 0, "read after NEXT returns the new message");
    // NEXT with empty queue clears VALID
    xact(mk(LOC_STATUS, 1), 1, 0, r, v);
    rd(LOC_STATUS, v);
    check(v[5] == 0, "VALID low after NEXT on empty queue");

    // store with send: the new value goes into the message
    xact(mk(LOC_O3, 0, SEND_PLAIN, 5'd4), 0, 32'hCAFE_F00D, r, v);
    check(oq.size() >= 1 && oq[$].w[3] == 32'hCAFE_F00D && oq[$].mtype == 4, "store+send");

    // another slave answers WAIT: the NIC transaction in that reply cycle is ignored
    @(negedge clk); ncs = 1; dbe = 1; da = 0;
    @(negedge clk); ncs = 0; dbe = 1; da = mk(LOC_O0); r_w = 0; dr_in = DR_WAIT;
    @(negedge clk); ncs = 1; dbe = 0; dr_in = DR_IDLE; d_in = 32'hDEAD_BEEF;
    rd(LOC_O0, v);
    check(v == 32'h1000_0000, "transaction after another slave's WAIT ignored");

    // back-to-back transactions: address of the next in the reply cycle of the last
    @(negedge clk); ncs = 0; dbe = 1; da = mk(LOC_O1); r_w = 0;
    @(negedge clk); da = mk(LOC_O2); d_in = 32'h1111_1111;
    @(negedge clk); da = mk(LOC_O1); r_w = 1; d_in = 32'h2222_2222;
    @(negedge clk); ncs = 1; dbe = 0;
    @(posedge clk); #1;
    check(last_rdata == 32'h1111_1111 && m_o[2] == 32'h2222_2222, "back-to-back");

    // random traffic
    arrive_pct = 5;
    for (int n = 0; n < 3000; n++) begin
      logic [3:0]  loc;
      logic [1:0]  snd;
      logic        nx, rdw;
      loc = 4'($urandom_range(0, 15));
      rdw = 1'($urandom);
      nx  = ($urandom_range(0, 9) < 2);
      snd = ($urandom_range(0, 9) < 4) ? 2'($urandom_range(1, 3)) : 2'd0;
      if (loc == LOC_CONTROL && !rdw)
        v = {23'b0, 4'($urandom_range(2, 15)), 4'($urandom), 1'($urandom)};
      else
        v = $urandom;
      drain_oq = ((n / 300) % 2) == 0;
      xact(mk(loc, nx, snd, 5'($urandom), 1'($urandom)), rdw, v, r, v2);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    drain_oq = 1;
    repeat (50) @(posedge clk);

    $display("sends=%0d reply=%0d forward=%0d csp=%0d wait=%0d fault=%0d reload=%0d next_empty=%0d ignored=%0d b2b=%0d reads=%0d",
             n_send, n_reply, n_fwd, n_csp, n_wait, n_fault, n_reload, n_next_empty, n_ignored, n_b2b, n_reads);
    check(n_wait > 0 && n_fault > 0, "WAIT and FAULT both occurred");
    check(n_reply > 0 && n_fwd > 0 && n_csp > 0, "REPLY, FORWARD and CSP sends occurred");
    check(n_reload > 0 && n_next_empty > 0 && n_ignored > 0 && n_b2b > 0, "NEXT cases, ignore, back-to-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
