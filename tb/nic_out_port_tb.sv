// nic_out_port_tb: self-checking test of the network output port.
//
// A model queue feeds the port with random messages while nowait is held,
// released and toggled. A monitor on nodata rebuilds every packet and checks
//   * the idle pattern 0x5555 between packets,
//   * the header {1, CSP, 1, type, o0[31:24]} and the byte map of words
//     1..10 against its own table, and the 0x5555 pad in word 11,
//   * that the 12 words come on consecutive cycles,
//   * that a header appears only one cycle after a cycle with nowait low,
//   * that the message order is kept,
//   * that packets go back to back when messages wait and nowait stays low.
module nic_out_port_tb;
  import nic_pkg::*;
  import nic_tb_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        q_empty, q_pop, nowait, noclk, busy, pkt_start;
  nic_msg_t    q_head;
  logic [15:0] nodata;

  int checks = 0, failures = 0;
  int n_pkts = 0, n_b2b = 0, n_blocked = 0;

  nic_msg_t txq[$];     // model of the output queue
  nic_msg_t sent[$];    // messages popped by the port, in order

  nic_out_port dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // queue model: update head after each edge
  always @(posedge clk) begin
    if (rst_n && q_pop) begin
      sent.push_back(txq[0]);
      void'(txq.pop_front());
    end
  end
  always @(negedge clk) begin
    q_empty = (txq.size() == 0);
    q_head  = (txq.size() != 0) ? txq[0] : '0;
  end

  // monitor
  int         widx = -1;       // word index of current packet, -1 idle
  nic_msg_t   cur;
  int         got = 0;
  logic       nowait_prev = 1'b1;
  logic       end_prev = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (widx < 0 || widx == 11) begin
        if (nodata[15]) begin
          check(!nowait_prev, "header only after nowait low");
          check(sent.size() > got, "header for a popped message");
          if (sent.size() > got) cur = sent[got];
          got++;
          n_pkts++;
          if (end_prev) n_b2b++;
          check(nodata == ref_word(cur, 0), "header word");
          widx = 0;
        end else begin
          check(nodata == 16'h5555, "idle pattern");
          widx = -1;
        end
      end else begin
        widx++;
        check(nodata == ref_word(cur, widx), $sformatf("packet word %0d", widx));
      end
      end_prev    = (widx == 11);
      nowait_prev = nowait;
      if (nowait && !q_empty && !busy) n_blocked++;
    end
  end

  initial begin
    nowait  = 1'b1;
    q_empty = 1'b1;
    q_head  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. messages wait while nowait is high: nothing is sent
    for (int k = 0; k < 3; k++) txq.push_back(rand_msg());
    repeat (30) @(posedge clk);
    check(n_pkts == 0 && sent.size() == 0, "blocked by nowait");

    // 2. release: three packets back to back, first header one cycle later
    @(negedge clk) nowait = 1'b0;
    @(posedge clk);
    @(negedge clk);
    check(nodata[15] && nodata == ref_word(sent[0], 0), "start latency of one cycle");
    repeat (40) @(posedge clk);
    check(n_pkts == 3 && n_b2b == 2, "three packets back to back");

    // 3. random traffic with random nowait
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      if ($urandom_range(0, 99) < 6) txq.push_back(rand_msg());
      if ($urandom_range(0, 99) < 10) nowait = ~nowait;
    end
    @(negedge clk) nowait = 1'b0;
    while (txq.size() != 0 || busy) @(posedge clk);
    repeat (3) @(posedge clk);

    check(got == sent.size(), "every popped message was sent");
    check(n_b2b > 2 && n_blocked > 0, "back-to-back and blocked starts seen");
    $display("packets=%0d back_to_back=%0d blocked_cycles=%0d", n_pkts, n_b2b, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
