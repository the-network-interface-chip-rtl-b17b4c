// nic_in_port_tb: self-checking test of the network input port.
//
// A sender model puts packets for random messages on nidata, idle 0x5555
// in between, starting a packet only in a cycle after niwait was seen low
// and sometimes back to back. The packet body words are random, so their
// bit 15 is often set and must not be taken for a header. A queue model
// stands in for the input queue and is drained slowly, in phases, so that
// niwait has to rise. The test checks that every message arrives, in
// order and intact, that each is pushed in the cycle of its 12th word, that
// no push ever meets a full queue, and that niwait was raised and honoured.
module nic_in_port_tb;
  import nic_pkg::*;
  import nic_tb_pkg::*;

  localparam int unsigned DEPTH = 15;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [15:0]      nidata;
  logic             niwait, q_full, q_push, busy, dropped;
  logic [CNT_W-1:0] q_count;
  nic_msg_t         q_din;

  int checks = 0, failures = 0;
  int n_niwait = 0, n_b2b = 0, n_sop_in_body = 0;

  nic_msg_t rxq[$];       // model of the input queue
  nic_msg_t expq[$];      // messages sent, in order
  int       cyc = 0;
  int       hdr_cyc[$];   // cycle each header was driven
  bit       drain_fast = 1'b1;

  nic_in_port #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // queue model
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (niwait) n_niwait++;
      if (q_push) begin
        check(!q_full, "push into a non-full queue");
        check(hdr_cyc.size() != 0 && cyc - hdr_cyc[0] == 11, "push in the 12th word");
        if (hdr_cyc.size() != 0) void'(hdr_cyc.pop_front());
        check(expq.size() != 0 && q_din == expq[0], "received message");
        if (expq.size() != 0) void'(expq.pop_front());
        rxq.push_back(q_din);
      end
      if (rxq.size() != 0 && $urandom_range(0, 99) < (drain_fast ? 30 : 1))
        void'(rxq.pop_front());
    end
  end
  always @(negedge clk) begin
    q_count = CNT_W'(rxq.size());
    q_full  = (rxq.size() >= DEPTH);
  end

  task automatic send_pkt(nic_msg_t m);
    expq.push_back(m);
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      nidata = ref_word(m, i);
      if (i == 0) hdr_cyc.push_back(cyc + 1);
      if (i > 0 && nidata[15]) n_sop_in_body++;
    end
  endtask

  initial begin
    nidata  = 16'h5555;
    q_count = '0;
    q_full  = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int phase = 0; phase < 4; phase++) begin
      drain_fast = phase[0];
      for (int n = 0; n < 60; n++) begin
        // the sender checks niwait before it begins a packet
        @(negedge clk);
        while (niwait) begin
          nidata = 16'h5555;
          @(negedge clk);
        end
        send_pkt(rand_msg());
        if ($urandom_range(0, 1) == 0) begin
          // back to back: the next header right after word 11, if allowed
          if (!niwait) begin
            send_pkt(rand_msg());
            n_b2b++;
          end
        end
        @(negedge clk) nidata = 16'h5555;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    @(negedge clk) nidata = 16'h5555;
    repeat (20) @(posedge clk);

    check(expq.size() == 0, "all messages received");
    check(n_niwait > 0, "niwait was raised");
    check(n_b2b > 0 && n_sop_in_body > 0, "back-to-back packets and bit 15 set in bodies");
    $display("niwait_cycles=%0d back_to_back=%0d", n_niwait, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
