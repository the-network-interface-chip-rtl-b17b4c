// nic_msg_queue_tb: self-checking test of the dual-clock message queue.
//
// The write side runs on a 10 ns clock, the read side on a 7 ns clock whose
// edges never coincide with the writer's. Random pushes (only while full is
// low) and pops (only while empty is low) are made in phases: a slow reader
// drives the queue to full, a slow writer drains it, and a mixed phase does
// both. A SystemVerilog queue is the reference. The test checks
//   * every popped message against the reference (order and contents),
//   * that the write-side count never under-reports and the read-side count
//     never over-reports the true occupancy, and neither exceeds DEPTH,
//   * that both counts settle to the true occupancy when traffic stops,
//   * that a push into an empty queue becomes visible to the reader within
//     three read-clock edges,
//   * that full is reached at DEPTH messages.
module nic_msg_queue_tb;
  import nic_pkg::*;
  import nic_tb_pkg::*;

  localparam int unsigned DEPTH = 15;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic             wclk = 1'b0, rclk = 1'b0;
  logic             wrst_n = 1'b0, rrst_n = 1'b0;
  logic             push, pop, full, empty;
  nic_msg_t         din, dout;
  logic [CNT_W-1:0] wcount, rcount;

  int checks = 0, failures = 0;
  int saw_full = 0, n_pops = 0;
  int push_pct = 50, pop_pct = 50;
  bit run = 1'b0;

  nic_msg_t model[$];

  nic_msg_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5   wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  initial begin : watchdog
    #400000;
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

  // write side
  always @(negedge wclk) begin
    push = run && !full && ($urandom_range(0, 99) < push_pct);
    din  = rand_msg();
  end
  always @(posedge wclk) begin
    if (wrst_n) begin
      check(int'(wcount) >= model.size() && wcount <= DEPTH, "write-side count");
      check(full == (wcount >= DEPTH), "full flag");
      if (full) saw_full++;
      if (push) model.push_back(din);
    end
  end

  // read side
  always @(negedge rclk) begin
    pop = run && !empty && ($urandom_range(0, 99) < pop_pct);
  end
  always @(posedge rclk) begin
    if (rrst_n) begin
      check(int'(rcount) <= model.size(), "read-side count");
      check(empty == (rcount == 0), "empty flag");
      if (pop) begin
        check(model.size() != 0 && dout == model[0], "popped message");
        if (model.size() != 0) void'(model.pop_front());
        n_pops++;
      end
    end
  end

  task automatic settle();
    run = 1'b0;
    repeat (10) @(posedge wclk);
    check(int'(wcount) == model.size() && int'(rcount) == model.size(), "counts settle");
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge wclk);
    wrst_n = 1'b1;
    rrst_n = 1'b1;
    @(posedge wclk);
    check(empty && !full && wcount == 0 && rcount == 0, "empty after reset");

    for (int ph = 0; ph < 9; ph++) begin
      case (ph % 3)
        0: begin push_pct = 80; pop_pct = 5;  end   // fill
        1: begin push_pct = 5;  pop_pct = 80; end   // drain
        default: begin push_pct = 50; pop_pct = 50; end
      endcase
      run = 1'b1;
      repeat (400) @(posedge wclk);
      settle();
    end

    // drain completely, then time one push into the empty queue
    pop_pct = 100; push_pct = 0; run = 1'b1;
    repeat (100) @(posedge wclk);
    settle();
    check(empty && model.size() == 0, "drained");
    @(negedge wclk);
    force push = 1'b1;
    @(posedge wclk);
    #0.5;
    release push;
    push = 1'b0;
    repeat (3) @(posedge rclk);
    #0.5;
    check(!empty && dout == model[0], "visible to the reader within three read-clock edges");

    check(saw_full > 0 && n_pops > 100, "queue reached full and traffic flowed");
    $display("pops=%0d full_cycles=%0d", n_pops, saw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
