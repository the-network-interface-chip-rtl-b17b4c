// nic_inst_calc_tb: self-checking test of the INST computation.
//
// Exercises the type-0 path (INST = i1) and the CODE-BASE path for every
// combination of VALID, oaFULL, iaFULL and a set of types, plus random
// values, against a reference written from the dispatch rule: handler of
// type i at CODE-BASE + 2^8*i, +2^14 when the output queue is almost full,
// +2^13 when the input queue is almost full.
module nic_inst_calc_tb;
  import nic_pkg::*;

  status_t     status;
  logic [31:0] code_base, i1, inst;
  int checks = 0, failures = 0;
  int n_type0 = 0, n_base = 0;

  nic_inst_calc dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_inst(status_t s, logic [31:0] cb, logic [31:0] r1);
    logic [31:0] a;
    if (s.valid && !s.oafull && !s.iafull && s.itype == 0) return r1;
    a = {cb[31:15], 15'b0};
    if (s.valid)  a = a + (32'(s.itype) << 8);
    if (s.oafull) a = a + (32'd1 << 14);
    if (s.iafull) a = a + (32'd1 << 13);
    return a;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      status = status_t'($urandom);
      if (n < 256) begin
        status.valid  = n[0];
        status.oafull = n[1];
        status.iafull = n[2];
        status.itype  = (n[7:3] == 0) ? 5'd0 : 5'(n[7:3]);
      end
      code_base = $urandom;
      i1        = $urandom;
      #1;
      checks++;
      if (inst !== ref_inst(status, code_base, i1)) begin
        failures++;
        $display("FAIL status=%h cb=%h i1=%h inst=%h exp=%h", status, code_base, i1, inst,
                 ref_inst(status, code_base, i1));
      end
      if (status.valid && !status.oafull && !status.iafull && status.itype == 0) n_type0++;
      else n_base++;
    end
    checks++;
    if (n_type0 == 0 || n_base == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
