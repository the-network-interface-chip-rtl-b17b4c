// nic_inst_calc: computes the read-only INST location of the NIC.
//
// INST is the address of the message handler the processor should jump to.
// It is recomputed every cycle from STATUS, CODE-BASE and i1, so a single
// load of INST followed by a jump dispatches an incoming message:
//
//   * a valid message of type 0 with neither queue almost full returns i1,
//     the handler address carried in the message itself;
//   * otherwise INST is CODE-BASE[31:15] with oaFULL in bit 14, iaFULL in
//     bit 13, the incoming type (0 when no message is valid) in bits 12:8
//     and zeros in bits 7:0, so type i lands 2^8*i above the base and the
//     almost-full conditions divert to handlers 2^14 and 2^13 further up.
//
// This rule is the document's. The block is purely combinational.
module nic_inst_calc
  import nic_pkg::*;
(
  input  status_t     status,
  input  logic [31:0] code_base,
  input  logic [31:0] i1,
  output logic [31:0] inst
);

  always_comb begin
    if (status.valid && !status.oafull && !status.iafull && status.itype == 5'd0) begin
      inst = i1;
    end else begin
      inst[31:15] = code_base[31:15];
      inst[14]    = status.oafull;
      inst[13]    = status.iafull;
      inst[12:8]  = status.valid ? status.itype : 5'd0;
      inst[7:0]   = 8'h00;
    end
  end

endmodule
