// risc_cond: branch condition evaluation.
//
// Combinational. For the 4-bit condition code of a branch instruction it
// says whether the branch is taken under the current N/Z/C/V flags. Codes
// 0..15 are BRA, BEQ, BNE, BCS/BHS, BCC/BLO, BMI, BPL, BVS, BVC, BHI, BLS,
// BGE, BLT, BGT, BLE and JMS, in the published order. The conditions are the
// usual ARM ones (carry set means "higher or same"); JMS and BRA always
// branch, and is_call marks JMS so the caller saves the return address.
module risc_cond
  import risc_pkg::*;
(
  input  logic [3:0] cond,
  input  flags_t     f,
  output logic       taken,
  output logic       is_call
);

  always_comb begin
    is_call = (cond == C_JMS);
    unique case (cond)
      C_BRA: taken = 1'b1;
      C_BEQ: taken = f.z;
      C_BNE: taken = !f.z;
      C_BCS: taken = f.c;
      C_BCC: taken = !f.c;
      C_BMI: taken = f.n;
      C_BPL: taken = !f.n;
      C_BVS: taken = f.v;
      C_BVC: taken = !f.v;
      C_BHI: taken = f.c && !f.z;
      C_BLS: taken = !f.c || f.z;
      C_BGE: taken = (f.n == f.v);
      C_BLT: taken = (f.n != f.v);
      C_BGT: taken = !f.z && (f.n == f.v);
      C_BLE: taken = f.z || (f.n != f.v);
      default: taken = 1'b1;  // JMS
    endcase
  end

endmodule
