// branch_control: decides whether the next PC is the branch target.
//
// The PC-source select is 1 (take the branch address) for an unconditional
// branch, or for a conditional branch (CBZ) when the ALU reports a zero
// result; otherwise it is 0 and the PC advances to PC+4. Combinational.
module branch_control (
  input  logic uncond_branch,  // B instruction
  input  logic cond_branch,    // CBZ instruction
  input  logic zero,           // ALU zero flag
  output logic pc_src          // 0: PC+4, 1: branch address
);
  assign pc_src = uncond_branch | (cond_branch & zero);
endmodule
