// cas_instr_reg: instruction register and update mechanism of a Core Access
// Switch (CAS).
//
// A K-bit shift register is loaded serially from the first test bus wire
// while the CAS is in CONFIGURATION mode (cfg = 1) and upd is low. Bit 0 of the shift
// register takes the serial input, so the bit shifted in first ends up in
// bit K-1; an instruction is therefore shifted in most significant bit first.
// The last stage drives shift_out, which continues the configuration chain to
// the next CAS (or to a wrapper instruction register). A second K-bit
// register, the update register, copies the shift register when upd = 1 and
// holds the instruction that the switcher uses, so the switcher does not see
// the intermediate patterns while bits are being shifted.
//
// The control word c equals the update register OR-ed with cfg: during
// CONFIGURATION all control bits are 1, which is the instruction that isolates
// the core side of the switcher.
//
// Interface and timing: everything is clocked on the rising edge of tck;
// shifting and updating each take effect on the edge where cfg / upd is 1.
// rst_n is an asynchronous, active-low reset that clears both registers, so a
// CAS leaves reset in BYPASS (instruction 0).
//
// From the architecture description: the shift stage, the update stage, the
// forcing of all control bits to 1 while configuring, BYPASS = all zeros.
// Own choices: shifting is enabled by cfg and paused in the update cycle (so
// cfg may stay high while updating and the core stays isolated until the new
// instruction is in place), update is a synchronous enable on
// tck rather than a separate clock, the reset and its value.
module cas_instr_reg #(
  parameter int unsigned K = 7   // instruction width, k = ceil(log2(m)); 7 for N=6, P=3
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         cfg,        // CONFIGURATION mode: shift enable, forces c to all ones
  input  logic         upd,        // copy shift register into update register
  input  logic         shift_in,   // serial instruction data (from e0)
  output logic         shift_out,  // last shift stage (towards s0 or wrapper SI)
  output logic [K-1:0] c           // control word to the N/P switcher
);

  logic [K-1:0] shift_q;
  logic [K-1:0] upd_q;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n)   shift_q <= '0;
    else if (cfg && !upd) shift_q <= K'({shift_q, shift_in});
  end

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n)   upd_q <= '0;
    else if (upd) upd_q <= shift_q;
  end

  assign shift_out = shift_q[K-1];
  assign c         = upd_q | {K{cfg}};

endmodule
