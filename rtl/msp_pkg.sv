// msp_pkg: sizes shared by the Multi-State Processor (MSP) register and state
// management blocks.
//
// The MSP gives every logical register its own bank of physical registers,
// managed by a State Control Table (SCT). A new processor state (StateId) is
// created by every instruction that writes a destination register. The
// defaults below describe the 16-SP configuration: 32 logical registers with
// 16 physical registers each (512 physical registers, 64-bit values), a
// 128-entry instruction queue and an issue width of 5. With M physical
// registers a StateId has log2(M) bits plus one saturation bit (10 bits here).
// The rename group of four instructions, of which at most two may write the
// same logical register, follows the description of the renaming logic; the
// number of read and write-back ports and of tracked in-progress pipeline
// slots are this design's own choices.
package msp_pkg;

  parameter int unsigned NUM_LREGS     = 32;   // logical registers = SCTs = banks
  parameter int unsigned REGS_PER_BANK = 16;   // n of the n-SP configuration
  parameter int unsigned NUM_PREGS     = NUM_LREGS * REGS_PER_BANK;
  parameter int unsigned LREG_W        = $clog2(NUM_LREGS);
  parameter int unsigned IDX_W         = $clog2(REGS_PER_BANK);
  parameter int unsigned PREG_W        = LREG_W + IDX_W;
  parameter int unsigned SID_W         = $clog2(NUM_PREGS) + 1;  // + saturation bit
  parameter int unsigned DATA_W        = 64;
  parameter int unsigned RENAME_W      = 4;    // instructions renamed per cycle
  parameter int unsigned MAX_SAME      = 2;    // renames of one register per cycle
  parameter int unsigned NSRC          = 2;    // source operands per instruction
  parameter int unsigned IQ_SIZE       = 128;
  parameter int unsigned ISSUE_W       = 5;
  parameter int unsigned RD_PORTS      = NSRC * ISSUE_W;
  parameter int unsigned WB_PORTS      = ISSUE_W;
  parameter int unsigned INPROG        = 3 * ISSUE_W;  // Arbitrate, Read, Execute slots

endpackage
