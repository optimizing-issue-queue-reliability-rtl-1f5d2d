// iq_pkg: sizes, types and constants shared by the reliability-optimized
// SMT issue queue.
//
// Machine sizes follow the simulated configuration of the design: a 96-entry
// issue queue shared by 4 hardware contexts, 8-wide dispatch, issue and
// commit, and a 10K-cycle sampling interval with 5 sub-samples. Register tag
// and opcode widths are this implementation's own choice, as is the split of
// an entry into ACE and un-ACE bits: an ACE instruction exposes every stored
// bit, an un-ACE instruction only its opcode bits.
package iq_pkg;

  localparam int unsigned IQ_SIZE    = 96;   // issue queue entries
  localparam int unsigned N_THREADS  = 4;    // SMT contexts
  localparam int unsigned ISSUE_W    = 8;    // issue width
  localparam int unsigned DISP_W     = 8;    // dispatch width
  localparam int unsigned COMMIT_W   = 8;    // commit width
  localparam int unsigned INTERVAL   = 10000; // sampling interval (cycles)
  localparam int unsigned N_SUB      = 5;    // DVM sub-samples per interval
  localparam int unsigned T_CACHE_MISS = 16; // L2 misses per interval
  localparam int unsigned RATIO_PERIOD = 50; // cycles between wq ratio divisions

  localparam int unsigned TAG_W  = 9;        // physical register tag
  localparam int unsigned OPC_W  = 8;        // opcode / control field
  localparam int unsigned TID_W  = $clog2(N_THREADS);

  // Reliability thresholds are fractions in unsigned Q0.16.
  localparam int unsigned THR_W  = 16;

  // Instruction as presented at dispatch.
  typedef struct packed {
    logic [TID_W-1:0] tid;
    logic             ace;      // 1-bit ACE-ness tag from the extended ISA
    logic [OPC_W-1:0] opc;
    logic [TAG_W-1:0] src1;
    logic             src1_rdy;
    logic [TAG_W-1:0] src2;
    logic             src2_rdy;
    logic [TAG_W-1:0] dst;
  } iq_inst_t;

  // Bits held per entry (valid bit excluded) and how many of them are ACE
  // for an un-ACE instruction.
  localparam int unsigned ENTRY_BITS = $bits(iq_inst_t);
  localparam int unsigned UNACE_BITS = OPC_W;

  // Dispatch control scheme.
  typedef enum logic {
    SCHEME_OPT2 = 1'b0,   // VISA issue + IPC/RQL allocation, FLUSH on L2 misses
    SCHEME_DVM  = 1'b1    // VISA issue + dynamic vulnerability management
  } scheme_e;

endpackage
