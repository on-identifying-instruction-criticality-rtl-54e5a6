// cpp_pkg: types and constants shared by the criticality-steered integer
// cluster. It defines how the critical path history table (CPHT) index is
// formed (the four predictor types), the integer operation encoding, and the
// operation/result records that travel between the issue lanes and the
// functional units.
//
// The predictor types, the 2K-entry table, the 6-bit counters, the +8/-1
// training steps, the threshold of 8 and the 8-instruction criticality
// history are the configuration of the design this RTL follows. The opcode
// set, the 32-bit data width, the tag width and the 8-byte instruction
// spacing of the PC are choices of this implementation.
package cpp_pkg;

  // How the CPHT index is formed.
  //   IDX_PC   : PC only (per-address predictor)
  //   IDX_GCPH : PC combined with the global critical path history
  //   IDX_GBH  : PC combined with the global branch history
  //   IDX_BOTH : PC combined with both histories
  typedef enum logic [1:0] {
    IDX_PC   = 2'd0,
    IDX_GCPH = 2'd1,
    IDX_GBH  = 2'd2,
    IDX_BOTH = 2'd3
  } idx_mode_e;

  localparam int unsigned XLEN     = 32;  // integer data width
  localparam int unsigned PC_W     = 32;  // program counter width
  localparam int unsigned PC_SHIFT = 3;   // instructions are 8 bytes apart
  localparam int unsigned TAG_W    = 8;   // instruction tag width

  // Integer operations executed by both the fast and the slow units.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_NOR  = 4'd5,
    ALU_SLT  = 4'd6,
    ALU_SLTU = 4'd7,
    ALU_SLL  = 4'd8,
    ALU_SRL  = 4'd9,
    ALU_SRA  = 4'd10,
    ALU_LUI  = 4'd11
  } alu_op_e;

  // An integer instruction as it leaves the issue stage.
  typedef struct packed {
    alu_op_e           op;
    logic [XLEN-1:0]   a;
    logic [XLEN-1:0]   b;
    logic [TAG_W-1:0]  tag;
  } int_op_t;

  // A result as it leaves a functional unit.
  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [XLEN-1:0]   data;
  } int_res_t;

endpackage
