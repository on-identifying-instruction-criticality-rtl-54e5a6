// cpp_index: forms the CPHT index of an instruction. The PC, with the byte
// offset within an instruction dropped (PC_SHIFT bits), supplies IDX_W bits;
// depending on MODE it is combined by bitwise exclusive-or with the global
// critical path history, the branch history, or both. A history longer than
// IDX_W keeps its IDX_W newest bits; a shorter one is zero-extended, so it
// lands on the low index bits.
//
// Combinational. Which inputs form the index for each predictor type follows
// the design; the combining function (exclusive-or, as in gshare), the
// alignment of the histories and PC_SHIFT are this implementation's choices.
module cpp_index
  import cpp_pkg::*;
#(
  parameter idx_mode_e   MODE     = IDX_GCPH,
  parameter int unsigned IDX_W    = 11,
  parameter int unsigned GCPH_LEN = 8,
  parameter int unsigned BHR_LEN  = 8
) (
  input  logic [PC_W-1:0]     pc,
  input  logic [GCPH_LEN-1:0] gcph,
  input  logic [BHR_LEN-1:0]  bhist,
  output logic [IDX_W-1:0]    idx
);

  logic [IDX_W-1:0] pc_part, gcph_part, bhr_part;

  assign pc_part   = IDX_W'(pc >> PC_SHIFT);
  assign gcph_part = IDX_W'(gcph);
  assign bhr_part  = IDX_W'(bhist);

  always_comb begin
    unique case (MODE)
      IDX_PC:   idx = pc_part;
      IDX_GCPH: idx = pc_part ^ gcph_part;
      IDX_GBH:  idx = pc_part ^ bhr_part;
      IDX_BOTH: idx = pc_part ^ gcph_part ^ bhr_part;
      default:  idx = pc_part;
    endcase
  end

endmodule
