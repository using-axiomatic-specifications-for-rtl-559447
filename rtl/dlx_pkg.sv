// dlx_pkg: shared widths, op-codes and types of the DLX subset processor.
//
// The processor executes the integer subset NOP, ADD, SLL, LW, SW, BNEZ, J and
// JR on 32-bit words. Instruction words use the three DLX formats:
//   R-type  op[31:26] rs1[25:21] rs2[20:16] rd[15:11] func[10:0]
//   I-type  op[31:26] rs1[25:21] rd[20:16]  imm16[15:0]
//   J-type  op[31:26] off26[25:0]
// The op-code and function-code values of NOP (R-type function 000000),
// ADD (function 100000), SLL (function 000100), LW (100011), SW (101011),
// BNEZ (000101) and JR (000011), the floating-point MULTF (op 000001,
// function 000010) and the unused R-type function codes 000001, 000101 and
// 001000..001111 are the ones of the specification this design follows.
// The field bit positions and the J op-code 000010 are those of the usual
// DLX instruction set and are this design's choice.
package dlx_pkg;

  localparam int unsigned XLEN = 32;   // data and address width (bits)
  localparam int unsigned NREG = 32;   // general purpose registers
  localparam int unsigned RIDX = 5;    // register index width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RIDX-1:0] ridx_t;

  // Major op-codes (bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'b000000;  // integer register-register
  localparam logic [5:0] OP_FTYPE = 6'b000001;  // floating-point register-register
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_JR    = 6'b000011;
  localparam logic [5:0] OP_BNEZ  = 6'b000101;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;

  // Function codes (bits 5:0 of an R-type word)
  localparam logic [5:0] FN_NOP   = 6'b000000;
  localparam logic [5:0] FN_SLL   = 6'b000100;
  localparam logic [5:0] FN_ADD   = 6'b100000;
  localparam logic [5:0] FF_MULTF = 6'b000010;  // in an op 000001 word

  // What the decoder makes of a word
  typedef enum logic [3:0] {
    I_NOP, I_ADD, I_SLL, I_LW, I_SW, I_BNEZ, I_J, I_JR, I_NONE
  } instr_e;

  // Label of a decoded word: normal, no associated instruction, or an
  // instruction whose behaviour is left to a later refinement.
  typedef enum logic [1:0] {
    LBL_OK, LBL_UNDEFINSTR, LBL_TBSL
  } label_e;

  // Why the execution unit stopped (the ERRORINFETCH state)
  typedef enum logic [2:0] {
    ERR_NONE,        // running
    ERR_UNDEFINSTR,  // op-code with no instruction
    ERR_TBSL,        // instruction not implemented in this refinement
    ERR_FETCH_OOM,   // PC outside the memory
    ERR_DATA_OOM     // LW/SW address outside the memory
  } err_e;

  typedef struct packed {
    logic [5:0]  op;
    ridx_t       rs1;
    ridx_t       rs2;     // R-type second source
    ridx_t       rd_r;    // R-type destination
    ridx_t       rd_i;    // I-type destination / SW data source
    logic [10:0] func;
    logic [15:0] imm16;
    logic [25:0] off26;
  } fields_t;

endpackage
