// instr_decoder: splits a DLX instruction word into fields and classifies it.
//
// The word's fields (op-code, register indices, function code, 16-bit and
// 26-bit immediates) are cut out at the DLX bit positions listed in dlx_pkg,
// and the word is labelled:
//   LBL_OK          an instruction this processor executes: NOP (R-type
//                   function 000000), ADD (function 100000), SLL (function
//                   000100), LW, SW, BNEZ, J and JR;
//   LBL_UNDEFINSTR  an R-type function code with no associated instruction,
//                   000001, 000101 and 001000..001111;
//   LBL_TBSL        any other word: the floating-point MULTF and every
//                   instruction outside this subset, whose behaviour is left
//                   to a later refinement.
// The NOP/ADD/SLL/LW/SW/BNEZ/JR codes, the UNDEFINSTR codes and MULTF being
// TBSL follow the specification. Only the low six bits of the 11-bit R-type
// function field are decoded, and the J op-code is 000010, as in the usual DLX
// encoding; labelling the remaining unknown codes TBSL rather than UNDEFINSTR
// is this design's choice (either label stops the processor).
//
// Purely combinational.
module instr_decoder
  import dlx_pkg::*;
(
  input  word_t   instr,
  output fields_t fields,
  output instr_e  kind,
  output label_e  label
);

  logic [5:0] fn;

  always_comb begin
    fields.op    = instr[31:26];
    fields.rs1   = instr[25:21];
    fields.rs2   = instr[20:16];
    fields.rd_i  = instr[20:16];
    fields.rd_r  = instr[15:11];
    fields.func  = instr[10:0];
    fields.imm16 = instr[15:0];
    fields.off26 = instr[25:0];
    fn           = instr[5:0];

    kind  = I_NONE;
    label = LBL_TBSL;
    unique case (instr[31:26])
      OP_RTYPE: begin
        if (fn == FN_NOP) begin
          kind = I_NOP; label = LBL_OK;
        end else if (fn == FN_ADD) begin
          kind = I_ADD; label = LBL_OK;
        end else if (fn == FN_SLL) begin
          kind = I_SLL; label = LBL_OK;
        end else if (fn == 6'b000001 || fn == 6'b000101 || fn[5:3] == 3'b001) begin
          label = LBL_UNDEFINSTR;
        end
      end
      OP_J:    begin kind = I_J;    label = LBL_OK; end
      OP_JR:   begin kind = I_JR;   label = LBL_OK; end
      OP_BNEZ: begin kind = I_BNEZ; label = LBL_OK; end
      OP_LW:   begin kind = I_LW;   label = LBL_OK; end
      OP_SW:   begin kind = I_SW;   label = LBL_OK; end
      OP_FTYPE: label = LBL_TBSL;  // MULTF and the other floating-point operations
      default:  label = LBL_TBSL;  // every other op-code
    endcase
  end

endmodule
