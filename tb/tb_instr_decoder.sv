// tb_instr_decoder: checks the decoder's classification and field extraction.
//
// Every op-code with every low function code, plus random upper bits, is
// decoded; the expected instruction and label come from a table written out
// from the instruction set (op-codes 000010 J, 000011 JR, 000101 BNEZ,
// 100011 LW, 101011 SW; R-type functions 000000 NOP, 000100 SLL, 100000 ADD;
// R-type functions 000001, 000101, 001000-001111 undefined; all else TBSL).
module tb_instr_decoder;
  import dlx_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  word_t   instr;
  fields_t fields;
  instr_e  kind;
  label_e  label;
  int checks = 0, failures = 0;

  instr_decoder dut (.instr, .fields, .kind, .label);

  initial begin
    for (int op = 0; op < 64; op++) begin
      for (int fn = 0; fn < 64; fn++) begin
        instr_e exp_k;
        label_e exp_l;
        instr = {6'(op), 20'($urandom), 6'(fn)};
        #1;
        exp_k = I_NONE; exp_l = LBL_TBSL;
        if (op == 0) begin
          if (fn == 0)       begin exp_k = I_NOP; exp_l = LBL_OK; end
          else if (fn == 32) begin exp_k = I_ADD; exp_l = LBL_OK; end
          else if (fn == 4)  begin exp_k = I_SLL; exp_l = LBL_OK; end
          else if (fn == 1 || fn == 5 || (fn >= 8 && fn <= 15)) exp_l = LBL_UNDEFINSTR;
        end
        else if (op == 2)  begin exp_k = I_J;    exp_l = LBL_OK; end
        else if (op == 3)  begin exp_k = I_JR;   exp_l = LBL_OK; end
        else if (op == 5)  begin exp_k = I_BNEZ; exp_l = LBL_OK; end
        else if (op == 35) begin exp_k = I_LW;   exp_l = LBL_OK; end
        else if (op == 43) begin exp_k = I_SW;   exp_l = LBL_OK; end
        checks++;
        if (kind !== exp_k || label !== exp_l) begin
          failures++; $display("FAIL op %0d fn %0d: %s %s", op, fn, kind.name(), label.name());
        end
        checks++;
        if (fields.op !== instr[31:26] || fields.rs1 !== instr[25:21] ||
            fields.rs2 !== instr[20:16] || fields.rd_i !== instr[20:16] ||
            fields.rd_r !== instr[15:11] || fields.imm16 !== instr[15:0] ||
            fields.off26 !== instr[25:0] || fields.func !== instr[10:0]) begin
          failures++; $display("FAIL fields %h", instr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
