// bitmask_unit: restores an instruction from a dictionary entry and a mask.
//
// A bitmask codeword says that the instruction differs from a big-LUT entry
// only inside one MASK_W-bit group. The instruction is split into
// INSTR_W/MASK_W aligned groups numbered from the most significant end
// (position 0 is the top group). The unit shifts the mask value to its
// position and XORs it onto the entry. Shifting and the XOR follow the
// document (one 2-bit mask, aligned positions counted from the MSB as in its
// encoding example); the dictionary read happens in parallel, outside this
// unit. Purely combinational.
module bitmask_unit #(
  parameter int unsigned INSTR_W = 32,
  parameter int unsigned MASK_W  = 2,
  localparam int unsigned POS_W  = $clog2(INSTR_W / MASK_W)
) (
  input  logic [INSTR_W-1:0] dict_word,
  input  logic [POS_W-1:0]   mask_pos,
  input  logic [MASK_W-1:0]  mask_val,
  output logic [INSTR_W-1:0] instr
);

  logic [INSTR_W-1:0] shifted_mask;

  always_comb begin
    shifted_mask = {mask_val, {(INSTR_W-MASK_W){1'b0}}} >> (32'(mask_pos) * MASK_W);
    instr        = dict_word ^ shifted_mask;
  end

  initial begin
    assert (INSTR_W % MASK_W == 0 && (1 << POS_W) == INSTR_W / MASK_W)
      else $error("bitmask_unit: INSTR_W/MASK_W must be a power of two");
  end

endmodule
