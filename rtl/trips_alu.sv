// trips_alu: the integer execution unit of one TRIPS execution node.
//
// Purely combinational. It computes the result of every integer instruction of
// the TRIPS ISA (arithmetic, logical, shift, extend and test instructions, in
// register-register G form and register-immediate I form) and of the
// miscellaneous instructions MOV, MOVI, GENS, GENU and APP. Test instructions
// return 0 or 1, which the node forwards as a predicate or as data. The
// instruction list follows the TRIPS ISA; opcode numbers, the 64-bit datapath,
// APP as (a << 16) | constant and division by zero returning all ones are
// this design's choices. Floating-point opcodes are recognised but not
// executed: for them `unimpl` is raised and the result is zero.
//
// Interface: op, a (left operand), b (right operand), imm (sign-extended
// immediate or constant from the instruction) -> res, unimpl.
module trips_alu
  import trips_pkg::*;
(
  input  opcode_e op,
  input  word_t   a,
  input  word_t   b,
  input  word_t   imm,
  output word_t   res,
  output logic    unimpl
);

  word_t  rhs;
  logic   imm_form;

  always_comb begin
    imm_form = (op_format(op) == FMT_I);
    rhs      = imm_form ? imm : b;
  end

  always_comb begin
    res    = '0;
    unimpl = 1'b0;
    unique case (op)
      OP_ADD,  OP_ADDI:  res = a + rhs;
      OP_SUB,  OP_SUBI:  res = a - rhs;
      OP_MUL,  OP_MULI:  res = a * rhs;
      OP_DIVS, OP_DIVSI: res = (rhs == '0) ? '1 : word_t'($signed(a) / $signed(rhs));
      OP_DIVU, OP_DIVUI: res = (rhs == '0) ? '1 : a / rhs;
      OP_AND,  OP_ANDI:  res = a & rhs;
      OP_OR,   OP_ORI:   res = a | rhs;
      OP_XOR,  OP_XORI:  res = a ^ rhs;
      OP_SLL,  OP_SLLI:  res = a << rhs[5:0];
      OP_SRL,  OP_SRLI:  res = a >> rhs[5:0];
      OP_SRA,  OP_SRAI:  res = word_t'($signed(a) >>> rhs[5:0]);
      OP_EXTSB: res = {{56{a[7]}},  a[7:0]};
      OP_EXTSH: res = {{48{a[15]}}, a[15:0]};
      OP_EXTSW: res = {{32{a[31]}}, a[31:0]};
      OP_EXTUB: res = {56'd0, a[7:0]};
      OP_EXTUH: res = {48'd0, a[15:0]};
      OP_EXTUW: res = {32'd0, a[31:0]};
      OP_TEQ,  OP_TEQI:  res = word_t'(a == rhs);
      OP_TLT,  OP_TLTI:  res = word_t'($signed(a) <  $signed(rhs));
      OP_TLE,  OP_TLEI:  res = word_t'($signed(a) <= $signed(rhs));
      OP_TLTU, OP_TLTUI: res = word_t'(a <  rhs);
      OP_TLEU, OP_TLEUI: res = word_t'(a <= rhs);
      OP_MOV:            res = a;
      OP_MOVI:           res = imm;
      OP_GENS, OP_GENU:  res = imm;
      OP_APP:            res = (a << 16) | {48'd0, imm[15:0]};
      OP_FADD, OP_FSUB, OP_FMUL, OP_FDIV, OP_FEQ, OP_FLT, OP_FLE,
      OP_FITOD, OP_FDTOI, OP_FSTOD, OP_FDTOS: unimpl = 1'b1;
      default:           res = '0;
    endcase
  end

endmodule
