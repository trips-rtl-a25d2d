// tb_trips_alu: self-checking test of the integer ALU.
//
// Drives 4000 random operand pairs through every integer opcode plus directed
// corner cases (division by zero, signed division, shifts by 63, sign
// extension of negative values) and compares with an independent reference
// model written here with plain SystemVerilog operators. Also checks that
// floating-point opcodes raise `unimpl` and integer ones do not. The ALU is
// combinational; each vector is applied and checked after #1.
`timescale 1ns/1ps
module tb_trips_alu;
  import trips_pkg::*;

  opcode_e op;
  word_t   a, b, imm, res;
  logic    unimpl;
  int checks = 0, failures = 0;

  trips_alu dut (.*);

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic bit uses_imm(opcode_e o);
    case (o)
      OP_ADDI, OP_SUBI, OP_MULI, OP_DIVSI, OP_DIVUI, OP_ANDI, OP_ORI, OP_XORI,
      OP_SLLI, OP_SRLI, OP_SRAI, OP_TEQI, OP_TLTI, OP_TLEI, OP_TLTUI, OP_TLEUI: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic word_t model(opcode_e o, word_t x, word_t y, word_t k);
    word_t r;
    longint sx, sr;
    r = uses_imm(o) ? k : y;
    sx = x; sr = r;
    case (o)
      OP_ADD, OP_ADDI: return x + r;
      OP_SUB, OP_SUBI: return x - r;
      OP_MUL, OP_MULI: return x * r;
      OP_DIVS, OP_DIVSI: return r == 0 ? 64'hffff_ffff_ffff_ffff : word_t'(sx / sr);
      OP_DIVU, OP_DIVUI: return r == 0 ? 64'hffff_ffff_ffff_ffff : x / r;
      OP_AND, OP_ANDI: return x & r;
      OP_OR, OP_ORI: return x | r;
      OP_XOR, OP_XORI: return x ^ r;
      OP_SLL, OP_SLLI: return x << (r % 64);
      OP_SRL, OP_SRLI: return x >> (r % 64);
      OP_SRA, OP_SRAI: return word_t'(sx >>> (r % 64));
      OP_EXTSB: return word_t'(longint'(byte'(x[7:0])));
      OP_EXTSH: return word_t'(longint'(shortint'(x[15:0])));
      OP_EXTSW: return word_t'(longint'(int'(x[31:0])));
      OP_EXTUB: return x & 64'hff;
      OP_EXTUH: return x & 64'hffff;
      OP_EXTUW: return x & 64'hffff_ffff;
      OP_TEQ, OP_TEQI: return word_t'(x == r);
      OP_TLT, OP_TLTI: return word_t'(sx < sr);
      OP_TLE, OP_TLEI: return word_t'(sx <= sr);
      OP_TLTU, OP_TLTUI: return word_t'(x < r);
      OP_TLEU, OP_TLEUI: return word_t'(x <= r);
      OP_MOV: return x;
      OP_MOVI, OP_GENS, OP_GENU: return k;
      OP_APP: return (x << 16) | (k & 64'hffff);
      default: return 0;
    endcase
  endfunction

  opcode_e ops [$];
  task automatic apply(opcode_e o, word_t x, word_t y, word_t k);
    op = o; a = x; b = y; imm = k;
    #1;
    checks++;
    if (res !== model(o, x, y, k) || unimpl) begin
      failures++;
      $display("FAIL %s a=%h b=%h imm=%h res=%h exp=%h unimpl=%b", o.name(), x, y, k, res, model(o, x, y, k), unimpl);
    end
  endtask

  function automatic word_t rnd();
    case ($urandom % 4)
      0: return {$urandom, $urandom};
      1: return word_t'($urandom % 16);
      2: return {32'hffff_ffff, $urandom};
      default: return word_t'($urandom % 70);
    endcase
  endfunction

  initial begin
    for (int i = OP_ADD; i <= OP_TLEUI; i++) ops.push_back(opcode_e'(i));
    ops.push_back(OP_MOV); ops.push_back(OP_MOVI); ops.push_back(OP_GENS);
    ops.push_back(OP_GENU); ops.push_back(OP_APP);
    // directed corners
    apply(OP_DIVU, 64'd5, 64'd0, 0);
    apply(OP_DIVSI, 64'd5, 0, 64'd0);
    apply(OP_DIVS, -64'sd7, 64'd2, 0);
    apply(OP_SRA, 64'h8000_0000_0000_0000, 64'd63, 0);
    apply(OP_SLLI, 64'd1, 0, 64'd63);
    apply(OP_EXTSB, 64'h80, 0, 0);
    apply(OP_TLT, -64'sd1, 64'd0, 0);
    apply(OP_TLTU, -64'sd1, 64'd0, 0);
    apply(OP_APP, 64'h1234, 0, 64'hffff_ffff_ffff_5678);
    // random
    for (int i = 0; i < 4000; i++) apply(ops[$urandom % ops.size()], rnd(), rnd(), rnd());
    // floating point is reported as unimplemented
    for (int i = OP_FADD; i <= OP_FDTOS; i++) begin
      op = opcode_e'(i); a = 1; b = 2; imm = 0;
      #1;
      checks++;
      if (!unimpl) begin failures++; $display("FAIL %s should be unimplemented", op.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
