// tb_pi_alu: self-checking test of the regulator ALU.
// Applies random and corner operands to every operation and compares the
// result with a 64-bit integer model of the same arithmetic (saturation to
// 25 bits, gain products scaled by 1024, shift by 5, limiter to +/-32767).
module tb_pi_alu;
  import apf_pkg::*;

  alu_op_e op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  pi_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic longint sat25(longint v);
    if (v > 64'sd16777215) return 64'sd16777215;
    if (v < -64'sd16777216) return -64'sd16777216;
    return v;
  endfunction

  function automatic longint model(alu_op_e o, longint x, longint z);
    case (o)
      ALU_ADD:   return sat25(x + z);
      ALU_SUB:   return sat25(x - z);
      ALU_MUL:   return sat25(x * z);
      ALU_MULQ:  return sat25((x * z) >>> 10);
      ALU_SHR:   return x >>> 5;
      ALU_PASS:  return x;
      ALU_LIMIT: return (x > 32767) ? 32767 : ((x < -32767) ? -32767 : x);
      default:   return x;
    endcase
  endfunction

  task automatic check(alu_op_e o, longint x, longint z);
    longint exp;
    op = o; a = word_t'(x); b = word_t'(z);
    #1;
    exp = model(o, x, z);
    checks++;
    if (longint'(y) !== exp) begin
      failures++;
      $display("FAIL op=%s a=%0d b=%0d y=%0d exp=%0d", o.name(), x, z, y, exp);
    end
  endtask

  initial begin
    alu_op_e ops [7] = '{ALU_ADD, ALU_SUB, ALU_MUL, ALU_MULQ, ALU_SHR, ALU_PASS, ALU_LIMIT};
    longint corner [6] = '{0, 1, -1, 16777215, -16777216, 32768};
    foreach (ops[i]) begin
      foreach (corner[j]) foreach (corner[k]) check(ops[i], corner[j], corner[k]);
      repeat (200) begin
        longint x, z;
        x = longint'($signed($urandom_range(0, 32'h1FFFFFF) - 32'h1000000)) ;
        z = longint'($signed($urandom_range(0, 32'hFFFF)) - 32768);
        check(ops[i], x, z);
        x = longint'($signed($urandom_range(0, 32'hFFFF)) - 32768);
        check(ops[i], x, z);
      end
    end
    // Known values: 1000 * 20 = 20000; (2048 * 102) >> 10 = 204; -100 >>> 5 = -4.
    check(ALU_MUL, 1000, 20);
    check(ALU_MULQ, 2048, 102);
    check(ALU_SHR, -100, 0);
    if (model(ALU_MULQ, 2048, 102) != 204 || model(ALU_SHR, -100, 0) != -4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
