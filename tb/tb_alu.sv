// Self-checking test of the ALU: every operation on random and corner-case
// operands against a reference written with integer arithmetic, including
// signed saturation on overflow and the branch comparisons.
module tb_alu;
  import sensasip_pkg::*;
  alu_op_e op;
  logic [15:0] a, b, y;
  logic [4:0] sh;
  logic eq, gt;
  int checks = 0, failures = 0;

  alu #(.W(16)) dut (.op, .a, .b, .sh, .y, .eq, .gt);

  initial begin #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [15:0] sat(int v);
    if (v > 32767) return 16'h7fff;
    if (v < -32768) return 16'h8000;
    return 16'(v);
  endfunction

  function automatic logic [15:0] ref_y(alu_op_e o, logic [15:0] x, logic [15:0] z, int s);
    int sx = int'($signed(x)), sz = int'($signed(z));
    case (o)
      ALU_ADDS: return sat(sx + sz);
      ALU_ADDU: return 16'(int'(x) + int'(z));
      ALU_SUBS: return sat(sx - sz);
      ALU_SUBU: return 16'(int'(x) - int'(z));
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_SLL:  return 16'(int'(x) * (2 ** s));
      ALU_SRL:  return 16'(int'(x) / (2 ** s));
      ALU_SRA:  return 16'(int'($floor(real'(sx) / real'(2 ** s))));
      ALU_PASSB: return z;
      default:  return 16'h0;
    endcase
  endfunction

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h1234};
    for (int t = 0; t < 6000; t++) begin
      op = alu_op_e'($urandom_range(0, 10));
      if (t < 1000) begin a = corner[$urandom_range(0, 5)]; b = corner[$urandom_range(0, 5)]; end
      else begin a = 16'($urandom); b = 16'($urandom); end
      sh = 5'($urandom_range(0, 15));
      #1;
      checks++;
      if (y !== ref_y(op, a, b, int'(sh))) begin
        failures++;
        $display("FAIL op %s a %h b %h sh %0d y %h exp %h", op.name(), a, b, sh, y, ref_y(op, a, b, int'(sh)));
      end
      checks++;
      if (eq !== (a == b) || gt !== (int'($signed(a)) > int'($signed(b)))) begin
        failures++; $display("FAIL compare a %h b %h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
